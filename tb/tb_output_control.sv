// tb_output_control: self-checking test of the grant phase of one output.
//
// Random requests, activity and acceptance each cycle. A model grants the first
// requesting input at or after pointer C, going round, and moves C to one beyond
// the granted input only when the grant was accepted.
module tb_output_control;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  logic active = 0, out_unmatched = 0, accepted = 0;
  logic [N-1:0] req = '0;
  logic grant_valid;
  logic [2:0] grant_idx, ptr;
  int checks = 0, failures = 0;

  output_control #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int c = 0, exp_idx, n_refused = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      active        = $urandom_range(7) != 0;
      out_unmatched = $urandom_range(7) != 0;
      req           = N'($urandom);
      accepted      = $urandom_range(1);
      #1;
      exp_idx = -1;
      if (active && out_unmatched)
        for (int k = 0; k < N; k++) if (exp_idx < 0 && req[(c + k) % N]) exp_idx = (c + k) % N;
      check("ptr", int'(ptr) == c);
      check("grant_valid", grant_valid == (exp_idx >= 0));
      if (exp_idx >= 0) check("grant_idx", int'(grant_idx) == exp_idx);
      if (exp_idx >= 0 && !accepted) n_refused++;
      @(posedge clk);
      if (exp_idx >= 0 && accepted) c = (exp_idx + 1) % N;
    end
    check("refused grant seen", n_refused > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
