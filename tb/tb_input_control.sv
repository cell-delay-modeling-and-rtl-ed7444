// tb_input_control: self-checking test of the request and accept phases of one input.
//
// Random queue contents, unmatched masks, activity and grants are applied each
// cycle. The expected requests (queued AND output unmatched, only while active
// and unmatched) and the expected acceptance (first granted output at or after
// pointer A, going round) are computed by a model, which also moves its own copy
// of A to one beyond each accepted output.
module tb_input_control;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  logic active = 0, in_unmatched = 0;
  logic [N-1:0] out_unmatched = '0, hq_req = '0, grant = '0, req;
  logic accept_valid;
  logic [2:0] accept_idx, ptr;
  int checks = 0, failures = 0;

  input_control #(.N(N)) dut (.*);

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
    int a = 0, exp_idx, n_multi = 0, n_wrap = 0;
    logic [N-1:0] exp_req, g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      active        = $urandom_range(7) != 0;
      in_unmatched  = $urandom_range(7) != 0;
      out_unmatched = N'($urandom);
      hq_req        = N'($urandom);
      // outputs only grant what was requested, but stray grants must be ignored too
      grant         = N'($urandom) & (($urandom_range(7) == 0) ? '1 : (hq_req & out_unmatched));
      #1;
      exp_req = (active && in_unmatched) ? (hq_req & out_unmatched) : '0;
      check("req", req == exp_req);
      check("ptr", int'(ptr) == a);
      g = grant & exp_req;
      exp_idx = -1;
      for (int k = 0; k < N; k++) if (exp_idx < 0 && g[(a + k) % N]) exp_idx = (a + k) % N;
      check("accept_valid", accept_valid == (exp_idx >= 0));
      if (exp_idx >= 0) check("accept_idx", int'(accept_idx) == exp_idx);
      if ($countones(g) > 1) n_multi++;
      if (exp_idx >= 0 && exp_idx < a) n_wrap++;
      @(posedge clk);
      if (exp_idx >= 0) a = (exp_idx + 1) % N;
    end
    check("several grants seen", n_multi > 0);
    check("pointer wrap-around seen", n_wrap > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
