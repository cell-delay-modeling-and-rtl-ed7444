// tb_switch_fabric: self-checking test of the nonblocking crossbar.
//
// Each transfer uses a random partial permutation of inputs to outputs with random
// cells. Every output must show the cell of the one input aimed at it exactly one
// clock after xfer_en, outputs nobody aimed at must stay invalid, and no output
// may be valid outside that cycle.
module tb_switch_fabric;
  localparam int unsigned N = 16, CELL_W = 424;

  logic clk = 0, rst_n = 0, xfer_en = 0;
  logic [N-1:0] in_valid = '0, out_valid;
  logic [N-1:0][3:0] in_dest = '0;
  logic [N-1:0][CELL_W-1:0] in_cell = '0, out_cell;
  int checks = 0, failures = 0;

  switch_fabric #(.N(N), .CELL_W(CELL_W)) dut (.*);

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
    int perm [N];
    int src [N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      foreach (perm[k]) perm[k] = k;
      perm.shuffle();
      foreach (src[o]) src[o] = -1;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = $urandom_range(3) != 0;
        in_dest[i]  = 4'(perm[i]);
        in_cell[i]  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                       $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        if (in_valid[i]) src[perm[i]] = i;
      end
      xfer_en = (t % 3 == 0);
      @(negedge clk);
      for (int o = 0; o < N; o++) begin
        if (xfer_en) begin
          check("out_valid", out_valid[o] == (src[o] >= 0));
          if (src[o] >= 0) check("out_cell", out_cell[o] == in_cell[src[o]]);
        end else begin
          check("idle output", out_valid[o] == 1'b0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
