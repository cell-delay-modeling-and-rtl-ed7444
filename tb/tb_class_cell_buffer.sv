// tb_class_cell_buffer: self-checking test of one class RAM with free-list allocation.
//
// Random writes and reads against a model that knows which locations are used and
// what each holds. Checks that a write gets the lowest free address, that a read
// returns the stored cell one clock later, that freed locations are reused, that
// the occupancy count is right and that a full RAM refuses further cells.
module tb_class_cell_buffer;
  localparam int unsigned DEPTH = 8, CELL_W = 424;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full;
  logic [CELL_W-1:0] wr_data = '0, rd_data;
  logic [2:0] wr_addr, rd_addr = '0;
  logic [3:0] count;
  int checks = 0, failures = 0;

  bit used [DEPTH];
  logic [CELL_W-1:0] store [DEPTH];

  class_cell_buffer #(.DEPTH(DEPTH), .CELL_W(CELL_W)) dut (.*);

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

  function automatic logic [CELL_W-1:0] rnd_cell();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
            $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    int n_full = 0, n_used;
    int lowest, pick;
    bit expect_read;
    logic [CELL_W-1:0] expect_data;
    foreach (used[i]) used[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // model expectations before the edge
      lowest = -1; n_used = 0;
      for (int i = DEPTH - 1; i >= 0; i--) if (!used[i]) lowest = i;
      foreach (used[i]) n_used += used[i];
      check("full", full == (lowest < 0));
      check("count", int'(count) == n_used);
      if (lowest >= 0) check("lowest free address", int'(wr_addr) == lowest);
      if (lowest < 0) n_full++;
      // choose operations; phases bias towards filling then emptying
      wr_en = ((t / 200) % 2 == 0) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      wr_data = rnd_cell();
      rd_en = 0;
      pick = -1;
      if ($urandom_range(1) == 1 && n_used > 0) begin
        do pick = $urandom_range(DEPTH - 1); while (!used[pick]);
        rd_en = 1; rd_addr = 3'(pick);
      end
      expect_read = rd_en;
      if (rd_en) expect_data = store[pick];
      @(posedge clk);
      if (rd_en) used[pick] = 0;
      if (wr_en && lowest >= 0) begin used[lowest] = 1; store[lowest] = wr_data; end
      #1;
      if (expect_read) check("read data", rd_data == expect_data);
    end
    check("RAM was seen full", n_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
