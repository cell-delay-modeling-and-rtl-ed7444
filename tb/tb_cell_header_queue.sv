// tb_cell_header_queue: self-checking test of a plane's cell header queue.
//
// Random pushes and pops (pop = remove the oldest entry for a chosen output)
// against a model kept as a plain queue in arrival order. Checks the request
// vector, the address returned for a pop, whether the pop found an entry, the
// count and the full flag; pushes and pops are also made in the same cycle,
// including on a full queue.
module tb_cell_header_queue;
  localparam int unsigned N = 4, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic push_en = 0, pop_en = 0, pop_hit, full;
  logic [1:0] push_dest = '0, pop_dest = '0;
  logic [2:0] push_addr = '0, pop_addr;
  logic [N-1:0] req;
  logic [3:0] count;
  int checks = 0, failures = 0;

  typedef struct { int dest; int addr; } ent_t;
  ent_t model [$];

  cell_header_queue #(.N(N), .DEPTH(DEPTH)) dut (.*);

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
    int hit_idx, n_full = 0, n_both = 0, n_mid = 0;
    logic [N-1:0] exp_req;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      push_en   = ((t / 300) % 2 == 0) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      push_dest = 2'($urandom_range(N - 1));
      push_addr = 3'($urandom_range(DEPTH - 1));
      pop_en    = $urandom_range(1);
      pop_dest  = 2'($urandom_range(N - 1));
      #1;
      exp_req = '0;
      foreach (model[e]) exp_req[model[e].dest] = 1'b1;
      check("req", req == exp_req);
      check("count", int'(count) == model.size());
      check("full", full == (model.size() == DEPTH));
      hit_idx = -1;
      foreach (model[e]) if (hit_idx < 0 && model[e].dest == int'(pop_dest)) hit_idx = e;
      check("pop_hit", pop_hit == (hit_idx >= 0));
      if (hit_idx >= 0) check("pop_addr", int'(pop_addr) == model[hit_idx].addr);
      if (model.size() == DEPTH) n_full++;
      @(posedge clk);
      if (pop_en && hit_idx >= 0) begin
        if (hit_idx > 0 && hit_idx < model.size() - 1) n_mid++;
        model.delete(hit_idx);
      end
      if (push_en && model.size() < DEPTH) begin
        if (pop_en && hit_idx >= 0) n_both++;
        model.push_back('{int'(push_dest), int'(push_addr)});
      end
    end
    check("queue was seen full", n_full > 0);
    check("push and pop in one cycle", n_both > 0);
    check("removal from the middle", n_mid > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
