// tb_input_port: self-checking test of one input with its discriminator and class RAMs.
//
// Provisions a set of virtual paths, then offers cells on random paths. A model
// keeps, per class, the cells stored and their RAM addresses (taken from the push
// outputs); it checks the class, destination and drop flags of every arrival and,
// reading stored cells back by class and address in random order, that the right
// cell comes out one clock later. Long runs of arrivals without reads fill the
// RAMs so that cells are dropped for lack of space.
module tb_input_port;
  import atm_pkg::*;
  localparam int unsigned N = 4, NC = 5, DEPTH = 4;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_valid = 0;
  logic [VPI_W-1:0] cfg_vpi = '0;
  logic [2:0] cfg_cls = '0, push_cls, rd_cls = '0;
  logic [1:0] cfg_dest = '0, push_dest;
  logic arrive = 0, in_valid = 0, push_en, drop_unknown, drop_full, rd_en = 0;
  logic [CELL_W-1:0] in_cell = '0, rd_cell;
  logic [1:0] push_addr, rd_addr = '0;
  logic [NC-1:0][2:0] occupancy;
  int checks = 0, failures = 0;

  typedef struct { bit valid; int cls; int dest; } ent_t;
  ent_t tbl [256];
  logic [CELL_W-1:0] stored [NC][int];   // class -> address -> cell

  input_port #(.N(N), .NUM_CLASSES(NC), .DEPTH(DEPTH)) dut (.*);

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
    int vpi, c, n_full = 0, n_unknown = 0, n_read = 0;
    int addrs [$];
    logic [CELL_W-1:0] exp_cell;
    bit reading;
    foreach (tbl[v]) tbl[v] = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 40; v++) begin
      @(negedge clk);
      cfg_we = 1; cfg_valid = 1; cfg_vpi = VPI_W'(v);
      cfg_cls = 3'(v % NC); cfg_dest = 2'((v / NC) % N);
      tbl[v] = '{1, v % NC, (v / NC) % N};
    end
    @(negedge clk) cfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      arrive   = (t % 2 == 0);
      in_valid = $urandom_range(3) != 0;
      vpi      = $urandom_range(47);   // paths 40..47 are not provisioned
      in_cell  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      in_cell[VPI_MSB -: VPI_W] = VPI_W'(vpi);
      // reads on odd cycles, rarely during the filling stretches
      reading = !arrive && (((t / 400) % 2 == 1) ? $urandom_range(1) == 1 : $urandom_range(9) == 0);
      rd_en = 0;
      if (reading) begin
        c = $urandom_range(NC - 1);
        if (stored[c].num() > 0) begin
          addrs.delete();
          foreach (stored[c][a]) addrs.push_back(a);
          addrs.shuffle();
          rd_en = 1; rd_cls = 3'(c); rd_addr = 2'(addrs[0]);
          exp_cell = stored[c][addrs[0]];
        end
      end
      #1;
      for (int k = 0; k < NC; k++) check("occupancy", int'(occupancy[k]) == stored[k].num());
      if (arrive && in_valid) begin
        c = tbl[vpi].cls;
        check("drop_unknown", drop_unknown == !tbl[vpi].valid);
        if (tbl[vpi].valid) begin
          check("drop_full", drop_full == (stored[c].num() == DEPTH));
          check("push_en", push_en == (stored[c].num() < DEPTH));
          check("push_cls", int'(push_cls) == c);
          check("push_dest", int'(push_dest) == tbl[vpi].dest);
          if (push_en) begin
            check("address is free", !stored[c].exists(int'(push_addr)));
            stored[c][int'(push_addr)] = in_cell;
          end
          if (drop_full) n_full++;
        end else n_unknown++;
      end else begin
        check("no push without arrival", !push_en && !drop_full && !drop_unknown);
      end
      @(posedge clk);
      #1;
      if (rd_en) begin
        check("read cell", rd_cell == exp_cell);
        stored[rd_cls].delete(int'(rd_addr));
        n_read++;
      end
    end
    check("overflow drops seen", n_full > 0);
    check("unknown-path drops seen", n_unknown > 0);
    check("reads seen", n_read > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
