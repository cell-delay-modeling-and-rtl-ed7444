// tb_irrm_mc_switch: end-to-end test of the switch at a reduced size (4 x 4,
// RAMs of 4 cells per class), driven by switch_harness with the mechanism mix:
// early-stopped iterations, contention, multiple grants, matches in lower planes,
// RAM overflow and unprovisioned paths. Every delivered cell, its timing (one slot
// after it is scheduled) and every status output are checked against the
// reference model.
module tb_irrm_mc_switch;
  import atm_pkg::*;
  localparam int unsigned N = 4, NC = 5, DEPTH = 4;

  logic clk = 0;
  logic rst_n, cfg_we, cfg_valid, slot_start, interrupted, done;
  logic [1:0] cfg_port, cfg_dest;
  logic [VPI_W-1:0] cfg_vpi;
  logic [2:0] cfg_cls, iters_used;
  logic [N-1:0] in_valid, out_valid, drop_unknown, drop_full;
  logic [N-1:0][CELL_W-1:0] in_cell, out_cell;
  logic [NC-1:0] contention, multi_grant;
  int checks, failures;

  irrm_mc_switch #(.N(N), .NUM_CLASSES(NC), .DEPTH(DEPTH)) dut (.*);
  switch_harness #(.N(N), .NC(NC), .DEPTH(DEPTH), .SLOTS(800), .LOAD(90), .SCEN(0)) h (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
