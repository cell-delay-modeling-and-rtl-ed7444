// tb_workload_bernoulli: the switch at its default size (16 x 16, five classes, 64-cell
// RAMs) under Bernoulli arrivals at 80 % load, uniformly spread over the outputs, class mix 40/20/20/10/10 % (CBR, rtVBR, nrtVBR, ABR, UBR).
// Every cell is checked against the reference model of switch_harness; the
// average queueing delay of each class is printed and must not decrease from one
// class to the next lower-priority one.
module tb_workload_bernoulli;
  import atm_pkg::*;
  localparam int unsigned N = 16, NC = 5, DEPTH = 64;

  logic clk = 0;
  logic rst_n, cfg_we, cfg_valid, slot_start, interrupted, done;
  logic [3:0] cfg_port, cfg_dest;
  logic [VPI_W-1:0] cfg_vpi;
  logic [2:0] cfg_cls, iters_used;
  logic [N-1:0] in_valid, out_valid, drop_unknown, drop_full;
  logic [N-1:0][CELL_W-1:0] in_cell, out_cell;
  logic [NC-1:0] contention, multi_grant;
  int checks, failures;

  irrm_mc_switch dut (.*);
  switch_harness #(.N(N), .NC(NC), .DEPTH(DEPTH), .SLOTS(3000), .LOAD(80), .SCEN(1), .BURST_L(10)) h (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1 wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
