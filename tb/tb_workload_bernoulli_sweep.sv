// tb_workload_bernoulli_sweep: the switch at its default size (16 x 16, five
// classes, 64-cell RAMs) under Bernoulli arrivals at 40 %, 70 % and 95 % load,
// class mix 40/20/20/10/10 %, one switch per load running side by side. Every cell
// is checked against the reference model of switch_harness; each run prints the
// average delay per class next to the priority-queue estimate, and the delay must
// not decrease from one class to the next lower-priority one.
module tb_workload_bernoulli_sweep;
  import atm_pkg::*;
  localparam int unsigned N = 16, NC = 5, DEPTH = 64, RUNS = 3;
  localparam int unsigned LOADS [RUNS] = '{40, 70, 95};

  logic clk = 0;
  logic [RUNS-1:0] done;
  int checks [RUNS], failures [RUNS];

  for (genvar r = 0; r < RUNS; r++) begin : g_run
    logic rst_n, cfg_we, cfg_valid, slot_start, interrupted;
    logic [3:0] cfg_port, cfg_dest;
    logic [VPI_W-1:0] cfg_vpi;
    logic [2:0] cfg_cls, iters_used;
    logic [N-1:0] in_valid, out_valid, drop_unknown, drop_full;
    logic [N-1:0][CELL_W-1:0] in_cell, out_cell;
    logic [NC-1:0] contention, multi_grant;

    irrm_mc_switch dut (.*);
    switch_harness #(.N(N), .NC(NC), .DEPTH(DEPTH), .SLOTS(2000), .LOAD(LOADS[r]), .SCEN(1)) h (
      .*, .done(done[r]), .checks(checks[r]), .failures(failures[r]));
  end

  always #5 clk = ~clk;

  function automatic int total(int v [RUNS]);
    int s;
    s = 0;
    foreach (v[r]) s += v[r];
    return s;
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures) + 1);
    $finish;
  end

  initial begin
    #1 wait (done === '1);
    $display("TB_RESULT checks=%0d failures=%0d", total(checks), total(failures));
    $finish;
  end
endmodule
