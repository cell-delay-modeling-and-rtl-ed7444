// switch_harness: traffic source, reference model and checker for irrm_mc_switch.
//
// The harness resets the switch, provisions every input's connection table (VPI
// c*N + o carries class c to output o; the highest VPI is left unprovisioned) and
// then offers one cell per input per time slot. A reference model, written from the
// scheduling rules and independent of the RTL, keeps each input's per-class
// queues in arrival order and the round-robin pointers of every plane. For every
// slot it predicts the dropped cells, which cell each output delivers one slot
// later, how many planes ran, whether the iterations stopped early and each plane's
// contention and multiple-grant flags; all of these are compared with the switch.
//
// Traffic (SCEN):
//   0  mechanism mix: a stretch of CBR permutation traffic (every port matched by
//      the first plane, so the iterations stop early), a stretch of random
//      Bernoulli traffic at LOAD percent with the class mix 40/20/20/10/10 %, a
//      stretch in which every input floods output 0 (RAM overflow), and a few cells
//      on an unprovisioned path throughout. Each mechanism must occur.
//   1  Bernoulli arrivals at LOAD percent, uniform destinations, class mix as above.
//   2  on-off arrivals at LOAD percent, geometric bursts of mean length BURST_L
//      cells to one destination and class, class mix as above.
// After SLOTS slots of traffic the switch is drained; every accepted cell must
// leave. The average queueing delay per class, in slots, is printed.
module switch_harness
  import atm_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned NC      = 5,
  parameter int unsigned DEPTH   = 4,
  parameter int unsigned SLOTS   = 400,
  parameter int unsigned LOAD    = 80,
  parameter int unsigned SCEN    = 0,
  parameter int unsigned BURST_L = 10
) (
  input  logic                              clk,
  output logic                              rst_n,
  output logic                              cfg_we,
  output logic [$clog2(N)-1:0]              cfg_port,
  output logic [VPI_W-1:0]                  cfg_vpi,
  output logic                              cfg_valid,
  output logic [$clog2(NC)-1:0]             cfg_cls,
  output logic [$clog2(N)-1:0]              cfg_dest,
  input  logic                              slot_start,
  output logic [N-1:0]                      in_valid,
  output logic [N-1:0][CELL_W-1:0]          in_cell,
  input  logic [N-1:0]                      out_valid,
  input  logic [N-1:0][CELL_W-1:0]          out_cell,
  input  logic [N-1:0]                      drop_unknown,
  input  logic [N-1:0]                      drop_full,
  input  logic [$clog2(NC+1)-1:0]           iters_used,
  input  logic                              interrupted,
  input  logic [NC-1:0]                     contention,
  input  logic [NC-1:0]                     multi_grant,
  output logic                              done,
  output int                                checks,
  output int                                failures
);
  localparam int unsigned UNKNOWN_VPI = 255;

  typedef struct { int dest; logic [CELL_W-1:0] data; int slot; } qcell_t;
  qcell_t q [N][NC][$];
  int A [NC][N];     // accept pointers
  int C [NC][N];     // grant pointers

  // predictions for the coming slot boundary
  bit                exp_valid [N];
  logic [CELL_W-1:0] exp_cell [N];
  int                exp_iters;
  bit                exp_int;
  bit                exp_cont [NC];
  bit                exp_multi [NC];

  // statistics
  longint delay_sum [NC];
  int     delay_cnt [NC];
  int     n_interrupt, n_contention, n_multi, n_late, n_blocked, n_drop_full, n_drop_unknown;
  int     n_in, n_out;

  // on-off source state
  bit on_q [N];
  int burst_dest [N], burst_cls [N];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int pick_class();
    int r;
    r = $urandom_range(99);
    if (r < 40) return 0;
    if (r < 60) return 1 % NC;
    if (r < 80) return 2 % NC;
    if (r < 90) return 3 % NC;
    return 4 % NC;
  endfunction

  function automatic bit chance(real prob);
    return (real'($urandom) / 4294967296.0) < prob;
  endfunction

  function automatic logic [CELL_W-1:0] make_cell(int vpi, int serial);
    logic [CELL_W-1:0] c;
    for (int w = 0; w < (CELL_W + 31) / 32; w++) c[w * 32 +: 32] = $urandom;
    c[VPI_MSB -: VPI_W] = VPI_W'(vpi);
    c[VPI_LSB - 1 -: 16] = 16'(serial);  // VCI carries a serial number
    return c;
  endfunction

  // One time slot of the reference scheduler, run after the arrivals are queued.
  task automatic schedule(int slot);
    bit unm_in [N], unm_out [N], all_m;
    bit req [N][N];
    int gnt [N], acc [N], cnt, pos, p;
    foreach (unm_in[i]) begin unm_in[i] = 1; unm_out[i] = 1; exp_valid[i] = 0; end
    exp_iters = 0; exp_int = 0;
    for (int c = 0; c < NC; c++) begin
      exp_cont[c] = 0; exp_multi[c] = 0;
      all_m = 1;
      for (int k = 0; k < N; k++) if (unm_in[k] || unm_out[k]) all_m = 0;
      if (all_m) begin exp_int = 1; continue; end
      exp_iters++;
      // request
      for (int i = 0; i < N; i++)
        for (int o = 0; o < N; o++) req[i][o] = 0;
      for (int i = 0; i < N; i++)
        foreach (q[i][c][e]) begin
          if (unm_in[i] && unm_out[q[i][c][e].dest]) req[i][q[i][c][e].dest] = 1;
          else if (unm_in[i] && c > 0) n_blocked++;   // output already taken by a higher class
        end
      // grant
      for (int o = 0; o < N; o++) begin
        gnt[o] = -1; cnt = 0;
        for (int k = 0; k < N; k++) begin
          p = (C[c][o] + k) % N;
          if (req[p][o]) begin cnt++; if (gnt[o] < 0) gnt[o] = p; end
        end
        if (cnt > 1) exp_cont[c] = 1;
      end
      // accept
      for (int i = 0; i < N; i++) begin
        acc[i] = -1; cnt = 0;
        for (int k = 0; k < N; k++) begin
          p = (A[c][i] + k) % N;
          if (gnt[p] == i) begin cnt++; if (acc[i] < 0) acc[i] = p; end
        end
        if (cnt > 1) exp_multi[c] = 1;
      end
      for (int o = 0; o < N; o++)
        if (gnt[o] >= 0 && acc[gnt[o]] == o) C[c][o] = (gnt[o] + 1) % N;
      for (int i = 0; i < N; i++) begin
        if (acc[i] < 0) continue;
        A[c][i] = (acc[i] + 1) % N;
        pos = -1;
        foreach (q[i][c][e]) if (pos < 0 && q[i][c][e].dest == acc[i]) pos = e;
        exp_valid[acc[i]] = 1;
        exp_cell[acc[i]]  = q[i][c][pos].data;
        delay_sum[c] += slot - q[i][c][pos].slot;
        delay_cnt[c]++;
        q[i][c].delete(pos);
        unm_in[i] = 0; unm_out[acc[i]] = 0;
        if (c > 0) n_late++;
      end
      n_contention += exp_cont[c];
      n_multi      += exp_multi[c];
    end
    n_interrupt += exp_int;
  endtask

  function automatic int queued();
    int n;
    n = 0;
    for (int i = 0; i < N; i++) for (int c = 0; c < NC; c++) n += q[i][c].size();
    return n;
  endfunction

  initial begin
    int slot, serial, vpi, cls, dst, drain, stage;
    int arr_vpi [N];
    real p_on, p_off;
    checks = 0; failures = 0; done = 0;
    rst_n = 0; cfg_we = 0; cfg_port = '0; cfg_vpi = '0; cfg_valid = 0; cfg_cls = '0; cfg_dest = '0;
    in_valid = '0; in_cell = '0;
    for (int c = 0; c < NC; c++) begin
      delay_sum[c] = 0; delay_cnt[c] = 0; exp_cont[c] = 0; exp_multi[c] = 0;
      for (int k = 0; k < N; k++) begin A[c][k] = 0; C[c][k] = 0; end
    end
    foreach (exp_valid[k]) begin exp_valid[k] = 0; on_q[k] = 0; end
    exp_iters = NC; exp_int = 0;   // slots without cells run every plane
    n_interrupt = 0; n_contention = 0; n_multi = 0; n_late = 0; n_blocked = 0;
    n_drop_full = 0; n_drop_unknown = 0; n_in = 0; n_out = 0;
    p_off = 1.0 / real'(BURST_L);
    p_on  = real'(LOAD) / (real'(BURST_L) * real'(100 - LOAD));
    repeat (4) @(negedge clk);
    rst_n = 1;
    // provision the connection tables
    for (int i = 0; i < N; i++)
      for (int c = 0; c < NC; c++)
        for (int o = 0; o < N; o++) begin
          @(negedge clk);
          cfg_we = 1; cfg_port = ($clog2(N))'(i); cfg_vpi = VPI_W'(c * N + o);
          cfg_valid = 1; cfg_cls = ($clog2(NC))'(c); cfg_dest = ($clog2(N))'(o);
        end
    @(negedge clk) cfg_we = 0;
    while (!slot_start) @(negedge clk);
    // nothing was offered so far: the first boundary delivers nothing
    slot = 0; serial = 0; drain = 0;
    forever begin
      // ---- phase 0 of a slot (we are just after the falling edge) ----
      for (int o = 0; o < N; o++) begin
        check("out_valid", out_valid[o] == exp_valid[o]);
        if (exp_valid[o] && out_valid[o]) check("out_cell", out_cell[o] == exp_cell[o]);
        n_out += out_valid[o];
      end
      check("iters_used", int'(iters_used) == exp_iters);
      check("interrupted", interrupted == exp_int);
      if (drain > 0 && queued() == 0) break;
      if (slot >= SLOTS) drain++;
      check("drain ends", drain < N * NC * DEPTH + 10);
      // arrivals
      stage = (SCEN == 0) ? (4 * slot) / SLOTS : 1;
      for (int i = 0; i < N; i++) begin
        in_valid[i] = 0; arr_vpi[i] = -1;
        if (slot >= SLOTS) continue;
        if (SCEN == 2) begin
          if (!on_q[i] && chance(p_on)) begin
            on_q[i] = 1; burst_dest[i] = $urandom_range(N - 1); burst_cls[i] = pick_class();
          end
          if (on_q[i]) begin
            in_valid[i] = 1; cls = burst_cls[i]; dst = burst_dest[i];
            if (chance(p_off)) on_q[i] = 0;
          end
        end else if (stage == 0) begin
          in_valid[i] = 1; cls = 0; dst = (i + slot) % N;          // permutation, CBR
        end else if (stage == 2) begin
          in_valid[i] = 1; cls = NC - 1; dst = 0;                  // every input floods output 0
        end else begin
          in_valid[i] = $urandom_range(99) < LOAD;
          cls = pick_class(); dst = $urandom_range(N - 1);
        end
        if (!in_valid[i]) continue;
        vpi = cls * N + dst;
        if (SCEN == 0 && $urandom_range(49) == 0) vpi = UNKNOWN_VPI;
        arr_vpi[i] = vpi;
        in_cell[i] = make_cell(vpi, serial++);
      end
      #1;
      for (int i = 0; i < N; i++) begin
        if (arr_vpi[i] < 0) begin
          check("no drop without arrival", !drop_unknown[i] && !drop_full[i]);
          continue;
        end
        n_in++;
        if (arr_vpi[i] == UNKNOWN_VPI) begin
          check("drop_unknown", drop_unknown[i] && !drop_full[i]);
          n_drop_unknown++;
          continue;
        end
        cls = arr_vpi[i] / N; dst = arr_vpi[i] % N;
        check("drop_unknown clear", !drop_unknown[i]);
        if (q[i][cls].size() == DEPTH) begin
          check("drop_full", drop_full[i]);
          n_drop_full++;
        end else begin
          check("drop_full clear", !drop_full[i]);
          q[i][cls].push_back('{dest: dst, data: in_cell[i], slot: slot});
        end
      end
      schedule(slot);
      // ---- phases 1 .. NC+2 ----
      for (int ph = 1; ph < NC + 3; ph++) begin
        @(negedge clk);
        in_valid = '0;
        check("slot_start only in phase 0", !slot_start);
        check("no output inside a slot", out_valid == '0);
        if (ph <= NC) begin
          check("contention", contention[ph - 1] == exp_cont[ph - 1]);
          check("multi_grant", multi_grant[ph - 1] == exp_multi[ph - 1]);
        end
      end
      @(negedge clk);
      check("slot length", slot_start);
      slot++;
    end
    $display("load %0d %%, traffic %0d: slots %0d, cells offered %0d, delivered %0d, dropped full %0d, dropped unknown %0d",
             LOAD, SCEN, slot, n_in, n_out, n_drop_full, n_drop_unknown);
    check("every accepted cell delivered", n_out == n_in - n_drop_full - n_drop_unknown);
    $display("events: interrupted slots %0d, contention %0d, multiple grants %0d, matches in planes 2.. %0d, cells held back by a higher class %0d",
             n_interrupt, n_contention, n_multi, n_late, n_blocked);
    for (int c = 0; c < NC; c++)
      if (delay_cnt[c] > 0)
        $display("class %0d: %0d cells, average delay %0.2f slots", c, delay_cnt[c],
                 real'(delay_sum[c]) / real'(delay_cnt[c]));
    if (SCEN != 0) begin
      // Strict priority: a class never waits less, on average, than the one above it.
      for (int c = 1; c < NC; c++)
        if (delay_cnt[c] > 0 && delay_cnt[c - 1] > 0)
          check("delay grows with lower priority",
                real'(delay_sum[c]) / real'(delay_cnt[c]) >= real'(delay_sum[c - 1]) / real'(delay_cnt[c - 1]));
    end
    if (SCEN == 1) begin
      // Priority-queue estimate of the mean wait for Bernoulli arrivals at load p with
      // cumulative class shares s(h): 1 / ((1 - p s(h-1)) (1 - p s(h))) - 1 slots.
      real p, s_prev, s_cur, share [5];
      share = '{0.4, 0.2, 0.2, 0.1, 0.1};
      p = real'(LOAD) / 100.0; s_prev = 0.0; s_cur = 0.0;
      for (int c = 0; c < NC && c < 5; c++) begin
        s_cur += share[c];
        $display("class %0d: queueing estimate %0.2f slots", c,
                 1.0 / ((1.0 - p * s_prev) * (1.0 - p * s_cur)) - 1.0);
        s_prev = s_cur;
      end
    end
    if (SCEN == 0) begin
      check("iterations interrupted at least once", n_interrupt > 0);
      check("output contention at least once", n_contention > 0);
      check("several grants at one input at least once", n_multi > 0);
      check("match in a lower-priority plane at least once", n_late > 0);
      check("cell held back by a higher class at least once", n_blocked > 0);
      check("RAM overflow at least once", n_drop_full > 0);
      check("unknown path at least once", n_drop_unknown > 0);
    end
    done = 1;
  end
endmodule
