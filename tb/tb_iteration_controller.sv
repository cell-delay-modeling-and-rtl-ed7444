// tb_iteration_controller: self-checking test of the time-slot sequencer.
//
// Stands in for the planes: whenever a plane is active it answers with a random
// set of matches between still-unmatched inputs and outputs (sometimes a complete
// matching, so that the remaining planes must be skipped). A model follows the
// slot: phase sequence, which plane may run, the unmatched masks, the match
// records and the RAM read and transfer requests they produce, and the per-slot
// statistics (planes run, interruption). The slot length must be NUM_CLASSES + 3
// cycles.
module tb_iteration_controller;
  localparam int unsigned N = 4, NC = 5, DEPTH = 8;
  localparam int unsigned SLOT = NC + 3;

  logic clk = 0, rst_n = 0;
  logic slot_start;
  logic [2:0] phase;
  logic [NC-1:0] plane_active;
  logic [N-1:0] in_unmatched, out_unmatched;
  logic [NC-1:0][N-1:0] match_valid;
  logic [NC-1:0][N-1:0][1:0] match_out;
  logic [NC-1:0][N-1:0][2:0] match_addr;
  logic [N-1:0] rd_en;
  logic [N-1:0][2:0] rd_cls;
  logic [N-1:0][2:0] rd_addr;
  logic xfer_en;
  logic [N-1:0] xfer_valid;
  logic [N-1:0][1:0] xfer_dest;
  logic [2:0] iters_used;
  logic interrupted;
  int checks = 0, failures = 0;

  iteration_controller #(.N(N), .NUM_CLASSES(NC), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit unm_in [N], unm_out [N];
    int rec_out [N], rec_cls [N], rec_addr [N];
    int ph, iters, last_iters, n_int = 0, n_late = 0, prev_start = -1;
    bit skipped, last_int, all_m;
    int perm [N];
    match_valid = '0; match_out = '0; match_addr = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ph = 0; last_iters = 0; last_int = 0;
    for (int t = 0; t < SLOT * 1500; t++) begin
      // negedge: registered state settled
      if (ph == 0) begin
        foreach (unm_in[i]) begin unm_in[i] = 1; unm_out[i] = 1; rec_out[i] = -1; end
        iters = 0; skipped = 0;
      end
      check("phase", int'(phase) == ph);
      check("slot_start", slot_start == (ph == 0));
      if (slot_start) begin
        if (prev_start >= 0) check("slot length", t - prev_start == SLOT);
        prev_start = t;
      end
      if (ph != 0) begin
        for (int i = 0; i < N; i++) begin
          check("in_unmatched", in_unmatched[i] == unm_in[i]);
          check("out_unmatched", out_unmatched[i] == unm_out[i]);
        end
      end
      all_m = 1;
      foreach (unm_in[i]) if (unm_in[i] || unm_out[i]) all_m = 0;
      for (int c = 0; c < NC; c++)
        check("plane_active", plane_active[c] == (ph == c + 1 && !all_m));
      check("iters_used", int'(iters_used) == last_iters);
      check("interrupted", interrupted == last_int);
      // play the active plane: random matching among unmatched ports
      match_valid = '0;
      if (ph >= 1 && ph <= NC) begin
        int c;
        c = ph - 1;
        if (!all_m) iters++; else skipped = 1;
        match_out[c]  = (2*N)'($urandom);
        match_addr[c] = (3*N)'($urandom);
        if (!all_m) begin
          foreach (perm[k]) perm[k] = k;
          perm.shuffle();
          for (int i = 0; i < N; i++) begin
            // plane 0 often matches everything to exercise the interruption
            if (unm_in[i] && unm_out[perm[i]] &&
                ((c == 0 && (t / SLOT) % 3 == 0) || $urandom_range(2) == 0)) begin
              match_valid[c][i] = 1'b1;
              match_out[c][i]   = 2'(perm[i]);
              match_addr[c][i]  = 3'($urandom_range(DEPTH - 1));
            end
          end
        end
      end
      // transfer outputs
      for (int i = 0; i < N; i++) begin
        check("rd_en", rd_en[i] == (ph == NC + 1 && rec_out[i] >= 0));
        if (rec_out[i] >= 0 && ph >= NC + 1) begin
          check("rd_cls", int'(rd_cls[i]) == rec_cls[i]);
          check("rd_addr", int'(rd_addr[i]) == rec_addr[i]);
          check("xfer_valid", xfer_valid[i]);
          check("xfer_dest", int'(xfer_dest[i]) == rec_out[i]);
        end
      end
      check("xfer_en", xfer_en == (ph == NC + 2));
      @(posedge clk);
      // model update
      if (ph >= 1 && ph <= NC) begin
        for (int i = 0; i < N; i++)
          if (match_valid[ph - 1][i]) begin
            unm_in[i] = 0; unm_out[match_out[ph - 1][i]] = 0;
            rec_out[i] = match_out[ph - 1][i]; rec_cls[i] = ph - 1;
            rec_addr[i] = match_addr[ph - 1][i];
            if (ph > 1) n_late++;
          end
      end
      if (ph == NC + 1) begin
        last_iters = iters; last_int = skipped;
        if (skipped) n_int++;
      end
      ph = (ph + 1) % SLOT;
      @(negedge clk);
    end
    check("interruption seen", n_int > 0);
    check("matches in later planes seen", n_late > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
