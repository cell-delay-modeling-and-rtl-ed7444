// iteration_controller: time-slot sequencer of the IRRM-MC scheduler.
//
// A time slot lasts SLOT_CYCLES = NUM_CLASSES + 3 clock cycles, counted by 'phase':
//   phase 0               arrival: the input ports store the cells that arrive in
//                         this slot; the unmatched masks are set to all ones and the
//                         match records are cleared.
//   phase 1 .. NUM_CLASSES iteration j runs in plane j-1: plane 0 (CBR) first, the
//                         lowest-priority plane last. Each plane sees only the
//                         inputs and outputs the planes before it left unmatched;
//                         its matches clear those bits and are recorded per input
//                         (output, class, RAM address). As soon as every input and
//                         every output is matched no further plane is started
//                         (the iteration process is interrupted).
//   phase NUM_CLASSES+1   read: every matched input reads its cell from the RAM of
//                         the matched class (rd_en, rd_cls, rd_addr).
//   phase NUM_CLASSES+2   transfer: the cells, now at the RAM outputs, cross the
//                         fabric (xfer_en with xfer_valid/xfer_dest per input) and
//                         are registered at the output ports, where they appear in
//                         phase 0 of the next slot.
// iters_used and interrupted describe the last finished slot's scheduling.
//
// Running the planes in priority order, passing the unmatched inputs and outputs
// on and stopping once all are matched follow the IRRM-MC scheduler; the cycle
// budget of the slot and the read/transfer phases are this implementation's.
module iteration_controller #(
  parameter int unsigned N           = 16,
  parameter int unsigned NUM_CLASSES = 5,
  parameter int unsigned DEPTH       = 64
) (
  input  logic                                          clk,
  input  logic                                          rst_n,
  output logic                                          slot_start,
  output logic [$clog2(NUM_CLASSES+3)-1:0]              phase,
  // planes
  output logic [NUM_CLASSES-1:0]                        plane_active,
  output logic [N-1:0]                                  in_unmatched,
  output logic [N-1:0]                                  out_unmatched,
  input  logic [NUM_CLASSES-1:0][N-1:0]                 match_valid,
  input  logic [NUM_CLASSES-1:0][N-1:0][$clog2(N)-1:0]  match_out,
  input  logic [NUM_CLASSES-1:0][N-1:0][$clog2(DEPTH)-1:0] match_addr,
  // RAM read, one per input
  output logic [N-1:0]                                  rd_en,
  output logic [N-1:0][$clog2(NUM_CLASSES)-1:0]         rd_cls,
  output logic [N-1:0][$clog2(DEPTH)-1:0]               rd_addr,
  // fabric transfer
  output logic                                          xfer_en,
  output logic [N-1:0]                                  xfer_valid,
  output logic [N-1:0][$clog2(N)-1:0]                   xfer_dest,
  // statistics of the last slot
  output logic [$clog2(NUM_CLASSES+1)-1:0]              iters_used,
  output logic                                          interrupted
);
  localparam int unsigned SLOT_CYCLES = NUM_CLASSES + 3;
  localparam int unsigned PHW = $clog2(SLOT_CYCLES);
  localparam int unsigned PW  = $clog2(N);
  localparam int unsigned CLW = $clog2(NUM_CLASSES);
  localparam int unsigned ITW = $clog2(NUM_CLASSES + 1);
  localparam logic [PHW-1:0] PH_READ = PHW'(NUM_CLASSES + 1);
  localparam logic [PHW-1:0] PH_XFER = PHW'(NUM_CLASSES + 2);

  typedef struct packed {
    logic               valid;
    logic [PW-1:0]      dest;
    logic [CLW-1:0]     cls;
    logic [$clog2(DEPTH)-1:0] addr;
  } match_rec_t;

  logic [PHW-1:0] phase_q;
  logic [N-1:0]   in_unm_q, out_unm_q;
  match_rec_t     rec_q [N];
  logic [ITW-1:0] iter_cnt_q, iters_used_q;
  logic           skipped_q, interrupted_q;
  logic           all_matched;

  assign phase         = phase_q;
  assign slot_start    = (phase_q == '0);
  assign in_unmatched  = in_unm_q;
  assign out_unmatched = out_unm_q;
  assign all_matched   = (in_unm_q == '0) && (out_unm_q == '0);
  assign iters_used    = iters_used_q;
  assign interrupted   = interrupted_q;

  always_comb begin
    for (int unsigned c = 0; c < NUM_CLASSES; c++)
      plane_active[c] = (phase_q == PHW'(c + 1)) && !all_matched;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q       <= '0;
      in_unm_q      <= '1;
      out_unm_q     <= '1;
      iter_cnt_q    <= '0;
      skipped_q     <= 1'b0;
      iters_used_q  <= '0;
      interrupted_q <= 1'b0;
      for (int unsigned i = 0; i < N; i++) rec_q[i] <= '0;
    end else begin
      phase_q <= (phase_q == PHW'(SLOT_CYCLES - 1)) ? '0 : phase_q + 1'b1;

      if (slot_start) begin
        in_unm_q   <= '1;
        out_unm_q  <= '1;
        iter_cnt_q <= '0;
        skipped_q  <= 1'b0;
        for (int unsigned i = 0; i < N; i++) rec_q[i] <= '0;
      end

      for (int unsigned c = 0; c < NUM_CLASSES; c++) begin
        if (phase_q == PHW'(c + 1)) begin
          if (plane_active[c]) iter_cnt_q <= iter_cnt_q + 1'b1;
          else                 skipped_q  <= 1'b1;
        end
        if (plane_active[c]) begin
          for (int unsigned i = 0; i < N; i++) begin
            if (match_valid[c][i]) begin
              in_unm_q[i]                <= 1'b0;
              out_unm_q[match_out[c][i]] <= 1'b0;
              rec_q[i] <= '{valid: 1'b1, dest: match_out[c][i], cls: CLW'(c),
                            addr: match_addr[c][i]};
            end
          end
        end
      end

      if (phase_q == PH_READ) begin
        iters_used_q  <= iter_cnt_q;
        interrupted_q <= skipped_q;
      end
    end
  end

  always_comb begin
    xfer_en = (phase_q == PH_XFER);
    for (int unsigned i = 0; i < N; i++) begin
      rd_en[i]      = (phase_q == PH_READ) && rec_q[i].valid;
      rd_cls[i]     = rec_q[i].cls;
      rd_addr[i]    = rec_q[i].addr;
      xfer_valid[i] = rec_q[i].valid;
      xfer_dest[i]  = rec_q[i].dest;
    end
  end

  // A port is never matched twice in one slot.
  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_chk
    for (genvar i = 0; i < N; i++) begin : g_in
      a_match_free: assert property (@(posedge clk) disable iff (!rst_n)
          plane_active[c] && match_valid[c][i] |-> in_unm_q[i] && out_unm_q[match_out[c][i]])
        else $error("plane %0d matched a port already matched", c);
    end
  end
endmodule
