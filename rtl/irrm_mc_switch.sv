// irrm_mc_switch: N x N input-queued ATM switch with service-class priority,
// scheduled by iterative round-robin matching with multiple classes (IRRM-MC).
//
// Each input sorts its cells by virtual path into one random-access RAM per
// service class (CBR, rtVBR, nrtVBR, ABR, UBR). The routing information of the
// queued cells is held in one control plane per class. In every time slot the
// planes run one request-grant-accept iteration each, in priority order: the CBR
// plane matches first, and each later plane only sees the inputs and outputs left
// unmatched by the planes before it, so CBR cells always have the first claim on
// the fabric and UBR cells the last. Scheduling stops early once all ports are
// matched. The matched cells are then read from their RAMs and cross a nonblocking
// crossbar to the outputs.
//
// Interface and timing: a time slot is NUM_CLASSES + 3 clock cycles. slot_start
// marks its first cycle, in which each input may present one cell (in_valid,
// in_cell). A cell that is matched in the slot it arrived in leaves on
// out_valid/out_cell (a one-cycle pulse) in the first cycle of the next slot, i.e.
// exactly one slot after it arrived. The connection table of each input is written
// through the cfg_* port (cfg_port selects the input): it maps a VPI to a service
// class and an output port. Dropped cells are flagged on drop_unknown/drop_full
// in their arrival cycle. iters_used and interrupted report how many planes ran in
// the last slot and whether the iterations stopped early; contention and
// multi_grant report, per plane, an output that received several requests and an
// input that received several grants during the plane's iteration.
//
// The planes, their request/grant/accept phases and pointer rules and the
// priority order follow the IRRM-MC scheduler; the slot timing, the cell format
// (whole 53-byte cells), the VPI-indexed connection tables, the RAM depth and the
// drop policy are this implementation's choices.
module irrm_mc_switch
  import atm_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned NUM_CLASSES = NUM_SVC,
  parameter int unsigned DEPTH       = 64
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // connection tables
  input  logic                                   cfg_we,
  input  logic [$clog2(N)-1:0]                   cfg_port,
  input  logic [VPI_W-1:0]                       cfg_vpi,
  input  logic                                   cfg_valid,
  input  logic [$clog2(NUM_CLASSES)-1:0]         cfg_cls,
  input  logic [$clog2(N)-1:0]                   cfg_dest,
  // cell slots
  output logic                                   slot_start,
  input  logic [N-1:0]                           in_valid,
  input  logic [N-1:0][CELL_W-1:0]               in_cell,
  output logic [N-1:0]                           out_valid,
  output logic [N-1:0][CELL_W-1:0]               out_cell,
  output logic [N-1:0]                           drop_unknown,
  output logic [N-1:0]                           drop_full,
  // scheduling status
  output logic [$clog2(NUM_CLASSES+1)-1:0]       iters_used,
  output logic                                   interrupted,
  output logic [NUM_CLASSES-1:0]                 contention,
  output logic [NUM_CLASSES-1:0]                 multi_grant
);
  localparam int unsigned PW  = $clog2(N);
  localparam int unsigned AW  = $clog2(DEPTH);
  localparam int unsigned CLW = $clog2(NUM_CLASSES);

  // input ports -> planes
  logic [N-1:0]           push_en;
  logic [N-1:0][CLW-1:0]  push_cls;
  logic [N-1:0][PW-1:0]   push_dest;
  logic [N-1:0][AW-1:0]   push_addr;

  // controller <-> planes / inputs / fabric
  logic [NUM_CLASSES-1:0]               plane_active;
  logic [N-1:0]                         in_unmatched, out_unmatched;
  logic [NUM_CLASSES-1:0][N-1:0]        match_valid;
  logic [NUM_CLASSES-1:0][N-1:0][PW-1:0] match_out;
  logic [NUM_CLASSES-1:0][N-1:0][AW-1:0] match_addr;
  logic [N-1:0]                         rd_en;
  logic [N-1:0][CLW-1:0]                rd_cls;
  logic [N-1:0][AW-1:0]                 rd_addr;
  logic [N-1:0][CELL_W-1:0]             rd_cell;
  logic                                 xfer_en;
  logic [N-1:0]                         xfer_valid;
  logic [N-1:0][PW-1:0]                 xfer_dest;

  for (genvar i = 0; i < N; i++) begin : g_port
    input_port #(.N(N), .NUM_CLASSES(NUM_CLASSES), .DEPTH(DEPTH)) u_in (
      .clk         (clk),
      .rst_n       (rst_n),
      .cfg_we      (cfg_we && cfg_port == PW'(i)),
      .cfg_vpi     (cfg_vpi),
      .cfg_valid   (cfg_valid),
      .cfg_cls     (cfg_cls),
      .cfg_dest    (cfg_dest),
      .arrive      (slot_start),
      .in_valid    (in_valid[i]),
      .in_cell     (in_cell[i]),
      .push_en     (push_en[i]),
      .push_cls    (push_cls[i]),
      .push_dest   (push_dest[i]),
      .push_addr   (push_addr[i]),
      .drop_unknown(drop_unknown[i]),
      .drop_full   (drop_full[i]),
      .rd_en       (rd_en[i]),
      .rd_cls      (rd_cls[i]),
      .rd_addr     (rd_addr[i]),
      .rd_cell     (rd_cell[i]),
      .occupancy   ()
    );
  end

  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_plane
    logic [N-1:0] plane_push;
    for (genvar i = 0; i < N; i++) begin : g_push
      assign plane_push[i] = push_en[i] && push_cls[i] == CLW'(c);
    end
    control_plane #(.N(N), .DEPTH(DEPTH)) u_plane (
      .clk          (clk),
      .rst_n        (rst_n),
      .push_en      (plane_push),
      .push_dest    (push_dest),
      .push_addr    (push_addr),
      .active       (plane_active[c]),
      .in_unmatched (in_unmatched),
      .out_unmatched(out_unmatched),
      .match_valid  (match_valid[c]),
      .match_out    (match_out[c]),
      .match_addr   (match_addr[c]),
      .hq_count     (),
      .contention   (contention[c]),
      .multi_grant  (multi_grant[c])
    );
  end

  iteration_controller #(.N(N), .NUM_CLASSES(NUM_CLASSES), .DEPTH(DEPTH)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .slot_start   (slot_start),
    .phase        (),
    .plane_active (plane_active),
    .in_unmatched (in_unmatched),
    .out_unmatched(out_unmatched),
    .match_valid  (match_valid),
    .match_out    (match_out),
    .match_addr   (match_addr),
    .rd_en        (rd_en),
    .rd_cls       (rd_cls),
    .rd_addr      (rd_addr),
    .xfer_en      (xfer_en),
    .xfer_valid   (xfer_valid),
    .xfer_dest    (xfer_dest),
    .iters_used   (iters_used),
    .interrupted  (interrupted)
  );

  switch_fabric #(.N(N), .CELL_W(CELL_W)) u_fabric (
    .clk      (clk),
    .rst_n    (rst_n),
    .xfer_en  (xfer_en),
    .in_valid (xfer_valid),
    .in_dest  (xfer_dest),
    .in_cell  (rd_cell),
    .out_valid(out_valid),
    .out_cell (out_cell)
  );
endmodule
