// input_port: one switch input line with its discriminator and class RAMs.
//
// An arriving cell (in_valid during the arrival cycle, arrive) is classified by
// the virtual-path discriminator and written into the random-access RAM of its
// service class, which returns the address it used. The input then hands the
// cell's routing information (class, output port, RAM address) to the header
// queue of its input in the plane of that class (push_*). A cell is dropped, and
// flagged for one cycle, if its virtual path is not provisioned (drop_unknown) or
// if the RAM of its class is full (drop_full).
// When the scheduler has matched the input, it reads the cell back by class and
// address (rd_en, rd_cls, rd_addr); the cell appears on rd_cell one clock later
// and its RAM location is freed.
//
// One RAM per service class, filled through the discriminator, follows the switch
// architecture; the drop policy and the read timing are this implementation's.
module input_port
  import atm_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned NUM_CLASSES = NUM_SVC,
  parameter int unsigned DEPTH       = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // connection table write
  input  logic                           cfg_we,
  input  logic [VPI_W-1:0]               cfg_vpi,
  input  logic                           cfg_valid,
  input  logic [$clog2(NUM_CLASSES)-1:0] cfg_cls,
  input  logic [$clog2(N)-1:0]           cfg_dest,
  // arrival
  input  logic                           arrive,
  input  logic                           in_valid,
  input  logic [CELL_W-1:0]              in_cell,
  output logic                           push_en,
  output logic [$clog2(NUM_CLASSES)-1:0] push_cls,
  output logic [$clog2(N)-1:0]           push_dest,
  output logic [$clog2(DEPTH)-1:0]       push_addr,
  output logic                           drop_unknown,
  output logic                           drop_full,
  // scheduled read
  input  logic                           rd_en,
  input  logic [$clog2(NUM_CLASSES)-1:0] rd_cls,
  input  logic [$clog2(DEPTH)-1:0]       rd_addr,
  output logic [CELL_W-1:0]              rd_cell,
  // occupancy of each class RAM
  output logic [NUM_CLASSES-1:0][$clog2(DEPTH+1)-1:0] occupancy
);
  localparam int unsigned CLW = $clog2(NUM_CLASSES);

  logic                 cls_valid, cls_unknown;
  logic [CLW-1:0]       cls;
  logic [$clog2(N)-1:0] dest;

  vc_discriminator #(.N(N), .NUM_CLASSES(NUM_CLASSES)) u_disc (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_vpi    (cfg_vpi),
    .cfg_valid  (cfg_valid),
    .cfg_cls    (cfg_cls),
    .cfg_dest   (cfg_dest),
    .in_valid   (arrive && in_valid),
    .in_cell    (in_cell),
    .out_valid  (cls_valid),
    .out_unknown(cls_unknown),
    .out_cls    (cls),
    .out_dest   (dest)
  );

  logic [NUM_CLASSES-1:0]                     wr_en, buf_full, buf_rd;
  logic [NUM_CLASSES-1:0][$clog2(DEPTH)-1:0]  wr_addr;
  logic [CELL_W-1:0]                          buf_data [NUM_CLASSES];
  logic [CLW-1:0]                             rd_cls_q;

  for (genvar c = 0; c < NUM_CLASSES; c++) begin : g_cls
    assign wr_en[c]  = cls_valid && cls == CLW'(c);
    assign buf_rd[c] = rd_en && rd_cls == CLW'(c);
    class_cell_buffer #(.DEPTH(DEPTH), .CELL_W(CELL_W)) u_ram (
      .clk    (clk),
      .rst_n  (rst_n),
      .wr_en  (wr_en[c]),
      .wr_data(in_cell),
      .wr_addr(wr_addr[c]),
      .full   (buf_full[c]),
      .rd_en  (buf_rd[c]),
      .rd_addr(rd_addr),
      .rd_data(buf_data[c]),
      .count  (occupancy[c])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_cls_q <= rd_cls;
  end
  assign rd_cell = buf_data[rd_cls_q];

  assign push_en      = cls_valid && !buf_full[cls];
  assign push_cls     = cls;
  assign push_dest    = dest;
  assign push_addr    = wr_addr[cls];
  assign drop_unknown = cls_unknown;
  assign drop_full    = cls_valid && buf_full[cls];
endmodule
