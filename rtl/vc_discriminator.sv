// vc_discriminator: virtual-path discriminator of one switch input.
//
// Every arriving cell is sorted into the RAM of its own service class by the
// virtual path it travels on. A connection table indexed by the cell's VPI holds,
// for each provisioned path, its service class and the output port it is switched
// to; a cell on an unprovisioned path is flagged so the input can discard it.
// The table is written through a simple configuration port and cleared by reset.
//
// Timing: the lookup is combinational (cell in, class/destination out in the same
// cycle); a table write takes effect on the next clock edge.
//
// Sorting cells into classes by their virtual path/channel is the switch
// architecture's; the VPI-indexed table, its configuration port and the discard of
// unknown paths are choices of this implementation.
module vc_discriminator
  import atm_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned NUM_CLASSES = NUM_SVC
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // connection table write
  input  logic                           cfg_we,
  input  logic [VPI_W-1:0]               cfg_vpi,
  input  logic                           cfg_valid,
  input  logic [$clog2(NUM_CLASSES)-1:0] cfg_cls,
  input  logic [$clog2(N)-1:0]           cfg_dest,
  // arriving cell
  input  logic                           in_valid,
  input  logic [CELL_W-1:0]              in_cell,
  // classification
  output logic                           out_valid,    // known path, cell accepted for buffering
  output logic                           out_unknown,  // cell on an unprovisioned path
  output logic [$clog2(NUM_CLASSES)-1:0] out_cls,
  output logic [$clog2(N)-1:0]           out_dest
);
  localparam int unsigned ENTRIES = 1 << VPI_W;

  typedef struct packed {
    logic                           valid;
    logic [$clog2(NUM_CLASSES)-1:0] cls;
    logic [$clog2(N)-1:0]           dest;
  } conn_t;

  conn_t table_q [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < ENTRIES; e++) table_q[e] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_vpi] <= '{valid: cfg_valid, cls: cfg_cls, dest: cfg_dest};
    end
  end

  logic [VPI_W-1:0] vpi;
  conn_t            hit;

  always_comb begin
    vpi         = in_cell[VPI_MSB:VPI_LSB];
    hit         = table_q[vpi];
    out_valid   = in_valid && hit.valid;
    out_unknown = in_valid && !hit.valid;
    out_cls     = hit.cls;
    out_dest    = hit.dest;
  end
endmodule
