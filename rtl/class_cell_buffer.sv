// class_cell_buffer: random-access cell RAM of one service class at one input.
//
// Cells are written into any free location and read back from any location, in
// whatever order the scheduler picks them; a used-bit per location serves as the
// free list. On a write the lowest free address is allocated and returned
// (wr_addr, valid in the same cycle as wr_en) so that the cell header queue can
// remember where the cell lies. A read takes the address recorded in the header
// queue; the data appear on rd_data one clock later (synchronous read) and the
// location is freed at the same edge. A write and a read may happen in the same
// cycle. When no location is free, full is high and a write is ignored.
//
// That each input keeps one random-access RAM per class is the switch
// architecture's; the depth, the allocation rule and the read timing are choices
// of this implementation.
module class_cell_buffer #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned CELL_W = 424
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write (store an arriving cell)
  input  logic                     wr_en,
  input  logic [CELL_W-1:0]        wr_data,
  output logic [$clog2(DEPTH)-1:0] wr_addr,   // address that wr_en will use
  output logic                     full,
  // read (release a scheduled cell)
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [CELL_W-1:0]        rd_data,
  // occupancy
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CELL_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  used_q;

  // lowest free location
  always_comb begin
    wr_addr = '0;
    full    = 1'b1;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!used_q[i]) begin
        wr_addr = AW'(i);
        full    = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q <= '0;
    end else begin
      if (rd_en) used_q[rd_addr] <= 1'b0;
      if (wr_en && !full) used_q[wr_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += ($clog2(DEPTH+1))'(used_q[i]);
  end
endmodule
