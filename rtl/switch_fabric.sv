// switch_fabric: nonblocking N x N crossbar between the input RAMs and the outputs.
//
// In the transfer cycle (xfer_en) every input that holds a match presents its cell
// with its destination; since the scheduler matches each output to at most one
// input, every output selects the single input aimed at it, with no internal
// blocking. The selected cells are registered, so they appear on out_valid/out_cell
// one clock after xfer_en; out_valid is a one-cycle pulse.
//
// A nonblocking fabric is what the switch architecture calls for; a crossbar of
// AND-OR multiplexers with registered outputs is this implementation's choice.
module switch_fabric #(
  parameter int unsigned N      = 16,
  parameter int unsigned CELL_W = 424
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          xfer_en,
  input  logic [N-1:0]                  in_valid,
  input  logic [N-1:0][$clog2(N)-1:0]   in_dest,
  input  logic [N-1:0][CELL_W-1:0]      in_cell,
  output logic [N-1:0]                  out_valid,
  output logic [N-1:0][CELL_W-1:0]      out_cell
);
  localparam int unsigned PW = $clog2(N);

  logic [N-1:0]             sel_valid;
  logic [N-1:0][CELL_W-1:0] sel_cell;

  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      sel_valid[o] = 1'b0;
      sel_cell[o]  = '0;
      for (int unsigned i = 0; i < N; i++) begin
        if (in_valid[i] && in_dest[i] == PW'(o)) begin
          sel_valid[o] = 1'b1;
          sel_cell[o]  = sel_cell[o] | in_cell[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_cell  <= '0;
    end else begin
      out_valid <= xfer_en ? sel_valid : '0;
      if (xfer_en) out_cell <= sel_cell;
    end
  end

  // The scheduler never sends two cells to one output.
  for (genvar o = 0; o < N; o++) begin : g_chk
    logic [N-1:0] aimed;
    for (genvar i = 0; i < N; i++) begin : g_aim
      assign aimed[i] = in_valid[i] && in_dest[i] == PW'(o);
    end
    a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
                                   xfer_en |-> (aimed & (aimed - 1'b1)) == '0)
      else $error("output %0d selected twice", o);
  end
endmodule
