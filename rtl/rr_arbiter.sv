// rr_arbiter: round-robin selector used by the grant and accept phases.
//
// Picks, among the asserted request bits, the one nearest to the pointer going
// round the circle upward: the pointer position itself has the highest priority,
// then ptr+1, ptr+2, ... wrapping at N-1. Purely combinational; the pointer is
// kept by the caller, which decides when to move it.
//   req   : one bit per contender
//   ptr   : highest-priority position
//   valid : at least one request
//   idx   : the chosen position (0 when valid is low)
module rr_arbiter #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] ptr,
  output logic                 valid,
  output logic [$clog2(N)-1:0] idx
);
  localparam int unsigned W = $clog2(N);

  always_comb begin
    valid = 1'b0;
    idx   = '0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned pos;
      pos = (int'(ptr) + k) % N;
      if (!valid && req[pos]) begin
        valid = 1'b1;
        idx   = W'(pos);
      end
    end
  end
endmodule
