// output_control: grant phase of one output in one control plane.
//
// When the plane runs its iteration and the output is still unmatched, the output
// grants the request nearest to its round-robin pointer C (the pointer position has
// the highest priority). C moves to one position beyond the granted input only if
// that input accepts the grant in the accept phase; otherwise it stays, so the
// output keeps offering the same input first.
//
// Timing: combinational grant within the iteration's clock cycle; C is updated at
// the end of that cycle. Reset sets C to 0.
//
// The grant rule and the accept-conditional pointer update are those of the
// IRRM-MC scheduler; the reset value is this implementation's choice.
module output_control #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 active,
  input  logic                 out_unmatched,
  input  logic [N-1:0]         req,          // request bits, one per input
  output logic                 grant_valid,
  output logic [$clog2(N)-1:0] grant_idx,    // granted input
  input  logic                 accepted,     // the granted input accepted this output
  output logic [$clog2(N)-1:0] ptr           // grant pointer C
);
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] ptr_q;
  logic          arb_valid;

  assign ptr = ptr_q;

  rr_arbiter #(.N(N)) u_grant_arb (
    .req  ((active && out_unmatched) ? req : '0),
    .ptr  (ptr_q),
    .valid(arb_valid),
    .idx  (grant_idx)
  );

  assign grant_valid = arb_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (grant_valid && accepted) begin
      ptr_q <= (grant_idx == PW'(N - 1)) ? '0 : grant_idx + 1'b1;
    end
  end
endmodule
