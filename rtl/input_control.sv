// input_control: request and accept phases of one input in one control plane.
//
// Request phase: when the plane runs its iteration (active) and the input is still
// unmatched, the input sends one request bit to every still-unmatched output for
// which its header queue holds a cell of this plane's class.
// Accept phase: among the grants that come back from the output controls the
// input accepts the one nearest to its round-robin pointer A (the pointer position
// has the highest priority). After an acceptance, A moves to one position beyond
// the accepted output, so that output has the lowest priority next time.
//
// Timing: request -> grant -> accept settle combinationally in the one clock cycle
// of the iteration; the pointer A is updated at the end of that cycle. Reset sets A
// to 0.
//
// The phases and the pointer rule are those of the IRRM-MC scheduler; the reset
// value of the pointer is this implementation's choice.
module input_control #(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 active,        // this plane's iteration runs now
  input  logic                 in_unmatched,  // this input is not yet matched in this slot
  input  logic [N-1:0]         out_unmatched, // outputs not yet matched in this slot
  input  logic [N-1:0]         hq_req,        // outputs with a queued cell of this class
  output logic [N-1:0]         req,           // request bits, one per output
  input  logic [N-1:0]         grant,         // grant bits, one per output
  output logic                 accept_valid,
  output logic [$clog2(N)-1:0] accept_idx,    // accepted output
  output logic [$clog2(N)-1:0] ptr            // accept pointer A
);
  localparam int unsigned PW = $clog2(N);

  logic [PW-1:0] ptr_q;
  logic          arb_valid;
  logic [PW-1:0] arb_idx;

  assign ptr = ptr_q;
  assign req = (active && in_unmatched) ? (hq_req & out_unmatched) : '0;

  rr_arbiter #(.N(N)) u_accept_arb (
    .req  (grant & req),
    .ptr  (ptr_q),
    .valid(arb_valid),
    .idx  (arb_idx)
  );

  assign accept_valid = arb_valid;
  assign accept_idx   = arb_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (accept_valid) begin
      ptr_q <= (arb_idx == PW'(N - 1)) ? '0 : arb_idx + 1'b1;
    end
  end
endmodule
