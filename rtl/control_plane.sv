// control_plane: the scheduling plane of one service class.
//
// A plane holds, for its class, the cell header queue of every input, one input
// control per input (request and accept phases, pointer A) and one output control
// per output (grant phase, pointer C), fully cross-connected: input i's request
// bit k goes to output k, output k's grant goes back to the input it chose, and
// each input's accept goes back to the output it accepted.
//
// When 'active' is high the plane performs one complete request-grant-accept
// iteration in that clock cycle, restricted to the inputs and outputs still
// unmatched by the planes of higher priority (in_unmatched, out_unmatched). Every
// input that accepts a grant reports the match (match_valid, match_out) together
// with the RAM address of the oldest cell it holds for that output (match_addr);
// that header is removed from its queue at the same clock edge.
// Arriving cells of this class are appended to the header queue of their input
// through the push ports. Two status bits tell whether an output received more than
// one request (contention) and whether an input received more than one grant
// (multi_grant) in the current iteration.
//
// The structure (queues, input controls, output controls per plane) follows the
// switch architecture; the one-cycle iteration is this implementation's choice.
module control_plane #(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 64
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // header queue appends, one per input
  input  logic [N-1:0]                        push_en,
  input  logic [N-1:0][$clog2(N)-1:0]         push_dest,
  input  logic [N-1:0][$clog2(DEPTH)-1:0]     push_addr,
  // iteration
  input  logic                                active,
  input  logic [N-1:0]                        in_unmatched,
  input  logic [N-1:0]                        out_unmatched,
  output logic [N-1:0]                        match_valid,
  output logic [N-1:0][$clog2(N)-1:0]         match_out,
  output logic [N-1:0][$clog2(DEPTH)-1:0]     match_addr,
  // status
  output logic [N-1:0][$clog2(DEPTH+1)-1:0]   hq_count,
  output logic                                contention,
  output logic                                multi_grant
);
  localparam int unsigned PW = $clog2(N);

  logic [N-1:0][N-1:0] req_io;     // [input][output]
  logic [N-1:0][N-1:0] req_oi;     // [output][input]
  logic [N-1:0][N-1:0] grant_io;   // [input][output]
  logic [N-1:0][N-1:0] hq_req;
  logic [N-1:0]        grant_valid;
  logic [N-1:0][PW-1:0] grant_idx;
  logic [N-1:0]        accepted;   // per output

  for (genvar i = 0; i < N; i++) begin : g_in
    cell_header_queue #(.N(N), .DEPTH(DEPTH)) u_hq (
      .clk      (clk),
      .rst_n    (rst_n),
      .push_en  (push_en[i]),
      .push_dest(push_dest[i]),
      .push_addr(push_addr[i]),
      .pop_en   (match_valid[i]),
      .pop_dest (match_out[i]),
      .pop_addr (match_addr[i]),
      .pop_hit  (),
      .req      (hq_req[i]),
      .count    (hq_count[i]),
      .full     ()
    );

    input_control #(.N(N)) u_ic (
      .clk          (clk),
      .rst_n        (rst_n),
      .active       (active),
      .in_unmatched (in_unmatched[i]),
      .out_unmatched(out_unmatched),
      .hq_req       (hq_req[i]),
      .req          (req_io[i]),
      .grant        (grant_io[i]),
      .accept_valid (match_valid[i]),
      .accept_idx   (match_out[i]),
      .ptr          ()
    );
  end

  for (genvar o = 0; o < N; o++) begin : g_out
    output_control #(.N(N)) u_oc (
      .clk          (clk),
      .rst_n        (rst_n),
      .active       (active),
      .out_unmatched(out_unmatched[o]),
      .req          (req_oi[o]),
      .grant_valid  (grant_valid[o]),
      .grant_idx    (grant_idx[o]),
      .accepted     (accepted[o]),
      .ptr          ()
    );
  end

  // crossing wires between the input and output controls
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned o = 0; o < N; o++) begin
        req_oi[o][i]   = req_io[i][o];
        grant_io[i][o] = grant_valid[o] && (grant_idx[o] == PW'(i));
      end
    end
    for (int unsigned o = 0; o < N; o++) begin
      accepted[o] = 1'b0;
      for (int unsigned i = 0; i < N; i++) begin
        if (match_valid[i] && match_out[i] == PW'(o)) accepted[o] = 1'b1;
      end
    end
  end

  always_comb begin
    contention  = 1'b0;
    multi_grant = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      if ((req_oi[k] & (req_oi[k] - 1'b1)) != '0)     contention  = 1'b1;
      if ((grant_io[k] & (grant_io[k] - 1'b1)) != '0) multi_grant = 1'b1;
    end
  end

  // Every accept answers a grant of the output it names.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_accept_granted: assert property (@(posedge clk) disable iff (!rst_n)
        match_valid[i] |-> grant_valid[match_out[i]] && grant_idx[match_out[i]] == PW'(i))
      else $error("input %0d accepted output %0d without its grant", i, match_out[i]);
  end
endmodule
