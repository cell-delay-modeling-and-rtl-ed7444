// cell_header_queue: routing information of the cells of one class at one input.
//
// Each control plane keeps, for every input, a queue of the headers of the cells
// waiting in that input's RAM of the plane's class. An entry holds the output port
// the cell is routed to and the RAM address where the cell lies. Entries are kept
// in arrival order in a compacting queue (entry 0 is the oldest).
//
// From the queue the request vector of the request phase is formed: bit k is set
// when at least one queued cell is destined for output k. When the input accepts
// output k, the oldest entry for output k is removed (pop_en with pop_dest = k); its
// RAM address is returned combinationally on pop_addr in the same cycle, and the
// entries behind it move up at the clock edge. A push appends one entry; push and
// pop may happen in the same cycle. A push into a full queue is ignored (the RAM of
// the same depth is full too, so the input never issues one).
//
// The queue per input per plane and its use for routing follow the switch
// architecture; first-in-first-out order among cells for the same output and the
// compacting organisation are choices of this implementation.
module cell_header_queue #(
  parameter int unsigned N     = 16,
  parameter int unsigned DEPTH = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // append (cell stored in the class RAM)
  input  logic                       push_en,
  input  logic [$clog2(N)-1:0]       push_dest,
  input  logic [$clog2(DEPTH)-1:0]   push_addr,
  // remove the oldest entry for one output (cell matched)
  input  logic                       pop_en,
  input  logic [$clog2(N)-1:0]       pop_dest,
  output logic [$clog2(DEPTH)-1:0]   pop_addr,
  output logic                       pop_hit,   // an entry for pop_dest exists
  // request phase
  output logic [N-1:0]               req,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full
);
  localparam int unsigned PW = $clog2(N);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [PW-1:0] dest;
    logic [AW-1:0] addr;
  } hq_entry_t;

  hq_entry_t q   [DEPTH];
  logic [CW-1:0] cnt_q;

  assign count = cnt_q;
  assign full  = (cnt_q == CW'(DEPTH));

  // request vector
  always_comb begin
    req = '0;
    for (int unsigned e = 0; e < DEPTH; e++) begin
      if (CW'(e) < cnt_q) req[q[e].dest] = 1'b1;
    end
  end

  // oldest entry for pop_dest
  logic [AW-1:0] pop_idx;
  always_comb begin
    pop_hit  = 1'b0;
    pop_idx  = '0;
    for (int unsigned e = 0; e < DEPTH; e++) begin
      if (!pop_hit && CW'(e) < cnt_q && q[e].dest == pop_dest) begin
        pop_hit = 1'b1;
        pop_idx = AW'(e);
      end
    end
    pop_addr = q[pop_idx].addr;
  end

  logic do_pop, do_push;
  assign do_pop  = pop_en && pop_hit;
  assign do_push = push_en && (!full || do_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
    end else begin
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  // Entries are not reset: only the first cnt_q entries are ever read.
  always_ff @(posedge clk) begin
    for (int unsigned e = 0; e < DEPTH; e++) begin
      if (do_pop && AW'(e) >= pop_idx) begin
        // close the gap left by the removed entry
        if (e + 1 < DEPTH) q[e] <= q[e + 1];
      end
    end
    if (do_push) begin
      q[do_pop ? AW'(cnt_q - 1'b1) : AW'(cnt_q)] <= '{dest: push_dest, addr: push_addr};
    end
  end
endmodule
