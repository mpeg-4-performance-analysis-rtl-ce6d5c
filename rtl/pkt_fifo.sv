// pkt_fifo: the packet buffer of a CDMA transmitter.
//
// A synchronous first-in first-out buffer of DEPTH packets of WIDTH bits,
// held in a register array with a write pointer, a read pointer and an
// occupancy counter. The oldest packet is always visible on dout while
// empty is low (first-word fall-through), so the scheduler can look at its
// destination in the same cycle it decides.
//
// Packets are never dropped. full tells the sender to stop; it rises when
// the occupancy reaches DEPTH - FULL_SLACK. A sender that sees full the
// same cycle it would push uses FULL_SLACK = 0; a sender whose packets are
// still in a pipeline when full rises (the link between two switches)
// needs as much slack as that pipeline is deep. A push into a buffer with
// no free entry is a protocol error and is flagged by an assertion.
//
// Timing: a packet pushed in cycle t is on dout in cycle t+1. push and pop
// in the same cycle are allowed, also when the buffer is full.
// The depth of 8 is the document's buffer size; the fall-through
// organisation and the slack are this design's choices.
module pkt_fifo #(
  parameter int unsigned WIDTH      = 72,
  parameter int unsigned DEPTH      = 8,
  parameter int unsigned FULL_SLACK = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count >= CNT_W'(DEPTH - FULL_SLACK));
  assign do_pop  = pop && !empty;
  assign do_push = push && ((count < CNT_W'(DEPTH)) || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage has no reset: an entry is only read after it has been written.
  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A push must find a free entry: the buffer never drops a packet.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (count < CNT_W'(DEPTH)) || do_pop)
    else $error("pkt_fifo: push into a full buffer");

  // Popping an empty buffer means a grant was given without a request.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> !empty)
    else $error("pkt_fifo: pop from an empty buffer");

endmodule
