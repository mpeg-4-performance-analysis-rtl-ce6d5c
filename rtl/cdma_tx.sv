// cdma_tx: transmitter (TX) module of one CDMA switch port.
//
// Packets from the attached resource (or from the other switch, on the
// link port) enter a pkt_fifo. The packet at the head of the buffer asks
// the scheduler for its output port: the destination port field when the
// packet's group id names this switch, otherwise the link port towards the
// other switch. When the scheduler grants the request the TX spreads every
// bit of the packet, header and payload, onto the Walsh codeword of that
// output port (row port+1 of the Hadamard matrix): a 0 is sent as the
// codeword, a 1 as its complement. All bits are spread in parallel, so a
// whole packet crosses the switch in one clock cycle; active marks the
// cycle in which the chips carry a packet, and the packet leaves the buffer
// at the end of it.
//
// Interface: in_valid/in_hdr/in_payload push a packet and must not be
// raised while full is high (full comes FULL_SLACK entries early).
// req/req_port go to the scheduler, grant comes back in the same cycle.
// chips is bit-major: chip k of packet bit b is chips[b*CODE_LEN + k].
// The codeword selection by destination, the modulation rule and the
// buffer with its "buffer full" signal follow the document; the parallel
// spreading of the whole packet and the routing by group id are this
// design's choices.
module cdma_tx
  import noc_pkg::*;
#(
  parameter int unsigned PAYLOAD_W  = noc_pkg::NOC_PAYLOAD_W,
  parameter int unsigned DEPTH      = noc_pkg::NOC_DEPTH,
  parameter int unsigned CODE_LEN   = noc_pkg::NOC_CODE_LEN,
  parameter int unsigned MY_GID     = 0,
  parameter int unsigned LINK_PORT  = noc_pkg::NOC_LINK_PORT,
  parameter int unsigned FULL_SLACK = 0,
  localparam int unsigned PKT_W     = HDR_W + PAYLOAD_W,
  localparam int unsigned NCHIP     = PKT_W * CODE_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the resource
  input  logic                 in_valid,
  input  pkt_hdr_t             in_hdr,
  input  logic [PAYLOAD_W-1:0] in_payload,
  output logic                 full,
  // to and from the scheduler
  output logic                 req,
  output logic [DST_W-1:0]     req_port,
  input  logic                 grant,
  // to the code adder
  output logic [NCHIP-1:0]     chips,
  output logic                 active
);

  logic [PKT_W-1:0] head;
  logic             empty;
  pkt_hdr_t         head_hdr;

  pkt_fifo #(
    .WIDTH     (PKT_W),
    .DEPTH     (DEPTH),
    .FULL_SLACK(FULL_SLACK)
  ) u_fifo (
    .clk  (clk),
    .rst_n(rst_n),
    .push (in_valid),
    .din  ({in_hdr, in_payload}),
    .pop  (grant),
    .dout (head),
    .empty(empty),
    .full (full),
    .count()
  );

  assign head_hdr = pkt_hdr_t'(head[PKT_W-1 -: HDR_W]);
  assign req      = !empty;
  assign req_port = (head_hdr.gid == GID_W'(MY_GID)) ? head_hdr.dst
                                                     : DST_W'(LINK_PORT);
  assign active   = grant;

  // Modulation: chip = codeword chip XOR data bit.
  always_comb begin
    chips = '0;
    for (int unsigned b = 0; b < PKT_W; b++)
      for (int unsigned k = 0; k < CODE_LEN; k++)
        chips[b*CODE_LEN + k] = walsh_bit(32'(req_port) + 1, k) ^ head[b];
  end

  a_grant_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    grant |-> req)
    else $error("cdma_tx: grant without a request");

endmodule
