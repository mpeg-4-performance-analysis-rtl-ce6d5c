// cdma_switch: one CDMA switch of the star network.
//
// N_PORTS ports, each with a transmitter (cdma_tx, with its packet buffer)
// and a receiver (cdma_rx), around a shared code adder and a scheduler.
// In every cycle the scheduler grants, for each destination port, at most
// one of the transmitters whose oldest packet goes there; the granted
// transmitters spread their packets onto the destination's Walsh codeword,
// the code adder sums all of them, and every receiver pulls its own packet
// out of the sum. Up to N_PORTS packets (CODE_LEN-1) cross the switch in
// the same cycle.
//
// Port LINK_PORT joins this switch to the other switch of the star:
// packets whose group id is not MY_GID leave through it, and packets
// arriving on it from the other switch are routed by their destination
// port field. Its buffer raises full LINK_SLACK entries early, because
// the other switch's pipeline may still hold that many packets for it.
// Set LINK_PORT >= N_PORTS for a switch without a link.
//
// Interface per port p: in_valid/in_hdr/in_payload and in_full (stop
// sending), out_valid/out_hdr/out_payload, and dst_full (the receiver of
// p cannot take a packet; 0 for a resource). err collects the receivers'
// error flags. Timing: a packet pushed in cycle t, without contention, is
// on out_* of its destination port in cycle t+3 (buffer, code adder
// register, receiver register).
// The block structure (TX/RX per port, scheduler, code adder) and the
// seven ports follow the document; the pipeline and the link handshake
// are this design's choices.
module cdma_switch
  import noc_pkg::*;
#(
  parameter int unsigned PAYLOAD_W  = noc_pkg::NOC_PAYLOAD_W,
  parameter int unsigned DEPTH      = noc_pkg::NOC_DEPTH,
  parameter int unsigned CODE_LEN   = noc_pkg::NOC_CODE_LEN,
  parameter int unsigned N_PORTS    = noc_pkg::NOC_N_PORTS,
  parameter int unsigned MY_GID     = 0,
  parameter int unsigned LINK_PORT  = noc_pkg::NOC_LINK_PORT,
  parameter int unsigned LINK_SLACK = 2
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic     [N_PORTS-1:0]              in_valid,
  input  pkt_hdr_t [N_PORTS-1:0]              in_hdr,
  input  logic     [N_PORTS-1:0][PAYLOAD_W-1:0] in_payload,
  output logic     [N_PORTS-1:0]              in_full,
  output logic     [N_PORTS-1:0]              out_valid,
  output pkt_hdr_t [N_PORTS-1:0]              out_hdr,
  output logic     [N_PORTS-1:0][PAYLOAD_W-1:0] out_payload,
  input  logic     [N_PORTS-1:0]              dst_full,
  output logic                                err
);

  localparam int unsigned PKT_W = HDR_W + PAYLOAD_W;
  localparam int unsigned NCHIP = PKT_W * CODE_LEN;
  localparam int unsigned SUM_W = $clog2(N_PORTS + 1) + 1;

  initial begin
    if (N_PORTS > CODE_LEN - 1)
      $fatal(1, "cdma_switch: %0d-chip codes serve at most %0d ports",
             CODE_LEN, CODE_LEN - 1);
  end

  logic [N_PORTS-1:0]              req, grant, active, rx_err;
  logic [N_PORTS-1:0][DST_W-1:0]   req_port;
  logic [N_PORTS-1:0][NCHIP-1:0]   chips;
  logic [NCHIP-1:0][SUM_W-1:0]     sum;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_port
    cdma_tx #(
      .PAYLOAD_W (PAYLOAD_W),
      .DEPTH     (DEPTH),
      .CODE_LEN  (CODE_LEN),
      .MY_GID    (MY_GID),
      .LINK_PORT (LINK_PORT),
      .FULL_SLACK((p == LINK_PORT) ? LINK_SLACK : 0)
    ) u_tx (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid[p]),
      .in_hdr    (in_hdr[p]),
      .in_payload(in_payload[p]),
      .full      (in_full[p]),
      .req       (req[p]),
      .req_port  (req_port[p]),
      .grant     (grant[p]),
      .chips     (chips[p]),
      .active    (active[p])
    );

    cdma_rx #(
      .PORT     (p),
      .PAYLOAD_W(PAYLOAD_W),
      .CODE_LEN (CODE_LEN),
      .N_PORTS  (N_PORTS)
    ) u_rx (
      .clk        (clk),
      .rst_n      (rst_n),
      .sum        (sum),
      .out_valid  (out_valid[p]),
      .out_hdr    (out_hdr[p]),
      .out_payload(out_payload[p]),
      .out_err    (rx_err[p])
    );
  end

  cdma_scheduler #(.N_PORTS(N_PORTS)) u_sched (
    .req     (req),
    .req_port(req_port),
    .dst_full(dst_full),
    .grant   (grant)
  );

  code_adder #(.N_PORTS(N_PORTS), .NCHIP(NCHIP)) u_adder (
    .clk   (clk),
    .rst_n (rst_n),
    .chips (chips),
    .active(active),
    .sum   (sum)
  );

  assign err = |rx_err;

endmodule
