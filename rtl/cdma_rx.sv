// cdma_rx: receiver (RX) module of one CDMA switch port.
//
// The receiver of port PORT recovers the packet sent to it from the
// code adder's chip sums by correlating, for every packet bit, the
// CODE_LEN sums of that bit with the port's own Walsh codeword (row
// PORT+1): sums at chips where the codeword is 0 are added, sums where it
// is 1 are subtracted. Packets for other destinations use orthogonal
// codewords and cancel, so the correlation is +CODE_LEN for a 0 bit,
// -CODE_LEN for a 1 bit and 0 when no packet is sent to this port.
//
// A packet is present when the correlation of bit 0 is non-zero. err
// flags a correlation that is neither 0 nor +-CODE_LEN, or a packet whose
// bits disagree about being present; with a correct scheduler (one sender
// per destination) it never rises.
//
// Interface: sum from code_adder; out_valid/out_hdr/out_payload go to the
// resource (or to the other switch on the link port); there is no
// back-pressure on the receive side. Timing: one register stage; a packet
// whose sums arrive in cycle t is on the outputs in cycle t+1. Demodulation
// with the transmit codeword follows the document; the correlation
// arithmetic, the presence test and err are this design's choices.
module cdma_rx
  import noc_pkg::*;
#(
  parameter int unsigned PORT      = 0,
  parameter int unsigned PAYLOAD_W = noc_pkg::NOC_PAYLOAD_W,
  parameter int unsigned CODE_LEN  = noc_pkg::NOC_CODE_LEN,
  parameter int unsigned N_PORTS   = noc_pkg::NOC_N_PORTS,
  localparam int unsigned PKT_W    = HDR_W + PAYLOAD_W,
  localparam int unsigned NCHIP    = PKT_W * CODE_LEN,
  localparam int unsigned SUM_W    = $clog2(N_PORTS + 1) + 1,
  localparam int unsigned CORR_W   = $clog2(N_PORTS * CODE_LEN + 1) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NCHIP-1:0][SUM_W-1:0]   sum,
  output logic                          out_valid,
  output pkt_hdr_t                      out_hdr,
  output logic [PAYLOAD_W-1:0]          out_payload,
  output logic                          out_err
);

  logic [PKT_W-1:0] bits, present, bad;
  logic             valid_d, err_d;

  for (genvar b = 0; b < PKT_W; b++) begin : g_bit
    always_comb begin
      logic signed [CORR_W-1:0] corr;
      corr = '0;
      for (int unsigned k = 0; k < CODE_LEN; k++) begin
        logic signed [CORR_W-1:0] s;
        s = CORR_W'($signed(sum[b*CODE_LEN + k]));
        if (walsh_bit(PORT + 1, k)) corr = corr - s;
        else                        corr = corr + s;
      end
      bits[b]    = corr[CORR_W-1];
      present[b] = (corr != '0);
      bad[b]     = present[b] && (corr != CORR_W'(CODE_LEN))
                              && (corr != -CORR_W'(CODE_LEN));
    end
  end

  assign valid_d = present[0];
  assign err_d   = (|bad) || (present != {PKT_W{valid_d}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_err     <= 1'b0;
      out_hdr     <= '0;
      out_payload <= '0;
    end else begin
      out_valid <= valid_d;
      out_err   <= err_d;
      if (valid_d) {out_hdr, out_payload} <= bits;
    end
  end

endmodule
