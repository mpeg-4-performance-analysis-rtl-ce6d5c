// traffic_gen: traffic model of one MPEG-4 resource.
//
// Stands in for a resource (CPU, DSP, memory, ...) when the network is
// simulated with the MPEG-4 traffic pattern. For every other resource d
// it keeps a 16-bit Galois LFSR (polynomial x^16+x^14+x^13+x^11+1) and a
// pending flag. In every enabled cycle, a destination without a pending
// packet gets one when its LFSR value lies below send_threshold(SRC_ID,d)
// = bw(SRC_ID,d)/bw_max * 65536, where bw is the average bandwidth of the
// MPEG-4 system; the heaviest path (SDRAM to upsampling unit) therefore
// produces a packet every cycle, every other path proportionally less
// often. Pending packets are offered one at a time, round robin over the
// destinations, and wait while the network signals full; at most one
// packet per destination waits, so further requests for it merge. A
// destination whose packet is taken may get its next one in the same
// cycle, so a path with probability 1 can send every cycle.
//
// The packet header carries the destination's switch (group id) and
// port and SRC_ID as source; the payload carries the cycle count at which
// the packet was offered, so the receiver can measure its latency.
// Interface: en starts generation; valid/hdr/payload offer a packet, which
// is taken in a cycle where valid is high and full is low.
// The normalised-bandwidth traffic rule follows the document; the LFSRs,
// the pending flags and the time-stamp payload are this design's choices.
module traffic_gen
  import noc_pkg::*;
#(
  parameter int unsigned SRC_ID    = 0,
  parameter int unsigned PAYLOAD_W = noc_pkg::NOC_PAYLOAD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 full,
  output logic                 valid,
  output pkt_hdr_t             hdr,
  output logic [PAYLOAD_W-1:0] payload
);

  localparam int unsigned IDX_W = $clog2(N_RES);

  logic [N_RES-1:0][15:0] lfsr;
  logic [N_RES-1:0]       pending;
  logic [IDX_W-1:0]       rr, sel;
  logic                   take;
  logic [PAYLOAD_W-1:0]   now;

  function automatic logic [15:0] seed(int unsigned d);
    logic [15:0] s;
    s = 16'(32'hACE1 ^ (SRC_ID * 4099) ^ (d * 257));
    return (s == '0) ? 16'h1 : s;
  endfunction

  // Round-robin choice of the next pending destination, starting at rr.
  always_comb begin
    sel   = rr;
    valid = 1'b0;
    for (int unsigned n = 0; n < N_RES; n++) begin
      int unsigned d;
      d = (32'(rr) + n) % N_RES;
      if (!valid && pending[d]) begin
        valid = 1'b1;
        sel   = IDX_W'(d);
      end
    end
  end

  assign take     = valid && !full;
  assign hdr.gid  = res_gid(SRC_W'(sel));
  assign hdr.dst  = res_port(SRC_W'(sel));
  assign hdr.src  = SRC_W'(SRC_ID);
  assign payload  = now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 0; d < N_RES; d++) lfsr[d] <= seed(d);
      pending <= '0;
      rr      <= '0;
      now     <= '0;
    end else begin
      now <= now + 1;
      for (int unsigned d = 0; d < N_RES; d++) begin
        logic hit, leaving;
        hit     = en && (32'(lfsr[d]) < send_threshold(SRC_ID, d));
        leaving = take && (sel == IDX_W'(d));
        if (en) lfsr[d] <= {1'b0, lfsr[d][15:1]} ^ (lfsr[d][0] ? 16'hB400 : 16'h0);
        // A packet leaving frees the slot for a new one in the same cycle.
        if (leaving || !pending[d]) pending[d] <= hit;
      end
      if (take) rr <= (sel == IDX_W'(N_RES - 1)) ? '0 : sel + 1'b1;
    end
  end

endmodule
