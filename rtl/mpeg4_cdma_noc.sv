// mpeg4_cdma_noc: CDMA star network-on-chip for a twelve-resource MPEG-4
// system.
//
// Two seven-port CDMA switches form the star. Switch 0 serves SDRAM, the
// 3D graphics processor, the video output processor, the media CPU, the
// audio output processor and the audio DSP; switch 1 serves the
// upsampling unit, SRAM2, the quantization unit, the RISC CPU, the scaling
// unit and SRAM1. Port 6 of each switch is the link to the other one: a
// packet between the two groups passes through both switches (two hops),
// a packet inside a group through one. Link back-pressure uses the link
// buffer's early full flag as dst_full of the sending switch.
//
// Each resource port can be driven from outside (the real IP block) or,
// with tgen_en high, by a built-in traffic_gen that reproduces the
// resource's share of the MPEG-4 bandwidth table; this is the simulation
// platform used to measure latency and buffer occupancy.
//
// Ports, indexed by resource number (noc_pkg::res_id_t):
//   ext_valid/ext_hdr/ext_payload  packet from the resource (tgen_en low)
//   res_full                       the resource's TX buffer is full: stop
//   inj_fire/inj_hdr/inj_payload   packet entering the network this cycle
//                                  (trace port for a transmit log)
//   res_out_valid/_hdr/_payload    packet delivered to the resource
//   link_full[g]                   the link buffer of switch g is full
//   err[g]                         a receiver of switch g saw a bad sum
// Timing: without contention a packet reaches a resource of its own group
// 3 cycles after it was pushed, and one of the other group 6 cycles after.
// The two-switch star, the seven-port switch, the resources and their
// traffic follow the document; which switch and port a resource uses is
// this design's choice (see noc_pkg).
module mpeg4_cdma_noc
  import noc_pkg::*;
#(
  parameter int unsigned PAYLOAD_W = noc_pkg::NOC_PAYLOAD_W,
  parameter int unsigned DEPTH     = noc_pkg::NOC_DEPTH,
  parameter int unsigned CODE_LEN  = noc_pkg::NOC_CODE_LEN
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               tgen_en,
  input  logic     [N_RES-1:0]               ext_valid,
  input  pkt_hdr_t [N_RES-1:0]               ext_hdr,
  input  logic     [N_RES-1:0][PAYLOAD_W-1:0] ext_payload,
  output logic     [N_RES-1:0]               res_full,
  output logic     [N_RES-1:0]               inj_fire,
  output pkt_hdr_t [N_RES-1:0]               inj_hdr,
  output logic     [N_RES-1:0][PAYLOAD_W-1:0] inj_payload,
  output logic     [N_RES-1:0]               res_out_valid,
  output pkt_hdr_t [N_RES-1:0]               res_out_hdr,
  output logic     [N_RES-1:0][PAYLOAD_W-1:0] res_out_payload,
  output logic     [N_GROUPS-1:0]            link_full,
  output logic     [N_GROUPS-1:0]            err
);

  // Resource-side signals after the source select.
  logic     [N_RES-1:0]                 src_valid, tg_valid;
  pkt_hdr_t [N_RES-1:0]                 src_hdr, tg_hdr;
  logic     [N_RES-1:0][PAYLOAD_W-1:0]  src_payload, tg_payload;

  // Switch-side signals.
  logic     [N_GROUPS-1:0][NOC_N_PORTS-1:0]                sw_in_valid, sw_in_full;
  logic     [N_GROUPS-1:0][NOC_N_PORTS-1:0]                sw_out_valid, sw_dst_full;
  pkt_hdr_t [N_GROUPS-1:0][NOC_N_PORTS-1:0]                sw_in_hdr, sw_out_hdr;
  logic     [N_GROUPS-1:0][NOC_N_PORTS-1:0][PAYLOAD_W-1:0] sw_in_payload, sw_out_payload;

  for (genvar r = 0; r < N_RES; r++) begin : g_res
    localparam int unsigned G = 32'(res_gid(SRC_W'(r)));
    localparam int unsigned P = 32'(res_port(SRC_W'(r)));

    traffic_gen #(.SRC_ID(r), .PAYLOAD_W(PAYLOAD_W)) u_tg (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (tgen_en),
      .full   (res_full[r] || !tgen_en),
      .valid  (tg_valid[r]),
      .hdr    (tg_hdr[r]),
      .payload(tg_payload[r])
    );

    assign src_valid[r]   = tgen_en ? tg_valid[r]   : ext_valid[r];
    assign src_hdr[r]     = tgen_en ? tg_hdr[r]     : ext_hdr[r];
    assign src_payload[r] = tgen_en ? tg_payload[r] : ext_payload[r];
    assign inj_fire[r]    = src_valid[r] && !res_full[r];
    assign inj_hdr[r]     = src_hdr[r];
    assign inj_payload[r] = src_payload[r];

    assign sw_in_valid[G][P]   = inj_fire[r];
    assign sw_in_hdr[G][P]     = src_hdr[r];
    assign sw_in_payload[G][P] = src_payload[r];
    assign sw_dst_full[G][P]   = 1'b0;
    assign res_full[r]         = sw_in_full[G][P];

    assign res_out_valid[r]   = sw_out_valid[G][P];
    assign res_out_hdr[r]     = sw_out_hdr[G][P];
    assign res_out_payload[r] = sw_out_payload[G][P];
  end

  // The link: what one switch delivers on its link port enters the
  // other switch's link transmitter.
  for (genvar g = 0; g < N_GROUPS; g++) begin : g_sw
    localparam int unsigned O = N_GROUPS - 1 - g;

    assign sw_in_valid[g][NOC_LINK_PORT]   = sw_out_valid[O][NOC_LINK_PORT];
    assign sw_in_hdr[g][NOC_LINK_PORT]     = sw_out_hdr[O][NOC_LINK_PORT];
    assign sw_in_payload[g][NOC_LINK_PORT] = sw_out_payload[O][NOC_LINK_PORT];
    assign sw_dst_full[g][NOC_LINK_PORT]   = sw_in_full[O][NOC_LINK_PORT];
    assign link_full[g]                = sw_in_full[g][NOC_LINK_PORT];

    cdma_switch #(
      .PAYLOAD_W (PAYLOAD_W),
      .DEPTH     (DEPTH),
      .CODE_LEN  (CODE_LEN),
      .N_PORTS   (NOC_N_PORTS),
      .MY_GID    (g),
      .LINK_PORT (NOC_LINK_PORT),
      .LINK_SLACK(2)
    ) u_sw (
      .clk        (clk),
      .rst_n      (rst_n),
      .in_valid   (sw_in_valid[g]),
      .in_hdr     (sw_in_hdr[g]),
      .in_payload (sw_in_payload[g]),
      .in_full    (sw_in_full[g]),
      .out_valid  (sw_out_valid[g]),
      .out_hdr    (sw_out_hdr[g]),
      .out_payload(sw_out_payload[g]),
      .dst_full   (sw_dst_full[g]),
      .err        (err[g])
    );
  end

endmodule
