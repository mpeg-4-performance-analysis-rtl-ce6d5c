// noc_pkg: types, constants and helper functions shared by the CDMA star
// network-on-chip.
//
// The network moves packets made of a header (group id, source address,
// destination address) and a payload. Every packet bit is spread onto an
// L-chip Walsh codeword: a 0 is sent as the codeword, a 1 as its complement.
// Walsh codewords are the rows of the Sylvester Hadamard matrix; chip k of
// row r is the parity of (r & k) (0 means +1, 1 means -1). Row 0 is the
// constant row and is never used, so an L-chip code serves L-1 destinations,
// which is why a switch has CODE_LEN-1 = 7 ports.
//
// The package also carries the MPEG-4 system the network is sized for:
// twelve resources, their placement on the two switches, and the average
// bandwidth each resource sends to each other one (MByte/s x 100).
// The resource set, the bandwidth table, L = 8 chips via seven ports, the
// payload widths, the 8-entry buffer and the two-switch star follow the
// document. The header field widths, the meaning of the group id (the
// destination's switch) and the resource-to-port placement are this
// design's own choices.
package noc_pkg;

  // Network shape
  localparam int unsigned N_RES      = 12;  // MPEG-4 resources
  localparam int unsigned N_GROUPS   = 2;   // CDMA star switches
  localparam int unsigned NOC_N_PORTS   = 7;   // ports per switch
  localparam int unsigned NOC_CODE_LEN  = 8;   // Walsh code length L
  localparam int unsigned NOC_LINK_PORT = 6;   // port that joins the two switches
  localparam int unsigned NOC_DEPTH     = 8;   // TX buffer, packets
  localparam int unsigned NOC_PAYLOAD_W = 64;  // payload bits

  // Header fields
  localparam int unsigned GID_W = 1;  // destination group (switch)
  localparam int unsigned SRC_W = 4;  // source resource number
  localparam int unsigned DST_W = 3;  // destination port on that switch

  typedef struct packed {
    logic [GID_W-1:0] gid;
    logic [SRC_W-1:0] src;
    logic [DST_W-1:0] dst;
  } pkt_hdr_t;

  localparam int unsigned HDR_W = $bits(pkt_hdr_t);

  // The twelve MPEG-4 resources. The document numbers them 1-6 and 8-13;
  // here they are numbered 0-11 in the same order.
  typedef enum logic [SRC_W-1:0] {
    RES_AUDIO_OUT = 4'd0,   // audio output processor (1)
    RES_AUDIO_DSP = 4'd1,   // audio DSP processor    (2)
    RES_MEDIA_CPU = 4'd2,   // media CPU              (3)
    RES_VIDEO_OUT = 4'd3,   // video output processor (4)
    RES_GFX3D     = 4'd4,   // 3D graphics processor  (5)
    RES_SDRAM     = 4'd5,   // SDRAM                  (6)
    RES_SRAM1     = 4'd6,   // SRAM1                  (8)
    RES_QUANT     = 4'd7,   // quantization unit      (9)
    RES_SRAM2     = 4'd8,   // SRAM2                  (10)
    RES_RISC      = 4'd9,   // RISC CPU               (11)
    RES_SCALING   = 4'd10,  // scaling unit           (12)
    RES_UPSAMPLE  = 4'd11   // upsampling unit        (13)
  } res_id_t;

  // Chip k of Walsh row r, 0 for +1 and 1 for -1.
  function automatic logic walsh_bit(int unsigned row, int unsigned k);
    logic [31:0] rk;
    rk = row & k;
    return ^rk;
  endfunction

  // Switch (group) that a resource is attached to.
  function automatic logic [GID_W-1:0] res_gid(logic [SRC_W-1:0] r);
    case (r)
      RES_SDRAM, RES_GFX3D, RES_VIDEO_OUT,
      RES_MEDIA_CPU, RES_AUDIO_OUT, RES_AUDIO_DSP: return 1'b0;
      default:                                     return 1'b1;
    endcase
  endfunction

  // Port of its switch that a resource is attached to. Within a switch the
  // resources with the most traffic take the lowest ports, which the
  // scheduler serves first.
  function automatic logic [DST_W-1:0] res_port(logic [SRC_W-1:0] r);
    case (r)
      RES_SDRAM:     return 3'd0;
      RES_GFX3D:     return 3'd1;
      RES_VIDEO_OUT: return 3'd2;
      RES_MEDIA_CPU: return 3'd3;
      RES_AUDIO_OUT: return 3'd4;
      RES_AUDIO_DSP: return 3'd5;
      RES_UPSAMPLE:  return 3'd0;
      RES_SRAM2:     return 3'd1;
      RES_QUANT:     return 3'd2;
      RES_RISC:      return 3'd3;
      RES_SCALING:   return 3'd4;
      RES_SRAM1:     return 3'd5;
      default:       return 3'd7;
    endcase
  endfunction

  // Resource on a given switch port; N_RES for the link port or none.
  function automatic int unsigned port_res(int unsigned gid, int unsigned port);
    for (int unsigned r = 0; r < N_RES; r++)
      if (res_gid(SRC_W'(r)) == gid[GID_W-1:0] && res_port(SRC_W'(r)) == port[DST_W-1:0])
        return r;
    return N_RES;
  endfunction

  // Average bandwidth from resource s to resource d in MByte/s x 100.
  function automatic int unsigned bw_x100(int unsigned s, int unsigned d);
    case ({s[3:0], d[3:0]})
      {RES_AUDIO_OUT, RES_SDRAM}:     return 25;
      {RES_AUDIO_DSP, RES_SDRAM}:     return 25;
      {RES_MEDIA_CPU, RES_SDRAM}:     return 2500;
      {RES_MEDIA_CPU, RES_SRAM1}:     return 2000;
      {RES_VIDEO_OUT, RES_SDRAM}:     return 9500;
      {RES_GFX3D,     RES_SDRAM}:     return 30000;
      {RES_GFX3D,     RES_QUANT}:     return 2000;
      {RES_SDRAM,     RES_AUDIO_OUT}: return 25;
      {RES_SDRAM,     RES_AUDIO_DSP}: return 25;
      {RES_SDRAM,     RES_MEDIA_CPU}: return 3000;
      {RES_SDRAM,     RES_VIDEO_OUT}: return 9500;
      {RES_SDRAM,     RES_GFX3D}:     return 30000;
      {RES_SDRAM,     RES_SCALING}:   return 1600;
      {RES_SDRAM,     RES_UPSAMPLE}:  return 45500;
      {RES_SRAM1,     RES_MEDIA_CPU}: return 2000;
      {RES_QUANT,     RES_GFX3D}:     return 2000;
      {RES_QUANT,     RES_SRAM2}:     return 25000;
      {RES_SRAM2,     RES_QUANT}:     return 25000;
      {RES_SRAM2,     RES_RISC}:      return 12500;
      {RES_SRAM2,     RES_SCALING}:   return 8700;
      {RES_SRAM2,     RES_UPSAMPLE}:  return 33500;
      {RES_RISC,      RES_SRAM2}:     return 12500;
      {RES_SCALING,   RES_SDRAM}:     return 1600;
      {RES_SCALING,   RES_SRAM2}:     return 8700;
      {RES_UPSAMPLE,  RES_SDRAM}:     return 45500;
      {RES_UPSAMPLE,  RES_SRAM2}:     return 33500;
      default:                        return 0;
    endcase
  endfunction

  // The highest bandwidth in the table; it is sent every cycle.
  localparam int unsigned BW_MAX_X100 = 45500;

  // Per-cycle probability that resource s produces a packet for resource d,
  // in units of 1/65536: bw(s,d) / bw_max * 65536.
  function automatic int unsigned send_threshold(int unsigned s, int unsigned d);
    return (bw_x100(s, d) * 65536 + BW_MAX_X100 / 2) / BW_MAX_X100;
  endfunction

endpackage
