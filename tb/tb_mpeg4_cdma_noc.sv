// tb_mpeg4_cdma_noc: end-to-end test of the two-switch CDMA star network
// with every parameter at its default (64-bit payload, 8-entry buffers,
// 8-chip Walsh codes).
//
// Phase 1, external sources: directed packets check the exact latency of
// a one-hop path (SDRAM to 3D graphics, 3 cycles) and a two-hop path
// (SDRAM to upsampling unit, 6 cycles), and eight simultaneous packets
// check concurrent delivery.
// Phase 2, built-in traffic generators: the twelve resources send the
// MPEG-4 traffic pattern for RUN_CYCLES cycles. Every packet that enters
// is put on a scoreboard per (source, destination); every delivered
// packet must be the oldest one of its pair, arrive at the right
// resource, and not come earlier than its hop count allows. The test
// reports average latency, hop count and per-path throughput. Phase 3
// switches the generators off again and drains the network: nothing may
// be lost. Each mechanism (one-hop and two-hop delivery, concurrent
// delivery, waiting for the code of a busy destination, a full resource
// buffer, a full link buffer, the switch between external and generated
// traffic) is counted, and one that never happened is a failure.
module tb_mpeg4_cdma_noc;
  import noc_pkg::*;
  localparam int unsigned PW         = NOC_PAYLOAD_W;
  localparam int unsigned RUN_CYCLES = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                         tgen_en;
  logic     [N_RES-1:0]         ext_valid, res_full, inj_fire, res_out_valid;
  pkt_hdr_t [N_RES-1:0]         ext_hdr, res_out_hdr;
  logic     [N_RES-1:0][PW-1:0] ext_payload, res_out_payload, inj_payload;
  pkt_hdr_t [N_RES-1:0]         inj_hdr;
  logic     [N_GROUPS-1:0]      link_full, err;

  mpeg4_cdma_noc dut (
    .clk, .rst_n, .tgen_en, .ext_valid, .ext_hdr, .ext_payload,
    .res_full, .inj_fire, .inj_hdr, .inj_payload, .res_out_valid, .res_out_hdr, .res_out_payload,
    .link_full, .err);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_one_hop = 0, n_two_hop = 0, n_concurrent = 0, n_waited = 0;
  int n_res_full = 0, n_link_full = 0, n_mode_switch = 0;
  longint lat_sum = 0;
  int     lat_n = 0, lat_max = 0;
  int     hop_sum = 0;
  int     pair_cnt [N_RES][N_RES];

  typedef struct {
    pkt_hdr_t      hdr;
    logic [PW-1:0] payload;
    int            t_in;
  } rec_t;
  rec_t sb [N_RES][N_RES][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dst_res(pkt_hdr_t h);
    return int'(port_res(int'(h.gid), int'(h.dst)));
  endfunction

  // Record entering packets and check delivered ones; called mid-cycle.
  task automatic monitor();
    int nv = 0;
    for (int r = 0; r < N_RES; r++) begin
      if (res_full[r]) n_res_full++;
      if (inj_fire[r]) begin
        rec_t x;
        int d;
        x.hdr     = inj_hdr[r];
        x.payload = inj_payload[r];
        x.t_in    = cycle;
        d = dst_res(x.hdr);
        check(d < N_RES, "entering packet has a valid destination");
        check(x.hdr.src == SRC_W'(r), "entering packet source field");
        if (d < N_RES) sb[r][d].push_back(x);
      end
    end
    for (int g = 0; g < N_GROUPS; g++) if (link_full[g]) n_link_full++;
    for (int r = 0; r < N_RES; r++) begin
      if (!res_out_valid[r]) continue;
      nv++;
      begin
        int s = int'(res_out_hdr[r].src);
        check(s < N_RES, "delivered source field");
        if (s < N_RES) begin
          check(sb[s][r].size() != 0, "unexpected packet");
          if (sb[s][r].size() != 0) begin
            rec_t x;
            int hops, lat;
            x = sb[s][r].pop_front();
            check(res_out_hdr[r] == x.hdr && res_out_payload[r] == x.payload,
                  "packet content and order");
            hops = (res_gid(SRC_W'(s)) == res_gid(SRC_W'(r))) ? 1 : 2;
            lat  = cycle - x.t_in;
            check(lat >= 3 * hops, "latency not below the pipeline depth");
            if (lat > 3 * hops) n_waited++;
            if (hops == 1) n_one_hop++; else n_two_hop++;
            hop_sum += hops;
            lat_sum += lat;
            lat_n++;
            if (lat > lat_max) lat_max = lat;
            pair_cnt[s][r]++;
          end
        end
      end
    end
    if (nv > 1) n_concurrent++;
    check(err == '0, "receiver error");
  endtask

  task automatic ext_send(int s, int d);
    ext_valid[s]       = 1'b1;
    ext_hdr[s].gid     = res_gid(SRC_W'(d));
    ext_hdr[s].dst     = res_port(SRC_W'(d));
    ext_hdr[s].src     = SRC_W'(s);
    ext_payload[s]     = {$urandom, $urandom};
  endtask

  task automatic step();
    @(negedge clk);
    #1 monitor();
  endtask

  // Sends one packet from s to d on an idle network and checks its latency.
  task automatic lone_packet(int s, int d, int want);
    int t0, got;
    @(negedge clk);
    ext_send(s, d);
    t0 = cycle;
    #1 monitor();
    @(negedge clk);
    ext_valid = '0;
    #1;
    got = -1;
    for (int n = 1; n < 20 && got < 0; n++) begin
      if (res_out_valid[d]) got = cycle - t0;
      monitor();
      if (got < 0) begin @(negedge clk); #1; end
    end
    check(got == want, $sformatf("lone packet %0d->%0d latency %0d, want %0d", s, d, got, want));
  endtask

  initial begin
    for (int s = 0; s < N_RES; s++) for (int d = 0; d < N_RES; d++) pair_cnt[s][d] = 0;
    tgen_en = 0; ext_valid = '0; ext_hdr = '0; ext_payload = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Phase 1: directed packets.
    lone_packet(RES_SDRAM, RES_GFX3D, 3);
    repeat (5) step();
    lone_packet(RES_SDRAM, RES_UPSAMPLE, 6);
    repeat (5) step();
    lone_packet(RES_UPSAMPLE, RES_SRAM2, 3);
    repeat (5) step();
    // Eight packets at once, to eight different destinations.
    @(negedge clk);
    ext_send(RES_SDRAM,     RES_GFX3D);
    ext_send(RES_GFX3D,     RES_SDRAM);
    ext_send(RES_VIDEO_OUT, RES_MEDIA_CPU);
    ext_send(RES_AUDIO_OUT, RES_VIDEO_OUT);
    ext_send(RES_UPSAMPLE,  RES_SRAM2);
    ext_send(RES_SRAM2,     RES_UPSAMPLE);
    ext_send(RES_QUANT,     RES_RISC);
    ext_send(RES_RISC,      RES_QUANT);
    #1 monitor();
    @(negedge clk);
    ext_valid = '0;
    #1 monitor();
    repeat (10) step();

    // Phase 2: MPEG-4 traffic from the generators.
    @(negedge clk);
    tgen_en = 1;
    n_mode_switch++;
    #1 monitor();
    repeat (RUN_CYCLES) step();

    // Phase 3: back to external sources and drain.
    @(negedge clk);
    tgen_en = 0;
    n_mode_switch++;
    #1 monitor();
    repeat (500) step();

    for (int s = 0; s < N_RES; s++)
      for (int d = 0; d < N_RES; d++)
        check(sb[s][d].size() == 0, "packet lost");

    check(n_one_hop > 0,     "one-hop deliveries");
    check(n_two_hop > 0,     "two-hop deliveries");
    check(n_concurrent > 0,  "concurrent deliveries");
    check(n_waited > 0,      "packets that waited for a busy destination");
    check(n_res_full > 0,    "full resource buffers");
    check(n_link_full > 0,   "full link buffers");
    check(n_mode_switch == 2, "mode switches");

    $display("delivered=%0d one_hop=%0d two_hop=%0d concurrent_cycles=%0d waited=%0d",
             lat_n, n_one_hop, n_two_hop, n_concurrent, n_waited);
    $display("res_full_cycles=%0d link_full_cycles=%0d", n_res_full, n_link_full);
    if (lat_n > 0)
      $display("average latency %0.2f cycles (max %0d), average hop count %0.3f",
               real'(lat_sum) / lat_n, lat_max, real'(hop_sum) / lat_n);
    // Delivered packets per cycle for the heaviest paths.
    $display("SDRAM->UPSAMPLE %0.3f  UPSAMPLE->SDRAM %0.3f  SRAM2->UPSAMPLE %0.3f  GFX3D->SDRAM %0.3f per cycle",
             real'(pair_cnt[RES_SDRAM][RES_UPSAMPLE]) / RUN_CYCLES,
             real'(pair_cnt[RES_UPSAMPLE][RES_SDRAM]) / RUN_CYCLES,
             real'(pair_cnt[RES_SRAM2][RES_UPSAMPLE]) / RUN_CYCLES,
             real'(pair_cnt[RES_GFX3D][RES_SDRAM]) / RUN_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
