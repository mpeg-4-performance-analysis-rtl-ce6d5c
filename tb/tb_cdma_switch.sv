// tb_cdma_switch: self-checking test of one seven-port CDMA switch.
//
// Ports 0-5 play resources of group 0, port 6 plays the link from the
// other switch. All ports send random packets (to local ports, or to
// group 1, which must leave on the link port); the payload is a unique
// sequence number. A scoreboard checks that every packet arrives once,
// on the right port, with its header intact, in order per source and
// destination, and not before 3 cycles. It also checks the 3-cycle latency
// of a lone packet, that nothing leaves on the link port while the link
// reports full, and counts concurrent deliveries, contention waits and
// full buffers; each must happen at least once.
module tb_cdma_switch;
  import noc_pkg::*;
  localparam int unsigned N  = 7;
  localparam int unsigned PW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [N-1:0]         in_valid, in_full, out_valid, dst_full;
  pkt_hdr_t [N-1:0]         in_hdr, out_hdr;
  logic     [N-1:0][PW-1:0] in_payload, out_payload;
  logic                     err;

  cdma_switch #(.PAYLOAD_W(PW), .DEPTH(8), .CODE_LEN(8), .N_PORTS(N),
                .MY_GID(0), .LINK_PORT(6), .LINK_SLACK(2)) dut (
    .clk, .rst_n, .in_valid, .in_hdr, .in_payload, .in_full,
    .out_valid, .out_hdr, .out_payload, .dst_full, .err);

  int checks = 0, failures = 0;
  int concurrent = 0, waited = 0, full_seen = 0, link_out = 0, delivered = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

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

  // Expected packets per (source port, output port), and push cycles.
  logic [HDR_W+PW-1:0] exp_q [N][N][$];
  int                  sent_at [int];
  logic [N-1:0]        full_hist [4];
  int                  seq = 0;

  function automatic int out_port_of(pkt_hdr_t h);
    return (h.gid == 0) ? int'(h.dst) : 6;
  endfunction

  // Checks the outputs of the current cycle (called after the negedge).
  task automatic check_outputs();
    int nv = 0;
    for (int p = 0; p < N; p++) begin
      if (!out_valid[p]) continue;
      nv++;
      delivered++;
      if (p == 6) begin
        link_out++;
        check(!full_hist[1][6], "link output while link full");
      end
      begin
        int s = int'(out_hdr[p].src);
        int lat;
        check(s < N, "source field");
        if (s < N) begin
          check(exp_q[s][p].size() != 0, "unexpected packet");
          if (exp_q[s][p].size() != 0) begin
            check({out_hdr[p], out_payload[p]} == exp_q[s][p][0], "packet content/order");
            void'(exp_q[s][p].pop_front());
          end
        end
        lat = cycle - sent_at[int'(out_payload[p])];
        check(lat >= 3, "latency at least 3");
        if (lat > 3) waited++;
      end
    end
    if (nv > 1) concurrent++;
    check(!err, "receiver error");
  endtask

  task automatic push_pkt(int p, pkt_hdr_t h);
    in_valid[p]   = 1'b1;
    in_hdr[p]     = h;
    in_payload[p] = PW'(seq);
    sent_at[seq]  = cycle;   // the cycle in which in_valid is high
    exp_q[p][out_port_of(h)].push_back({h, PW'(seq)});
    seq++;
  endtask

  initial begin
    pkt_hdr_t h;
    int t0;
    in_valid = '0; in_hdr = '0; in_payload = '0; dst_full = '0;
    for (int i = 0; i < 4; i++) full_hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // A lone packet from port 0 to port 3: exactly 3 cycles.
    @(negedge clk);
    h.gid = 0; h.src = 0; h.dst = 3;
    push_pkt(0, h);
    t0 = cycle;
    @(negedge clk); in_valid = '0;
    while (!out_valid[3] && cycle < t0 + 10) @(negedge clk);
    check(out_valid[3] && (cycle - t0 == 3), "lone packet latency 3");
    check_outputs();

    // Random traffic.
    for (int t = 0; t < 6000; t++) begin
      bit heavy;
      @(negedge clk);
      check_outputs();
      heavy = ((t / 500) % 2) == 1;
      // Link back-pressure in bursts.
      if ((t % 97) == 0) dst_full[6] = ($urandom % 2);
      for (int p = 0; p < N; p++) begin
        in_valid[p] = 1'b0;
        if (in_full[p]) full_seen++;
        if (!in_full[p] && (($urandom % 8) < (heavy ? 7 : 2))) begin
          if (p == 6) begin h.gid = 0; h.dst = DST_W'($urandom % 6); end
          else begin
            h.gid = GID_W'(($urandom % 4) == 0);
            // heavy phases favour destination 2 to create contention
            h.dst = DST_W'(heavy && ($urandom % 2) ? 2 : $urandom % 6);
          end
          h.src = SRC_W'(p);
          push_pkt(p, h);
        end
      end
      @(posedge clk);
      for (int i = 3; i > 0; i--) full_hist[i] = full_hist[i-1];
      full_hist[0] = dst_full;
    end

    // Drain.
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      check_outputs();
      in_valid = '0; dst_full = '0;
      @(posedge clk);
      for (int i = 3; i > 0; i--) full_hist[i] = full_hist[i-1];
      full_hist[0] = dst_full;
    end
    for (int s = 0; s < N; s++)
      for (int p = 0; p < N; p++)
        check(exp_q[s][p].size() == 0, "packet lost");
    check(concurrent > 0, "concurrent deliveries seen");
    check(waited > 0, "contention seen");
    check(full_seen > 0, "buffer full seen");
    check(link_out > 0, "link traffic seen");
    $display("delivered=%0d concurrent_cycles=%0d waited=%0d full=%0d link=%0d",
             delivered, concurrent, waited, full_seen, link_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
