// tb_cdma_tx: self-checking test of a CDMA transmitter.
//
// Pushes packets for local destinations and for the other switch into
// the transmitter of switch 0 and grants its requests at random. Checks
// that the requested port is the packet's destination port (or the link
// port 6 for group 1), that the chips of a granted packet equal each bit
// spread onto Walsh row port+1 (built independently by recursive
// doubling), that packets leave in arrival order, and that full rises
// when the eight-entry buffer is full.
module tb_cdma_tx;
  import noc_pkg::*;
  localparam int unsigned L     = 8;
  localparam int unsigned PW    = 8;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned PKT_W = HDR_W + PW;
  localparam int unsigned NCHIP = PKT_W * L;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, full, req, grant, active;
  pkt_hdr_t         in_hdr;
  logic [PW-1:0]    in_payload;
  logic [DST_W-1:0] req_port;
  logic [NCHIP-1:0] chips;
  int checks = 0, failures = 0, fulls = 0, links = 0;

  cdma_tx #(.PAYLOAD_W(PW), .DEPTH(DEPTH), .CODE_LEN(L), .MY_GID(0),
            .LINK_PORT(6), .FULL_SLACK(0)) dut (
    .clk, .rst_n, .in_valid, .in_hdr, .in_payload, .full,
    .req, .req_port, .grant, .chips, .active);

  int h [L][L];
  initial begin
    h[0][0] = 1;
    for (int n = 1; n < L; n = n * 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n] = h[r][c]; h[r+n][c] = h[r][c]; h[r+n][c+n] = -h[r][c];
        end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PKT_W-1:0] q[$];

  initial begin
    in_valid = 0; in_hdr = '0; in_payload = '0; grant = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      bit fill;
      @(negedge clk);
      fill = ((t / 300) % 2) == 0;
      check(req == (q.size() != 0), "req");
      check(full == (q.size() >= DEPTH), "full");
      if (full) fulls++;
      grant = req && (($urandom % 4) < (fill ? 1 : 3));
      #1;
      check(active == grant, "active");
      if (q.size() != 0) begin
        pkt_hdr_t hh;
        int port;
        hh = pkt_hdr_t'(q[0][PKT_W-1 -: HDR_W]);
        port = (hh.gid == 0) ? int'(hh.dst) : 6;
        if (hh.gid != 0) links++;
        check(int'(req_port) == port, "req_port");
        if (grant)
          for (int b = 0; b < PKT_W; b++)
            for (int k = 0; k < L; k++) begin
              // chip 0 stands for +1, 1 for -1
              int want;
              want = q[0][b] ? -h[port+1][k] : h[port+1][k];
              check(chips[b*L+k] == (want < 0), "chip");
            end
      end
      in_valid   = !full && (($urandom % 4) < (fill ? 3 : 1));
      in_hdr.gid = GID_W'(($urandom % 3) == 0);
      in_hdr.src = SRC_W'($urandom);
      in_hdr.dst = DST_W'($urandom % 6);
      in_payload = PW'($urandom);
      @(posedge clk);
      if (grant) void'(q.pop_front());
      if (in_valid) q.push_back({in_hdr, in_payload});
    end
    check(fulls > 0 && links > 0, "full and link cases seen");
    $display("full cycles=%0d link packets=%0d", fulls, links);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
