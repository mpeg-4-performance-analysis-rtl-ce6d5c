// tb_cdma_rx: self-checking test of the CDMA receivers.
//
// Instantiates the seven receivers of a switch on one shared chip-sum
// bus. The testbench plays transmitters and code adder itself: it builds
// the 8x8 Walsh-Hadamard matrix by the recursive doubling H2n = [H H; H -H],
// spreads random packets for a random set of destinations (at most one per
// destination) and adds them up. Every receiver must deliver exactly its
// own packet one cycle later, the others nothing, and err must stay low.
// Collisions (two packets on one codeword) must raise err.
module tb_cdma_rx;
  import noc_pkg::*;
  localparam int unsigned N      = 7;
  localparam int unsigned L      = 8;
  localparam int unsigned PW     = 8;
  localparam int unsigned PKT_W  = HDR_W + PW;
  localparam int unsigned NCHIP  = PKT_W * L;
  localparam int unsigned SUM_W  = $clog2(N + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NCHIP-1:0][SUM_W-1:0] sum;
  logic     [N-1:0]            ov, oe;
  pkt_hdr_t [N-1:0]            oh;
  logic     [N-1:0][PW-1:0]    op;
  int checks = 0, failures = 0, collisions = 0, deliveries = 0;

  for (genvar p = 0; p < N; p++) begin : g_rx
    cdma_rx #(.PORT(p), .PAYLOAD_W(PW), .CODE_LEN(L), .N_PORTS(N)) dut (
      .clk, .rst_n, .sum, .out_valid(ov[p]), .out_hdr(oh[p]),
      .out_payload(op[p]), .out_err(oe[p]));
  end

  int h [L][L];   // +1 / -1
  initial begin
    h[0][0] = 1;
    for (int n = 1; n < L; n = n * 2)
      for (int r = 0; r < n; r++)
        for (int c = 0; c < n; c++) begin
          h[r][c+n]   = h[r][c];
          h[r+n][c]   = h[r][c];
          h[r+n][c+n] = -h[r][c];
        end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PKT_W-1:0] pkt [N];
  logic [N-1:0]     sent;
  int               acc [NCHIP];

  initial begin
    sum = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      bit collide;
      int cp;
      @(negedge clk);
      collide = (t % 50) == 49;
      sent = N'($urandom);
      cp = $urandom % N;
      if (t == 0) sent = '1;
      if (collide) sent[cp] = 1'b1;
      for (int c = 0; c < NCHIP; c++) acc[c] = 0;
      for (int p = 0; p < N; p++) begin
        pkt[p] = PKT_W'({$urandom, $urandom});
        if (sent[p])
          for (int b = 0; b < PKT_W; b++)
            for (int k = 0; k < L; k++)
              acc[b*L+k] += pkt[p][b] ? -h[p+1][k] : h[p+1][k];
      end
      if (collide)   // a second packet on codeword cp
        for (int b = 0; b < PKT_W; b++)
          for (int k = 0; k < L; k++)
            acc[b*L+k] += (b % 2) ? -h[cp+1][k] : h[cp+1][k];
      for (int c = 0; c < NCHIP; c++) sum[c] = SUM_W'(acc[c]);
      @(negedge clk);
      if (collide) begin
        checks++;
        if (!oe[cp]) failures++;
        collisions++;
      end else begin
        for (int p = 0; p < N; p++) begin
          checks++;
          if (ov[p] != sent[p] || oe[p]) begin
            failures++;
            if (failures < 10) $display("FAIL port %0d valid=%b want %b err=%b", p, ov[p], sent[p], oe[p]);
          end
          if (sent[p]) begin
            checks++;
            deliveries++;
            if ({oh[p], op[p]} != pkt[p]) begin
              failures++;
              if (failures < 10) $display("FAIL port %0d data %h want %h", p, {oh[p], op[p]}, pkt[p]);
            end
          end
        end
      end
    end
    checks++;
    if (collisions == 0 || deliveries == 0) failures++;
    $display("deliveries=%0d collisions=%0d", deliveries, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
