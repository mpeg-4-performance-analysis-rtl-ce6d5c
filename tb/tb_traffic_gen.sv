// tb_traffic_gen: self-checking test of the resource traffic model.
//
// Instance A models the 3D graphics processor, which sends 300 MByte/s to
// SDRAM and 20 MByte/s to the quantization unit; against the heaviest
// path of 455 MByte/s these are per-cycle rates of 0.659 and 0.044. The
// test counts the packets A produces per destination over 20000 cycles
// with the network never full, and checks the rates within a tolerance,
// that no other destination is addressed, and the header and time-stamp
// fields (the payload is the cycle count at which the packet is taken,
// so it advances while the packet waits). Instance B models the upsampling unit, whose path to SDRAM is
// the heaviest one: it must offer a packet every cycle. Holding full high
// keeps a packet on offer, and nothing may be
// offered while en is low.
module tb_traffic_gen;
  import noc_pkg::*;
  localparam int unsigned PW = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          en, full_a, full_b;
  logic          va, vb;
  pkt_hdr_t      ha, hb;
  logic [PW-1:0] pa, pb;

  traffic_gen #(.SRC_ID(RES_GFX3D), .PAYLOAD_W(PW)) dut_a (
    .clk, .rst_n, .en, .full(full_a), .valid(va), .hdr(ha), .payload(pa));
  traffic_gen #(.SRC_ID(RES_UPSAMPLE), .PAYLOAD_W(PW)) dut_b (
    .clk, .rst_n, .en, .full(full_b), .valid(vb), .hdr(hb), .payload(pb));

  int checks = 0, failures = 0;
  int n_sdram = 0, n_quant = 0, n_other = 0, b_idle = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned CYCLES = 20000;

  initial begin
    real ra, rq;
    en = 0; full_a = 0; full_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Disabled: nothing offered.
    repeat (20) begin
      @(negedge clk);
      check(!va && !vb, "idle while disabled");
    end
    @(negedge clk);
    en = 1;
    @(negedge clk);
    for (int t = 0; t < CYCLES; t++) begin
      @(negedge clk);
      cycle++;
      if (va) begin
        check(ha.src == SRC_W'(RES_GFX3D), "source field");
        check(pa != '0, "time stamp");
        if (ha.gid == 0 && ha.dst == 3'd0) n_sdram++;        // SDRAM: group 0 port 0
        else if (ha.gid == 1 && ha.dst == 3'd2) n_quant++;   // QUANT: group 1 port 2
        else n_other++;
      end
      if (!vb) b_idle++;
      else check(hb.src == SRC_W'(RES_UPSAMPLE), "source field B");
    end
    ra = real'(n_sdram) / CYCLES;
    rq = real'(n_quant) / CYCLES;
    $display("rate to SDRAM %f (0.659), to QUANT %f (0.044), other %0d, B idle %0d",
             ra, rq, n_other, b_idle);
    check(ra > 0.62 && ra < 0.70, "rate to SDRAM");
    check(rq > 0.030 && rq < 0.055, "rate to QUANT");
    check(n_other == 0, "no other destinations");
    check(b_idle == 0, "heaviest path offers every cycle");
    // Full: the offered packet stays the same until full drops.
    @(negedge clk);
    full_a = 1; full_b = 1;
    @(negedge clk);
    begin
      pkt_hdr_t h0;
      logic [PW-1:0] p0;
      h0 = hb;
      p0 = pb;
      for (int n = 1; n <= 10; n++) begin
        @(negedge clk);
        // still offering; the time stamp is the cycle it will be taken
        check(vb && hb.src == h0.src && pb == p0 + PW'(n), "held while full");
      end
    end
    full_a = 0; full_b = 0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
