// tb_mpeg4_payload_sizes: runs the MPEG-4 traffic pattern on the whole
// network at payload widths of 8, 16 and 32 bits side by side (64 bits is
// the end-to-end test). Each network runs 5000 cycles of generated
// traffic and is then drained. Every packet that entered must be
// delivered, to the resource its header names, without receiver errors.
// The traffic and the scheduling do not depend on the payload width, so
// the three networks must also deliver exactly the same number of packets.
module tb_mpeg4_payload_sizes;
  logic clk = 1'b0, rst_n = 1'b0, tgen_en = 1'b0;
  always #5 clk = ~clk;

  int inj [3], del [3], mis [3], errs [3], full [3];
  int checks = 0, failures = 0;

  noc_size_run #(.PW(8))  r8  (.clk, .rst_n, .tgen_en, .injected(inj[0]), .delivered(del[0]),
                               .misrouted(mis[0]), .errors(errs[0]), .full_cycles(full[0]));
  noc_size_run #(.PW(16)) r16 (.clk, .rst_n, .tgen_en, .injected(inj[1]), .delivered(del[1]),
                               .misrouted(mis[1]), .errors(errs[1]), .full_cycles(full[1]));
  noc_size_run #(.PW(32)) r32 (.clk, .rst_n, .tgen_en, .injected(inj[2]), .delivered(del[2]),
                               .misrouted(mis[2]), .errors(errs[2]), .full_cycles(full[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) tgen_en = 1'b1;
    repeat (5000) @(negedge clk);
    tgen_en = 1'b0;
    repeat (500) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      $display("payload %0d bits: entered %0d delivered %0d misrouted %0d errors %0d full cycles %0d",
               8 << i, inj[i], del[i], mis[i], errs[i], full[i]);
      check(inj[i] > 0, "traffic generated");
      check(del[i] == inj[i], "every packet delivered");
      check(mis[i] == 0, "no misrouted packet");
      check(errs[i] == 0, "no receiver error");
      check(full[i] > 0, "buffers filled");
      check(del[i] == del[0], "same delivery count at every width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
