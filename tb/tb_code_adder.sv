// tb_code_adder: self-checking test of the code adder.
//
// Drives random chip vectors and random sets of active transmitters and
// checks, one cycle later, every chip position's registered sum against
// the count (active 0 chips) - (active 1 chips). Also checks the extremes
// +7 and -7 and that the sums are zero after reset.
module tb_code_adder;
  localparam int unsigned N     = 7;
  localparam int unsigned NCHIP = 40;
  localparam int unsigned SUM_W = $clog2(N + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0][NCHIP-1:0]   chips;
  logic [N-1:0]              active;
  logic [NCHIP-1:0][SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  code_adder #(.N_PORTS(N), .NCHIP(NCHIP)) dut (.clk, .rst_n, .chips, .active, .sum);

  int expected [NCHIP];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chips = '0; active = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int c = 0; c < NCHIP; c++) begin
      checks++; if (sum[c] != '0) failures++;
    end
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      case (t)
        0: begin active = '1; chips = '0; end   // all +1
        1: begin active = '1; chips = '1; end   // all -1
        default: begin
          active = N'($urandom);
          for (int i = 0; i < N; i++) chips[i] = {$urandom, $urandom};
        end
      endcase
      for (int c = 0; c < NCHIP; c++) begin
        expected[c] = 0;
        for (int i = 0; i < N; i++)
          if (active[i]) expected[c] += chips[i][c] ? -1 : 1;
      end
      @(negedge clk);
      for (int c = 0; c < NCHIP; c++) begin
        checks++;
        if ($signed(sum[c]) != expected[c]) begin
          failures++;
          if (failures < 10) $display("FAIL chip %0d got %0d want %0d", c, $signed(sum[c]), expected[c]);
        end
      end
      if (t == 0) begin checks++; if ($signed(sum[0]) != 7) failures++; end
      if (t == 1) begin checks++; if ($signed(sum[0]) != -7) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
