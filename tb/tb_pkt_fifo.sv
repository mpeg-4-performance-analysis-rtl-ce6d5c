// tb_pkt_fifo: self-checking test of the packet buffer.
//
// Drives random pushes and pops (never pushing into a full buffer, as a
// well-behaved sender would) and compares dout, empty, full and count
// against a queue model every cycle. A second instance with FULL_SLACK = 2
// checks that its full flag rises two entries early while it still accepts
// packets up to the real depth. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_pkt_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             push, pop;
  logic [WIDTH-1:0] din, dout;
  logic             empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;

  logic             push2, pop2;
  logic [WIDTH-1:0] din2, dout2;
  logic             empty2, full2;
  logic [$clog2(DEPTH+1)-1:0] count2;

  int checks = 0, failures = 0;

  pkt_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .FULL_SLACK(0)) dut (
    .clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

  pkt_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .FULL_SLACK(2)) dut2 (
    .clk, .rst_n, .push(push2), .din(din2), .pop(pop2), .dout(dout2),
    .empty(empty2), .full(full2), .count(count2));

  logic [WIDTH-1:0] q[$];
  logic [WIDTH-1:0] q2[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase;
    push = 0; pop = 0; din = '0;
    push2 = 0; pop2 = 0; din2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // Compare outputs with the model before the edge.
      @(negedge clk);
      check(count == q.size(), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() >= DEPTH), "full");
      if (q.size() != 0) check(dout == q[0], "dout");
      check(count2 == q2.size(), "count2");
      check(full2 == (q2.size() >= DEPTH - 2), "full2 early");
      if (q2.size() != 0) check(dout2 == q2[0], "dout2");
      // Phases bias towards filling and draining.
      phase = (cyc / 200) % 3;
      pop  = (q.size() != 0) && (($urandom % 4) < ((phase == 0) ? 1 : (phase == 1) ? 3 : 2));
      push = (!full || pop) && (($urandom % 4) < ((phase == 0) ? 3 : (phase == 1) ? 1 : 2));
      din  = WIDTH'($urandom);
      // The slack instance is pushed up to its real depth.
      pop2  = (q2.size() != 0) && (($urandom % 4) < ((phase == 0) ? 1 : 2));
      push2 = (q2.size() < DEPTH) && (($urandom % 2) == 0);
      din2  = WIDTH'($urandom);
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
      if (pop2)  void'(q2.pop_front());
      if (push2) q2.push_back(din2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
