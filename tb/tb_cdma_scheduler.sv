// tb_cdma_scheduler: self-checking test of the per-destination scheduler.
//
// Applies random request patterns, destination ports (including ports
// that do not exist) and dst_full masks, and compares the grants with a
// reference: for every destination the lowest-numbered requester wins,
// unless the destination is full. Also checks directed cases: all ports
// asking for one destination, and all ports asking for different ones.
module tb_cdma_scheduler;
  import noc_pkg::*;
  localparam int unsigned N = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]            req, dst_full, grant;
  logic [N-1:0][DST_W-1:0] req_port;
  int checks = 0, failures = 0;

  cdma_scheduler #(.N_PORTS(N)) dut (.req, .req_port, .dst_full, .grant);

  function automatic logic [N-1:0] model(logic [N-1:0] rq, logic [N-1:0][DST_W-1:0] rp,
                                         logic [N-1:0] df);
    logic [N-1:0] g = '0;
    for (int d = 0; d < N; d++) begin
      if (df[d]) continue;
      for (int i = 0; i < N; i++)
        if (rq[i] && rp[i] == DST_W'(d)) begin g[i] = 1'b1; break; end
    end
    return g;
  endfunction

  task automatic apply_check(string what);
    #1;
    checks++;
    if (grant !== model(req, req_port, dst_full)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s req=%b full=%b grant=%b", what, req, dst_full, grant);
    end
    // At most one grant per destination.
    for (int d = 0; d < N; d++) begin
      int n = 0;
      for (int i = 0; i < N; i++) if (grant[i] && req_port[i] == DST_W'(d)) n++;
      checks++;
      if (n > 1) failures++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Every port wants port 2: only port 0 is served.
    req = '1; dst_full = '0;
    for (int i = 0; i < N; i++) req_port[i] = 3'd2;
    apply_check("all to one");
    checks++; if (grant != 7'b0000001) failures++;
    // Port 2 full: nobody is served.
    dst_full = 7'b0000100;
    apply_check("dest full");
    checks++; if (grant != '0) failures++;
    // Distinct destinations: all served in the same cycle.
    dst_full = '0;
    for (int i = 0; i < N; i++) req_port[i] = DST_W'((i + 3) % N);
    apply_check("all distinct");
    checks++; if (grant != '1) failures++;
    for (int t = 0; t < 20000; t++) begin
      @(posedge clk);
      req      = N'($urandom);
      dst_full = (($urandom % 4) == 0) ? N'($urandom) : '0;
      for (int i = 0; i < N; i++) req_port[i] = DST_W'($urandom % 8);
      apply_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
