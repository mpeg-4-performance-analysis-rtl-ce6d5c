// noc_size_run: testbench helper that runs the whole network at one
// payload width with its built-in MPEG-4 traffic generators and counts
// what happens: packets entering, packets delivered, packets delivered to
// a resource other than the one their header names, and receiver errors.
module noc_size_run
  import noc_pkg::*;
#(
  parameter int unsigned PW = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tgen_en,
  output int   injected,
  output int   delivered,
  output int   misrouted,
  output int   errors,
  output int   full_cycles
);
  logic     [N_RES-1:0]         res_full, inj_fire, res_out_valid;
  pkt_hdr_t [N_RES-1:0]         inj_hdr, res_out_hdr;
  logic     [N_RES-1:0][PW-1:0] inj_payload, res_out_payload;
  logic     [N_GROUPS-1:0]      link_full, err;

  mpeg4_cdma_noc #(.PAYLOAD_W(PW)) dut (
    .clk, .rst_n, .tgen_en,
    .ext_valid('0), .ext_hdr('0), .ext_payload('0),
    .res_full, .inj_fire, .inj_hdr, .inj_payload,
    .res_out_valid, .res_out_hdr, .res_out_payload, .link_full, .err);

  initial begin
    injected = 0; delivered = 0; misrouted = 0; errors = 0; full_cycles = 0;
  end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < N_RES; r++) begin
      if (inj_fire[r]) injected++;
      if (res_full[r]) full_cycles++;
      if (res_out_valid[r]) begin
        delivered++;
        if (res_out_hdr[r].gid != res_gid(SRC_W'(r)) || res_out_hdr[r].dst != res_port(SRC_W'(r)))
          misrouted++;
      end
    end
    if (err != '0) errors++;
  end
endmodule
