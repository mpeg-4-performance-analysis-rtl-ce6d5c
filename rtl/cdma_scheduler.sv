// cdma_scheduler: decides which transmitters send in the current cycle.
//
// Every destination port of a switch owns one Walsh codeword, so packets
// for different destinations can share the code adder in the same cycle,
// while two packets for the same destination cannot. For every destination
// the scheduler grants at most one of the transmitters that request it,
// and none while that destination reports that it cannot take a packet
// (dst_full: the buffer behind the link port is full). The predefined
// rule is fixed priority: the lowest-numbered requesting port wins. Ports
// are assigned so that the resources with the most traffic have the lowest
// numbers, which gives the most frequently communicating blocks the
// highest priority. A transmitter that loses keeps its packet in its
// buffer and asks again in the next cycle.
//
// Interface and timing: purely combinational; req/req_port in, grant out
// in the same cycle. The per-destination arbitration follows the
// document; the fixed-priority rule is this design's reading of
// "predefined scheduling algorithm".
module cdma_scheduler
  import noc_pkg::*;
#(
  parameter int unsigned N_PORTS = noc_pkg::NOC_N_PORTS
) (
  input  logic [N_PORTS-1:0]            req,
  input  logic [N_PORTS-1:0][DST_W-1:0] req_port,
  input  logic [N_PORTS-1:0]            dst_full,
  output logic [N_PORTS-1:0]            grant
);

  logic [N_PORTS-1:0] taken;

  always_comb begin
    taken = '0;
    grant = '0;
    for (int unsigned i = 0; i < N_PORTS; i++) begin
      if (req[i] && (32'(req_port[i]) < N_PORTS)) begin
        if (!dst_full[req_port[i]] && !taken[req_port[i]]) begin
          grant[i]             = 1'b1;
          taken[req_port[i]]   = 1'b1;
        end
      end
    end
  end

endmodule
