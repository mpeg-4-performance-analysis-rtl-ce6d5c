// code_adder: sums the modulated codewords of all transmitters of a switch.
//
// Each active transmitter contributes +1 for a 0 chip and -1 for a 1 chip
// at every chip position; an idle transmitter contributes nothing. The
// adder forms, for every chip position, the signed sum over the N_PORTS
// transmitters and registers it. Because the codewords of different
// destinations are orthogonal, every receiver can recover its own packet
// from this one shared sum.
//
// Interface: chips[i] is the chip vector of transmitter i (bit-major, see
// cdma_tx), active[i] says whether it carries a packet. sum[c] is the
// signed sum for chip position c, in two's complement, SUM_W bits wide.
// Timing: one register stage; sums of cycle t appear in cycle t+1, and
// are zero after reset. Summing the codewords follows the document; the
// signed digital sum and the register stage are this design's choices.
module code_adder #(
  parameter int unsigned N_PORTS = 7,
  parameter int unsigned NCHIP   = 576,
  localparam int unsigned SUM_W  = $clog2(N_PORTS + 1) + 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_PORTS-1:0][NCHIP-1:0]     chips,
  input  logic [N_PORTS-1:0]                active,
  output logic [NCHIP-1:0][SUM_W-1:0]       sum
);

  logic [NCHIP-1:0][SUM_W-1:0] sum_d;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    always_comb begin
      logic signed [SUM_W-1:0] acc;
      acc = '0;
      for (int unsigned i = 0; i < N_PORTS; i++)
        if (active[i])
          acc = chips[i][c] ? acc - SUM_W'(1) : acc + SUM_W'(1);
      sum_d[c] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= sum_d;
  end

endmodule
