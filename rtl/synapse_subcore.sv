// synapse_subcore: one 128x128 synaptic sub-core of the neuron core.
//
// The weights are held as W_W bit-plane banks of SUB x SUB bits, so that a
// 5-bit weight is spread over 5 single-bit SRAM banks, as the sub-core in
// the document is drawn ("5 SRAM banks", "128 x 128 (5b)"). A read fetches
// one axon row: the SUB weights that this axon contributes to the SUB
// neurons (dendrites) of the sub-core. Reads are synchronous like an SRAM
// macro: rdata is valid the cycle after re. Writes store one weight.
//
// When pwr_en is low the sub-core is power gated: its read data is clamped
// to zero (output isolation) and writes are ignored. The power switches
// themselves are not modelled, and the contents are kept (a real gated
// array loses them, and must be reloaded before it is enabled again).
//
// Ports: weights are two's complement; rdata[c] is the weight of column c.
module synapse_subcore
  import snn_pkg::*;
#(
  parameter int unsigned SUB_N = SUB,
  parameter int unsigned WW    = W_W
) (
  input  logic                           clk,
  input  logic                           pwr_en,
  input  logic                           we,
  input  logic [$clog2(SUB_N)-1:0]       wrow,
  input  logic [$clog2(SUB_N)-1:0]       wcol,
  input  logic signed [WW-1:0]           wdata,
  input  logic                           re,
  input  logic [$clog2(SUB_N)-1:0]       rrow,
  output logic signed [WW-1:0]           rdata [SUB_N]
);
  // bank[b][row] holds bit b of the SUB_N weights of one axon row
  logic [SUB_N-1:0] bank [WW][SUB_N];
  logic [SUB_N-1:0] rq   [WW];

  always_ff @(posedge clk) begin
    if (pwr_en && we) begin
      for (int b = 0; b < WW; b++) bank[b][wrow][wcol] <= wdata[b];
    end
    for (int b = 0; b < WW; b++) begin
      if (pwr_en && re) rq[b] <= bank[b][rrow];
      else              rq[b] <= '0;
    end
  end

  always_comb begin
    for (int c = 0; c < SUB_N; c++)
      for (int b = 0; b < WW; b++) rdata[c][b] = rq[b][c];
  end
endmodule
