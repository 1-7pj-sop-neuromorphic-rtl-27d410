// router_cfg_mem: instruction memory of one NoC router.
//
// The routing of every neuron is worked out offline and preloaded here, one
// INSTR_W-bit instruction per (neuron, step). The default size, 256 neurons
// x 8 steps x 16 bits, is the 4 kB that the document gives for each router's
// memory; the split into 8 steps of 16 bits is this design's choice. The
// host writes through we/waddr/wdata on the main clock. The router reads
// with raddr = {neuron, step}; the read is combinational so that the
// instruction acts in the same cycle as its address.
module router_cfg_mem
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned IW    = INSTR_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [IW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [IW-1:0]            rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
