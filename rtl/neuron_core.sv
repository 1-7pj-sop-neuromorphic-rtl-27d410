// neuron_core: synaptic crossbar of one NPU, 2x2 sub-cores of 128x128.
//
// The 256 axons x 256 neurons crossbar is split into four sub-cores:
// sub-core 0 (axons 0-127, neurons 0-127), 1 (axons 0-127, neurons
// 128-255), 2 (axons 128-255, neurons 0-127) and 3 (axons 128-255, neurons
// 128-255). A spike on an axon turns the multiplication by its weight into
// a memory read of that axon's row, so the local partial sum of neuron j is
// the sum of the weights of all spiking axons in column j.
// Accumulation walks the rows: at row r the upper pair of sub-cores reads
// row r if axon r spiked and the lower pair reads row r if axon 128+r
// spiked, so the two vertically stacked sub-cores work in parallel and all
// 256 axons take 128 cycles. One cycle later (synchronous SRAM read) the
// Combine & MUX stage adds both rows into the 256 accumulators.
//
// Control follows the neuron-core instruction (type 10): r_weight[k]
// enables reads of sub-core k, w_weight[k] enables weight writes to it and
// acc[k] lets its output into the sums. subc_en[k] powers sub-core k.
//
// Ports: acc_clear zeroes the sums; rd_en/rd_row issue one row; wr_* write
// one weight; psum_sel picks the local partial sum of one neuron for the
// routers (combinational MUX of the 256 sums). From the document: the 2x2
// split, 128x128x5b sub-cores, parallel vertical pair, Combine & MUX. This
// design's choices: the row walk order, 18-bit sums, no skipping of rows
// that carry no spike (rows without a spike simply read nothing).
module neuron_core
  import snn_pkg::*;
#(
  parameter int unsigned SUB_N = SUB,
  parameter int unsigned WW    = W_W,
  parameter int unsigned PW    = PSUM_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [3:0]                   subc_en,
  input  core_instr_t                  cinstr,
  input  logic [2*SUB_N-1:0]           axon,
  input  logic                         acc_clear,
  input  logic                         rd_en,
  input  logic [$clog2(SUB_N)-1:0]     rd_row,
  input  logic                         wr_en,
  input  logic [1:0]                   wr_sub,
  input  logic [$clog2(SUB_N)-1:0]     wr_row,
  input  logic [$clog2(SUB_N)-1:0]     wr_col,
  input  logic signed [WW-1:0]         wr_data,
  input  logic [$clog2(2*SUB_N)-1:0]   psum_sel,
  output logic signed [PW-1:0]         local_psum,
  output logic signed [PW-1:0]         psum_q [2*SUB_N]
);
  logic signed [WW-1:0] w [4][SUB_N];
  logic [3:0]           rd_k;
  logic [3:0]           use_k;

  // Read enable per sub-core: the upper pair looks at axon r, the lower
  // pair at axon SUB_N + r.
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      rd_k[k] = rd_en && cinstr.itype == T_CORE && cinstr.r_weight[k] &&
                (k < 2 ? axon[{1'b0, rd_row}] : axon[{1'b1, rd_row}]);
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_sub
    synapse_subcore #(.SUB_N(SUB_N), .WW(WW)) u_sub (
      .clk   (clk),
      .pwr_en(subc_en[k]),
      .we    (wr_en && cinstr.itype == T_CORE && cinstr.w_weight[k] && wr_sub == 2'(k)),
      .wrow  (wr_row),
      .wcol  (wr_col),
      .wdata (wr_data),
      .re    (rd_k[k]),
      .rrow  (rd_row),
      .rdata (w[k])
    );
  end

  assign use_k = (cinstr.itype == T_CORE) ? (cinstr.acc & subc_en) : 4'b0;

  // Combine: column j of the left pair (0, 2) or right pair (1, 3).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 2*SUB_N; j++) psum_q[j] <= '0;
    end else if (acc_clear) begin
      for (int j = 0; j < 2*SUB_N; j++) psum_q[j] <= '0;
    end else begin
      for (int j = 0; j < SUB_N; j++) begin
        psum_q[j] <= psum_q[j]
                   + (use_k[0] ? PW'(w[0][j]) : '0)
                   + (use_k[2] ? PW'(w[2][j]) : '0);
        psum_q[SUB_N + j] <= psum_q[SUB_N + j]
                   + (use_k[1] ? PW'(w[1][j]) : '0)
                   + (use_k[3] ? PW'(w[3][j]) : '0);
      end
    end
  end

  assign local_psum = psum_q[psum_sel];
endmodule
