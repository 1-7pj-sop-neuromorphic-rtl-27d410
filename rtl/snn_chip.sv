// snn_chip: the neuromorphic processor, a ROWS x COLS mesh of NPUs.
//
// NPU (r, c) sits in row r (0 at the north edge) and column c (0 at the
// west edge). Neighbouring NPUs are joined by two networks: a partial-sum
// NoC, whose routers add partial sums as they pass so that a layer spread
// over several NPUs is summed exactly inside the network, and a spike NoC
// that carries the spikes of one layer to the NPUs of the next. Both are
// software defined: every router follows a per-neuron program written by the
// host, so there is no routing logic or flow control in hardware. All NPUs
// start a time step together and stay in lockstep.
//
// Host side: cfg_we/cfg_core/cfg_addr/cfg_wdata write one register of NPU
// number r*COLS + c (see npu for the register map); start begins a time step
// in every NPU; done pulses when it ends. The mesh-edge ports of both NoCs
// are brought out (north/south per column, east/west per row): the host
// sends partial sums or spikes in and receives what the NPUs send out, for
// example the output spikes of the last layer.
// The 4 x 3 array is the document's; the host bus and edge ports are this
// design's choices.
module snn_chip
  import snn_pkg::*;
#(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 3,
  parameter int unsigned STEPS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_core,
  input  logic [19:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic        start,
  output logic        busy,
  output logic        done,
  // mesh edges: partial sums
  input  psum_link_t  psum_n_in  [COLS],
  output psum_link_t  psum_n_out [COLS],
  input  psum_link_t  psum_s_in  [COLS],
  output psum_link_t  psum_s_out [COLS],
  input  psum_link_t  psum_e_in  [ROWS],
  output psum_link_t  psum_e_out [ROWS],
  input  psum_link_t  psum_w_in  [ROWS],
  output psum_link_t  psum_w_out [ROWS],
  // mesh edges: spikes
  input  logic [COLS-1:0] spk_n_in,
  output logic [COLS-1:0] spk_n_out,
  input  logic [COLS-1:0] spk_s_in,
  output logic [COLS-1:0] spk_s_out,
  input  logic [ROWS-1:0] spk_e_in,
  output logic [ROWS-1:0] spk_e_out,
  input  logic [ROWS-1:0] spk_w_in,
  output logic [ROWS-1:0] spk_w_out,
  // spiking decisions of every NPU
  output logic [ROWS*COLS-1:0] fire,
  output logic [7:0]           fire_idx [ROWS*COLS],
  output logic [ROWS*COLS-1:0] fire_spike
);
  psum_link_t  p_in  [ROWS][COLS][4];
  psum_link_t  p_out [ROWS][COLS][4];
  logic [3:0]  s_in  [ROWS][COLS];
  logic [3:0]  s_out [ROWS][COLS];
  logic [ROWS*COLS-1:0] busy_v, done_v;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned ID = r * COLS + c;

      // north input: from the NPU above, or the chip edge
      if (r == 0) begin : g_n_edge
        assign p_in[r][c][DIR_N] = psum_n_in[c];
        assign s_in[r][c][DIR_N] = spk_n_in[c];
        assign psum_n_out[c]     = p_out[r][c][DIR_N];
        assign spk_n_out[c]      = s_out[r][c][DIR_N];
      end else begin : g_n_link
        assign p_in[r][c][DIR_N] = p_out[r-1][c][DIR_S];
        assign s_in[r][c][DIR_N] = s_out[r-1][c][DIR_S];
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign p_in[r][c][DIR_S] = psum_s_in[c];
        assign s_in[r][c][DIR_S] = spk_s_in[c];
        assign psum_s_out[c]     = p_out[r][c][DIR_S];
        assign spk_s_out[c]      = s_out[r][c][DIR_S];
      end else begin : g_s_link
        assign p_in[r][c][DIR_S] = p_out[r+1][c][DIR_N];
        assign s_in[r][c][DIR_S] = s_out[r+1][c][DIR_N];
      end
      if (c == COLS - 1) begin : g_e_edge
        assign p_in[r][c][DIR_E] = psum_e_in[r];
        assign s_in[r][c][DIR_E] = spk_e_in[r];
        assign psum_e_out[r]     = p_out[r][c][DIR_E];
        assign spk_e_out[r]      = s_out[r][c][DIR_E];
      end else begin : g_e_link
        assign p_in[r][c][DIR_E] = p_out[r][c+1][DIR_W];
        assign s_in[r][c][DIR_E] = s_out[r][c+1][DIR_W];
      end
      if (c == 0) begin : g_w_edge
        assign p_in[r][c][DIR_W] = psum_w_in[r];
        assign s_in[r][c][DIR_W] = spk_w_in[r];
        assign psum_w_out[r]     = p_out[r][c][DIR_W];
        assign spk_w_out[r]      = s_out[r][c][DIR_W];
      end else begin : g_w_link
        assign p_in[r][c][DIR_W] = p_out[r][c-1][DIR_E];
        assign s_in[r][c][DIR_W] = s_out[r][c-1][DIR_E];
      end

      npu #(.STEPS(STEPS)) u_npu (
        .clk, .rst_n,
        .cfg_we      (cfg_we && cfg_core == 4'(ID)),
        .cfg_addr    (cfg_addr),
        .cfg_wdata   (cfg_wdata),
        .start       (start),
        .busy        (busy_v[ID]),
        .done        (done_v[ID]),
        .psum_in     (p_in[r][c]),
        .psum_out    (p_out[r][c]),
        .spike_in    (s_in[r][c]),
        .spike_out   (s_out[r][c]),
        .fire_o      (fire[ID]),
        .fire_idx_o  (fire_idx[ID]),
        .fire_spike_o(fire_spike[ID])
      );
    end
  end

  assign busy = |busy_v;
  assign done = &done_v;
endmodule
