// npu: Neural Process Unit, one tile of the neuromorphic mesh.
//
// An NPU holds a 256x256 synaptic crossbar (neuron_core), the spiking unit
// of its 256 neurons, one partial-sum router and one spike router with their
// instruction memories, the axon spike buffers and the FSM controller. A
// time step runs in two phases (see npu_fsm):
//   1. The spikes collected for this step are moved into the axon buffer
//      and the crossbar computes all 256 local partial sums (128 cycles).
//   2. The routers serve the neurons one by one, STEPS cycles each. For
//      neuron n the partial-sum router may add partial sums arriving from
//      neighbouring NPUs to the local one (in-network computing), forward
//      them, or send its own; the spike router may ask the spiking unit to
//      fire neuron n from the local psum or from the router's total sum,
//      inject the resulting spike, forward spikes, or deliver an incoming
//      spike to axon n of this NPU's buffer for the next time step.
// A layer too large for one core is thus split over several NPUs whose
// partial sums are added in the NoC, so no precision is lost to an
// intermediate spiking decision and no merge cores are needed.
//
// Host interface (one register write per cycle): cfg_we, cfg_addr
// {region[3:0], offset[15:0]}, cfg_wdata; regions are listed in snn_pkg.
// CTRL holds subc_en[3:0] (sub-core power) and noc_en (router clock
// enable); both reset to 0, so an unused NPU's routers hibernate.
// NoC ports: psum_in/out and spike_in/out indexed N, S, E, W; outputs are
// registered. fire_o/fire_idx_o/fire_spike_o report each spiking decision.
//
// From the document: the block structure of the NPU, 256 neurons sharing
// one router of each kind, the clock-gated routers, sub-core power gating,
// the instruction fields. This design's choices: the register map, the
// double-buffered axon spikes, the fixed STEPS cycles per neuron.
module npu
  import snn_pkg::*;
#(
  parameter int unsigned STEPS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [19:0]          cfg_addr,
  input  logic [31:0]          cfg_wdata,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  psum_link_t           psum_in   [4],
  output psum_link_t           psum_out  [4],
  input  logic [3:0]           spike_in,
  output logic [3:0]           spike_out,
  output logic                 fire_o,
  output logic [7:0]           fire_idx_o,
  output logic                 fire_spike_o
);
  localparam int unsigned NA  = $clog2(N_NEURONS);
  localparam int unsigned SA  = $clog2(STEPS);
  localparam int unsigned MA  = NA + SA;

  // ---------------- host registers ----------------
  region_e                  region;
  logic [15:0]              off;
  logic [3:0]               subc_en;
  logic                     noc_en;
  logic signed [VMEM_W-1:0] threshold;
  core_instr_t              cinstr;

  assign region = region_e'(cfg_addr[19:16]);
  assign off    = cfg_addr[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      subc_en   <= '0;
      noc_en    <= 1'b0;
      threshold <= '0;
      cinstr    <= '0;
    end else if (cfg_we) begin
      unique case (region)
        R_CTRL:   begin subc_en <= cfg_wdata[3:0]; noc_en <= cfg_wdata[4]; end
        R_THRESH: threshold <= cfg_wdata[VMEM_W-1:0];
        R_CINSTR: cinstr    <= core_instr_t'(cfg_wdata[$bits(core_instr_t)-1:0]);
        default: ;
      endcase
    end
  end

  // ---------------- controller ----------------
  logic          swap, rd_en, route;
  logic [6:0]    rd_row;
  logic [NA-1:0] nidx;
  logic [SA-1:0] step;

  npu_fsm #(.NN(N_NEURONS), .SUB_N(SUB), .STEPS(STEPS)) u_fsm (
    .clk, .rst_n, .start, .swap, .rd_en, .rd_row, .route, .nidx, .step, .busy, .done
  );

  // ---------------- axon spike buffers ----------------
  logic [N_AXONS-1:0] axon_cur, axon_nxt;
  logic               to_local;
  logic [NA-1:0]      nidx_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      axon_cur <= '0;
      axon_nxt <= '0;
      nidx_d   <= '0;
    end else begin
      nidx_d <= nidx;
      if (swap) begin
        axon_cur <= axon_nxt;
        axon_nxt <= '0;
      end else begin
        if (to_local) axon_nxt[nidx_d] <= 1'b1;
        if (cfg_we && region == R_AXON) axon_nxt[off[NA-1:0]] <= cfg_wdata[0];
      end
    end
  end

  // ---------------- neuron core ----------------
  logic signed [PSUM_W-1:0] local_psum;
  logic signed [PSUM_W-1:0] psum_all [N_NEURONS];

  neuron_core u_core (
    .clk, .rst_n,
    .subc_en  (subc_en),
    .cinstr   (cinstr),
    .axon     (axon_cur),
    .acc_clear(swap),
    .rd_en    (rd_en),
    .rd_row   (rd_row),
    .wr_en    (cfg_we && region == R_WEIGHT),
    .wr_sub   (off[15:14]),
    .wr_row   (off[13:7]),
    .wr_col   (off[6:0]),
    .wr_data  (cfg_wdata[W_W-1:0]),
    .psum_sel (nidx),
    .local_psum(local_psum),
    .psum_q   (psum_all)
  );

  // ---------------- router instruction memories ----------------
  logic [INSTR_W-1:0] ps_word, sp_word;

  router_cfg_mem #(.DEPTH(N_NEURONS * STEPS)) u_psmem (
    .clk, .we(cfg_we && region == R_PSMEM), .waddr(off[MA-1:0]), .wdata(cfg_wdata[INSTR_W-1:0]),
    .raddr({nidx, step}), .rdata(ps_word)
  );
  router_cfg_mem #(.DEPTH(N_NEURONS * STEPS)) u_spmem (
    .clk, .we(cfg_we && region == R_SPMEM), .waddr(off[MA-1:0]), .wdata(cfg_wdata[INSTR_W-1:0]),
    .raddr({nidx, step}), .rdata(sp_word)
  );

  // ---------------- routers on the gated clock ----------------
  logic gclk;
  clock_gate u_cg (.clk(clk), .en(noc_en), .gclk(gclk));

  logic signed [PSUM_W-1:0] sum_q;
  psum_router u_psr (
    .clk(gclk), .rst_n, .active(route), .instr(psum_instr_t'(ps_word)),
    .in(psum_in), .local_psum(local_psum), .out(psum_out), .sum_q(sum_q)
  );

  logic spike_q, fire, fire_total;
  spike_router u_spr (
    .clk(gclk), .rst_n, .active(route), .instr(spike_instr_t'(sp_word)),
    .in(spike_in), .local_spike(spike_q), .out(spike_out), .to_local(to_local),
    .fire(fire), .fire_total(fire_total)
  );

  // ---------------- spiking unit ----------------
  logic signed [VMEM_W-1:0] vmem [N_NEURONS];
  spike_unit u_su (
    .clk, .rst_n,
    .fire      (fire),
    .nidx      (nidx),
    .value     (fire_total ? sum_q : local_psum),
    .threshold (threshold),
    .vm_we     (cfg_we && region == R_VMEM),
    .vm_idx    (off[NA-1:0]),
    .vm_wdata  (cfg_wdata[VMEM_W-1:0]),
    .spike_q   (spike_q),
    .fire_q    (fire_o),
    .fire_idx_q(fire_idx_o),
    .vmem_q    (vmem)
  );
  assign fire_spike_o = spike_q;
endmodule
