// spike_unit: membrane potentials and spiking function of the 256 neurons.
//
// Each neuron keeps a membrane potential. When the spike router asks to
// fire neuron nidx, the unit adds the input value (the router's total sum
// or the neuron's local partial sum, chosen by the MUX in front of the
// spike router) to the potential, compares the result with the core's
// threshold, and on reaching it emits a spike and resets the potential to
// zero; otherwise the new potential is kept (integrate-and-fire, no leak).
// The decision is registered in spike_q, which the spike router injects into
// the NoC in a later cycle. The document gives the threshold setting and the
// binary spiking decision; the integrate-and-fire model, reset to zero,
// 24-bit potential and a single threshold per core are this design's choices.
//
// Ports: fire/nidx/value in the cycle of the request; spike_q, fire_q and
// fire_idx_q are valid the next cycle (fire_q is a one-cycle pulse).
// vm_we/vm_idx/vm_wdata let the host preset a potential.
module spike_unit
  import snn_pkg::*;
#(
  parameter int unsigned NN = N_NEURONS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fire,
  input  logic [$clog2(NN)-1:0]    nidx,
  input  logic signed [PSUM_W-1:0] value,
  input  logic signed [VMEM_W-1:0] threshold,
  input  logic                     vm_we,
  input  logic [$clog2(NN)-1:0]    vm_idx,
  input  logic signed [VMEM_W-1:0] vm_wdata,
  output logic                     spike_q,
  output logic                     fire_q,
  output logic [$clog2(NN)-1:0]    fire_idx_q,
  output logic signed [VMEM_W-1:0] vmem_q [NN]
);
  logic signed [VMEM_W-1:0] v_new;
  logic                     hit;
  assign v_new = vmem_q[nidx] + VMEM_W'(value);
  assign hit   = v_new >= threshold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NN; i++) vmem_q[i] <= '0;
      spike_q    <= 1'b0;
      fire_q     <= 1'b0;
      fire_idx_q <= '0;
    end else begin
      fire_q <= fire;
      if (fire) begin
        vmem_q[nidx] <= hit ? '0 : v_new;
        spike_q      <= hit;
        fire_idx_q   <= nidx;
      end
      if (vm_we) vmem_q[vm_idx] <= vm_wdata;
    end
  end
endmodule
