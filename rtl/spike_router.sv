// spike_router: registered 5x5 crossbar for spikes.
//
// Rows are the spike inputs N/S/E/W plus the local neuron's spike, columns
// the outputs N/S/E/W plus the local axon buffer. Like the partial-sum
// router it serves the NPU's neurons one by one, executing one instruction
// per cycle:
//   SEND (inject=1): out[out_sel] <= local spike.
//   BYPASS (bypass=1): out[out_sel] <= in[in_sel]; with out_sel=LOCAL the
//     incoming spike is delivered to this core's axon buffer (to_local).
//   spike_en=1: asks the spiking unit to fire the current neuron, from the
//     router's total sum (total_sum=1) or from the local psum (0); this is
//     decoded here and passed on as fire/fire_total.
// A spike is a single bit, 1 for a spike; outputs are registered and are 0
// in every cycle in which nothing is sent. The crossbar and the control
// fields (in_sel, out_sel, bypass, inject_en) follow the document; the
// encoding and the one-cycle registered hop are this design's choices.
//
// Clock: runs on the gated NoC clock; rst_n is asynchronous, active low.
module spike_router
  import snn_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         active,
  input  spike_instr_t instr,
  input  logic [3:0]   in,
  input  logic         local_spike,
  output logic [3:0]   out,
  output logic         to_local,
  output logic         fire,
  output logic         fire_total
);
  logic go;
  logic sel_in;
  assign go = active && (instr.itype == T_SPIKE);

  always_comb begin
    unique case (instr.in_sel)
      P_N:     sel_in = in[DIR_N];
      P_S:     sel_in = in[DIR_S];
      P_E:     sel_in = in[DIR_E];
      P_W:     sel_in = in[DIR_W];
      P_LOCAL: sel_in = local_spike;
      default: sel_in = 1'b0;
    endcase
  end

  logic bit_out;
  assign bit_out = instr.inject ? local_spike : (instr.bypass ? sel_in : 1'b0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out      <= '0;
      to_local <= 1'b0;
    end else begin
      out      <= '0;
      to_local <= 1'b0;
      if (go) begin
        unique case (instr.out_sel)
          P_N:     out[DIR_N] <= bit_out;
          P_S:     out[DIR_S] <= bit_out;
          P_E:     out[DIR_E] <= bit_out;
          P_W:     out[DIR_W] <= bit_out;
          P_LOCAL: to_local   <= bit_out;
          default: ;
        endcase
      end
    end
  end

  assign fire       = go && instr.spike_en;
  assign fire_total = instr.total_sum;

  // SEND and BYPASS are alternatives within one instruction.
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
    go |-> !(instr.inject && instr.bypass));
endmodule
