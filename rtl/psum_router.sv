// psum_router: partial-sum router with an integrated adder.
//
// One router serves all neurons of the NPU, one neuron at a time; every
// cycle it executes one instruction from its configuration memory:
//   CONSEC_ADD (add_en=1): sum <= op1 + op2, where each operand is a NoC
//     input (N/S/E/W), the local partial sum or the sum register. The
//     result is registered and fed back, so a partial sum arriving from the
//     mesh can be added to the local one and then to further arrivals. If
//     out_sel names a direction the new sum is also sent there.
//   SEND (add_en=0, bypass=0): out[out_sel] <= local psum (in_sel=LOCAL) or
//     the sum register (in_sel=SUM, the "sum_buf" path).
//   BYPASS (bypass=1): out[out_sel] <= in[in_sel], one hop per cycle.
// An instruction whose type is not 01 (or active low) is a no-op. Outputs are
// registered and carry a valid bit that is high for the one cycle after a
// send. The sum register drives the "weighted sum" output to the spiking
// unit. Instruction fields and the datapath (input MUX, consec_add MUX,
// adder, registered sum, output DEMUX) follow the document; the field
// encoding, the valid bit and the registered one-hop bypass are this
// design's choices (a multi-hop transfer is scheduled as one BYPASS per
// hop by the offline compiler).
//
// Clock: runs on the gated NoC clock; rst_n is asynchronous, active low.
module psum_router
  import snn_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     active,
  input  psum_instr_t              instr,
  input  psum_link_t               in   [4],
  input  logic signed [PSUM_W-1:0] local_psum,
  output psum_link_t               out  [4],
  output logic signed [PSUM_W-1:0] sum_q
);
  logic go;
  assign go = active && (instr.itype == T_PSUM);

  function automatic logic signed [PSUM_W-1:0] src(port_e p);
    unique case (p)
      P_N:     return in[DIR_N].data;
      P_S:     return in[DIR_S].data;
      P_E:     return in[DIR_E].data;
      P_W:     return in[DIR_W].data;
      P_LOCAL: return local_psum;
      P_SUM:   return sum_q;
      default: return '0;
    endcase
  endfunction

  function automatic logic src_valid(port_e p);
    unique case (p)
      P_N:     return in[DIR_N].valid;
      P_S:     return in[DIR_S].valid;
      P_E:     return in[DIR_E].valid;
      P_W:     return in[DIR_W].valid;
      P_LOCAL, P_SUM: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  logic signed [PSUM_W-1:0] add_res;
  psum_link_t               send;
  assign add_res = src(instr.op1) + src(instr.op2);

  // SEND and BYPASS both forward the operand named by in_sel; they differ
  // only in where it comes from (local side or mesh side).
  always_comb begin
    if (instr.add_en) send = '{valid: 1'b1, data: add_res};
    else              send = '{valid: src_valid(instr.in_sel), data: src(instr.in_sel)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      for (int d = 0; d < 4; d++) out[d] <= '0;
    end else begin
      for (int d = 0; d < 4; d++) out[d] <= '0;
      if (go) begin
        if (instr.add_en) sum_q <= add_res;
        unique case (instr.out_sel)
          P_N:     out[DIR_N] <= send;
          P_S:     out[DIR_S] <= send;
          P_E:     out[DIR_E] <= send;
          P_W:     out[DIR_W] <= send;
          default: ;
        endcase
      end
    end
  end

  // An operand read from the mesh must have arrived in this cycle.
  a_add_operand_valid: assert property (@(posedge clk) disable iff (!rst_n)
    (go && instr.add_en) |-> (src_valid(instr.op1) && src_valid(instr.op2)));
endmodule
