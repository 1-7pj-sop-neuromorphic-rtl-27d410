// npu_fsm: controller that sequences one time step of an NPU.
//
// On start it runs, with no gaps:
//   SWAP   1 cycle: spikes gathered for this step become the axon input
//          and the local partial sums are cleared;
//   ACC    SUB_N cycles: axon row r = 0..SUB_N-1 is read from the sub-cores;
//   DRAIN  1 cycle: the last row's weights are added;
//   ROUTE  NN*STEPS cycles: neuron n = 0..NN-1 is served by both routers
//          for STEPS cycles, step s = 0..STEPS-1, executing the instruction
//          stored at {n, s}; only then does the next neuron get the routers;
//   DONE   1 cycle: done pulses, then back to IDLE.
// So done is high 3 + SUB_N + NN*STEPS cycles after the cycle in which
// start is sampled (2179 cycles at the defaults). Every
// NPU of the chip is started together and so all walk the neurons in
// lockstep, which is what lets the offline schedule place a partial sum or a
// spike on a link in a known cycle. The document gives the FSM's role and
// the one-neuron-at-a-time router multiplexing; the states, the fixed
// STEPS slots per neuron and the cycle counts are this design's choices.
module npu_fsm
  import snn_pkg::*;
#(
  parameter int unsigned NN    = N_NEURONS,
  parameter int unsigned SUB_N = SUB,
  parameter int unsigned STEPS = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         swap,
  output logic                         rd_en,
  output logic [$clog2(SUB_N)-1:0]     rd_row,
  output logic                         route,
  output logic [$clog2(NN)-1:0]        nidx,
  output logic [$clog2(STEPS)-1:0]     step,
  output logic                         busy,
  output logic                         done
);
  typedef enum logic [2:0] {S_IDLE, S_SWAP, S_ACC, S_DRAIN, S_ROUTE, S_DONE} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      rd_row <= '0;
      nidx   <= '0;
      step   <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= S_SWAP;
        S_SWAP: begin
          rd_row <= '0;
          state  <= S_ACC;
        end
        S_ACC: begin
          rd_row <= rd_row + 1'b1;
          if (rd_row == $clog2(SUB_N)'(SUB_N - 1)) state <= S_DRAIN;
        end
        S_DRAIN: begin
          nidx  <= '0;
          step  <= '0;
          state <= S_ROUTE;
        end
        S_ROUTE: begin
          if (step == $clog2(STEPS)'(STEPS - 1)) begin
            step <= '0;
            nidx <= nidx + 1'b1;
            if (nidx == $clog2(NN)'(NN - 1)) state <= S_DONE;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign swap  = (state == S_SWAP);
  assign rd_en = (state == S_ACC);
  assign route = (state == S_ROUTE);
  assign busy  = (state != S_IDLE);
  assign done  = (state == S_DONE);
endmodule
