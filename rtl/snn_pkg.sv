// snn_pkg: types and constants shared by the neuromorphic processor.
//
// The processor is a mesh of Neural Process Units (NPUs). Each NPU owns a
// 256x256 synaptic crossbar of 5-bit weights (four 128x128 sub-cores), one
// partial-sum router with an adder and one spike router. Both routers are
// time-multiplexed over the 256 neurons of the core and are driven by
// instructions computed offline and preloaded into a small memory.
//
// From the document: core size 256x256, 2x2 sub-cores of 128x128, 5-bit
// weights, the three instruction classes (partial-sum router type 01, spike
// router type 00, neuron core type 10) and their field names and order.
// This design's own choices: the field widths, the port code values, the
// 18-bit partial-sum word, the 24-bit membrane potential and the 16-bit
// router instruction word.
package snn_pkg;

  localparam int unsigned N_NEURONS = 256;  // neurons per NPU
  localparam int unsigned N_AXONS   = 256;  // axons (inputs) per NPU
  localparam int unsigned SUB       = 128;  // sub-core edge (128x128)
  localparam int unsigned W_W       = 5;    // synaptic weight bits
  localparam int unsigned PSUM_W    = 18;   // partial-sum word bits
  localparam int unsigned VMEM_W    = 24;   // membrane potential bits
  localparam int unsigned INSTR_W   = 16;   // router instruction bits

  // Router port codes used by in_sel, out_sel, op1 and op2.
  typedef enum logic [2:0] {
    P_NONE  = 3'd0,
    P_N     = 3'd1,
    P_S     = 3'd2,
    P_E     = 3'd3,
    P_W     = 3'd4,
    P_LOCAL = 3'd5,  // local partial sum / local spike
    P_SUM   = 3'd6   // partial-sum router's sum register
  } port_e;

  // Mesh directions, index into the 4-entry NoC port arrays.
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_S = 1;
  localparam int unsigned DIR_E = 2;
  localparam int unsigned DIR_W = 3;

  // Instruction type codes (two most significant bits).
  localparam logic [1:0] T_SPIKE = 2'b00;
  localparam logic [1:0] T_PSUM  = 2'b01;
  localparam logic [1:0] T_CORE  = 2'b10;

  // Partial-sum router instruction: CONSEC_ADD, SEND, BYPASS.
  typedef struct packed {
    logic [1:0] itype;    // 01
    logic       add_en;   // sum <= op1 + op2
    port_e      op1;
    port_e      op2;
    logic       bypass;   // out[out_sel] <= in[in_sel]
    port_e      in_sel;
    port_e      out_sel;
  } psum_instr_t;

  // Spike router instruction: SEND (inject), BYPASS, fire.
  typedef struct packed {
    logic [1:0] itype;      // 00
    logic       spike_en;   // run the spiking function for this neuron
    logic       total_sum;  // 1: use router sum register, 0: local psum
    logic       inject;     // out[out_sel] <= local spike
    logic       bypass;     // out[out_sel] <= in[in_sel]
    port_e      in_sel;
    port_e      out_sel;
    logic [3:0] pad;
  } spike_instr_t;

  // Neuron-core instruction: LOAD WEIGHT, ACCUMULATION (one bit per sub-core).
  typedef struct packed {
    logic [1:0] itype;     // 10
    logic [3:0] r_weight;  // sub-core read enable
    logic [3:0] w_weight;  // sub-core write enable
    logic [3:0] acc;       // sub-core output added into the local sums
    logic       pad0;
    logic [1:0] pad1;
    logic [1:0] pad2;
  } core_instr_t;

  // One partial-sum NoC link.
  typedef struct packed {
    logic                     valid;
    logic signed [PSUM_W-1:0] data;
  } psum_link_t;

  // Host configuration regions (cfg_addr[19:16]).
  typedef enum logic [3:0] {
    R_CTRL   = 4'd0,  // data[3:0] subc_en, data[4] noc_en
    R_THRESH = 4'd1,  // firing threshold
    R_CINSTR = 4'd2,  // neuron-core instruction
    R_WEIGHT = 4'd3,  // addr {sub[1:0], row[6:0], col[6:0]}
    R_PSMEM  = 4'd4,  // addr {neuron, step}
    R_SPMEM  = 4'd5,  // addr {neuron, step}
    R_AXON   = 4'd6,  // addr axon, data[0] spike (next time step)
    R_VMEM   = 4'd7   // addr neuron, write membrane potential
  } region_e;

endpackage
