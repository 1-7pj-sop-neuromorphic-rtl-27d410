// tb_snn_chip: end-to-end run of the full 4 x 3 chip at its default sizes.
//
// Maps a two-layer spiking MLP the way the processor is meant to be used:
//   layer 1, 768 inputs x 512 neurons, on the 8 NPUs of columns 0 and 1.
//     NPU (r, c) holds inputs 192r .. 192r+191 and neurons 256c .. 256c+255.
//     The four partial sums of a neuron are added inside the partial-sum
//     network as an adder tree: (3,c) -> (2,c) and (1,c) -> (0,c), then
//     (2,c) -> (0,c) bypassing (1,c). (0,c) fires the neuron from the total.
//   layer 2, 512 x 10, on NPUs (0,2) (inputs 0-255) and (1,2) (256-511):
//     (1,2) sends its partial sum north, (0,2) adds and fires, and sends
//     the output spike out of the chip's north edge.
// Spikes of (0,0) reach (0,2) through (0,1); spikes of (0,1) reach (1,2)
// through (1,1). NPUs (2,2) and (3,2) are unused: their routers stay clock
// gated and their sub-cores power gated; layer-2 NPUs power only the two
// sub-cores that hold neurons 0-127.
// Per-neuron router program (steps 0..7), the same for every neuron:
//   s0 (3,c),(1,c): SEND local N      (1,2): SEND local N
//   s1 (2,c): CONSEC_ADD S+local, out N; (0,c): CONSEC_ADD S+local
//      (0,2): CONSEC_ADD S+local
//   s2 (1,c): BYPASS S->N;           (0,2): fire from total sum
//   s3 (0,c): CONSEC_ADD S+sum;      (0,2): SEND spike N (chip output)
//   s4 (0,c): fire from total sum
//   s5 (0,0): SEND spike E; (0,1): SEND spike S
//   s6 (0,1): BYPASS W->E;  (1,1): BYPASS N->E
//   s7 (0,2): BYPASS W->LOCAL; (1,2): BYPASS W->LOCAL (spike to axon n)
// Layer 2 runs one time step behind layer 1. The testbench keeps an
// integrate-and-fire model of both layers and checks every layer-1 firing
// decision, every layer-2 output spike at the north edge, and the time-step
// latency; it counts each mechanism and fails if one never happened.
module tb_snn_chip;
  import snn_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 3, ST = 8, NN = 256;
  localparam int unsigned NIN = 768, NH = 512, NOUT = 10, AX1 = 192;
  localparam int unsigned T_ROUTE = 130, T_DONE = 130 + NN * ST;
  localparam int unsigned TSTEPS = 4;
  localparam logic signed [VMEM_W-1:0] THR1 = 24'sd60, THR2 = 24'sd40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [3:0] cfg_core = '0;
  logic [19:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic start = 1'b0, busy, done;
  psum_link_t psum_n_in [COLS], psum_n_out [COLS], psum_s_in [COLS], psum_s_out [COLS];
  psum_link_t psum_e_in [ROWS], psum_e_out [ROWS], psum_w_in [ROWS], psum_w_out [ROWS];
  logic [COLS-1:0] spk_n_in = '0, spk_n_out, spk_s_in = '0, spk_s_out;
  logic [ROWS-1:0] spk_e_in = '0, spk_e_out, spk_w_in = '0, spk_w_out;
  logic [ROWS*COLS-1:0] fire, fire_spike;
  logic [7:0] fire_idx [ROWS*COLS];
  int checks = 0, failures = 0;

  snn_chip dut (.*);
  always #5 clk = ~clk;

  // ---------------- model ----------------
  logic signed [4:0] W1 [NIN][NH];
  logic signed [4:0] W2 [NH][NOUT];
  logic [NIN-1:0]    x;
  logic [NH-1:0]     s1, s1_prev;
  logic signed [VMEM_W-1:0] V1 [NH];
  logic signed [VMEM_W-1:0] V2 [NOUT];
  logic [NOUT-1:0]   out_exp;

  // mechanism counters
  int n_cadd = 0, n_psend = 0, n_pbyp = 0, n_inj = 0, n_sbyp = 0, n_recv = 0;
  int n_fire1 = 0, n_nofire1 = 0, n_out = 0, n_gated_edges = 0, n_pg = 0;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  task automatic wr(input int core, input region_e r, input int o, input logic [31:0] d);
    cfg_we = 1'b1; cfg_core = 4'(core); cfg_addr = {r, 16'(o)}; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic int id(int r, int c); return r * COLS + c; endfunction
  function automatic int waddr(int a, int n);
    return ((a / 128) * 2 + n / 128) * 16384 + (a % 128) * 128 + (n % 128);
  endfunction
  function automatic logic [15:0] ps(input logic a, input port_e o1, o2, input logic b,
                                     input port_e is, os);
    psum_instr_t i = '{T_PSUM, a, o1, o2, b, is, os};
    return 16'(i);
  endfunction
  function automatic logic [15:0] sp(input logic en, tot, inj, b, input port_e is, os);
    spike_instr_t i = '{T_SPIKE, en, tot, inj, b, is, os, 4'h0};
    return 16'(i);
  endfunction

  // program of NPU (r, c) at step s
  task automatic prog(input int r, input int c, input int s, output logic [15:0] p, output logic [15:0] q);
    p = '0; q = '0;
    if (c < 2) begin
      case (s)
        0: if (r == 3 || r == 1) p = ps(0, P_NONE, P_NONE, 0, P_LOCAL, P_N);
        1: if (r == 2) p = ps(1, P_S, P_LOCAL, 0, P_S, P_N);
           else if (r == 0) p = ps(1, P_S, P_LOCAL, 0, P_S, P_LOCAL);
        2: if (r == 1) p = ps(0, P_NONE, P_NONE, 1, P_S, P_N);
        3: if (r == 0) p = ps(1, P_S, P_SUM, 0, P_S, P_LOCAL);
        4: if (r == 0) q = sp(1, 1, 0, 0, P_NONE, P_NONE);
        5: if (r == 0) q = sp(0, 0, 1, 0, P_LOCAL, c == 0 ? P_E : P_S);
        6: if (r == 0 && c == 1) q = sp(0, 0, 0, 1, P_W, P_E);
           else if (r == 1 && c == 1) q = sp(0, 0, 0, 1, P_N, P_E);
        default: ;
      endcase
    end else begin
      case (s)
        0: if (r == 1) p = ps(0, P_NONE, P_NONE, 0, P_LOCAL, P_N);
        1: if (r == 0) p = ps(1, P_S, P_LOCAL, 0, P_S, P_LOCAL);
        2: if (r == 0) q = sp(1, 1, 0, 0, P_NONE, P_NONE);
        3: if (r == 0) q = sp(0, 0, 1, 0, P_LOCAL, P_N);
        7: if (r <= 1) q = sp(0, 0, 0, 1, P_W, P_LOCAL);
        default: ;
      endcase
    end
  endtask

  // ---------------- mechanism monitors ----------------
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      always @(posedge clk) if (rst_n) begin
        if (dut.g_row[r].g_col[c].u_npu.u_psr.go) begin
          if (dut.g_row[r].g_col[c].u_npu.u_psr.instr.add_en) n_cadd++;
          else if (dut.g_row[r].g_col[c].u_npu.u_psr.instr.bypass) n_pbyp++;
          else if (dut.g_row[r].g_col[c].u_npu.u_psr.instr.out_sel != P_NONE) n_psend++;
        end
        if (dut.g_row[r].g_col[c].u_npu.u_spr.go) begin
          if (dut.g_row[r].g_col[c].u_npu.u_spr.instr.inject) n_inj++;
          if (dut.g_row[r].g_col[c].u_npu.u_spr.instr.bypass &&
              dut.g_row[r].g_col[c].u_npu.u_spr.instr.out_sel != P_LOCAL) n_sbyp++;
        end
        if (dut.g_row[r].g_col[c].u_npu.to_local) n_recv++;
      end
    end
  end
  // a gated router clock must stay low while its NPU's clock runs
  always @(posedge clk) if (rst_n && busy && dut.g_row[3].g_col[2].u_npu.gclk == 1'b0) n_gated_edges++;

  // ---------------- one time step ----------------
  task automatic timestep(input int t);
    logic signed [PSUM_W-1:0] tot;
    logic signed [VMEM_W-1:0] nv;
    // layer 1 on input x
    for (int j = 0; j < NH; j++) begin
      tot = '0;
      for (int i = 0; i < NIN; i++) if (x[i]) tot += PSUM_W'(W1[i][j]);
      nv = V1[j] + VMEM_W'(tot);
      s1[j] = nv >= THR1;
      V1[j] = s1[j] ? '0 : nv;
    end
    // layer 2 on the previous step's layer-1 spikes
    for (int k = 0; k < NOUT; k++) begin
      tot = '0;
      for (int j = 0; j < NH; j++) if (s1_prev[j]) tot += PSUM_W'(W2[j][k]);
      nv = V2[k] + VMEM_W'(tot);
      out_exp[k] = nv >= THR2;
      V2[k] = out_exp[k] ? '0 : nv;
    end
    // host sends the input spikes to the layer-1 NPUs
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 2; c++)
        for (int a = 0; a < AX1; a++) wr(id(r, c), R_AXON, a, 32'(x[r * AX1 + a]));
    start = 1'b1; @(negedge clk); start = 1'b0;
    for (int j = 0; j <= T_DONE; j++) begin
      // layer-1 firing decisions are reported the cycle after step 4
      for (int c = 0; c < 2; c++) begin
        if (fire[id(0, c)]) begin
          int n = int'(fire_idx[id(0, c)]);
          checks++;
          if (fire_spike[id(0, c)] !== s1[c * NN + n])
            fail($sformatf("t%0d L1 neuron %0d: %b != %b", t, c * NN + n, fire_spike[id(0, c)], s1[c * NN + n]));
          if (s1[c * NN + n]) n_fire1++; else n_nofire1++;
        end
      end
      // layer-2 output spikes leave at the north edge of column 2 after s3
      if (j > T_ROUTE && j <= T_DONE) begin
        int jj = j - 1 - T_ROUTE;
        int n = jj / ST, s = jj % ST;
        if (s == 3) begin
          checks++;
          if (n < NOUT) begin
            if (spk_n_out[2] !== out_exp[n]) fail($sformatf("t%0d output %0d: %b != %b", t, n, spk_n_out[2], out_exp[n]));
            if (out_exp[n]) n_out++;
          end else if (spk_n_out[2] !== 1'b0) fail("spurious output spike");
        end
      end
      checks++;
      if ((j == T_DONE) != done) fail($sformatf("done at %0d", j));
      @(negedge clk);
    end
    s1_prev = s1;
  endtask

  initial begin
    #200000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < COLS; c++) begin psum_n_in[c] = '0; psum_s_in[c] = '0; end
    for (int r = 0; r < ROWS; r++) begin psum_e_in[r] = '0; psum_w_in[r] = '0; end
    for (int j = 0; j < NH; j++) V1[j] = '0;
    for (int k = 0; k < NOUT; k++) V2[k] = '0;
    s1_prev = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // control: layer-1 and layer-2 NPUs on, unused NPUs off
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic [31:0] ctrl;
        if (c < 2) ctrl = 32'h1f;
        else if (r < 2) ctrl = 32'h15;   // routers on, sub-cores 0 and 2
        else ctrl = 32'h00;
        if (ctrl[3:0] != 4'hf) n_pg++;
        wr(id(r, c), R_CTRL, 0, ctrl);
        wr(id(r, c), R_THRESH, 0, c < 2 ? 32'(THR1) : 32'(THR2));
        wr(id(r, c), R_CINSTR, 0, 32'({T_CORE, 4'b0000, 4'b1111, 4'b0000, 5'b0}));
      end
    // weights
    for (int i = 0; i < NIN; i++)
      for (int j = 0; j < NH; j++) W1[i][j] = 5'($urandom);
    for (int j = 0; j < NH; j++)
      for (int k = 0; k < NOUT; k++) W2[j][k] = 5'($urandom);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 2; c++)
        for (int a = 0; a < AX1; a++)
          for (int n = 0; n < NN; n++) wr(id(r, c), R_WEIGHT, waddr(a, n), 32'(W1[r * AX1 + a][c * NN + n]));
    for (int r = 0; r < 2; r++)
      for (int a = 0; a < NN; a++)
        for (int k = 0; k < NOUT; k++) wr(id(r, 2), R_WEIGHT, waddr(a, k), 32'(W2[r * NN + a][k]));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        wr(id(r, c), R_CINSTR, 0, 32'({T_CORE, 4'b1111, 4'b0000, 4'b1111, 5'b0}));
    // router programs
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (c == 2 && r >= 2) continue;
        for (int n = 0; n < NN; n++)
          for (int s = 0; s < ST; s++) begin
            logic [15:0] p, q;
            prog(r, c, s, p, q);
            if (c == 2 && n >= NOUT) begin p = '0; if (s != 7) q = '0; end
            wr(id(r, c), R_PSMEM, n * ST + s, 32'(p));
            wr(id(r, c), R_SPMEM, n * ST + s, 32'(q));
          end
      end
    for (int t = 0; t < TSTEPS; t++) begin
      for (int i = 0; i < NIN; i++) x[i] = ($urandom_range(4) == 0);
      timestep(t);
    end
    $display("in-network adds %0d, psum sends %0d, psum bypasses %0d", n_cadd, n_psend, n_pbyp);
    $display("spike injects %0d, spike bypasses %0d, spikes to axons %0d", n_inj, n_sbyp, n_recv);
    $display("layer-1 fires %0d / non-fires %0d, output spikes %0d", n_fire1, n_nofire1, n_out);
    $display("gated-clock cycles on an unused NPU %0d, power-gated NPUs %0d", n_gated_edges, n_pg);
    checks++;
    if (n_cadd == 0 || n_psend == 0 || n_pbyp == 0 || n_inj == 0 || n_sbyp == 0 || n_recv == 0 ||
        n_fire1 == 0 || n_nofire1 == 0 || n_out == 0 || n_gated_edges == 0 || n_pg == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
