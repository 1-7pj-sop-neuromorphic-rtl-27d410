// tb_npu: one NPU at its full size (256x256 crossbar, 8 router steps per
// neuron), with the four mesh neighbours played by the testbench.
// It programs random weights, a threshold and a router program in which
// every neuron n
//   step 0  partial-sum CONSEC_ADD: sum = psum arriving from S + local psum
//   step 1  spike unit fires neuron n from the total sum
//   step 2  spike SEND: the spike goes out to N
//   step 3  partial-sum SEND: the local psum goes out to E
//   step 4  partial-sum BYPASS: W -> N
//   step 5  spike BYPASS S -> LOCAL: an incoming spike goes to axon n
//   step 6  spike BYPASS E -> W
// and runs two time steps. The spikes received in step 5 of the first time
// step are the axon input of the second. All outputs are compared with a
// model, and the time-step latency (2179 cycles) is checked.
module tb_npu;
  import snn_pkg::*;
  localparam int unsigned NN = 256, ST = 8;
  localparam int unsigned T_ROUTE = 130, T_DONE = 130 + NN * ST;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [19:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0;
  logic start = 1'b0, busy, done;
  psum_link_t psum_in [4], psum_out [4];
  logic [3:0] spike_in = '0, spike_out;
  logic fire_o, fire_spike_o;
  logic [7:0] fire_idx_o;
  int checks = 0, failures = 0;
  int n_add = 0, n_send = 0, n_byp = 0, n_spk = 0, n_recv = 0, n_sbyp = 0;

  npu dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .busy, .done,
           .psum_in, .psum_out, .spike_in, .spike_out, .fire_o, .fire_idx_o, .fire_spike_o);
  always #5 clk = ~clk;

  logic signed [4:0]        W [NN][NN];
  logic [NN-1:0]            axon, axon_next;
  logic signed [VMEM_W-1:0] V [NN];
  localparam logic signed [VMEM_W-1:0] THR = 24'sd40;

  task automatic wr(input region_e r, input int o, input logic [31:0] d);
    cfg_we = 1'b1; cfg_addr = {r, 16'(o)}; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  function automatic logic [15:0] ps(input logic a, input port_e o1, o2, input logic b,
                                     input port_e is, os);
    psum_instr_t i = '{T_PSUM, a, o1, o2, b, is, os};
    return 16'(i);
  endfunction
  function automatic logic [15:0] sp(input logic en, tot, inj, b, input port_e is, os);
    spike_instr_t i = '{T_SPIKE, en, tot, inj, b, is, os, 4'h0};
    return 16'(i);
  endfunction

  function automatic logic signed [PSUM_W-1:0] lpsum(int n);
    logic signed [PSUM_W-1:0] e = '0;
    for (int a = 0; a < NN; a++) if (axon[a]) e += PSUM_W'(W[a][n]);
    return e;
  endfunction

  task automatic timestep(input int t);
    logic signed [PSUM_W-1:0] L [NN];
    logic signed [PSUM_W-1:0] xs, xw, exp_e, exp_n;
    logic exp_spk, exp_w, exp_ne, exp_nn, exp_nw, sin_s, sin_e;
    logic signed [VMEM_W-1:0] nv;
    for (int n = 0; n < NN; n++) L[n] = lpsum(n);
    start = 1'b1; @(negedge clk); start = 1'b0;
    exp_ne = 0; exp_nn = 0; exp_nw = 0; exp_spk = 0; exp_w = 0; exp_e = '0; exp_n = '0;
    for (int j = 0; j <= T_DONE; j++) begin
      // outputs of the previous interval's instruction
      checks += 4;
      if (psum_out[DIR_E].valid !== exp_ne || (exp_ne && psum_out[DIR_E].data !== exp_e))
        fail($sformatf("t%0d j%0d psum E %h", t, j, psum_out[DIR_E]));
      if (psum_out[DIR_N].valid !== exp_nn || (exp_nn && psum_out[DIR_N].data !== exp_n))
        fail($sformatf("t%0d j%0d psum N", t, j));
      if (spike_out[DIR_N] !== (exp_nw ? exp_spk : 1'b0)) fail($sformatf("t%0d j%0d spike N", t, j));
      if (spike_out[DIR_W] !== exp_w) fail($sformatf("t%0d j%0d spike W", t, j));
      exp_ne = 0; exp_nn = 0; exp_nw = 0; exp_w = 0;
      for (int d = 0; d < 4; d++) psum_in[d] = '0;
      spike_in = '0;
      if (j >= T_ROUTE && j < T_DONE) begin
        int n = (j - T_ROUTE) / ST, s = (j - T_ROUTE) % ST;
        case (s)
          0: begin
            xs = PSUM_W'($signed($urandom_range(80)) - 40);
            psum_in[DIR_S] = '{1'b1, xs};
            n_add++;
          end
          1: begin
            nv = V[n] + VMEM_W'(L[n] + xs);
            exp_spk = nv >= THR;
            V[n] = exp_spk ? '0 : nv;
            if (exp_spk) n_spk++;
          end
          2: exp_nw = 1;
          3: begin exp_ne = 1; exp_e = L[n]; n_send++; end
          4: begin
            xw = PSUM_W'($urandom);
            psum_in[DIR_W] = '{1'b1, xw}; exp_nn = 1; exp_n = xw; n_byp++;
          end
          5: begin
            sin_s = ($urandom_range(2) == 0);
            spike_in[DIR_S] = sin_s;
            axon_next[n] = sin_s;
            if (sin_s) n_recv++;
          end
          6: begin
            sin_e = 1'($urandom);
            spike_in[DIR_E] = sin_e; exp_w = sin_e;
            if (sin_e) n_sbyp++;
          end
          default: ;
        endcase
      end
      if (j == T_DONE) begin
        checks++;
        if (!done) fail("done not at 2179 cycles after start");
      end else begin
        checks++;
        if (done) fail($sformatf("early done at %0d", j));
      end
      @(negedge clk);
    end
  endtask

  initial begin
    #60000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int d = 0; d < 4; d++) psum_in[d] = '0;
    for (int n = 0; n < NN; n++) V[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wr(R_CTRL, 0, 32'h1f);
    wr(R_THRESH, 0, 32'(THR));
    wr(R_CINSTR, 0, 32'({T_CORE, 4'b0000, 4'b1111, 4'b0000, 5'b0}));
    for (int a = 0; a < NN; a++)
      for (int n = 0; n < NN; n++) begin
        W[a][n] = 5'($urandom);
        wr(R_WEIGHT, ((a / 128) * 2 + n / 128) * 16384 + (a % 128) * 128 + (n % 128), 32'(W[a][n]));
      end
    wr(R_CINSTR, 0, 32'({T_CORE, 4'b1111, 4'b0000, 4'b1111, 5'b0}));
    for (int n = 0; n < NN; n++)
      for (int s = 0; s < ST; s++) begin
        logic [15:0] p, q;
        p = 16'h0; q = 16'h0;
        case (s)
          0: p = ps(1, P_S, P_LOCAL, 0, P_S, P_LOCAL);
          1: q = sp(1, 1, 0, 0, P_NONE, P_NONE);
          2: q = sp(0, 0, 1, 0, P_LOCAL, P_N);
          3: p = ps(0, P_NONE, P_NONE, 0, P_LOCAL, P_E);
          4: p = ps(0, P_NONE, P_NONE, 1, P_W, P_N);
          5: q = sp(0, 0, 0, 1, P_S, P_LOCAL);
          6: q = sp(0, 0, 0, 1, P_E, P_W);
          default: ;
        endcase
        wr(R_PSMEM, n * ST + s, 32'(p));
        wr(R_SPMEM, n * ST + s, 32'(q));
      end
    for (int a = 0; a < NN; a++) begin
      axon[a] = 1'($urandom);
      wr(R_AXON, a, 32'(axon[a]));
    end
    axon_next = '0;
    timestep(0);
    axon = axon_next; axon_next = '0;
    timestep(1);
    $display("add %0d send %0d bypass %0d spikes %0d received %0d spike-bypass %0d",
             n_add, n_send, n_byp, n_spk, n_recv, n_sbyp);
    checks++;
    if (n_spk == 0 || n_spk == 2 * NN || n_recv == 0 || n_sbyp == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
