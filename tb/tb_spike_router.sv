// tb_spike_router: random instructions and random input spikes against a
// reference model of the registered crossbar; checks outputs, local
// delivery and the decoded fire request every cycle, and counts that SEND,
// BYPASS, local delivery and fire all occurred.
module tb_spike_router;
  import snn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  spike_instr_t instr;
  logic [3:0] in, out;
  logic local_spike, to_local, fire, fire_total;
  int checks = 0, failures = 0;
  int n_send = 0, n_byp = 0, n_loc = 0, n_fire = 0;

  spike_router dut (.clk, .rst_n, .active, .instr, .in, .local_spike, .out, .to_local, .fire, .fire_total);
  always #5 clk = ~clk;

  logic [3:0] m_out;
  logic       m_loc;

  task automatic model_step();
    logic b, sel;
    m_out = '0; m_loc = 1'b0;
    case (instr.in_sel)
      P_N: sel = in[0]; P_S: sel = in[1]; P_E: sel = in[2]; P_W: sel = in[3];
      P_LOCAL: sel = local_spike; default: sel = 1'b0;
    endcase
    b = instr.inject ? local_spike : (instr.bypass ? sel : 1'b0);
    if (active && instr.itype == T_SPIKE) begin
      case (instr.out_sel)
        P_N: m_out[0] = b; P_S: m_out[1] = b; P_E: m_out[2] = b; P_W: m_out[3] = b;
        P_LOCAL: m_loc = b; default: ;
      endcase
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    instr = '0; in = '0; local_spike = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      in = 4'($urandom); local_spike = 1'($urandom);
      active = $urandom_range(7) != 0;
      instr = spike_instr_t'(16'($urandom));
      if ($urandom_range(4) != 0) instr.itype = T_SPIKE;
      if (instr.inject && instr.bypass) instr.bypass = 1'b0;
      instr.in_sel  = port_e'($urandom_range(5, 0));
      instr.out_sel = port_e'($urandom_range(5, 0));
      // combinational fire decode
      #1;
      checks++;
      if (fire !== (active && instr.itype == T_SPIKE && instr.spike_en)) begin
        failures++; $display("FAIL fire decode");
      end
      if (fire) n_fire++;
      if (fire && fire_total !== instr.total_sum) begin failures++; $display("FAIL fire_total"); end
      model_step();
      if (active && instr.itype == T_SPIKE) begin
        if (instr.inject && instr.out_sel inside {P_N, P_S, P_E, P_W}) n_send++;
        if (instr.bypass && instr.out_sel inside {P_N, P_S, P_E, P_W}) n_byp++;
        if (m_loc) n_loc++;
      end
      @(negedge clk);
      checks += 2;
      if (out !== m_out) begin failures++; $display("FAIL out %b != %b", out, m_out); end
      if (to_local !== m_loc) begin failures++; $display("FAIL local %b != %b", to_local, m_loc); end
    end
    $display("send %0d bypass %0d local %0d fire %0d", n_send, n_byp, n_loc, n_fire);
    checks++; if (n_send == 0 || n_byp == 0 || n_loc == 0 || n_fire == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
