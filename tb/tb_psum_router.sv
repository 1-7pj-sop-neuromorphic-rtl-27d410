// tb_psum_router: drives the partial-sum router with random instructions
// and random partial sums on its four mesh inputs, and compares the
// registered outputs and the sum register with a reference model every
// cycle. Also runs the three named operations (CONSEC_ADD, SEND, BYPASS)
// as a directed sequence: local + south, then + east, then send north.
module tb_psum_router;
  import snn_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  psum_instr_t instr;
  psum_link_t  in [4];
  psum_link_t  out [4];
  logic signed [PSUM_W-1:0] local_psum, sum_q;
  int checks = 0, failures = 0;

  psum_router dut (.clk, .rst_n, .active, .instr, .in, .local_psum, .out, .sum_q);
  always #5 clk = ~clk;

  // reference model
  logic signed [PSUM_W-1:0] m_sum;
  psum_link_t               m_out [4];

  function automatic logic signed [PSUM_W-1:0] msrc(port_e p);
    case (p)
      P_N: return in[0].data;  P_S: return in[1].data;
      P_E: return in[2].data;  P_W: return in[3].data;
      P_LOCAL: return local_psum; P_SUM: return m_sum;
      default: return '0;
    endcase
  endfunction
  function automatic logic mval(port_e p);
    case (p)
      P_N: return in[0].valid;  P_S: return in[1].valid;
      P_E: return in[2].valid;  P_W: return in[3].valid;
      P_LOCAL, P_SUM: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  task automatic model_step();
    psum_link_t s;
    logic signed [PSUM_W-1:0] r;
    for (int d = 0; d < 4; d++) m_out[d] = '0;
    if (active && instr.itype == T_PSUM) begin
      r = msrc(instr.op1) + msrc(instr.op2);
      if (instr.add_en) s = '{1'b1, r};
      else              s = '{mval(instr.in_sel), msrc(instr.in_sel)};
      if (instr.out_sel inside {P_N, P_S, P_E, P_W}) m_out[int'(instr.out_sel) - 1] = s;
      if (instr.add_en) m_sum = r;
    end
  endtask

  task automatic compare(input string tag);
    checks++;
    if (sum_q !== m_sum) begin failures++; $display("FAIL %s sum %0d != %0d", tag, sum_q, m_sum); end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (out[d] !== m_out[d]) begin
        failures++; $display("FAIL %s out[%0d] %h != %h", tag, d, out[d], m_out[d]);
      end
    end
  endtask

  function automatic port_e rport(input logic allow_sum);
    int k = $urandom_range(allow_sum ? 6 : 5, 1);
    return port_e'(k);
  endfunction

  task automatic cycle();
    model_step();
    @(negedge clk);
    compare("rand");
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int n_add = 0, n_send = 0, n_byp = 0;
  initial begin
    instr = '0; local_psum = '0;
    for (int d = 0; d < 4; d++) in[d] = '0;
    m_sum = '0; for (int d = 0; d < 4; d++) m_out[d] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- directed: CONSEC_ADD S + local, CONSEC_ADD E + sum, SEND N ----
    active = 1'b1; local_psum = 18'sd100;
    in[1] = '{1'b1, -18'sd30};
    instr = '{T_PSUM, 1'b1, P_S, P_LOCAL, 1'b0, P_S, P_LOCAL};
    cycle();
    checks++; if (sum_q !== 18'sd70) begin failures++; $display("FAIL directed add1 %0d", sum_q); end
    in[1] = '0; in[2] = '{1'b1, 18'sd1000};
    instr = '{T_PSUM, 1'b1, P_E, P_SUM, 1'b0, P_E, P_LOCAL};
    cycle();
    checks++; if (sum_q !== 18'sd1070) begin failures++; $display("FAIL directed add2 %0d", sum_q); end
    in[2] = '0;
    instr = '{T_PSUM, 1'b0, P_NONE, P_NONE, 1'b0, P_SUM, P_N};
    cycle();
    checks++; if (out[0] !== '{1'b1, 18'sd1070}) begin failures++; $display("FAIL directed send"); end
    // BYPASS W -> E
    in[3] = '{1'b1, -18'sd5};
    instr = '{T_PSUM, 1'b0, P_NONE, P_NONE, 1'b1, P_W, P_E};
    cycle();
    checks++; if (out[2] !== '{1'b1, -18'sd5}) begin failures++; $display("FAIL directed bypass"); end
    // ---- random ----
    for (int i = 0; i < 3000; i++) begin
      for (int d = 0; d < 4; d++) in[d] = '{1'b1, PSUM_W'($urandom)};
      local_psum = PSUM_W'($urandom);
      active = ($urandom_range(7) != 0);
      instr.itype   = ($urandom_range(5) == 0) ? 2'($urandom) : T_PSUM;
      instr.add_en  = $urandom_range(2) == 0;
      instr.bypass  = !instr.add_en && $urandom_range(1);
      instr.op1     = rport(1'b0);
      instr.op2     = rport(1'b1);
      instr.in_sel  = instr.bypass ? port_e'($urandom_range(4, 1)) : rport(1'b1);
      instr.out_sel = port_e'($urandom_range(5, 0));
      if (active && instr.itype == T_PSUM) begin
        if (instr.add_en) n_add++; else if (instr.bypass) n_byp++; else n_send++;
      end
      cycle();
    end
    $display("ops: add %0d send %0d bypass %0d", n_add, n_send, n_byp);
    checks++; if (n_add == 0 || n_send == 0 || n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
