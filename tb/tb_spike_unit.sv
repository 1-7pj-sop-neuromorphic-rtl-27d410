// tb_spike_unit: integrate-and-fire check. Random fire requests on random
// neurons with random inputs and thresholds; a reference model keeps the
// membrane potentials. Checks the spike decision, the event outputs and the
// stored potentials, and counts both firing and non-firing decisions.
module tb_spike_unit;
  import snn_pkg::*;
  localparam int unsigned NN = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fire = 1'b0, vm_we = 1'b0;
  logic [7:0] nidx = '0, vm_idx = '0;
  logic signed [PSUM_W-1:0] value = '0;
  logic signed [VMEM_W-1:0] threshold = 24'sd300, vm_wdata = '0;
  logic spike_q, fire_q;
  logic [7:0] fire_idx_q;
  logic signed [VMEM_W-1:0] vmem_q [NN];
  logic signed [VMEM_W-1:0] m_v [NN];
  int checks = 0, failures = 0, n_spk = 0, n_nospk = 0;

  spike_unit dut (.clk, .rst_n, .fire, .nidx, .value, .threshold, .vm_we, .vm_idx, .vm_wdata,
                  .spike_q, .fire_q, .fire_idx_q, .vmem_q);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NN; i++) m_v[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // host preset of one potential
    vm_we = 1'b1; vm_idx = 8'd7; vm_wdata = 24'sd250; m_v[7] = 24'sd250;
    @(negedge clk); vm_we = 1'b0;
    // neuron 7: +60 crosses 300 -> spike and reset
    fire = 1'b1; nidx = 8'd7; value = 18'sd60;
    @(negedge clk); fire = 1'b0;
    checks += 3;
    if (!spike_q || !fire_q || fire_idx_q != 8'd7) begin failures++; $display("FAIL directed spike"); end
    if (vmem_q[7] !== 0) begin failures++; $display("FAIL reset"); end
    m_v[7] = '0;
    for (int i = 0; i < 3000; i++) begin
      logic signed [VMEM_W-1:0] nv;
      logic exp;
      fire = $urandom_range(3) != 0;
      nidx = 8'($urandom_range(15));
      value = PSUM_W'($signed($urandom_range(600)) - 200);
      if ($urandom_range(20) == 0) threshold = VMEM_W'($urandom_range(1000));
      nv  = m_v[nidx] + VMEM_W'(value);
      exp = nv >= threshold;
      @(negedge clk);
      checks++;
      if (fire_q !== fire) begin failures++; $display("FAIL fire_q"); end
      if (fire) begin
        checks += 2;
        if (spike_q !== exp) begin failures++; $display("FAIL spike n%0d v%0d", nidx, nv); end
        if (fire_idx_q !== nidx) failures++;
        m_v[nidx] = exp ? '0 : nv;
        if (exp) n_spk++; else n_nospk++;
      end
      checks++;
      if (vmem_q[nidx] !== m_v[nidx]) begin failures++; $display("FAIL vmem %0d", nidx); end
    end
    checks++; if (n_spk == 0 || n_nospk == 0) failures++;
    $display("spikes %0d non-spikes %0d", n_spk, n_nospk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
