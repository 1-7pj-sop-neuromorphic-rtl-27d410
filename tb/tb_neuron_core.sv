// tb_neuron_core: loads all 4 x 128 x 128 random 5-bit weights with the
// LOAD WEIGHT instruction, then runs ACCUMULATION for random axon spike
// vectors and compares all 256 local partial sums with sums worked out in
// the testbench. Repeats with sub-cores power gated and with the acc field
// masking a sub-core, and checks that the sums are final after 128 row
// cycles plus one.
module tb_neuron_core;
  import snn_pkg::*;
  localparam int unsigned S = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] subc_en = 4'hf;
  core_instr_t cinstr;
  logic [2*S-1:0] axon = '0;
  logic acc_clear = 1'b0, rd_en = 1'b0, wr_en = 1'b0;
  logic [6:0] rd_row = '0, wr_row = '0, wr_col = '0;
  logic [1:0] wr_sub = '0;
  logic signed [4:0] wr_data = '0;
  logic [7:0] psum_sel = '0;
  logic signed [PSUM_W-1:0] local_psum;
  logic signed [PSUM_W-1:0] psum_q [2*S];
  logic signed [4:0] W [2*S][2*S];   // W[axon][neuron]
  int checks = 0, failures = 0;

  neuron_core dut (.clk, .rst_n, .subc_en, .cinstr, .axon, .acc_clear, .rd_en, .rd_row,
                   .wr_en, .wr_sub, .wr_row, .wr_col, .wr_data, .psum_sel, .local_psum, .psum_q);
  always #5 clk = ~clk;

  localparam core_instr_t LOAD_WEIGHT  = '{T_CORE, 4'b0000, 4'b1111, 4'b0000, 1'b0, 2'b00, 2'b00};
  localparam core_instr_t ACCUMULATION = '{T_CORE, 4'b1111, 4'b0000, 4'b1111, 1'b0, 2'b00, 2'b00};

  task automatic run_and_check(input logic [3:0] use_mask, input string tag);
    @(negedge clk); acc_clear = 1'b1;
    @(negedge clk); acc_clear = 1'b0;
    for (int r = 0; r < S; r++) begin
      rd_en = 1'b1; rd_row = 7'(r);
      @(negedge clk);
    end
    rd_en = 1'b0;
    @(negedge clk);   // drain: last row added
    for (int n = 0; n < 2*S; n++) begin
      logic signed [PSUM_W-1:0] e = '0;
      for (int a = 0; a < 2*S; a++) begin
        int k = (a < S ? 0 : 2) + (n < S ? 0 : 1);
        if (axon[a] && use_mask[k]) e += PSUM_W'(W[a][n]);
      end
      checks++;
      if (psum_q[n] !== e) begin
        failures++;
        if (failures < 6) $display("FAIL %s neuron %0d: %0d != %0d", tag, n, psum_q[n], e);
      end
      psum_sel = 8'(n); #1;
      checks++;
      if (local_psum !== e) failures++;
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cinstr = LOAD_WEIGHT;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 2*S; a++)
      for (int n = 0; n < 2*S; n++) begin
        W[a][n] = 5'($urandom);
        wr_en = 1'b1;
        wr_sub = 2'((a < S ? 0 : 2) + (n < S ? 0 : 1));
        wr_row = 7'(a % S); wr_col = 7'(n % S); wr_data = W[a][n];
        @(negedge clk);
      end
    wr_en = 1'b0;
    cinstr = ACCUMULATION;
    for (int t = 0; t < 3; t++) begin
      for (int a = 0; a < 2*S; a++) axon[a] = ($urandom_range(3) == 0);
      run_and_check(4'hf, "all");
    end
    axon = '1;
    run_and_check(4'hf, "all spikes");
    // power gate sub-cores 1 and 2
    subc_en = 4'b1001;
    for (int a = 0; a < 2*S; a++) axon[a] = $urandom_range(1);
    run_and_check(4'b1001, "gated");
    // acc field masks sub-core 3
    subc_en = 4'hf;
    cinstr.acc = 4'b0111;
    run_and_check(4'b0111, "acc mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
