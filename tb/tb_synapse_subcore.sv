// tb_synapse_subcore: fills the 128x128 sub-core with pseudo-random 5-bit
// weights, reads rows back (one-cycle read latency), and checks the power
// gating behaviour: zero read data and ignored writes while pwr_en is low.
module tb_synapse_subcore;
  localparam int unsigned N = 128;
  logic clk = 1'b0, pwr_en = 1'b1, we = 1'b0, re = 1'b0;
  logic [6:0] wrow = '0, wcol = '0, rrow = '0;
  logic signed [4:0] wdata = '0;
  logic signed [4:0] rdata [N];
  logic signed [4:0] model [N][N];
  int checks = 0, failures = 0;

  synapse_subcore dut (.clk, .pwr_en, .we, .wrow, .wcol, .wdata, .re, .rrow, .rdata);
  always #5 clk = ~clk;

  task automatic check_row(input int r, input logic zero);
    @(negedge clk); re = 1'b1; rrow = 7'(r);
    @(negedge clk); re = 1'b0;
    for (int c = 0; c < N; c++) begin
      checks++;
      if (rdata[c] !== (zero ? 5'sd0 : model[r][c])) begin
        failures++;
        if (failures < 5) $display("FAIL r%0d c%0d: %0d != %0d", r, c, rdata[c], model[r][c]);
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        model[r][c] = 5'($urandom);
        @(negedge clk); we = 1'b1; wrow = 7'(r); wcol = 7'(c); wdata = model[r][c];
      end
    @(negedge clk); we = 1'b0;
    for (int r = 0; r < N; r += 9) check_row(r, 1'b0);
    check_row(N - 1, 1'b0);
    // no read: data is zero
    @(negedge clk); re = 1'b0; @(negedge clk);
    checks++; if (rdata[3] !== 5'sd0) failures++;
    // power gated: reads give zero, writes are dropped
    pwr_en = 1'b0;
    check_row(5, 1'b1);
    @(negedge clk); we = 1'b1; wrow = 7'd5; wcol = 7'd9; wdata = ~model[5][9];
    @(negedge clk); we = 1'b0; pwr_en = 1'b1;
    check_row(5, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
