// tb_npu_fsm: runs two time steps and checks the phase sequence and its
// cycle counts: 1 swap cycle, SUB_N row reads in order 0..SUB_N-1, 1 drain
// cycle, NN*STEPS routing cycles visiting (neuron, step) in order, then a
// done pulse 3 + SUB_N + NN*STEPS cycles after the cycle that samples start.
module tb_npu_fsm;
  localparam int unsigned NN = 256, SUB_N = 128, STEPS = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic swap, rd_en, route, busy, done;
  logic [6:0] rd_row;
  logic [7:0] nidx;
  logic [2:0] step;
  int checks = 0, failures = 0;

  npu_fsm dut (.clk, .rst_n, .start, .swap, .rd_en, .rd_row, .route, .nidx, .step, .busy, .done);
  always #5 clk = ~clk;

  task automatic expect1(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect1(!busy && !done, "idle after reset");
    for (int t = 0; t < 2; t++) begin
      int cyc;
      cyc = 0;
      start = 1'b1; @(negedge clk); start = 1'b0;
      expect1(swap && busy, "swap after start");
      @(negedge clk); cyc++;
      for (int r = 0; r < SUB_N; r++) begin
        expect1(rd_en && rd_row == 7'(r) && !route, $sformatf("row %0d", r));
        @(negedge clk); cyc++;
      end
      expect1(!rd_en && !route && busy, "drain");
      @(negedge clk); cyc++;
      for (int n = 0; n < NN; n++)
        for (int s = 0; s < STEPS; s++) begin
          expect1(route && nidx == 8'(n) && step == 3'(s), $sformatf("route %0d.%0d", n, s));
          @(negedge clk); cyc++;
        end
      expect1(done, "done pulse");
      expect1(cyc + 1 == 3 + SUB_N + NN * STEPS, "latency");
      @(negedge clk);
      expect1(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
