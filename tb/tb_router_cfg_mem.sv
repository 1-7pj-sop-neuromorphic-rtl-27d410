// tb_router_cfg_mem: writes every entry of the instruction memory with a
// value derived from its address and reads all entries back.
module tb_router_cfg_mem;
  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW    = $clog2(DEPTH);
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  router_cfg_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int a);
    return 16'((a * 40503) ^ (a >> 3) ^ 16'h5a5a);
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1'b1; waddr = AW'(a); wdata = pat(a);
    end
    @(negedge clk); we = 1'b0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      raddr = AW'(a); #1;
      checks++;
      if (rdata !== pat(a)) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d: %h != %h", a, rdata, pat(a));
      end
    end
    // a write updates the read value after the clock edge
    raddr = 11'd7; @(negedge clk); we = 1'b1; waddr = 11'd7; wdata = 16'hbeef;
    @(negedge clk); we = 1'b0; #1;
    checks++; if (rdata !== 16'hbeef) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
