// tb_clock_gate: checks that the gated clock follows clk while enabled,
// stays low while disabled, and that an enable change while clk is high
// waits for the next low phase (no clipped pulse).
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0;

  clock_gate dut (.clk, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // disabled: no gated edges over 10 clocks
    repeat (10) @(posedge clk);
    check(gedges == 0, "no edges while disabled");
    // enable in the low phase, count 10 edges
    @(negedge clk); en = 1'b1;
    gedges = 0;
    repeat (10) @(posedge clk);
    #1 check(gedges == 10, $sformatf("10 edges while enabled, got %0d", gedges));
    // gclk equals clk in the high phase
    check(gclk == 1'b1, "gclk high with clk");
    // drop enable while clk is high: gclk must stay high until clk falls
    en = 1'b0;
    #1 check(gclk == 1'b1, "no clipped pulse when enable drops in high phase");
    @(negedge clk); #1 check(gclk == 1'b0, "gclk low after clk falls");
    gedges = 0;
    repeat (5) @(posedge clk);
    #1 check(gedges == 0, "no edges after disable");
    // raise enable while clk is high: first gated edge only at next rising edge
    en = 1'b1;
    #1 check(gclk == 1'b0, "no partial pulse when enable rises in high phase");
    @(posedge clk); #1 check(gclk == 1'b1, "gated edge at next rising clk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
