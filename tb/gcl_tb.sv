// gcl_tb: testbench of the gated clock element.
//
// For every gse/ls/ce combination the inputs are set while clk is low and
// the pulses on gclk are counted over 8 clock periods: clk must pass for
// (gse=0, ce=1) and (gse=1, ls=1) and be stopped otherwise. A second part
// drops the enable while clk is high and checks that the running pulse is
// not cut short (gclk stays high until clk falls).
module gcl_tb;
  logic clk = 1'b0, gse, ls, ce, gclk;
  int checks = 0, failures = 0;
  int pulses = 0;

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  gcl dut (.clk(clk), .gse(gse), .ls(ls), .ce(ce), .gclk(gclk));

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    gse = 0; ls = 0; ce = 0;
    for (int v = 0; v < 8; v++) begin
      @(negedge clk);
      {gse, ls, ce} = 3'(v);
      #1 pulses = 0;
      repeat (8) @(negedge clk);
      exp = (gse ? ls : ce) ? 8 : 0;
      checks++;
      if (pulses != exp) begin
        failures++;
        $display("FAIL gse=%b ls=%b ce=%b: %0d pulses, expected %0d", gse, ls, ce, pulses, exp);
      end
    end
    // enable removed during the high phase: current pulse completes
    @(negedge clk);
    gse = 1; ls = 1;
    @(posedge clk);
    #2 ls = 0;
    #1;
    checks++;
    if (gclk !== 1'b1) begin failures++; $display("FAIL gclk cut short"); end
    @(negedge clk);
    #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL gclk not low"); end
    // enable raised during the high phase: no partial pulse
    @(posedge clk);
    #2 ls = 1;
    #1;
    checks++;
    if (gclk !== 1'b0) begin failures++; $display("FAIL glitch on gclk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
