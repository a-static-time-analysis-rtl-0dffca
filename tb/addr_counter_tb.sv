// addr_counter_tb: testbench of the shift-compatible address sequencer at
// SD = 31. After start the address must run 1, 2, ... 31 on successive
// cycles, busy must be high exactly those 31 cycles, and the counter must
// then rest at 0. A restart in mid-sequence must begin again at 1.
module addr_counter_tb;
  localparam int unsigned SD = 31;
  localparam int unsigned AW = sca_pkg::addr_width(SD);

  logic clk = 1'b0, rst = 1'b0, start;

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts
  logic [AW-1:0] add;
  logic busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  addr_counter #(.SD(SD)) dut (.clk(clk), .rst(rst), .start(start), .add(add), .busy(busy));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    start = 0;
    @(negedge clk);
    check("reset add", int'(add), 0);
    check("reset busy", int'(busy), 0);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check("idle add", int'(add), 0);
    // full pass
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_cycles = 0;
    for (int k = 1; k <= SD; k++) begin
      check("sequence add", int'(add), k);
      check("sequence busy", int'(busy), 1);
      busy_cycles += busy;
      @(negedge clk);
    end
    check("busy cycles", busy_cycles, SD);
    for (int k = 0; k < 5; k++) begin
      check("rest add", int'(add), 0);
      @(negedge clk);
    end
    // restart in the middle of a pass
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (6) @(negedge clk);
    check("before restart", int'(add), 7);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    check("after restart", int'(add), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
