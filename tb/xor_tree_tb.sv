// xor_tree_tb: testbench of the pipelined XOR tree. Three instances -- 32
// words with a register set every 3 levels (2 stages), 8 words every 3
// levels (1 stage) and 5 words with a register after every level (3
// stages) -- get a new random input set every cycle; each output must
// equal the XOR of the inputs applied exactly xor_stages() cycles earlier.
module xor_tree_tb;
  localparam int unsigned W = 32;

  logic clk = 1'b0, rst = 1'b0;
  logic [31:0][W-1:0] in32;
  logic [7:0][W-1:0]  in8;
  logic [4:0][W-1:0]  in5;
  logic [W-1:0] out32, out8, out5;
  logic [W-1:0] h32 [16], h8 [16], h5 [16];   // expected results, h[0] = newest
  int checks = 0, failures = 0;

  localparam int unsigned L32 = sca_pkg::xor_stages(32, 3);
  localparam int unsigned L8  = sca_pkg::xor_stages(8, 3);
  localparam int unsigned L5  = sca_pkg::xor_stages(5, 1);

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  xor_tree #(.N(32), .W(W), .S(3)) dut32 (.clk(clk), .rst(rst), .in(in32), .out(out32));
  xor_tree #(.N(8),  .W(W), .S(3)) dut8  (.clk(clk), .rst(rst), .in(in8),  .out(out8));
  xor_tree #(.N(5),  .W(W), .S(1)) dut5  (.clk(clk), .rst(rst), .in(in5),  .out(out5));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x;
    checks++;
    if (L32 != 2 || L8 != 1 || L5 != 3) begin
      failures++;
      $display("FAIL stage counts %0d %0d %0d", L32, L8, L5);
    end
    in32 = '0; in8 = '0; in5 = '0;
    for (int k = 0; k < 16; k++) begin h32[k] = '0; h8[k] = '0; h5[k] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 500; c++) begin
      @(negedge clk);
      for (int j = 0; j < 32; j++) in32[j] = $urandom;
      for (int j = 0; j < 8; j++)  in8[j]  = $urandom;
      for (int j = 0; j < 5; j++)  in5[j]  = $urandom;
      // occasionally only one non-zero word, as with one selected page
      if (c % 7 == 0) begin
        x = in32[c % 32]; in32 = '0; in32[c % 32] = x;
      end
      @(posedge clk);
      for (int k = 15; k > 0; k--) begin h32[k] = h32[k-1]; h8[k] = h8[k-1]; h5[k] = h5[k-1]; end
      h32[0] = '0; h8[0] = '0; h5[0] = '0;
      for (int j = 0; j < 32; j++) h32[0] ^= in32[j];
      for (int j = 0; j < 8; j++)  h8[0]  ^= in8[j];
      for (int j = 0; j < 5; j++)  h5[0]  ^= in5[j];
      #1;
      // after L register stages the output holds the result of L edges ago,
      // counting this edge as the first
      check("out32", out32, h32[L32 - 1]);
      check("out8",  out8,  h8[L8 - 1]);
      check("out5",  out5,  h5[L5 - 1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
