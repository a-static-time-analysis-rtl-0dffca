// line_decoder_tb: exhaustive testbench of the 1-out-of-N line decoder at
// the reference size N = 31: every address 0..31 is applied and the line
// selects are compared with "only line add, none for 0".
module line_decoder_tb;
  localparam int unsigned N  = 31;
  localparam int unsigned AW = sca_pkg::addr_width(N);

  logic [AW-1:0] add;
  logic [N:1]    ls;
  logic [N:1]    exp;
  int checks = 0, failures = 0;

  line_decoder #(.N(N)) dut (.add(add), .ls(ls));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < (1 << AW); a++) begin
      add = AW'(a);
      exp = '0;
      if (a >= 1 && a <= N) exp[a] = 1'b1;
      #1;
      checks++;
      if (ls !== exp) begin
        failures++;
        $display("FAIL add=%0d ls=%b expected %b", a, ls, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
