// sca_ff_tb: exhaustive self-checking testbench of the SCA register.
//
// For se = 0 (functional) and se = 1 (synchronous write, asynchronous read),
// every di/si combination and both stored values, so is checked before the
// clock edge and dout after it against the mode table; the asynchronous
// reset is checked too.
module sca_ff_tb;
  logic clk = 1'b0, rst = 1'b0;
  logic di, si, se, dout, so;
  int checks = 0, failures = 0;

  sca_ff dut (.clk(clk), .rst(rst), .di(di), .si(si), .se(se), .dout(dout), .so(so));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b (se=%b di=%b si=%b)", what, $time, got, exp, se, di, si);
    end
  endtask

  task automatic tick();
    #5 clk = 1'b1;
    #5 clk = 1'b0;
  endtask

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    di = 1'b1; si = 1'b1; se = 1'b0;
    #3;
    check("dout after reset", dout, 1'b0);
    rst = 1'b0;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 8; v++) begin
        se = 1'b0; di = v[2];
        tick();
        check("preload", dout, v[2]);
        se = m[0]; di = v[1]; si = v[0];
        #1;
        check("so before edge", so, se ? v[2] : si);
        tick();
        check("dout after edge", dout, se ? si : di);
      end
    end
    se = 1'b0; di = 1'b1;
    tick();
    rst = 1'b1;
    #1;
    check("async reset", dout, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
