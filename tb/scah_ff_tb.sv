// scah_ff_tb: exhaustive self-checking testbench of the SCAh register.
//
// For every mode (se[0:1] = functional, asynchronous read, hold, synchronous
// write/read), every di/si combination and both stored values, so is
// checked before the clock edge and dout after it against the mode table.
// The asynchronous reset is checked at start and once more mid-run.
module scah_ff_tb;
  import sca_pkg::*;

  logic clk = 1'b0, rst = 1'b0;
  logic di, si, dout, so;
  logic [0:1] se;
  int checks = 0, failures = 0;

  scah_ff dut (.clk(clk), .rst(rst), .di(di), .si(si), .se(se), .dout(dout), .so(so));

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
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    scah_mode_e mode;
    logic exp_so, exp_q;
    di = 1'b1; si = 1'b1; se = SCAH_FUNCTIONAL;
    #3;
    check("dout after reset", dout, 1'b0);
    rst = 1'b0;
    for (int mi = 0; mi < 4; mi++) begin
      for (int v = 0; v < 8; v++) begin
        mode = scah_mode_e'(mi);
        // load the stored value v[2] through functional mode
        se = SCAH_FUNCTIONAL; di = v[2];
        tick();
        check("preload", dout, v[2]);
        se = mode; di = v[1]; si = v[0];
        #1;
        case (mode)
          SCAH_FUNCTIONAL: begin exp_so = si;   exp_q = di;   end
          SCAH_ASYNC_READ: begin exp_so = v[2]; exp_q = di;   end
          SCAH_HOLD:       begin exp_so = si;   exp_q = v[2]; end
          default:         begin exp_so = v[2]; exp_q = si;   end
        endcase
        check("so before edge", so, exp_so);
        tick();
        check("dout after edge", dout, exp_q);
        // in read modes so follows the new register value
        if (se[1]) check("so after edge", so, exp_q);
      end
    end
    // asynchronous reset without a clock edge
    se = SCAH_FUNCTIONAL; di = 1'b1;
    tick();
    rst = 1'b1;
    #1;
    check("async reset", dout, 1'b0);
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
