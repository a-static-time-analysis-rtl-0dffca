// gscas_page_tb: self-checking testbench of gscas_page (gated SCA page).
//
// A 4-chain x 5-line page is driven with random psel, line selects (none or
// one line), gse, per-line clock enables, scan-in words, last-page scan-out words and
// functional data. pso is compared before each rising edge and all register
// values after it against a model written from the register mode tables.
module gscas_page_tb;
  localparam int unsigned SW = 4, SD = 5;
  localparam int unsigned NCYC = 2000;
  logic clk = 1'b0, rst = 1'b0;
  logic psel, gse;
  logic [SD:1] ls, ce;
  logic [SW-1:0] si, lpso, pso;
  logic [SD:1][SW-1:0] di, dout;
  logic [SD:1][SW-1:0] q;            // model state
  int checks = 0, failures = 0;
  int n_sel_write = 0, n_unsel = 0;
  always #5 clk = ~clk;
  gscas_page #(.SW(SW), .SD(SD)) dut (
    .clk(clk), .rst(rst), .psel(psel),
    .gse(gse),
    .ce(ce),
    .ls(ls), .si(si), .lpso(lpso), .pso(pso), .di(di), .dout(dout)
  );
  // scan word arriving at line l (l = SD+1: the chain end)
  function automatic logic [SW-1:0] chain_at(int l);
    logic [SW-1:0] c;
    c = psel ? si : '0;
    for (int k = 1; k < l; k++) if (psel && ls[k]) c = q[k];
    return c;
  endfunction
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask
  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts

  initial begin
    repeat (4 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [SD:1][SW-1:0] nq;
    logic sel, clocked;
    psel = 0; gse = 0; ls = '0; ce = '0; si = '0; lpso = '0; di = '0; q = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      psel = ($urandom_range(0, 3) != 0);
      gse  = 1'($urandom);
      ls   = '0;
      if ($urandom_range(0, 3) != 0) ls[$urandom_range(1, SD)] = 1'b1;
      ce   = SD'($urandom);
      si   = SW'($urandom);
      lpso = SW'($urandom);
      for (int l = 1; l <= SD; l++) di[l] = SW'($urandom);
      if (psel && ls != 0) n_sel_write++;
      if (!psel && ls != 0) n_unsel++;
      #4;
      check("pso", 64'(pso), 64'(chain_at(SD + 1) ^ lpso));
      nq = q;
      for (int l = 1; l <= SD; l++) begin
        sel = psel && ls[l];
        clocked = gse ? sel : ce[l];
        if (clocked) nq[l] = sel ? chain_at(l) : di[l];
      end
      @(posedge clk);
      q = nq;
      #1;
      for (int l = 1; l <= SD; l++) check($sformatf("dout[%0d]", l), 64'(dout[l]), 64'(q[l]));
    end
    if (n_sel_write == 0 || n_unsel == 0) begin
      failures++;
      $display("selected/unselected page access not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
