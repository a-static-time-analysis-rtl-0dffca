// sca_top_tb: end-to-end testbench of sca_top at a reduced size (4 chains x 5 lines x 3 pages).
//
// All three structures (SCAh, SCA without hold, gated SCA) are driven at
// once. Phase 1 is a directed shift-scan compatible pass on one page of the
// SCAh and gated structures: the sequencer writes words W1..WSD into lines
// 1..SD, one line per cycle, then a second pass writes new words and must
// return W1..WSD on psso, SD cycles per page (1 + XL cycles later on the
// pipelined gated structure, XL = XOR-tree stages). Phase 2 is random
// traffic compared cycle by
// cycle with a reference model of each structure (psso before every edge,
// all register values after it). Every mechanism -- functional capture,
// asynchronous read, hold, synchronous write/read, page switching, the
// address sequencer, clock-gated lines with ce = 0 -- is counted and must
// occur at least once.
module sca_top_tb;
  import sca_model_pkg::*;

  localparam int unsigned SW = 4, SD = 5, PAGES = 3;
  localparam int unsigned AW = sca_pkg::addr_width(SD);
  localparam int unsigned PW = sca_pkg::page_width(PAGES);
  localparam int unsigned NCYC = 3000;
  localparam int unsigned DPAGE = PAGES - 1;   // page used by the directed pass
  localparam int unsigned XL = sca_pkg::xor_stages(PAGES, 3);  // XOR-tree stages, gated SCA

  typedef sca_model #(SW, SD, PAGES) model_t;
  typedef logic [PAGES-1:0][SD:1][SW-1:0] regs_t;

  logic clk = 1'b0, rst = 1'b0;
  logic h_gse, g_gse;
  logic [AW-1:0] h_add, s_add, g_add;
  logic h_seq_start, s_seq_start, g_seq_start, h_seq_busy, s_seq_busy, g_seq_busy;
  logic h_page_we, s_page_we, g_page_we, h_page_en, s_page_en, g_page_en;
  logic [PW-1:0] h_page_idx, s_page_idx, g_page_idx;
  logic [SW-1:0] h_si, s_si, g_si, h_psso, s_psso, g_psso;
  logic [PAGES-1:0][SD:1] g_ce;
  regs_t h_di, s_di, g_di, h_dout, s_dout, g_dout;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_func = 0, n_read = 0, n_hold = 0, n_write = 0, n_seq = 0, n_page = 0;
  int n_s_write = 0, n_s_func = 0, n_g_write = 0, n_g_hold = 0, n_g_ce_off = 0, n_g_func = 0;

  model_t mh, ms, mg;
  model_t::in_t ih, is, ig;

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  sca_top #(.SW(SW), .SD(SD), .PAGES(PAGES)) dut (.*);

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic model_t::in_t idle_in();
    model_t::in_t i;
    i.gse = 0; i.add = 0; i.seq_start = 0; i.page_we = 0; i.page_idx = 0; i.page_en = 0;
    i.si = '0; i.ce = '0; i.di = '0;
    return i;
  endfunction

  // put the three input sets on the pins
  task automatic drive();
    h_gse = ih.gse; h_add = AW'(ih.add); h_seq_start = ih.seq_start; h_page_we = ih.page_we;
    h_page_idx = PW'(ih.page_idx); h_page_en = ih.page_en; h_si = ih.si; h_di = ih.di;
    s_add = AW'(is.add); s_seq_start = is.seq_start; s_page_we = is.page_we;
    s_page_idx = PW'(is.page_idx); s_page_en = is.page_en; s_si = is.si; s_di = is.di;
    g_gse = ig.gse; g_add = AW'(ig.add); g_seq_start = ig.seq_start; g_page_we = ig.page_we;
    g_page_idx = PW'(ig.page_idx); g_page_en = ig.page_en; g_si = ig.si; g_ce = ig.ce; g_di = ig.di;
  endtask

  // one clock cycle: drive at the falling edge, compare psso before the
  // rising edge, advance the models, compare registers after it
  task automatic cycle(output logic [SW-1:0] hp, output logic [SW-1:0] gp);
    @(negedge clk);
    drive();
    if (mh.busy()) n_seq++;
    if (ih.page_we) n_page++;
    if (!ih.gse && ih.add == 0 && !mh.busy()) n_func++;
    if (!ih.gse && ih.add >= 1 && ih.add <= SD && mh.psel != 0) n_read++;
    if (ih.gse && ih.add == 0 && !mh.busy()) n_hold++;
    if (ih.gse && (mh.busy() || (ih.add >= 1 && ih.add <= SD)) && mh.psel != 0) n_write++;
    if ((ms.busy() || (is.add >= 1 && is.add <= SD)) && ms.psel != 0) n_s_write++;
    if (is.add == 0 && !ms.busy()) n_s_func++;
    if (mg.gse_q && mg.ls_q != 0 && mg.psel != 0) n_g_write++;
    if (mg.gse_q && mg.ls_q == 0) n_g_hold++;
    if (!mg.gse_q) begin
      n_g_func++;
      if (ig.ce != '1) n_g_ce_off++;
    end
    #4;
    check("h_psso", 64'(h_psso), 64'(mh.eval(ih)));
    check("s_psso", 64'(s_psso), 64'(ms.eval(is)));
    check("g_psso", 64'(g_psso), 64'(mg.eval(ig)));
    check("busy", 64'({h_seq_busy, s_seq_busy, g_seq_busy}), 64'({mh.busy(), ms.busy(), mg.busy()}));
    hp = h_psso;
    gp = g_psso;
    @(posedge clk);
    mh.clock(ih); ms.clock(is); mg.clock(ig);
    #1;
    for (int p = 0; p < PAGES; p++)
      for (int l = 1; l <= SD; l++) begin
        check("h_dout", 64'(h_dout[p][l]), 64'(mh.mem[p][l]));
        check("s_dout", 64'(s_dout[p][l]), 64'(ms.mem[p][l]));
        check("g_dout", 64'(g_dout[p][l]), 64'(mg.mem[p][l]));
      end
  endtask

  function automatic logic [SW-1:0] word(int pass, int line);
    logic [31:0] h;
    h = 32'(pass) * 32'd1103515245 + 32'(line) * 32'd12345 + 32'h5a3c96e1;
    return SW'(h ^ (h >> 7));
  endfunction

  initial begin
    repeat (60 * (NCYC + 4 * SD + 20)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SW-1:0] hp, gp;
    logic [SW-1:0] h_got [0:2*SD+8];
    logic [SW-1:0] g_got [0:2*SD+8];
    int t0, pass_cycles;
    mh = new(STYLE_SCAH, 1'b0);
    ms = new(STYLE_SCAS, 1'b0);
    mg = new(STYLE_GSCAS, 1'b1, XL);
    ih = idle_in(); is = idle_in(); ig = idle_in();
    drive();
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // ---- phase 1: directed shift-compatible passes on page DPAGE ----
    ih = idle_in(); ih.gse = 1; ih.page_we = 1; ih.page_en = 1; ih.page_idx = DPAGE;
    ig = ih; is = idle_in();
    cycle(hp, gp);
    ih.page_we = 0; ig.page_we = 0;
    for (int pass = 1; pass <= 2; pass++) begin
      ih.seq_start = 1; ig.seq_start = 1;
      cycle(hp, gp);
      ih.seq_start = 0; ig.seq_start = 0;
      t0 = $time;
      pass_cycles = 0;
      for (int k = 0; k < SD + 3; k++) begin
        ih.si = word(pass, k + 1);
        ig.si = word(pass, k + 1);
        if (mh.busy()) pass_cycles++;
        cycle(hp, gp);
        h_got[k] = hp;
        g_got[k] = gp;
      end
      check("pass length in cycles", 64'(pass_cycles), 64'(SD));
      if (pass == 2)
        for (int k = 0; k < SD; k++) begin
          check("SCAh read back", 64'(h_got[k]), 64'(word(1, k + 1)));
          check("gSCA read back", 64'(g_got[k + 1 + XL]), 64'(word(1, k + 1)));
        end
    end
    // the other pages of the SCAh structure held their (reset) content
    for (int p = 0; p < PAGES - 1; p++) check("unselected page", 64'(h_dout[p]), 64'(0));

    // ---- phase 2: random traffic on all three structures ----
    for (int c = 0; c < NCYC; c++) begin
      ih.gse       = ($urandom_range(0, 2) != 0);
      ih.add       = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, SD);
      ih.seq_start = ($urandom_range(0, 4 * SD) == 0);
      ih.page_we   = ($urandom_range(0, 20) == 0);
      ih.page_idx  = $urandom_range(0, PAGES - 1);
      ih.page_en   = ($urandom_range(0, 7) != 0);
      for (int w = 0; w < SW; w++) ih.si[w] = 1'($urandom);
      for (int p = 0; p < PAGES; p++)
        for (int l = 1; l <= SD; l++) begin
          ih.ce[p][l] = 1'($urandom);
          for (int w = 0; w < SW; w++) ih.di[p][l][w] = 1'($urandom);
        end
      is = ih; ig = ih;
      // decorrelate the structures a little
      is.add = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, SD);
      ig.gse = ($urandom_range(0, 2) != 0);
      cycle(hp, gp);
    end

    if (n_func == 0 || n_read == 0 || n_hold == 0 || n_write == 0 || n_seq == 0 || n_page == 0 ||
        n_s_write == 0 || n_s_func == 0 || n_g_write == 0 || n_g_hold == 0 || n_g_ce_off == 0 || n_g_func == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("SCAh: functional=%0d async-read=%0d hold=%0d write/read=%0d sequencer=%0d page-writes=%0d",
             n_func, n_read, n_hold, n_write, n_seq, n_page);
    $display("SCA: write/read=%0d functional=%0d; gated SCA: write=%0d clock-gated hold=%0d functional=%0d ce-off=%0d",
             n_s_write, n_s_func, n_g_write, n_g_hold, n_g_func, n_g_ce_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
