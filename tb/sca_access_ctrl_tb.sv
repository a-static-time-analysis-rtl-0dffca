// sca_access_ctrl_tb: testbench of the global access logic at the reference
// size (32 chains, 31 lines, 32 pages), with one combinational (PIPE = 0)
// and one pipelined (PIPE = 1) instance driven by the same random stimulus.
// Checked every cycle: psel against the last page-select write, the line
// selects against the decoded address (or the running sequencer, which
// must override add for 31 cycles after a start), si and gse pass-through,
// and, for the pipelined instance, that line selects, si and gse arrive
// exactly one cycle later.
module sca_access_ctrl_tb;
  localparam int unsigned SW = 32, SD = 31, PAGES = 32;
  localparam int unsigned AW = sca_pkg::addr_width(SD);
  localparam int unsigned PW = sca_pkg::page_width(PAGES);

  logic clk = 1'b0, rst = 1'b0;
  logic gse, seq_start, page_we, page_en;
  logic [AW-1:0] add;
  logic [PW-1:0] page_idx;
  logic [SW-1:0] si;
  logic busy0, busy1, gse0, gse1;
  logic [PAGES-1:0] psel0, psel1;
  logic [SD:1] ls0, ls1;
  logic [SW-1:0] si0, si1;

  int checks = 0, failures = 0, seq_cycles = 0;

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts
  always #5 clk = ~clk;

  sca_access_ctrl #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b0)) dut0 (
    .clk(clk), .rst(rst), .gse(gse), .add(add), .seq_start(seq_start), .seq_busy(busy0),
    .page_we(page_we), .page_idx(page_idx), .page_en(page_en), .si(si),
    .psel(psel0), .ls(ls0), .si_o(si0), .gse_o(gse0));

  sca_access_ctrl #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b1)) dut1 (
    .clk(clk), .rst(rst), .gse(gse), .add(add), .seq_start(seq_start), .seq_busy(busy1),
    .page_we(page_we), .page_idx(page_idx), .page_en(page_en), .si(si),
    .psel(psel1), .ls(ls1), .si_o(si1), .gse_o(gse1));

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PAGES-1:0] m_psel;
    int m_cnt, a;
    logic [SD:1] m_ls, p_ls;
    logic [SW-1:0] p_si;
    logic p_gse;
    m_psel = '0; m_cnt = 0; p_ls = '0; p_si = '0; p_gse = 0;
    gse = 0; add = '0; seq_start = 0; page_we = 0; page_idx = '0; page_en = 0; si = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      gse = 1'($urandom); add = AW'($urandom_range(0, SD + 1)); si = $urandom;
      seq_start = ($urandom_range(0, 80) == 0); page_we = ($urandom_range(0, 7) == 0);
      page_idx = PW'($urandom); page_en = ($urandom_range(0, 3) != 0);
      a = (m_cnt != 0) ? m_cnt : int'(add);
      m_ls = '0;
      if (a >= 1 && a <= SD) m_ls[a] = 1'b1;
      if (m_cnt != 0) seq_cycles++;
      #4;
      check("busy0", 64'(busy0), 64'(m_cnt != 0));
      check("busy1", 64'(busy1), 64'(m_cnt != 0));
      check("psel0", 64'(psel0), 64'(m_psel));
      check("psel1", 64'(psel1), 64'(m_psel));
      check("ls0", 64'(ls0), 64'(m_ls));
      check("si0", 64'(si0), 64'(si));
      check("gse0", 64'(gse0), 64'(gse));
      check("ls1", 64'(ls1), 64'(p_ls));
      check("si1", 64'(si1), 64'(p_si));
      check("gse1", 64'(gse1), 64'(p_gse));
      @(posedge clk);
      p_ls = m_ls; p_si = si; p_gse = gse;
      if (page_we) m_psel = page_en ? (PAGES'(1) << page_idx) : '0;
      if (seq_start) m_cnt = 1;
      else if (m_cnt == SD) m_cnt = 0;
      else if (m_cnt != 0) m_cnt++;
    end
    if (seq_cycles == 0) begin failures++; $display("sequencer never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
