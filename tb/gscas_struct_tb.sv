// gscas_struct_tb: self-checking testbench of gscas_struct (gated SCA structure, pipelined access).
//
// A small structure (4 chains x 5 lines x 3 pages) is driven with random
// traffic: page-select writes, line addresses (often 0), gse, scan-in words,
// functional data, per-line clock enables and sequencer starts. Before each
// rising edge psso is compared with the reference model; after the edge
// every register value is compared. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module gscas_struct_tb;
  import sca_model_pkg::*;

  localparam int unsigned SW = 4, SD = 5, PAGES = 3;
  localparam int unsigned AW = sca_pkg::addr_width(SD);
  localparam int unsigned PW = sca_pkg::page_width(PAGES);
  localparam int unsigned NCYC = 3000;

  typedef sca_model #(SW, SD, PAGES) model_t;

  logic clk = 1'b0, rst = 1'b0;
  logic gse, seq_start, seq_busy, page_we, page_en;
  logic [AW-1:0] add;
  logic [PW-1:0] page_idx;
  logic [SW-1:0] si, psso;
  logic [PAGES-1:0][SD:1] ce;
  logic [PAGES-1:0][SD:1][SW-1:0] di, dout;

  int checks = 0, failures = 0;
  int n_write = 0, n_read = 0, n_seq = 0, n_page = 0;
  model_t m;
  model_t::in_t in;

  always #5 clk = ~clk;

  gscas_struct #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b1)) dut (
    .clk(clk), .rst(rst),
    .gse(gse),
    .add(add), .seq_start(seq_start), .seq_busy(seq_busy),
    .page_we(page_we), .page_idx(page_idx), .page_en(page_en),
    .si(si), .psso(psso),
    .ce(ce),
    .di(di), .dout(dout)
  );

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial #1 rst = 1'b1;  // a real edge, so the asynchronous reset acts

  initial begin
    repeat (20 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = new(STYLE_GSCAS, 1'b1, sca_pkg::xor_stages(PAGES, 3));
    gse = 0; add = '0; seq_start = 0; page_we = 0; page_idx = '0; page_en = 0;
    si = '0; ce = '0; di = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      in.gse       = ($urandom_range(0, 3) != 0);
      in.add       = ($urandom_range(0, 2) == 0) ? 0 : $urandom_range(1, SD + 1);
      in.seq_start = ($urandom_range(0, 60) == 0);
      in.page_we   = ($urandom_range(0, 15) == 0) || (c == 0);
      in.page_idx  = $urandom_range(0, PAGES - 1);
      in.page_en   = ($urandom_range(0, 5) != 0);
      for (int w = 0; w < SW; w++) in.si[w] = 1'($urandom);
      for (int p = 0; p < PAGES; p++)
        for (int l = 1; l <= SD; l++) begin
          in.ce[p][l] = 1'($urandom);
          for (int w = 0; w < SW; w++) in.di[p][l][w] = 1'($urandom);
        end
      gse = in.gse; add = AW'(in.add); seq_start = in.seq_start; page_we = in.page_we;
      page_idx = PW'(in.page_idx); page_en = in.page_en; si = in.si; ce = in.ce; di = in.di;
      if (m.busy()) n_seq++;
      if (in.page_we) n_page++;
      if (in.gse && (m.busy() || (in.add >= 1 && in.add <= SD)) && m.psel != 0) n_write++;
      if (!in.gse && in.add >= 1 && in.add <= SD && m.psel != 0) n_read++;
      #4;
      check("psso", 64'(psso), 64'(m.eval(in)));
      check("seq_busy", 64'(seq_busy), 64'(m.busy()));
      @(posedge clk);
      m.clock(in);
      #1;
      for (int p = 0; p < PAGES; p++)
        for (int l = 1; l <= SD; l++)
          check($sformatf("dout[%0d][%0d]", p, l), 64'(dout[p][l]), 64'(m.mem[p][l]));
    end
    if (n_write == 0 || n_read == 0 || n_seq == 0 || n_page == 0) begin
      failures++;
      $display("mechanism not exercised: write=%0d read=%0d seq=%0d page=%0d", n_write, n_read, n_seq, n_page);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
