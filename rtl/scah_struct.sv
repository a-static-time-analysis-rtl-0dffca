// scah_struct: SCAh scan structure (single cycle access with hold mode).
//
// PAGES pages of SW x SD SCAh registers (32 x 31 x 32 = 31744 by default),
// one global 1-out-of-SD line decoder, a page-select register and the
// shift-compatible address sequencer (sca_access_ctrl). Page scan outputs are
// XOR-ed page by page into the global scan-out bus psso; since an unselected
// page contributes zeros, psso carries the selected page's output.
//
// Operation, with one page selected through page_we/page_idx/page_en:
//   gse=0, add=0   functional: every register captures di at each edge;
//   gse=0, add=l   line l of the selected page is read on psso without
//                  being written (all registers still capture di);
//   gse=1, add=0   hold: no register changes; psso shows the scan-in bus;
//   gse=1, add=l   line l captures si at the edge, psso shows its content
//                  (old content before the edge, new content after).
// seq_start runs the address through 1..SD on successive cycles, which
// writes and reads a whole page in SD cycles like a shift pass.
//
// PIPE = 0 (default, as in the page drawing) keeps the access paths
// combinational: reads appear in the cycle the address is applied. PIPE = 1
// registers si, the line selects and gse at the input and replaces the page
// chain by a pipelined XOR tree (xor_tree, a register set after every XS
// levels and at the end): a write lands one cycle later and a read result
// 1 + sca_pkg::xor_stages(PAGES, XS) cycles after the address.
module scah_struct #(
  parameter int unsigned SW    = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD    = sca_pkg::SD_DEFAULT,
  parameter int unsigned PAGES = sca_pkg::PAGES_DEFAULT,
  parameter int unsigned XS    = 3,     // XOR levels per buried register set (PIPE = 1)
  parameter bit          PIPE  = 1'b0,
  parameter int unsigned AW    = sca_pkg::addr_width(SD),
  parameter int unsigned PW    = sca_pkg::page_width(PAGES)
) (
  input  logic                              clk,
  input  logic                              rst,
  // test access
  input  logic                              gse,
  input  logic [AW-1:0]                     add,
  input  logic                              seq_start,
  output logic                              seq_busy,
  input  logic                              page_we,
  input  logic [PW-1:0]                     page_idx,
  input  logic                              page_en,
  input  logic [SW-1:0]                     si,
  output logic [SW-1:0]                     psso,
  // functional side: one bit per register, [page][line][chain]
  input  logic [PAGES-1:0][SD:1][SW-1:0]    di,
  output logic [PAGES-1:0][SD:1][SW-1:0]    dout
);

  logic [PAGES-1:0] psel;
  logic [SD:1]      ls;
  logic [SW-1:0]    si_p;
  logic             gse_p;
  logic [PAGES-1:0][SW-1:0] lpso;     // scan-out entering each page's XOR
  logic [PAGES-1:0][SW-1:0] page_so;  // pso of every page

  sca_access_ctrl #(
    .SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(PIPE), .AW(AW), .PW(PW)
  ) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .gse      (gse),
    .add      (add),
    .seq_start(seq_start),
    .seq_busy (seq_busy),
    .page_we  (page_we),
    .page_idx (page_idx),
    .page_en  (page_en),
    .si       (si),
    .psel     (psel),
    .ls       (ls),
    .si_o     (si_p),
    .gse_o    (gse_p)
  );

  for (genvar p = 0; p < PAGES; p++) begin : g_page
    scah_page #(.SW(SW), .SD(SD)) u_page (
      .clk (clk),
      .rst (rst),
      .psel(psel[p]),
      .gse (gse_p),
      .ls  (ls),
      .si  (si_p),
      .lpso(lpso[p]),
      .pso (page_so[p]),
      .di  (di[p]),
      .dout(dout[p])
    );
  end

  // PIPE = 0: the pages are chained, each XOR-ing its scan-out into that of
  // the preceding pages. PIPE = 1: the page scan-outs meet in a balanced,
  // pipelined XOR tree.
  if (PIPE) begin : g_tree
    assign lpso = '0;
    xor_tree #(.N(PAGES), .W(SW), .S(XS)) u_xor (
      .clk(clk),
      .rst(rst),
      .in (page_so),
      .out(psso)
    );
  end else begin : g_chain
    assign lpso[0] = '0;
    for (genvar p = 1; p < PAGES; p++) begin : g_x
      assign lpso[p] = page_so[p-1];
    end
    assign psso = page_so[PAGES-1];
  end

endmodule
