// gscas_struct: gated SCA scan structure (gSCAS).
//
// PAGES pages of SW x SD SCA registers whose lines are clocked through gated
// clock elements: hold is obtained by stopping the clock of every line that
// is not addressed, so the structure behaves like the SCAh structure with
// the area of the plain SCA register. Functional clocking is controlled per
// line by ce (gse = 0); in test mode (gse = 1) only the addressed line of
// the selected page is clocked and it captures the scan-in bus.
//
// PIPE = 1 (default, following the pipelined drawing of this structure)
// registers the scan-in bus, the decoded line selects and gse once, and
// combines the page scan-outs in a balanced XOR tree with a buried register
// set after every XS = 3 levels and one at its output (xor_tree); for 32
// pages that is 5 levels and X = sca_pkg::xor_stages(32, 3) = 2 register
// stages. Timing with PIPE = 1: gse, add and si applied before edge n reach
// the pages after edge n; the addressed line is written at edge n+1; psso
// shows the line's content as it was before that write from edge n+X on,
// and its new content one cycle later (while the address is held).
// PIPE = 0 gives combinational access and the page-by-page XOR chain.
module gscas_struct #(
  parameter int unsigned SW    = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD    = sca_pkg::SD_DEFAULT,
  parameter int unsigned PAGES = sca_pkg::PAGES_DEFAULT,
  parameter int unsigned XS    = 3,     // XOR levels per buried register set (PIPE = 1)
  parameter bit          PIPE  = 1'b1,
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
  input  logic [PAGES-1:0][SD:1]            ce,
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
    gscas_page #(.SW(SW), .SD(SD)) u_page (
      .clk (clk),
      .rst (rst),
      .psel(psel[p]),
      .gse (gse_p),
      .ce  (ce[p]),
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
