// scas_struct: SCA scan structure without hold mode (SCAS).
//
// The SCAh organisation (PAGES pages of SW x SD registers, global line
// decoder, page-select register, address sequencer, XOR-chained page
// outputs to psso) built from the cheaper SCA register, which has no global
// scan enable. Addressing line l of the selected page reads it on psso and
// writes the scan-in bus into it at the next edge; all other registers
// capture di at every edge, so there is no hold mode. With no line
// addressed the structure runs functionally and psso shows the scan-in bus
// of the selected page.
//
// PIPE = 0 (default) keeps the access paths combinational; PIPE = 1
// registers the line selects and si at the input and combines the pages in
// a pipelined XOR tree (xor_tree) instead of the page chain.
module scas_struct #(
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
  logic [PAGES-1:0][SW-1:0] lpso;     // scan-out entering each page's XOR
  logic [PAGES-1:0][SW-1:0] page_so;  // pso of every page

  sca_access_ctrl #(
    .SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(PIPE), .AW(AW), .PW(PW)
  ) u_ctrl (
    .clk      (clk),
    .rst      (rst),
    .gse      (1'b1),
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
    .gse_o    ()
  );

  for (genvar p = 0; p < PAGES; p++) begin : g_page
    scas_page #(.SW(SW), .SD(SD)) u_page (
      .clk (clk),
      .rst (rst),
      .psel(psel[p]),
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
