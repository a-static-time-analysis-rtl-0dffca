// sca_top: the three single-cycle-access (SCA) scan architectures side by
// side, each at the reference size of 32 pages x 32 scan chains x 31 lines
// (31744 registers):
//
//   h_*  SCAh structure: SCAh registers with a hold mode, global scan
//        enable gse, combinational access paths.
//   s_*  SCA structure without hold mode: plain SCA registers, no gse,
//        combinational access paths.
//   g_*  gated SCA structure: SCA registers with one gated clock element
//        per line (hold by clock gating), per-line clock enables ce,
//        pipelined access (registered si, line selects and gse, and a
//        pipelined XOR tree combining the pages).
//
// In every structure a register line is addressed by a line address add
// (1..SD, 0 = none) within the page chosen by the page-select register
// (page_we writes page_idx/page_en), and is read on the global scan-out bus
// psso and/or written from the scan-in bus si in one clock cycle instead of
// being shifted through a scan chain. seq_start runs the address through all
// lines for shift-scan compatible operation.
//
// The logic under test between the registers is not part of this RTL: each
// register's functional input (di) and output (dout) is a port, indexed
// [page][line][chain]. The three structures share only clk and rst.
module sca_top #(
  parameter int unsigned SW    = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD    = sca_pkg::SD_DEFAULT,
  parameter int unsigned PAGES = sca_pkg::PAGES_DEFAULT,
  parameter int unsigned AW    = sca_pkg::addr_width(SD),
  parameter int unsigned PW    = sca_pkg::page_width(PAGES)
) (
  input  logic                           clk,
  input  logic                           rst,
  // SCAh structure
  input  logic                           h_gse,
  input  logic [AW-1:0]                  h_add,
  input  logic                           h_seq_start,
  output logic                           h_seq_busy,
  input  logic                           h_page_we,
  input  logic [PW-1:0]                  h_page_idx,
  input  logic                           h_page_en,
  input  logic [SW-1:0]                  h_si,
  output logic [SW-1:0]                  h_psso,
  input  logic [PAGES-1:0][SD:1][SW-1:0] h_di,
  output logic [PAGES-1:0][SD:1][SW-1:0] h_dout,
  // SCA structure without hold mode
  input  logic [AW-1:0]                  s_add,
  input  logic                           s_seq_start,
  output logic                           s_seq_busy,
  input  logic                           s_page_we,
  input  logic [PW-1:0]                  s_page_idx,
  input  logic                           s_page_en,
  input  logic [SW-1:0]                  s_si,
  output logic [SW-1:0]                  s_psso,
  input  logic [PAGES-1:0][SD:1][SW-1:0] s_di,
  output logic [PAGES-1:0][SD:1][SW-1:0] s_dout,
  // gated SCA structure
  input  logic                           g_gse,
  input  logic [AW-1:0]                  g_add,
  input  logic                           g_seq_start,
  output logic                           g_seq_busy,
  input  logic                           g_page_we,
  input  logic [PW-1:0]                  g_page_idx,
  input  logic                           g_page_en,
  input  logic [SW-1:0]                  g_si,
  output logic [SW-1:0]                  g_psso,
  input  logic [PAGES-1:0][SD:1]         g_ce,
  input  logic [PAGES-1:0][SD:1][SW-1:0] g_di,
  output logic [PAGES-1:0][SD:1][SW-1:0] g_dout
);

  scah_struct #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b0), .AW(AW), .PW(PW)) u_scah (
    .clk      (clk),
    .rst      (rst),
    .gse      (h_gse),
    .add      (h_add),
    .seq_start(h_seq_start),
    .seq_busy (h_seq_busy),
    .page_we  (h_page_we),
    .page_idx (h_page_idx),
    .page_en  (h_page_en),
    .si       (h_si),
    .psso     (h_psso),
    .di       (h_di),
    .dout     (h_dout)
  );

  scas_struct #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b0), .AW(AW), .PW(PW)) u_scas (
    .clk      (clk),
    .rst      (rst),
    .add      (s_add),
    .seq_start(s_seq_start),
    .seq_busy (s_seq_busy),
    .page_we  (s_page_we),
    .page_idx (s_page_idx),
    .page_en  (s_page_en),
    .si       (s_si),
    .psso     (s_psso),
    .di       (s_di),
    .dout     (s_dout)
  );

  gscas_struct #(.SW(SW), .SD(SD), .PAGES(PAGES), .PIPE(1'b1), .AW(AW), .PW(PW)) u_gscas (
    .clk      (clk),
    .rst      (rst),
    .gse      (g_gse),
    .add      (g_add),
    .seq_start(g_seq_start),
    .seq_busy (g_seq_busy),
    .page_we  (g_page_we),
    .page_idx (g_page_idx),
    .page_en  (g_page_en),
    .si       (g_si),
    .psso     (g_psso),
    .ce       (g_ce),
    .di       (g_di),
    .dout     (g_dout)
  );

endmodule
