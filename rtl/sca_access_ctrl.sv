// sca_access_ctrl: global access logic shared by all pages of one SCA scan
// structure.
//
// It holds the page-select register (psel, one-hot, written by test control),
// the global 1-out-of-SD line decoder, and the shift-compatible address
// sequencer: while the sequencer runs (started by seq_start) it overrides the
// external address add with 1, 2, ... SD on successive cycles.
//
// With PIPE = 0 the decoded line selects, the scan-in bus and gse pass to the
// pages combinationally, so a line can be read in the same cycle its address
// is applied. With PIPE = 1 all three are registered once, which removes the
// decoder from the page timing paths at the cost of one cycle of latency: an
// address, scan-in word or gse applied before clock edge n acts on the pages
// between edges n and n+1 (writes land at edge n+1). psel is a register in
// both cases and is not delayed further. The AND with psel happens inside
// the pages.
module sca_access_ctrl #(
  parameter int unsigned SW    = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD    = sca_pkg::SD_DEFAULT,
  parameter int unsigned PAGES = sca_pkg::PAGES_DEFAULT,
  parameter bit          PIPE  = 1'b0,
  parameter int unsigned AW    = sca_pkg::addr_width(SD),
  parameter int unsigned PW    = sca_pkg::page_width(PAGES)
) (
  input  logic             clk,
  input  logic             rst,
  // test control
  input  logic             gse,
  input  logic [AW-1:0]    add,
  input  logic             seq_start,
  output logic             seq_busy,
  input  logic             page_we,
  input  logic [PW-1:0]    page_idx,
  input  logic             page_en,
  input  logic [SW-1:0]    si,
  // to the pages
  output logic [PAGES-1:0] psel,
  output logic [SD:1]      ls,
  output logic [SW-1:0]    si_o,
  output logic             gse_o
);

  logic [AW-1:0] seq_add;
  logic [AW-1:0] add_sel;
  logic [SD:1]   ls_dec;

  page_select_reg #(.PAGES(PAGES), .PW(PW)) u_psel (
    .clk (clk),
    .rst (rst),
    .we  (page_we),
    .page(page_idx),
    .en  (page_en),
    .psel(psel)
  );

  addr_counter #(.SD(SD), .AW(AW)) u_seq (
    .clk  (clk),
    .rst  (rst),
    .start(seq_start),
    .add  (seq_add),
    .busy (seq_busy)
  );

  assign add_sel = seq_busy ? seq_add : add;

  line_decoder #(.N(SD), .AW(AW)) u_dec (
    .add(add_sel),
    .ls (ls_dec)
  );

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        ls    <= '0;
        si_o  <= '0;
        gse_o <= 1'b0;
      end else begin
        ls    <= ls_dec;
        si_o  <= si;
        gse_o <= gse;
      end
    end
  end else begin : g_comb
    assign ls    = ls_dec;
    assign si_o  = si;
    assign gse_o = gse;
  end

endmodule
