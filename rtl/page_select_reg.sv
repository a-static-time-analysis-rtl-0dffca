// page_select_reg: the register that drives the page-select lines psel.
//
// Test control writes a page index and an enable bit (we = 1); the register
// then drives psel one-hot for that page, or all zero when en = 0 so that
// every page stays inactive. psel changes one clock after the write and is
// held until the next write. The index/enable programming interface and the
// reset to "no page" are this design's choices; the structure only requires
// that psel come from a register.
module page_select_reg #(
  parameter int unsigned PAGES = sca_pkg::PAGES_DEFAULT,
  parameter int unsigned PW    = sca_pkg::page_width(PAGES)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [PW-1:0]    page,
  input  logic             en,
  output logic [PAGES-1:0] psel
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      psel <= '0;
    end else if (we) begin
      for (int unsigned p = 0; p < PAGES; p++) begin
        psel[p] <= en && (page == PW'(p));
      end
    end
  end

endmodule
