// scah_page: one page of the SCAh scan structure.
//
// SW scan chains, each SD SCAh registers deep; the registers at the same
// depth form line l (1..SD) and share the line select ls[l]. The page select
// psel gates the scan-in bus and the line selects (AND-select), so an
// unselected page sees si = 0 and no line select: with gse = 1 it holds, with
// gse = 0 it runs functionally, and its scan output is all zero. gse goes to
// se[0] of every register ungated.
//
// Scan path: chain word 0 is the gated scan-in bus; register (l, w) takes
// si from chain word l-1 and drives chain word l from its so. Because an
// unselected register passes si to so, the chain end shows the content of
// the one selected line (or the scan-in bus if none is selected), and a
// write to line l captures the scan-in bus. The page output is that chain
// end XOR-ed with the scan output of the preceding pages: pso = so ^ lpso.
//
// Everything from psel/ls/si to pso is combinational; register contents
// change only at the rising edge of clk.
module scah_page #(
  parameter int unsigned SW = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD = sca_pkg::SD_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  psel,
  input  logic                  gse,
  input  logic [SD:1]           ls,
  input  logic [SW-1:0]         si,
  input  logic [SW-1:0]         lpso,
  output logic [SW-1:0]         pso,
  input  logic [SD:1][SW-1:0]   di,
  output logic [SD:1][SW-1:0]   dout
);

  logic [SD:1]         ls_p;
  logic [SD:0][SW-1:0] chain;

  assign ls_p     = ls & {SD{psel}};
  assign chain[0] = si & {SW{psel}};

  for (genvar l = 1; l <= SD; l++) begin : g_line
    for (genvar w = 0; w < SW; w++) begin : g_bit
      scah_ff u_ff (
        .clk (clk),
        .rst (rst),
        .di  (di[l][w]),
        .si  (chain[l-1][w]),
        .se  ({gse, ls_p[l]}),
        .dout(dout[l][w]),
        .so  (chain[l][w])
      );
    end
  end

  assign pso = chain[SD] ^ lpso;

endmodule
