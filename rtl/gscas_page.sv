// gscas_page: one page of the gated SCA structure (gSCAS).
//
// SCA registers (no hold mode of their own) arranged like the SCAh page:
// SW chains of SD registers, scan-in bus and line selects AND-ed with psel,
// page scan-out pso = so ^ lpso. Hold is supplied by the clock: every line
// has its own gated clock element gcl driven by clk, gse, the page-gated
// line select and the line's functional clock enable ce[l].
//
//   gse = 0: line l is clocked when ce[l] = 1 and captures di (functional);
//   gse = 1: only the addressed line of the selected page is clocked and
//            captures the scan-in bus (write); all other lines hold.
//
// With gse = 0 and a line addressed, that line shows its content on the
// scan output without being written as long as its ce is 0; if ce is 1 it
// captures the scan-in bus instead of di, so functional operation expects
// no line to be addressed. The scan output path is combinational.
module gscas_page #(
  parameter int unsigned SW = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD = sca_pkg::SD_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  psel,
  input  logic                  gse,
  input  logic [SD:1]           ls,
  input  logic [SD:1]           ce,
  input  logic [SW-1:0]         si,
  input  logic [SW-1:0]         lpso,
  output logic [SW-1:0]         pso,
  input  logic [SD:1][SW-1:0]   di,
  output logic [SD:1][SW-1:0]   dout
);

  logic [SD:1]         ls_p;
  logic [SD:1]         gclk;
  logic [SD:0][SW-1:0] chain;

  assign ls_p     = ls & {SD{psel}};
  assign chain[0] = si & {SW{psel}};

  for (genvar l = 1; l <= SD; l++) begin : g_line
    gcl u_gcl (
      .clk (clk),
      .gse (gse),
      .ls  (ls_p[l]),
      .ce  (ce[l]),
      .gclk(gclk[l])
    );
    for (genvar w = 0; w < SW; w++) begin : g_bit
      sca_ff u_ff (
        .clk (gclk[l]),
        .rst (rst),
        .di  (di[l][w]),
        .si  (chain[l-1][w]),
        .se  (ls_p[l]),
        .dout(dout[l][w]),
        .so  (chain[l][w])
      );
    end
  end

  assign pso = chain[SD] ^ lpso;

endmodule
