// scas_page: one page of the SCA structure without hold mode.
//
// Same organisation as the SCAh page (SW chains of SD registers, AND-select
// with psel, scan-out XOR-ed with the preceding pages: pso = so ^ lpso) but
// built from SCA registers, whose single control se is the page-gated line
// select. There is no global scan enable: registers of the selected line
// capture the scan-in bus at every clock edge while their line is selected,
// all other registers capture their functional input di. Reading a line
// (so shows its content) therefore always writes it at the next edge.
module scas_page #(
  parameter int unsigned SW = sca_pkg::SW_DEFAULT,
  parameter int unsigned SD = sca_pkg::SD_DEFAULT
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  psel,
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
      sca_ff u_ff (
        .clk (clk),
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
