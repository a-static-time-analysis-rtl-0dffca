// gcl: gated clock element of one register line in the gated SCA structure.
//
//   gse  ls  ce   gclk
//   0    -   0    0               functional, line disabled
//   0    -   1    clk             functional, line enabled
//   1    0   -    0               hold (line not addressed)
//   1    1   -    clk             write (line addressed)
//
// The enable (gse ? ls : ce) is taken into a latch that is transparent while
// clk is low and AND-ed with clk, the usual glitch-free clock-gate cell: an
// enable that changes during the high phase of clk only takes effect at the
// next clock pulse. The latch is intended; it is the storage of the clock
// gate. The truth table is the document's, the latch-based cell this
// design's choice.
module gcl (
  input  logic clk,
  input  logic gse,
  input  logic ls,
  input  logic ce,
  output logic gclk
);

  logic en;
  logic en_lat;

  assign en = gse ? ls : ce;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
