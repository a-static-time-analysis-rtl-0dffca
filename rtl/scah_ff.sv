// scah_ff: single-cycle-access scan register with hold mode (SCAh register).
//
// A scan flip-flop plus two 2-to-1 multiplexers. The input side chooses what
// is captured at the rising clock edge; the output side chooses what the scan
// output so shows, so a register can be read without being clocked and a
// chain of these registers forms a combinational multiplexer chain instead of
// a shift register.
//
//   se[0:1]  captured at clk  so     mode
//   00       di               si     functional
//   01       di               dout   asynchronous read
//   10       dout (hold)      si     hold
//   11       si               dout   synchronous write / read
//
// Structure (as in the published cell drawing): a hold mux picks si when
// se[1]=1 and dout otherwise; the scan mux in front of the flip-flop picks
// the hold-mux output when se[0]=1 and di otherwise; the output mux drives
// so = dout when se[1]=1 and so = si otherwise.
//
// Interface: se[0] is wired to the global scan enable gse, se[1] to the
// register's line select. so has no flip-flop in its path: it changes
// combinationally with se[1], si and dout. The asynchronous active-high reset
// clearing dout to 0 is this design's choice; the cell is described with a
// reset pin but no reset behaviour.
module scah_ff (
  input  logic       clk,
  input  logic       rst,
  input  logic       di,
  input  logic       si,
  input  logic [0:1] se,
  output logic       dout,
  output logic       so
);

  logic hold_mux;  // si when the line is selected, otherwise own value
  logic d_mux;     // next state

  assign hold_mux = se[1] ? si : dout;
  assign d_mux    = se[0] ? hold_mux : di;
  assign so       = se[1] ? dout : si;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) dout <= 1'b0;
    else     dout <= d_mux;
  end

endmodule
