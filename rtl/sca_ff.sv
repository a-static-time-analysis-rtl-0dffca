// sca_ff: single-cycle-access scan register without hold mode (SCA register).
//
// A standard scan flip-flop (scan mux in front of the flip-flop) plus one
// output multiplexer. Its only control is se, wired to the register's line
// select; there is no global scan enable pin.
//
//   se  captured at clk  so     mode
//   0   di               si     functional
//   1   si               dout   synchronous write, asynchronous read
//
// so has no flip-flop in its path. Hold, where it is needed, comes from the
// clock: in the gated structure the clock of a line is stopped by a gated
// clock element. The asynchronous active-high reset to 0 is this design's
// choice.
module sca_ff (
  input  logic clk,
  input  logic rst,
  input  logic di,
  input  logic si,
  input  logic se,
  output logic dout,
  output logic so
);

  assign so = se ? dout : si;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) dout <= 1'b0;
    else     dout <= se ? si : di;
  end

endmodule
