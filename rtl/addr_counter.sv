// addr_counter: line-address sequencer for shift-scan compatible operation.
//
// A pulse on start sets the line address to 1; from then on the address
// rises by one every clock until it has reached SD, after which it returns to
// 0 (no line selected) and busy falls. Driving the structure's address with
// this sequence writes a scan-in word into line 1, 2, ... SD on successive
// cycles while the old content of each line appears on the scan output, so
// one pass replaces SD shift cycles of a conventional scan chain. start
// during a running sequence restarts it at 1. Stopping at 0 after line SD is
// this design's choice.
module addr_counter #(
  parameter int unsigned SD = sca_pkg::SD_DEFAULT,
  parameter int unsigned AW = sca_pkg::addr_width(SD)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [AW-1:0] add,
  output logic          busy
);

  assign busy = (add != '0);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                  add <= '0;
    else if (start)           add <= AW'(1);
    else if (add == AW'(SD))  add <= '0;
    else if (busy)            add <= add + AW'(1);
  end

endmodule
