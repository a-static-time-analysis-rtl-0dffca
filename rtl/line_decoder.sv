// line_decoder: 1-out-of-N address line decoder.
//
// Drives the line-select signals ls[1..N] of a scan page. Address k (1..N)
// raises ls[k] alone; address 0 selects no line, which is how functional and
// hold modes are entered. Addresses above N also select no line (this
// design's choice). Purely combinational.
module line_decoder #(
  parameter int unsigned N  = sca_pkg::SD_DEFAULT,
  parameter int unsigned AW = sca_pkg::addr_width(N)
) (
  input  logic [AW-1:0] add,
  output logic [N:1]    ls
);

  always_comb begin
    for (int unsigned k = 1; k <= N; k++) begin
      ls[k] = (add == AW'(k));
    end
  end

endmodule
