// xor_tree: pipelined XOR reduction of the page scan-out buses.
//
// Combines N words of W bits into their bitwise XOR with a balanced binary
// tree of ceil(log2 N) levels. A register set is buried after every S-th
// level and one is always placed after the last level, so the result
// appears sca_pkg::xor_stages(N, S) clock cycles after its inputs (one
// cycle for N = 1). Since an unselected page drives all zeros, the XOR of
// all pages is the output of the selected page. With S = 3 a tree over
// eight pages has three XOR levels and one register stage. Odd words at a
// level pass to the next level unchanged.
module xor_tree #(
  parameter int unsigned N = sca_pkg::PAGES_DEFAULT,
  parameter int unsigned W = sca_pkg::SW_DEFAULT,
  parameter int unsigned S = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] in,
  output logic [W-1:0]        out
);

  localparam int unsigned L = (N < 2) ? 0 : $clog2(N);

  // level k (1..L) turns the words of level k-1 (level 0 = the inputs,
  // ceil(N / 2^(k-1)) words) into half as many
  for (genvar k = 1; k <= L; k++) begin : g_level
    localparam int unsigned NIN = (N + (1 << (k - 1)) - 1) >> (k - 1);
    logic [N-1:0][W-1:0] prev;
    logic [N-1:0][W-1:0] comb;
    logic [N-1:0][W-1:0] q;
    if (k == 1) begin : g_first
      assign prev = in;
    end else begin : g_next
      assign prev = g_level[k-1].q;
    end
    for (genvar j = 0; j < N; j++) begin : g_word
      if (2 * j + 1 < NIN) begin : g_xor
        assign comb[j] = prev[2*j] ^ prev[2*j+1];
      end else if (2 * j < NIN) begin : g_pass
        assign comb[j] = prev[2*j];
      end else begin : g_zero
        assign comb[j] = '0;
      end
    end
    if ((S != 0 && k % S == 0) || k == L) begin : g_reg
      always_ff @(posedge clk or posedge rst) begin
        if (rst) q <= '0;
        else     q <= comb;
      end
    end else begin : g_comb
      assign q = comb;
    end
  end

  if (L == 0) begin : g_single
    always_ff @(posedge clk or posedge rst) begin
      if (rst) out <= '0;
      else     out <= in[0];
    end
  end else begin : g_multi
    assign out = g_level[L].q[0];
  end

endmodule
