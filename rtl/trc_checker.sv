// trc_checker -- two-rail code checker tree.
//
// Reduces N two-rail pairs to a single pair that is a valid code word (rails
// different) only when every input pair is valid, and that is invalid (rails
// equal) as soon as one input pair is invalid. It is built from the classic
// two-rail checker cell z1 = a1&b1 | a0&b0, z0 = a1&b0 | a0&b1, arranged as a
// linear chain (the cell is associative, so the result equals a balanced tree).
// Purely combinational. The document states that error signals are two-rail
// encoded; the checker structure is the textbook one and is this design's choice.
module trc_checker
  import rc_pkg::*;
#(
  parameter int unsigned N = 7
) (
  input  trc_t [N-1:0] pairs_i,
  output trc_t         pair_o
);

  trc_t acc [N];

  always_comb begin
    acc[0] = pairs_i[0];
    for (int i = 1; i < N; i++) acc[i] = trc_cell(acc[i-1], pairs_i[i]);
  end

  assign pair_o = acc[N-1];

endmodule
