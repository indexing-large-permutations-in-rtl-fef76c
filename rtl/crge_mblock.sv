// crge_mblock -- CRGE computation block with a run-time modulus.
//
// y = (x - d) mod m, for x, d in [0, m-1]. Same subtract / add-back structure
// as crge_fblock, but the value added back when the difference is negative is
// the input m instead of a constant. The partial permutation generator feeds m
// from a counter so that one block steps through f_i, f_{i+1}, ..., f_{n-1}.
// Purely combinational.
//
// Ports: x, d (W bits, below m); m (MW bits, modulus); y (W bits).
module crge_mblock #(
  parameter int unsigned W  = 4,  // element and digit width
  parameter int unsigned MW = 5   // modulus width
) (
  input  logic [W-1:0]  x,
  input  logic [W-1:0]  d,
  input  logic [MW-1:0] m,
  output logic [W-1:0]  y
);

  logic [W:0]   diff;
  logic [W-1:0] wrap;

  always_comb begin
    diff = {1'b0, x} - {1'b0, d};
    // Low W bits of diff + m; the true sum is below m, so W bits hold it.
    wrap = W'((W + MW)'(diff) + (W + MW)'(m));
    y    = diff[W] ? wrap : diff[W-1:0];
  end

endmodule
