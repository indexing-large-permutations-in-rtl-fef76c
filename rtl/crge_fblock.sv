// crge_fblock -- one CRGE computation block, f_I(x, d) = (x - d) mod (I + 1).
//
// Both operands lie in [0, I], so the difference lies in [-I, I]. The block
// subtracts with one extra sign bit and, when the result is negative, adds
// I + 1 back (subtractor, adder and multiplexer). When I + 1 is a power of
// two the adder and multiplexer are not built: keeping only the low log2(I+1)
// bits of the difference already is the modulus. This structure follows the
// basic CRGE block; the uniform width W for all blocks is a choice of this
// design. Purely combinational.
//
// Ports: x, d (W bits, both in [0, I]); y (W bits, in [0, I]).
module crge_fblock #(
  parameter int unsigned I = 2,  // block index; modulus is I + 1
  parameter int unsigned W = 2   // element and digit width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] d,
  output logic [W-1:0] y
);

  localparam int unsigned MOD  = I + 1;
  localparam bit          POW2 = ((MOD & I) == 0);
  localparam int unsigned KB   = (MOD <= 2) ? 1 : $clog2(MOD);
  localparam logic [W-1:0] MASK = W'((64'd1 << KB) - 64'd1);

  logic [W:0] diff;

  always_comb begin
    diff = {1'b0, x} - {1'b0, d};
    if (POW2) begin
      y = diff[W-1:0] & MASK;                 // drop the sign: mod 2^k
    end else if (diff[W]) begin
      y = diff[W-1:0] + W'(MOD);              // negative: add I + 1
    end else begin
      y = diff[W-1:0];
    end
  end

  initial begin
    assert (I >= 1 && 64'(MOD) <= (64'd1 << W))
      else $error("crge_fblock: I=%0d does not fit W=%0d", I, W);
  end

endmodule
