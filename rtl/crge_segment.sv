// crge_segment -- a contiguous run of CRGE computation blocks f_LO .. f_HI.
//
// Each block f_i has an intermediate register q[i] in front of it. On reset
// every q[i] is loaded with i, the identity permutation, so in the first cycle
// block i starts element i with f_i(i, d_i). After that q[LO] takes x_in and
// every other q[i] takes the output of block i-1, so the partial value of an
// element walks one block per cycle towards f_HI. The output of block HI,
// y_out, is combinational from q[HI] and leaves the segment unregistered.
//
// A whole generator (LO = 1, HI = n-1, x_in tied to 0, which is the f_0
// multiplexer: element 0 enters as 0 after the reset cycle) is the core of
// the shift register design; several segments chained through x_in / y_out
// form the distributed model. The digits are plain inputs and must stay
// stable while the segment computes, as in the original design.
//
// Timing: with reset released before edge 1, y_out in cycle t (t = 1, 2, ...)
// is the value of element HI-t+1 after f_HI, for t <= HI+1.
module crge_segment #(
  parameter int unsigned LO = 1,  // first block index
  parameter int unsigned HI = 3,  // last block index
  parameter int unsigned W  = 2   // element and digit width
) (
  input  logic         clk,
  input  logic         rst,            // synchronous, loads the identity
  input  logic [W-1:0] digit [LO:HI],  // d_LO .. d_HI
  input  logic [W-1:0] x_in,           // stream from block LO-1 (or 0)
  output logic [W-1:0] y_out           // stream out of block HI
);

  logic [W-1:0] q [LO:HI];
  logic [W-1:0] y [LO:HI];

  for (genvar i = LO; i <= HI; i++) begin : g_blk
    crge_fblock #(.I(i), .W(W)) u_f (.x(q[i]), .d(digit[i]), .y(y[i]));

    if (i == LO) begin : g_first
      always_ff @(posedge clk) begin
        if (rst) q[i] <= W'(i);
        else     q[i] <= x_in;
      end
    end else begin : g_next
      always_ff @(posedge clk) begin
        if (rst) q[i] <= W'(i);
        else     q[i] <= y[i-1];
      end
    end
  end

  assign y_out = y[HI];

endmodule
