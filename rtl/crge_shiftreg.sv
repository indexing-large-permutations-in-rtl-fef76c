// crge_shiftreg -- CRGE permutation generator with a dedicated output shift
// register (the design's main generator).
//
// A crge_segment holds the n-1 computation blocks f_1 .. f_{n-1}, each behind
// an intermediate register reset to the identity permutation; the input of
// f_1 is the f_0 multiplexer, which gives 0 in every cycle after reset. The
// output of f_{n-1} is a finished element: sigma(n-1) in cycle 1, sigma(n-2)
// in cycle 2, ..., sigma(0) in cycle n. Finished elements are shifted into
// perm[0] and move towards perm[n-1], so after n shifts perm[i] = sigma(i).
//
// Completion is detected without a counter: on reset the output register is
// cleared except for bit 0 of perm[0]. That marker reaches perm[n-1] after
// n-1 shifts, which makes the next cycle the last one; that cycle also sets
// ready, and ready stops the shift register. Only reset values sit ahead of
// the marker, so no data bit can be mistaken for it.
//
// Interface: rst is synchronous and starts a new permutation (it is the
// start command). digit[i] (i = 1..n-1, value in [0, i]) must stay stable
// from reset until ready. ready rises exactly N cycles after the last reset
// cycle and stays high, holding perm, until the next reset.
module crge_shiftreg
  import crge_pkg::*;
#(
  parameter int unsigned N = 8192,           // elements in the permutation
  parameter int unsigned W = elem_width(N)   // element and digit width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] digit [1:N-1],
  output logic         ready,
  output logic [W-1:0] perm  [N]
);

  logic [W-1:0] done_elem;  // output of f_{n-1}

  crge_segment #(.LO(1), .HI(N-1), .W(W)) u_seg (
    .clk   (clk),
    .rst   (rst),
    .digit (digit),
    .x_in  ('0),           // f_0(0, d_0) = 0
    .y_out (done_elem)
  );

  for (genvar k = 0; k < N; k++) begin : g_out
    if (k == 0) begin : g_first
      always_ff @(posedge clk) begin
        if (rst)         perm[k] <= W'(1);      // marker bit
        else if (!ready) perm[k] <= done_elem;
      end
    end else begin : g_next
      always_ff @(posedge clk) begin
        if (rst)         perm[k] <= '0;
        else if (!ready) perm[k] <= perm[k-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)         ready <= 1'b0;
    else if (!ready) ready <= perm[N-1][0];     // marker in the last slot
  end

endmodule
