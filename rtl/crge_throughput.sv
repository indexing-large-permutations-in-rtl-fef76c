// crge_throughput -- high throughput CRGE generator: one whole permutation
// per clock cycle, fully pipelined.
//
// Stage s (s = 1 .. n-1) applies f_s to every element that has started:
// elements 0 .. s-1 arrive from the stage before, and element s starts here
// with the value s (element 0 starts in stage 1 as f_0(0, d_0) = 0). So stage
// s holds s+1 computation blocks, all with modulus s+1, n(n+1)/2 - 1 blocks in
// all. The index digits travel down the pipeline with their permutation;
// stage s receives d_s .. d_{n-1} and passes d_{s+1} .. d_{n-1} on.
//
// Stage 1 works directly on the inputs; a register sits after every stage,
// so a permutation appears on perm with out_valid N-1 cycles after its index
// was presented with in_valid. A new index may be presented in every cycle.
// The stage structure follows the original template; the valid signals, the
// register placement and the reset (valid bits only) are choices of this
// design.
module crge_throughput
  import crge_pkg::*;
#(
  parameter int unsigned N = 32,             // permutation size
  parameter int unsigned W = elem_width(N)   // element width
) (
  input  logic         clk,
  input  logic         rst,                  // synchronous, clears valids
  input  logic         in_valid,
  input  logic [W-1:0] digit [1:N-1],
  output logic         out_valid,
  output logic [W-1:0] perm  [N]
);

  for (genvar s = 1; s < N; s++) begin : g_st
    logic [W-1:0] in_pv  [s];        // elements 0 .. s-1 entering stage s
    logic [W-1:0] in_dg  [s:N-1];    // digits d_s .. d_{n-1}
    logic         in_v;
    logic [W-1:0] out_pv [s+1];      // elements 0 .. s after f_s

    if (s == 1) begin : g_in
      assign in_pv[0] = '0;
      assign in_v     = in_valid;
      for (genvar i = 1; i < N; i++) begin : g_d
        assign in_dg[i] = digit[i];
      end
    end else begin : g_reg
      always_ff @(posedge clk) begin
        for (int j = 0; j < s; j++) in_pv[j] <= g_st[s-1].out_pv[j];
        for (int i = s; i < N; i++) in_dg[i] <= g_st[s-1].in_dg[i];
        if (rst) in_v <= 1'b0;
        else     in_v <= g_st[s-1].in_v;
      end
    end

    for (genvar j = 0; j <= s; j++) begin : g_blk
      if (j < s) begin : g_old
        crge_fblock #(.I(s), .W(W)) u_f (.x(in_pv[j]), .d(in_dg[s]), .y(out_pv[j]));
      end else begin : g_new
        crge_fblock #(.I(s), .W(W)) u_f (.x(W'(s)), .d(in_dg[s]), .y(out_pv[j]));
      end
    end
  end

  always_ff @(posedge clk) begin
    perm <= g_st[N-1].out_pv;
    if (rst) out_valid <= 1'b0;
    else     out_valid <= g_st[N-1].in_v;
  end

endmodule
