// crge_partial -- CRGE partial permutation generator: computes only the
// elements listed in ELEMS, sigma(ELEMS[0]), ..., sigma(ELEMS[K-1]).
//
// Because every CRGE element depends only on its own start value and on the
// digits, an element needs just one computation block and one counter, however
// large n is. The index is side-loaded on reset into a shift register idx[],
// with idx[i] = d_i; every later cycle it moves down one place (idx[i] takes
// idx[i+1], idx[n-1] takes 0). The block for element e always reads idx[e],
// so in cycle t after reset it sees d_{e+t}. Its counter starts at e + 1 and
// counts up by one per cycle; it is the modulus input of the block, so the
// block computes f_e, f_{e+1}, ..., f_{n-1} in turn. The block input is e in
// the first cycle (loaded on reset) and its own previous output afterwards.
// A block stops once its counter has passed n.
//
// Interface: rst (synchronous) loads digit[] and starts; digit[] is needed
// only in the reset cycle. ready rises n - min(ELEMS) cycles after the last
// reset cycle and then elem[k] = sigma(ELEMS[k]). The structure follows the
// original template; the ELEMS default is a choice of this design.
module crge_partial
  import crge_pkg::*;
#(
  parameter int unsigned N = 8192,                       // permutation size
  parameter int unsigned K = 4,                          // elements wanted
  parameter int unsigned ELEMS [K] = '{0, 1, N/2, N-1},  // which elements
  parameter int unsigned W = elem_width(N)               // element width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] digit [1:N-1],
  output logic         ready,
  output logic [W-1:0] elem  [K]
);

  localparam int unsigned CW = $clog2(N + 2);  // counter counts to N + 1

  logic [W-1:0]  idx  [N];     // index shift register, idx[i] = current d
  logic [CW-1:0] cnt  [K];     // modulus counters
  logic [K-1:0]  busy;

  for (genvar i = 0; i < N; i++) begin : g_idx
    if (i == 0) begin : g_low
      always_ff @(posedge clk) begin
        if (rst) idx[i] <= '0;          // d_0 = 0
        else     idx[i] <= idx[i+1];
      end
    end else if (i == N - 1) begin : g_top
      always_ff @(posedge clk) begin
        if (rst) idx[i] <= digit[i];
        else     idx[i] <= '0;          // d_{n-1} = 0 enters at the top
      end
    end else begin : g_mid
      always_ff @(posedge clk) begin
        if (rst) idx[i] <= digit[i];
        else     idx[i] <= idx[i+1];
      end
    end
  end

  for (genvar k = 0; k < K; k++) begin : g_elem
    localparam int unsigned E = ELEMS[k];
    logic [W-1:0] y;

    crge_mblock #(.W(W), .MW(CW)) u_blk (
      .x (elem[k]),
      .d (idx[E]),
      .m (cnt[k]),
      .y (y)
    );

    assign busy[k] = (cnt[k] <= CW'(N));

    always_ff @(posedge clk) begin
      if (rst) begin
        elem[k] <= W'(E);
        cnt[k]  <= CW'(E + 1);
      end else if (busy[k]) begin
        elem[k] <= y;
        cnt[k]  <= cnt[k] + 1'b1;
      end
    end

    initial assert (E < N) else $error("crge_partial: element %0d out of range", E);
  end

  assign ready = ~|busy;

endmodule
