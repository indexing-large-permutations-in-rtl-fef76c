// tb_crge_partial_run -- one partial generator under test, used by
// tb_crge_partial. Runs TRIALS random indices against the reference model,
// checks latency n - min(ELEMS) and that the result is held, then raises
// finished. checks / failures are this instance's counts.
module tb_crge_partial_run #(
  parameter int unsigned N = 12,
  parameter int unsigned K = 4,
  parameter int unsigned E [K] = '{2, 5, 11, 7},
  parameter int unsigned TRIALS = 200
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic finished
);
  import crge_ref_pkg::*;
  localparam int unsigned W = crge_pkg::elem_width(N);
  logic rst = 1;
  logic [W-1:0] digit [1:N-1];
  logic ready;
  logic [W-1:0] elem [K];

  crge_partial #(.N(N), .K(K), .ELEMS(E), .W(W)) u_dut (
    .clk(clk), .rst(rst), .digit(digit), .ready(ready), .elem(elem));

  initial begin
    int unsigned emin = N;
    checks = 0;
    failures = 0;
  finished = 0;
    for (int k = 0; k < int'(K); k++) if (E[k] < emin) emin = E[k];
    for (int trial = 0; trial < int'(TRIALS); trial++) begin
      automatic uvec_t d = rand_digits(N);
      automatic uvec_t sg = ref_perm(N, d);
      automatic int unsigned cyc = 0;
      for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
      rst = 1;
      @(posedge clk);
      #1 rst = 0;
      for (int unsigned i = 1; i < N; i++) digit[i] = W'($urandom_range(i, 0));
      while (!ready && cyc < 4 * N) begin
        @(posedge clk);
        #1 cyc++;
      end
      checks++;
      if (cyc != N - emin) begin
        failures++;
        $display("FAIL n=%0d latency %0d exp %0d", N, cyc, N - emin);
      end
      for (int k = 0; k < int'(K); k++) begin
        checks++;
        if (int'(elem[k]) != int'(sg[E[k]])) begin
          failures++;
          $display("FAIL n=%0d element %0d = %0d exp %0d", N, E[k], elem[k], sg[E[k]]);
        end
      end
      repeat (2) @(posedge clk);
      #1;
      for (int k = 0; k < int'(K); k++) begin
        checks++;
        if (int'(elem[k]) != int'(sg[E[k]]) || !ready) begin
          failures++;
          $display("FAIL n=%0d element %0d not held", N, E[k]);
        end
        end
      end
    finished = 1;
  end
endmodule
