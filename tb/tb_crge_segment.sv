// tb_crge_segment -- test of a run of CRGE computation blocks.
//
// Instance A is a whole chain (blocks 1..8, x_in = 0, n = 9): its output
// stream must be sigma(8), sigma(7), ..., sigma(0) of the reference model, one
// element per cycle from the first cycle after reset. Instance B is a middle
// run (blocks 4..7) fed with a random x_in stream; each output is checked
// against the blocks' arithmetic applied by hand: elements 7..4 start at their
// own block, later values are the x_in values of 4 cycles earlier.
module tb_crge_segment;
  import crge_ref_pkg::*;
  localparam int unsigned N = 9;
  localparam int unsigned W = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] dA [1:N-1];
  logic [W-1:0] yA;
  logic [W-1:0] dB [4:7];
  logic [W-1:0] xB, yB;

  crge_segment #(.LO(1), .HI(N-1), .W(W)) u_a (.clk(clk), .rst(rst), .digit(dA), .x_in('0), .y_out(yA));
  crge_segment #(.LO(4), .HI(7),   .W(W)) u_b (.clk(clk), .rst(rst), .digit(dB), .x_in(xB), .y_out(yB));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned chain(int unsigned v, int unsigned from, int unsigned to, uvec_t d);
    for (int unsigned i = from; i <= to; i++) v = (v + (i + 1) - d[i]) % (i + 1);
    return v;
  endfunction

  initial begin
    uvec_t d, sg, xs;
    for (int trial = 0; trial < 50; trial++) begin
      d  = rand_digits(N);
      sg = ref_perm(N, d);
      xs = new[N + 8];
      for (int unsigned i = 1; i < N; i++) dA[i] = W'(d[i]);
      for (int unsigned i = 4; i <= 7; i++) dB[i] = W'(d[i]);
      rst = 1;
      xB  = '0;
      @(posedge clk);
      #1 rst = 0;
      for (int unsigned t = 1; t <= N; t++) begin
        xs[t] = $urandom_range(3, 0);       // x_in for block 4 is in [0, 3]
        xB = W'(xs[t]);
        #1;
        checks++;
        if (int'(yA) != int'(sg[N - t])) begin
          failures++;
          $display("FAIL A trial %0d cycle %0d: %0d exp %0d", trial, t, yA, sg[N - t]);
        end
        begin
          int unsigned exp_b;
          if (t <= 4) exp_b = chain(8 - t, 8 - t, 7, d);
          else        exp_b = chain(xs[t - 4], 4, 7, d);
          checks++;
          if (int'(yB) != int'(exp_b)) begin
            failures++;
            $display("FAIL B trial %0d cycle %0d: %0d exp %0d", trial, t, yB, exp_b);
          end
        end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
