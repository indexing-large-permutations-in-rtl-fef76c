// tb_crge_eval_sizes -- the shift register generator at the permutation sizes
// of the original area / clock-rate evaluation: n = 2 .. 10, 16, 32 and the
// powers of two 64 .. 1024 (2048 .. 8192 are covered by the default-size
// top-level test, 8192 directly). Each size gets a generator of exactly that
// n; each runs random indices against the reference model and must be ready
// exactly n cycles after reset. The testbench also reports the cycle count
// per permutation, the figure behind the worst-case running time comparison.
module tb_crge_eval_sizes;
  import crge_ref_pkg::*;

  localparam int NCFG = 16;
  localparam int unsigned SIZES [NCFG] =
    '{2, 3, 4, 5, 6, 7, 8, 9, 10, 16, 32, 64, 128, 256, 512, 1024};

  int checks = 0, failures = 0, finished = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned N = SIZES[c];
    localparam int unsigned W = crge_pkg::elem_width(N);
    localparam int TRIALS = (N >= 256) ? 3 : 20;
    logic rst = 1;
    logic [W-1:0] digit [1:N-1];
    logic ready;
    logic [W-1:0] perm [N];

    crge_shiftreg #(.N(N), .W(W)) u_dut (.clk(clk), .rst(rst), .digit(digit), .ready(ready), .perm(perm));

    int unsigned last_cyc = 0;

    initial begin
      for (int t = 0; t < TRIALS; t++) begin
        automatic uvec_t d = rand_digits(N);
        automatic uvec_t sg = ref_perm(N, d);
        automatic int unsigned cyc = 0;
        automatic bit ok = 1;
        for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
        rst = 1;
        @(posedge clk);
        #1 rst = 0;
        while (!ready && cyc < 2 * N) begin
          @(posedge clk);
          #1 cyc++;
        end
        last_cyc = cyc;
        checks++;
        if (cyc != N) begin
          failures++;
          $display("FAIL n=%0d latency %0d", N, cyc);
        end
        for (int unsigned i = 0; i < N; i++) if (int'(perm[i]) != int'(sg[i])) ok = 0;
        checks++;
        if (!ok) begin
          failures++;
          $display("FAIL n=%0d wrong permutation", N);
        end
      end
      $display("n=%0d: %0d cycles per permutation", N, last_cyc);
      finished++;
    end
  end

  initial begin
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
