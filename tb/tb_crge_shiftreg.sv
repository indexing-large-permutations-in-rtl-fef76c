// tb_crge_shiftreg -- test of the shift register CRGE generator.
//
// Four generators of different size run side by side:
//   n = 2  and n = 7  every index 0 .. n!-1 (exhaustive): each result must be
//                    a permutation, equal to the reference model, and all n!
//                    results must be distinct;
//   n = 10 and n = 67 random indices against the reference model.
// The n = 67 generator also produces 10-element permutations with the
// upper digits zero. For every run the testbench checks that ready rises exactly n cycles after
// reset (the latency of the design), and that perm and ready then stay
// constant for a random number of cycles.
module tb_crge_shiftreg;
  import crge_ref_pkg::*;

  localparam int NCFG = 4;
  localparam int unsigned CFG_N     [NCFG] = '{2, 7, 10, 67};
  localparam int unsigned CFG_EXH   [NCFG] = '{1, 1, 0, 0};
  localparam int unsigned CFG_TRIAL [NCFG] = '{0, 0, 300, 60};

  int checks = 0, failures = 0, finished = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned N = CFG_N[c];
    localparam int unsigned W = crge_pkg::elem_width(N);
    logic rst = 1;
    logic [W-1:0] digit [1:N-1];
    logic ready;
    logic [W-1:0] perm [N];

    crge_shiftreg #(.N(N), .W(W)) u_dut (.clk(clk), .rst(rst), .digit(digit), .ready(ready), .perm(perm));

    task automatic run(uvec_t d, output uvec_t got);
      int unsigned cyc = 0;
      uvec_t sg = ref_perm(N, d);
      got = new[N];
      for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
      rst = 1;
      @(posedge clk);
      #1 rst = 0;
      while (!ready && cyc < 4 * N) begin
        @(posedge clk);
        #1 cyc++;
      end
      checks++;
      if (cyc != N) begin
        failures++;
        $display("FAIL n=%0d latency %0d, expected %0d", N, cyc, N);
      end
      for (int unsigned i = 0; i < N; i++) got[i] = perm[i];
      checks++;
      if (got != sg) begin
        failures++;
        $display("FAIL n=%0d wrong permutation", N);
      end
      // result held constant
      repeat ($urandom_range(4, 0)) begin
        @(posedge clk);
        #1;
        for (int unsigned i = 0; i < N; i++)
          if (perm[i] != W'(got[i]) || !ready) begin
            failures++;
            $display("FAIL n=%0d result not held", N);
            break;
          end
      end
    endtask

    initial begin
      uvec_t d, got;
      if (CFG_EXH[c] != 0) begin
        longint unsigned nf = 1;
        bit seen [];
        for (int unsigned k = 2; k <= N; k++) nf *= k;
        seen = new[nf];
        for (longint unsigned r = 0; r < nf; r++) begin
          longint unsigned rk;
          d = index_digits(N, r);
          run(d, got);
          checks++;
          if (!is_perm(N, got)) begin
            failures++;
            $display("FAIL n=%0d index %0d is not a permutation", N, r);
          end else begin
            rk = perm_rank(N, got);
            checks++;
            if (seen[rk]) begin
              failures++;
              $display("FAIL n=%0d index %0d repeats a permutation", N, r);
            end
            seen[rk] = 1;
          end
        end
      end
      for (int t = 0; t < int'(CFG_TRIAL[c]); t++) begin
        d = rand_digits(N);
        run(d, got);
      end
      // a smaller permutation (m = 10) from the same hardware: zero digits
      // from d_m up leave perm[0..m-1] = the m-element result, perm[i] = i above
      if (N > 10) begin
        for (int t = 0; t < 20; t++) begin
          automatic uvec_t ds = rand_digits(10);
          automatic uvec_t sm = ref_perm(10, ds);
          d = new[N];
          foreach (d[i]) d[i] = (i < 10) ? ds[i] : 0;
          run(d, got);
          checks++;
          for (int unsigned i = 0; i < N; i++)
            if (got[i] != ((i < 10) ? sm[i] : i)) begin
              failures++;
              $display("FAIL n=%0d smaller permutation element %0d", N, i);
              break;
            end
        end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
