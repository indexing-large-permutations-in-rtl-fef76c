// tb_crge_exhaustive10 -- every index of a 10-element permutation.
//
// All 10! = 3,628,800 indices are fed, one per cycle, through the pipelined
// generator at n = 10. For each output the testbench checks that it is a
// permutation, that no earlier index produced it (a bit per Lehmer rank) and
// that it equals the reference model. With all n! indices mapping to
// distinct permutations the generator is a bijection: every permutation is
// reached by exactly one index, so a uniform index gives an unbiased result.
module tb_crge_exhaustive10;
  import crge_ref_pkg::*;
  localparam int unsigned N = 10;
  localparam int unsigned W = crge_pkg::elem_width(N);
  localparam longint unsigned NF = 3628800;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst = 1, in_valid = 0, out_valid;
  logic [W-1:0] digit [1:N-1];
  logic [W-1:0] perm [N];

  crge_throughput #(.N(N), .W(W)) u_dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .digit(digit),
    .out_valid(out_valid), .perm(perm));

  bit seen [] = new[NF];
  longint unsigned n_out = 0, n_dup = 0, n_bad = 0, n_wrong = 0;
  uvec_t exp_q [$];

  initial begin
    repeat (NF + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // driver: index r in cycle r
  initial begin
    @(posedge clk);
    #1 rst = 0;
    for (longint unsigned r = 0; r < NF; r++) begin
      automatic uvec_t d = index_digits(N, r);
      for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
      in_valid = 1;
      exp_q.push_back(ref_perm(N, d));
      @(posedge clk);
      #1;
    end
    in_valid = 0;
  end

  // monitor
  always @(posedge clk) begin
    if (out_valid) begin
      automatic uvec_t got = new[N];
      automatic uvec_t ex = exp_q.pop_front();
      for (int unsigned i = 0; i < N; i++) got[i] = perm[i];
      n_out++;
      if (!is_perm(N, got)) n_bad++;
      else begin
        automatic longint unsigned rk = perm_rank(N, got);
        if (seen[rk]) n_dup++;
        seen[rk] = 1;
      end
      if (got != ex) n_wrong++;
      if (n_out == NF) begin
        checks = 3;
        failures = int'(n_bad != 0) + int'(n_dup != 0) + int'(n_wrong != 0);
        $display("indices %0d, not a permutation %0d, repeated %0d, differ from model %0d",
                 n_out, n_bad, n_dup, n_wrong);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
