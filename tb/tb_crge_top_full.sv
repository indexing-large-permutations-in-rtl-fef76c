// tb_crge_top_full -- crge_top at its default sizes, one complete operation
// of every generator.
//
// n = 8192 for the shift register, partial and distributed generators and
// n = 32 for the high throughput generator, with the top's parameters left at
// their defaults. One random index per sequential generator (8192 cycles
// each, all running at once) and a run of back-to-back indices through the
// pipeline, each compared with the reference model, plus the same mechanism
// counts as tb_crge_top.
module tb_crge_top_full;
  localparam int unsigned N = 8192;
  localparam int unsigned W = crge_pkg::elem_width(N);
  localparam int unsigned PP_K = 4;
  localparam int unsigned PP_ELEMS [PP_K] = '{0, 1, N/2, N-1};
  localparam int unsigned HT_N = 32;
  localparam int unsigned HT_W = crge_pkg::elem_width(HT_N);
  localparam int RUNS = 1, HT_RUN = 40, WATCHDOG = 40000;

  import crge_ref_pkg::*;

  int checks = 0, failures = 0;
  // how often each mechanism happened
  int n_sr_done = 0, n_sr_hold = 0, n_pp_done = 0, n_pp_early_stop = 0;
  int n_ds_elems = 0, n_ds_done = 0, n_ht_b2b = 0, n_ht_bubble = 0;

  logic clk = 0;
  always #5 clk = ~clk;

  logic            sr_rst = 1, pp_rst = 1, ds_rst = 1, ht_rst = 1, ht_in_valid = 0;
  logic [W-1:0]    sr_digit [1:N-1];
  logic [W-1:0]    pp_digit [1:N-1];
  logic [W-1:0]    ds_digit [1:N-1];
  logic [HT_W-1:0] ht_digit [1:HT_N-1];
  logic            sr_ready, pp_ready, ds_elem_valid, ds_done, ht_out_valid;
  logic [W-1:0]    sr_perm [N];
  logic [W-1:0]    pp_elem [PP_K];
  logic [W-1:0]    ds_elem_idx, ds_elem_val;
  logic [HT_W-1:0] ht_perm [HT_N];

  crge_top u_dut (
    .clk(clk),
    .sr_rst(sr_rst), .sr_digit(sr_digit), .sr_ready(sr_ready), .sr_perm(sr_perm),
    .pp_rst(pp_rst), .pp_digit(pp_digit), .pp_ready(pp_ready), .pp_elem(pp_elem),
    .ds_rst(ds_rst), .ds_digit(ds_digit), .ds_elem_valid(ds_elem_valid),
    .ds_elem_idx(ds_elem_idx), .ds_elem_val(ds_elem_val), .ds_done(ds_done),
    .ht_rst(ht_rst), .ht_in_valid(ht_in_valid), .ht_digit(ht_digit),
    .ht_out_valid(ht_out_valid), .ht_perm(ht_perm));

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // shift register generator: full permutation, latency N, result held
  task automatic run_sr();
    uvec_t d = rand_digits(N);
    uvec_t sg = ref_perm(N, d);
    int unsigned cyc = 0;
    bit ok = 1;
    for (int unsigned i = 1; i < N; i++) sr_digit[i] = W'(d[i]);
    sr_rst = 1;
    @(posedge clk);
    #1 sr_rst = 0;
    while (!sr_ready && cyc < 2 * N) begin
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == N, $sformatf("sr latency %0d", cyc));
    for (int unsigned i = 0; i < N; i++) if (int'(sr_perm[i]) != int'(sg[i])) ok = 0;
    check(ok, "sr permutation");
    if (sr_ready) n_sr_done++;
    repeat (3) @(posedge clk);
    #1 ok = sr_ready;
    for (int unsigned i = 0; i < N; i++) if (int'(sr_perm[i]) != int'(sg[i])) ok = 0;
    check(ok, "sr result held");
    if (ok) n_sr_hold++;
  endtask

  // partial generator: the PP_ELEMS elements, latency N - min(PP_ELEMS)
  task automatic run_pp();
    uvec_t d = rand_digits(N);
    uvec_t sg = ref_perm(N, d);
    int unsigned cyc = 0, emin = N;
    for (int k = 0; k < int'(PP_K); k++) if (PP_ELEMS[k] < emin) emin = PP_ELEMS[k];
    for (int unsigned i = 1; i < N; i++) pp_digit[i] = W'(d[i]);
    pp_rst = 1;
    @(posedge clk);
    #1 pp_rst = 0;
    while (!pp_ready && cyc < 2 * N) begin
      if (u_dut.u_pp.busy != '1 && u_dut.u_pp.busy != '0) n_pp_early_stop++;
      @(posedge clk);
      #1 cyc++;
    end
    check(cyc == N - emin, $sformatf("pp latency %0d", cyc));
    for (int k = 0; k < int'(PP_K); k++)
      check(int'(pp_elem[k]) == int'(sg[PP_ELEMS[k]]), $sformatf("pp element %0d", PP_ELEMS[k]));
    if (pp_ready) n_pp_done++;
  endtask

  // distributed generator: stream sigma(N-1) .. sigma(0)
  task automatic run_ds();
    uvec_t d = rand_digits(N);
    uvec_t sg = ref_perm(N, d);
    bit ok = 1;
    for (int unsigned i = 1; i < N; i++) ds_digit[i] = W'(d[i]);
    ds_rst = 1;
    @(posedge clk);
    #1 ds_rst = 0;
    #1;
    for (int unsigned t = 1; t <= N; t++) begin
      if (!ds_elem_valid || int'(ds_elem_idx) != int'(N - t) || int'(ds_elem_val) != int'(sg[N - t])) ok = 0;
      else n_ds_elems++;
      @(posedge clk);
      #1;
    end
    check(ok, "ds stream");
    check(ds_done && !ds_elem_valid, "ds end of stream");
    if (ds_done) n_ds_done++;
  endtask

  // high throughput generator: NHT indices, mostly back to back
  task automatic run_ht(int nht);
    bit    ev [$];
    uvec_t ep [$];
    uvec_t zero = new[HT_N];
    bit ok = 1;
    ht_rst = 1;
    ht_in_valid = 0;
    @(posedge clk);
    #1 ht_rst = 0;
    for (int k = 0; k < int'(HT_N) - 2; k++) begin
      ev.push_back(0);
      ep.push_back(zero);
    end
    for (int t = 0; t < nht + int'(HT_N); t++) begin
      uvec_t d = rand_digits(HT_N);
      bit v = (t < nht) && ($urandom_range(4, 0) != 0);
      ht_in_valid = v;
      for (int unsigned i = 1; i < HT_N; i++) ht_digit[i] = HT_W'(d[i]);
      ev.push_back(v);
      ep.push_back(ref_perm(HT_N, d));
      @(posedge clk);
      #1;
      begin
        bit e = ev.pop_front();
        uvec_t p = ep.pop_front();
        if (ht_out_valid != e) ok = 0;
        else if (e) begin
          for (int unsigned i = 0; i < HT_N; i++) if (int'(ht_perm[i]) != int'(p[i])) ok = 0;
          if (ev.size() > 0 && ev[0]) n_ht_b2b++;
        end else if (t >= int'(HT_N) - 2 && t < nht + int'(HT_N) - 2) n_ht_bubble++;
      end
    end
    check(ok, "ht permutations");
  endtask

  initial begin
    for (int r = 0; r < RUNS; r++) begin
      fork
        run_sr();
        run_pp();
        run_ds();
        run_ht(HT_RUN);
      join
    end
    check(n_sr_done > 0,       "mechanism: marker-detected completion never happened");
    check(n_sr_hold > 0,       "mechanism: result hold never happened");
    check(n_pp_done > 0,       "mechanism: partial completion never happened");
    check(n_pp_early_stop > 0, "mechanism: per-element block stop never happened");
    check(n_ds_elems > 0,      "mechanism: distributed streaming never happened");
    check(n_ds_done > 0,       "mechanism: distributed end of stream never happened");
    check(n_ht_b2b > 0,        "mechanism: back-to-back pipelined output never happened");
    check(n_ht_bubble > 0,     "mechanism: pipeline bubble never happened");
    $display("mechanisms: sr_done=%0d sr_hold=%0d pp_done=%0d pp_early_stop=%0d ds_elems=%0d ds_done=%0d ht_b2b=%0d ht_bubble=%0d",
             n_sr_done, n_sr_hold, n_pp_done, n_pp_early_stop, n_ds_elems, n_ds_done, n_ht_b2b, n_ht_bubble);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
