// tb_crge_throughput -- test of the pipelined high throughput CRGE generator.
//
// n = 8 and n = 5. Random indices are presented with in_valid high in most
// cycles (runs of back-to-back indices) and low in some (bubbles). Every
// permutation must come out exactly n-1 cycles after its index (in cycle
// t+n-1 for an index presented in cycle t), in order,
// equal to the reference model; out_valid must be low for bubbles. A reset
// in the middle of a run must empty the pipeline.
module tb_crge_throughput;
  import crge_ref_pkg::*;

  int checks = 0, failures = 0, finished = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned CN [2] = '{8, 5};

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int unsigned N = CN[c];
    localparam int unsigned W = crge_pkg::elem_width(N);
    logic rst = 1, in_valid = 0, out_valid;
    logic [W-1:0] digit [1:N-1];
    logic [W-1:0] perm [N];

    crge_throughput #(.N(N), .W(W)) u_dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .digit(digit),
      .out_valid(out_valid), .perm(perm));

    // expected output of each cycle: valid flag and permutation
    bit    exp_v [$];
    uvec_t exp_p [$];
    int    b2b = 0, bubbles = 0;

    initial begin
      automatic uvec_t zero = new[N];
      for (int k = 0; k < int'(N) - 2; k++) begin
        exp_v.push_back(0);
        exp_p.push_back(zero);
      end
      @(posedge clk);
      #1 rst = 0;
      for (int t = 0; t < 2000; t++) begin
        automatic uvec_t d = rand_digits(N);
        automatic bit v = ($urandom_range(9, 0) != 0);
        if (t == 1000) begin
          // reset mid-run: everything in flight is dropped
          rst = 1;
          in_valid = 0;
          @(posedge clk);
          #1 rst = 0;
          exp_v.delete();
          exp_p.delete();
          for (int k = 0; k < int'(N) - 2; k++) begin
            exp_v.push_back(0);
            exp_p.push_back(zero);
          end
        end
        in_valid = v;
        for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
        exp_v.push_back(v);
        exp_p.push_back(ref_perm(N, d));
        if (v) b2b++; else bubbles++;
        @(posedge clk);
        #1;
        begin
          automatic bit ev = exp_v.pop_front();
          automatic uvec_t ep = exp_p.pop_front();
          checks++;
          if (out_valid != ev) begin
            failures++;
            $display("FAIL n=%0d cycle %0d: out_valid=%0d exp %0d", N, t, out_valid, ev);
          end else if (ev) begin
            for (int unsigned i = 0; i < N; i++)
              if (int'(perm[i]) != int'(ep[i])) begin
                failures++;
                $display("FAIL n=%0d cycle %0d element %0d: %0d exp %0d", N, t, i, perm[i], ep[i]);
                break;
              end
          end
        end
      end
      checks++;
      if (bubbles == 0 || b2b == 0) failures++;
      finished++;
    end
  end

  initial begin
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
