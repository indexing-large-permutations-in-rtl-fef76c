// tb_crge_distributed -- test of the distributed CRGE model.
//
// n = 23 split over 4 equal segments, n = 9 over 8 segments (one block
// each), and n = 23 over 3 unequal segments of 12, 6 and 4 blocks.
// For random indices the element stream must carry sigma(n-1) .. sigma(0) in
// the n cycles after reset, with elem_idx naming each element, elem_valid
// high exactly those n cycles and done high afterwards.
module tb_crge_distributed;
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

  localparam int unsigned CN [3] = '{23, 9, 23};
  localparam int unsigned CS [3] = '{4, 8, 3};
  localparam int unsigned UNEQUAL [3] = '{12, 6, 4};

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    localparam int unsigned N = CN[c];
    localparam int unsigned NSEG = CS[c];
    localparam int unsigned W = crge_pkg::elem_width(N);
    logic rst = 1;
    logic [W-1:0] digit [1:N-1];
    logic vld, done;
    logic [W-1:0] eidx, eval;

    if (c == 2) begin : g_unequal
      crge_distributed #(.N(N), .NSEG(NSEG), .SEG_BLOCKS(UNEQUAL), .W(W)) u_dut (
        .clk(clk), .rst(rst), .digit(digit), .elem_valid(vld),
        .elem_idx(eidx), .elem_val(eval), .done(done));
    end else begin : g_equal
      crge_distributed #(.N(N), .NSEG(NSEG), .W(W)) u_dut (
        .clk(clk), .rst(rst), .digit(digit), .elem_valid(vld),
        .elem_idx(eidx), .elem_val(eval), .done(done));
    end

    initial begin
      for (int trial = 0; trial < 200; trial++) begin
        automatic uvec_t d = rand_digits(N);
        automatic uvec_t sg = ref_perm(N, d);
        for (int unsigned i = 1; i < N; i++) digit[i] = W'(d[i]);
        rst = 1;
        @(posedge clk);
        #1 rst = 0;
        #1;
        for (int unsigned t = 1; t <= N; t++) begin
          checks++;
          if (!vld || done || int'(eidx) != int'(N - t) || int'(eval) != int'(sg[N - t])) begin
            failures++;
            $display("FAIL n=%0d cycle %0d: vld=%0d idx=%0d val=%0d exp %0d", N, t, vld, eidx, eval, sg[N - t]);
          end
          @(posedge clk);
          #1;
        end
        checks++;
        if (vld || !done) begin
          failures++;
          $display("FAIL n=%0d stream did not end", N);
        end
      end
      finished++;
    end
  end

  initial begin
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
