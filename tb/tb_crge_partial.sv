// tb_crge_partial -- test of the CRGE partial permutation generator.
//
// Two generators: n = 12 computing elements {2, 5, 11, 7} and n = 40
// computing elements {0, 39, 17}. For random indices each computed element
// must equal the reference permutation's element, ready must rise exactly
// n - min(ELEMS) cycles after reset, and the digits are changed right after
// the reset cycle to show they are only needed while being side-loaded.
module tb_crge_partial;
  import crge_ref_pkg::*;

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

  localparam int unsigned E0 [4] = '{2, 5, 11, 7};
  localparam int unsigned E1 [3] = '{0, 39, 17};
  int c0, f0, c1, f1;
  logic d0, d1;

  tb_crge_partial_run #(.N(12), .K(4), .E(E0)) u_r0 (
    .clk(clk), .checks(c0), .failures(f0), .finished(d0));
  tb_crge_partial_run #(.N(40), .K(3), .E(E1)) u_r1 (
    .clk(clk), .checks(c1), .failures(f1), .finished(d1));

  initial begin
    #1;
    wait (d0 && d1);
    checks = c0 + c1;
    failures = f0 + f1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
