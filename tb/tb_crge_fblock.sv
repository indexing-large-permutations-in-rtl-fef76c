// tb_crge_fblock -- exhaustive test of the CRGE computation block.
//
// Instances with I = 1 .. 10 (power-of-two and general moduli) are driven
// with every x, d in [0, I]; each output is compared with (x - d) mod (I+1)
// worked out with integer arithmetic. The published f_2 truth table
// (9 rows) is also checked literally.
module tb_crge_fblock;
  localparam int unsigned W = 4;
  localparam int unsigned IMAX = 10;

  int checks = 0, failures = 0;
  logic [W-1:0] x [1:IMAX];
  logic [W-1:0] d [1:IMAX];
  logic [W-1:0] y [1:IMAX];

  for (genvar i = 1; i <= IMAX; i++) begin : g_dut
    crge_fblock #(.I(i), .W(W)) u_dut (.x(x[i]), .d(d[i]), .y(y[i]));
  end

  // truth table of f_2: x, d, f_2(x, d)
  int unsigned tab [9][3] = '{'{0,0,0}, '{0,1,2}, '{0,2,1}, '{1,0,1}, '{1,1,0},
                               '{1,2,2}, '{2,0,2}, '{2,1,1}, '{2,2,0}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 1; i <= IMAX; i++) begin
      for (int unsigned a = 0; a <= i; a++) begin
        for (int unsigned b = 0; b <= i; b++) begin
          int unsigned exp_v;
          x[i] = W'(a); d[i] = W'(b);
          #1;
          exp_v = (a + (i + 1) - b) % (i + 1);
          checks++;
          if (int'(y[i]) != int'(exp_v)) begin
            failures++;
            $display("FAIL I=%0d x=%0d d=%0d y=%0d exp=%0d", i, a, b, y[i], exp_v);
          end
        end
      end
    end
    for (int r = 0; r < 9; r++) begin
      x[2] = W'(tab[r][0]); d[2] = W'(tab[r][1]);
      #1;
      checks++;
      if (int'(y[2]) != int'(tab[r][2])) begin
        failures++;
        $display("FAIL table row %0d: y=%0d exp=%0d", r, y[2], tab[r][2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
