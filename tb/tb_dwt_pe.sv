// tb_dwt_pe -- checks every shift-add processing element against an
// ordinary multiplication by the integer tap (h, g scaled by 256), over the
// extreme and random values of a 16-bit signed input.
module tb_dwt_pe;
  import dwt_pkg::*;

  localparam int TAPS [8] = '{118, 216, 63, -35, -35, -63, 216, -118};

  sample_t x;
  acc_t    y [8];
  int checks = 0, failures = 0;

  dwt_pe #(.COEF(H0)) u0 (.x, .y(y[0]));
  dwt_pe #(.COEF(H1)) u1 (.x, .y(y[1]));
  dwt_pe #(.COEF(H2)) u2 (.x, .y(y[2]));
  dwt_pe #(.COEF(H3)) u3 (.x, .y(y[3]));
  dwt_pe #(.COEF(G0)) u4 (.x, .y(y[4]));
  dwt_pe #(.COEF(G1)) u5 (.x, .y(y[5]));
  dwt_pe #(.COEF(G2)) u6 (.x, .y(y[6]));
  dwt_pe #(.COEF(G3)) u7 (.x, .y(y[7]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: x = 16'sh7fff;
        1: x = 16'sh8000;
        2: x = 16'sd0;
        3: x = -16'sd1;
        4: x = 16'sd1;
        default: x = sample_t'($urandom);
      endcase
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (longint'(y[i]) != longint'(x) * TAPS[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: tap %0d x=%0d y=%0d", i, x, y[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
