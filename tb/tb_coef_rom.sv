// Test of the coefficient ROM: every one of the 256 coefficients is compared
// with exp(-j*2*pi*e/256) * 1024 computed here, where e is the twiddle
// exponent of the FFT steps, zero for the FFT last step and the DCT output
// index k for the DCT last step. Allowed error: 1 LSB.
module tb_coef_rom;
  import cfft_pkg::*;

  localparam real PI = 3.14159265358979323846;

  logic [5:0] addr;
  coef_t      coef [4];

  coef_rom dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 64; r++) begin
      addr = 6'(r);
      #1;
      for (int m = 0; m < 4; m++) begin
        int x2x3, x4x5, e;
        real er, ei, dr, di;
        x2x3 = (r >> 2) & 3;
        x4x5 = r & 3;
        if (r < 16)      e = 4 * (m * (x2x3 * 4 + x4x5));      // W64^(l2*(k0+4k1))
        else if (r < 32) e = 4 * (4 * m * x4x5);               // W64^(4*l1*k0)
        else if (r < 48) e = 0;
        else             e = x2x3 + 4 * x4x5 + 16 * m;         // DCT W256^k
        er = 1024.0 * $cos(2.0 * PI * e / 256.0);
        ei = -1024.0 * $sin(2.0 * PI * e / 256.0);
        dr = real'(coef[m].re) - er;
        di = real'(coef[m].im) - ei;
        checks++;
        if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
          failures++;
          if (failures < 10) $display("FAIL: row %0d col %0d = %0d,%0d expected %f,%f", r, m, coef[m].re, coef[m].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
