// Random test of the converged butterfly. FFT mode: y_m must equal the 4-point
// DFT sum_k x_k (-j)^(k*m). FWT mode: for butterfly A on (x0,x1) and B on
// (x2,x3), output l of each must equal u + (-j)^l v, at the output positions
// of the write addresses (A: 0,1,4,5; B: 2,3,6,7).
module tb_butterfly;
  import cfft_pkg::*;

  logic  fwt;
  cplx_t x [4];
  cplx_t y [8];

  butterfly dut (.*);

  int checks = 0, failures = 0;

  // (a + jb) * (-j)^e
  function automatic void rot(int a, int b, int e, output int r, output int i);
    case (e % 4)
      0: begin r = a;  i = b;  end
      1: begin r = b;  i = -a; end
      2: begin r = -a; i = -b; end
      default: begin r = -b; i = a; end
    endcase
  endfunction

  task automatic cmp(int idx, int er, int ei);
    checks++;
    if (int'(y[idx].re) != er || int'(y[idx].im) != ei) begin
      failures++;
      if (failures < 10) $display("FAIL: fwt=%0d y%0d = %0d,%0d expected %0d,%0d", fwt, idx, y[idx].re, y[idx].im, er, ei);
    end
  endtask

  initial begin
    int xr [4], xi [4];
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 4; k++) begin
        xr[k] = $signed(13'($urandom));
        xi[k] = $signed(13'($urandom));
        x[k].re = INT_W'(xr[k]);
        x[k].im = INT_W'(xi[k]);
      end
      fwt = 1'b0;
      #1;
      for (int m = 0; m < 4; m++) begin
        int sr, si, r, i;
        sr = 0; si = 0;
        for (int k = 0; k < 4; k++) begin
          rot(xr[k], xi[k], k * m, r, i);
          sr += r; si += i;
        end
        cmp(m, sr, si);
      end
      fwt = 1'b1;
      #1;
      for (int bfly = 0; bfly < 2; bfly++)
        for (int l = 0; l < 4; l++) begin
          int r, i, pos;
          rot(xr[2 * bfly + 1], xi[2 * bfly + 1], l, r, i);
          pos = (l >> 1) * 4 + bfly * 2 + (l & 1);
          cmp(pos, xr[2 * bfly] + r, xi[2 * bfly] + i);
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
