// Converged butterfly: one radix-4 DFT kernel or two modified Walsh butterflies.
//
// Two levels of four complex adders, steered by the single mode bit fwt.
// FFT/DCT (fwt=0), inputs x0..x3, outputs y0..y3 (y4..y7 are zero):
//   level 1: t0=x0+x2  t1=x0-x2  t2=x1+x3  t3=x1-x3
//   level 2: y0=t0+t2  y1=t1+(-j)t3  y2=t0-t2  y3=t1-(-j)t3
// so ym = sum_k xk * (-j)^(k*m), the 4-point DFT of the butterfly.
// FWT (fwt=1), butterfly A on (u,v)=(x0,x1), butterfly B on (x2,x3); each
// gives the four outputs u+(-j)^l v, l=0..3. The level-2 adders take the
// inputs directly, so in this mode every output is one addition deep:
//   y0=uA+vA  y1=uA-j*vA  y4=uA-vA  y5=uA+j*vA     (A)
//   y2=uB+vB  y3=uB-j*vB  y6=uB-vB  y7=uB+j*vB     (B)
// Output yi goes to memory address ai of the address generator. The document
// gives the kernels and the sharing of adders between the modes; the operand
// multiplexing shown here is this design's. Results wrap at 16 bits; the
// scaling of the datapath keeps every value of a transform in range.
// Purely combinational.
module butterfly
  import cfft_pkg::*;
(
  input  logic  fwt,
  input  cplx_t x [4],
  output cplx_t y [8]
);

  function automatic cplx_t add(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t sub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // multiply by -j: (a + jb)(-j) = b - ja
  function automatic cplx_t mul_mj(cplx_t a);
    cplx_t r;
    r.re = a.im;
    r.im = -a.re;
    return r;
  endfunction

  cplx_t a0, b0, a1, b1;   // level-1 operands
  cplx_t s0, s1, s2, s3;   // level-1 results
  cplx_t c0, d0, c1, d1;   // level-2 operands
  cplx_t q0, q1, q2, q3;   // level-2 results

  always_comb begin
    a0 = x[0];
    b0 = fwt ? x[1] : x[2];
    a1 = fwt ? x[2] : x[1];
    b1 = x[3];
    s0 = add(a0, b0);
    s1 = sub(a0, b0);
    s2 = add(a1, b1);
    s3 = sub(a1, b1);

    c0 = fwt ? x[0] : s0;
    d0 = fwt ? mul_mj(x[1]) : s2;
    c1 = fwt ? x[2] : s1;
    d1 = mul_mj(fwt ? x[3] : s3);
    q0 = add(c0, d0);
    q1 = sub(c0, d0);
    q2 = add(c1, d1);
    q3 = sub(c1, d1);

    if (fwt) begin
      y[0] = s0; y[1] = q0; y[4] = s1; y[5] = q1;
      y[2] = s2; y[3] = q2; y[6] = s3; y[7] = q3;
    end else begin
      y[0] = q0; y[1] = q2; y[2] = q1; y[3] = q3;
      y[4] = '0; y[5] = '0; y[6] = '0; y[7] = '0;
    end
  end

endmodule
