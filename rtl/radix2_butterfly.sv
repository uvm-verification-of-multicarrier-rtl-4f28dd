// radix2_butterfly: one radix-2 decimation-in-time butterfly of the IFFT.
//
// First the twiddle multiplication t = W*b (complex, Q2.14 times Q2.14,
// rounded back to Q2.14), then the butterfly x0 = a + t, x1 = a - t, as in
// the decimation-in-time butterfly the design is built on. Each output is
// halved (rounded, then saturated to 16 bits), so that log2(N) stages together
// apply the 1/N of the inverse-transform equation and the values cannot grow.
// Halving per stage and the rounding are this design's choice.
// Purely combinational.
module radix2_butterfly
  import fdm_pkg::*;
(
  input  cplx_t a,     // upper input
  input  cplx_t b,     // lower input, multiplied by the twiddle
  input  cplx_t w,     // twiddle factor
  output cplx_t x0,    // (a + W*b) / 2
  output cplx_t x1     // (a - W*b) / 2
);

  localparam int FRAC_W = 14;           // fraction bits of Q2.14
  localparam int PW = 2*SAMPLE_W + 1;   // product-sum width

  logic signed [PW-1:0] pr, pi;         // W*b before rescaling
  logic signed [PW-FRAC_W-1:0] tr, ti;  // W*b in Q2.14, a few guard bits
  logic signed [PW-FRAC_W:0]   s0r, s0i, s1r, s1i;

  // Round a sum to half and clamp it to the 16-bit sample range.
  function automatic sample_t half_sat(logic signed [PW-FRAC_W:0] v);
    logic signed [PW-FRAC_W:0] h;
    h = (v + 1) >>> 1;
    if (h > 32767)       return 16'sh7fff;
    else if (h < -32768) return 16'sh8000;
    else                 return sample_t'(h);
  endfunction

  always_comb begin
    pr = PW'(w.re * b.re) - PW'(w.im * b.im);
    pi = PW'(w.re * b.im) + PW'(w.im * b.re);
    tr = (PW-FRAC_W)'((pr + (PW'(1) <<< (FRAC_W-1))) >>> FRAC_W);
    ti = (PW-FRAC_W)'((pi + (PW'(1) <<< (FRAC_W-1))) >>> FRAC_W);
    s0r = (PW-FRAC_W+1)'(a.re) + (PW-FRAC_W+1)'(tr);
    s0i = (PW-FRAC_W+1)'(a.im) + (PW-FRAC_W+1)'(ti);
    s1r = (PW-FRAC_W+1)'(a.re) - (PW-FRAC_W+1)'(tr);
    s1i = (PW-FRAC_W+1)'(a.im) - (PW-FRAC_W+1)'(ti);
    x0.re = half_sat(s0r);
    x0.im = half_sat(s0i);
    x1.re = half_sat(s1r);
    x1.im = half_sat(s1i);
  end

endmodule : radix2_butterfly
