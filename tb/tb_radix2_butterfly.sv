// tb_radix2_butterfly: random operands and twiddles (including the exact
// unit twiddles), outputs compared with (a +- W*b)/2 computed in floating
// point, allowing one LSB for the two roundings.
module tb_radix2_butterfly;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  cplx_t a, b, w, x0, x1;
  int checks = 0, failures = 0;

  radix2_butterfly dut (.a(a), .b(b), .w(w), .x0(x0), .x1(x1));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t rnd16(int lim);
    return sample_t'($signed($urandom_range(2*lim)) - lim);
  endfunction

  task automatic check1(string what, int got, real exp);
    checks++;
    if (rabs(real'(got) - exp) > 1.0) begin
      failures++;
      $display("FAIL %s got %0d exp %f", what, got, exp);
    end
  endtask

  initial begin
    real ang, tr, ti;
    for (int i = 0; i < 2000; i++) begin
      a = '{re: rnd16(20000), im: rnd16(20000)};
      b = '{re: rnd16(20000), im: rnd16(20000)};
      if (i < 4) begin
        // 1, i, -1, -i
        w.re = (i == 0) ? 16384 : (i == 2) ? -16384 : 0;
        w.im = (i == 1) ? 16384 : (i == 3) ? -16384 : 0;
      end else begin
        ang  = 2.0 * 3.14159265358979 * real'($urandom_range(1023)) / 1024.0;
        w.re = sample_t'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
        w.im = sample_t'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
      end
      #1;
      tr = (real'(w.re) * real'(b.re) - real'(w.im) * real'(b.im)) / 16384.0;
      ti = (real'(w.re) * real'(b.im) + real'(w.im) * real'(b.re)) / 16384.0;
      check1("x0.re", int'(x0.re), (real'(a.re) + tr) / 2.0);
      check1("x0.im", int'(x0.im), (real'(a.im) + ti) / 2.0);
      check1("x1.re", int'(x1.re), (real'(a.re) - tr) / 2.0);
      check1("x1.im", int'(x1.im), (real'(a.im) - ti) / 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
