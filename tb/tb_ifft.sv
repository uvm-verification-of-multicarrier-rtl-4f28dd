// tb_ifft: the inverse FFT against a direct floating-point inverse DFT.
// Frames: single tones on a few bins, then random symbols of full-scale
// range. Each output sample must lie within TOL LSBs of the reference. Also
// checked: the butterfly-cycle latency log2(N)*N/2 + 1 from the load edge to
// out_valid, that out_valid and the samples hold while out_ready is low, and
// that in_ready is low while the IFFT is busy.
module tb_ifft;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  localparam int N     = 64;
  localparam int NDATA = 48;
  localparam int LAT   = $clog2(N) * N / 2 + 1;
  localparam real TOL  = 4.0;

  logic  clk = 0, rst = 1;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 0;
  cplx_t in_syms [NDATA];
  cplx_t out_samples [N];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  ifft #(.N(N), .NDATA(NDATA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int hold_cycles);
    real xr[], xi[], yr[], yi[];
    int lat;
    cplx_t first_snap [N];
    xr = new[N]; xi = new[N];
    for (int k = 0; k < N; k++) begin
      xr[k] = (k < NDATA) ? real'(in_syms[k].re) : 0.0;
      xi[k] = (k < NDATA) ? real'(in_syms[k].im) : 0.0;
    end
    ref_idft(N, xr, xi, yr, yi);
    // load
    while (!in_ready) @(posedge clk);
    in_valid <= 1;
    @(posedge clk);
    in_valid <= 0;
    lat = 0;
    while (!out_valid) begin
      @(posedge clk);
      lat++;
      if (lat > 1 && lat < LAT) begin
        checks++;
        if (in_ready) begin failures++; $display("FAIL in_ready while busy"); end
      end
    end
    checks++;
    if (lat != LAT) begin failures++; $display("FAIL latency %0d exp %0d", lat, LAT); end
    first_snap = out_samples;
    repeat (hold_cycles) @(posedge clk);
    checks++;
    if (!out_valid || out_samples != first_snap) begin
      failures++; $display("FAIL output not held");
    end
    for (int t = 0; t < N; t++) begin
      real er, ei;
      er = rabs(real'(out_samples[t].re) - yr[t]);
      ei = rabs(real'(out_samples[t].im) - yi[t]);
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > TOL || ei > TOL) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d got (%0d,%0d) exp (%f,%f)", t, out_samples[t].re, out_samples[t].im, yr[t], yi[t]);
      end
    end
    out_ready <= 1;
    @(posedge clk);
    out_ready <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // single tones
    for (int f = 0; f < 4; f++) begin
      int k0;
      k0 = (f == 0) ? 0 : (f == 1) ? 1 : (f == 2) ? 17 : NDATA - 1;
      foreach (in_syms[k]) in_syms[k] = '0;
      in_syms[k0] = '{re: 16'sd16000, im: -16'sd7000};
      run_frame(f);
    end
    // random spectra
    for (int fr = 0; fr < 12; fr++) begin
      foreach (in_syms[k]) begin
        in_syms[k].re = sample_t'($signed($urandom_range(32000)) - 16000);
        in_syms[k].im = sample_t'($signed($urandom_range(32000)) - 16000);
      end
      run_frame(fr % 3);
    end
    $display("max abs error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
