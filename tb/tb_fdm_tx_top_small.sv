// tb_fdm_tx_top_small: the end-to-end transmitter test at a reduced size
// (16-point IFFT, 12 data subcarriers, 4-sample cyclic prefix), showing that
// the parameters of the chain scale together. Stimulus, reference model and
// checks are those of tb_fdm_tx_top.
module tb_fdm_tx_top_small;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  localparam int N      = 16;
  localparam int NDATA  = 12;
  localparam int CP_LEN = 4;
  localparam int DIN_W  = 6;
  localparam int NFRAMES = 24;
  localparam real TOL   = 4.0;

  logic clk = 0, rst = 1;
  logic [1:0] mode = 0;
  logic pushin = 0, firstin = 0;
  logic [DIN_W-1:0] datain = 0;
  logic stopin, pushout, firstout, stopout = 0;
  logic [31:0] dataout;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_stopin = 0, n_stopout = 0, n_switch = 0, n_resync = 0, n_stray = 0;
  int n_mode [3] = '{0, 0, 0};

  fdm_tx_top #(.N(N), .NDATA(NDATA), .CP_LEN(CP_LEN), .DIN_W(DIN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output samples, in Q2.14 units
  real exp_re [$], exp_im [$];

  task automatic push(input logic first, input logic [DIN_W-1:0] d, input int m);
    @(negedge clk);
    pushin  = 1;
    firstin = first;
    datain  = d;
    mode    = 2'(m);
    while (stopin) begin
      n_stopin++;
      @(negedge clk);
    end
    @(posedge clk);
    @(negedge clk);
    pushin  = 0;
    firstin = 0;
    mode    = 2'($urandom);
    repeat ($urandom_range(1)) @(negedge clk);
  endtask

  task automatic send_frame(input int m);
    logic [4*NDATA-1:0] fbits;
    logic [3:0] sb;
    real xr[], xi[], yr[], yi[];
    int er, ei, npush;
    npush = NDATA * bps(m) / DIN_W;
    for (int w = 0; w < 4*NDATA; w += 32) fbits[w +: 32] = $urandom;
    // reference: map, zero pad, inverse DFT, cyclic prefix
    xr = new[N]; xi = new[N];
    for (int k = 0; k < N; k++) begin
      xr[k] = 0.0; xi[k] = 0.0;
      if (k < NDATA) begin
        sb = '0;
        for (int q = 0; q < bps(m); q++) sb[q] = fbits[k*bps(m) + q];
        ref_map(m, sb, er, ei);
        xr[k] = real'(er); xi[k] = real'(ei);
      end
    end
    ref_idft(N, xr, xi, yr, yi);
    for (int c = 0; c < CP_LEN; c++) begin
      exp_re.push_back(yr[N-CP_LEN+c]); exp_im.push_back(yi[N-CP_LEN+c]);
    end
    for (int t = 0; t < N; t++) begin
      exp_re.push_back(yr[t]); exp_im.push_back(yi[t]);
    end
    for (int p = 0; p < npush; p++) push(p == 0, fbits[p*DIN_W +: DIN_W], m);
    n_mode[m]++;
  endtask

  // source
  int sent = 0;
  initial begin
    int m, prev_m;
    repeat (3) @(negedge clk);
    rst = 0;
    // pushes before any frame has started are dropped
    push(0, 6'h3f, 1); n_stray++;
    push(0, 6'h2a, 1); n_stray++;
    prev_m = -1;
    for (int f = 0; f < NFRAMES; f++) begin
      m = (f < 6) ? f % 3 : int'($urandom_range(2));
      if (f % 7 == 3) begin
        // a partial frame (shorter than a whole one) that a new firstin abandons
        push(1, 6'($urandom), (m + 1) % 3);
        for (int p = 2; p < NDATA * bps((m + 1) % 3) / DIN_W && p < 4; p++)
          push(0, 6'($urandom), 0);
        n_resync++;
      end
      send_frame(m);
      if (prev_m >= 0 && m != prev_m) n_switch++;
      prev_m = m;
      sent++;
    end
  end

  // sink: random stalls, with long bursts during frames 8..13
  int got = 0;
  always @(posedge clk) begin
    if (!rst && pushout && !stopout) begin
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output sample");
      end else begin
        real dr, di;
        int gr, gi;
        gr = int'(sample_t'(dataout[31:16]));
        gi = int'(sample_t'(dataout[15:0]));
        dr = rabs(real'(gr) - exp_re[0]);
        di = rabs(real'(gi) - exp_im[0]);
        if (dr > TOL || di > TOL || firstout != ((got % (N + CP_LEN)) == 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL sample %0d: got (%0d,%0d) first=%0b exp (%f,%f)", got,
                     gr, gi, firstout, exp_re[0], exp_im[0]);
        end
        void'(exp_re.pop_front());
        void'(exp_im.pop_front());
      end
      got++;
    end
    if (!rst && pushout && stopout) n_stopout++;
    if (got / (N + CP_LEN) >= 8 && got / (N + CP_LEN) < 13)
      stopout <= ($urandom_range(9) != 0);
    else
      stopout <= ($urandom_range(4) == 0);
  end

  initial begin
    wait (sent == NFRAMES && got == NFRAMES * (N + CP_LEN));
    repeat (400) @(posedge clk);
    checks++;
    if (exp_re.size() != 0) begin failures++; $display("FAIL missing samples"); end
    $display("frames: BPSK %0d QPSK %0d 16-QAM %0d; mode switches %0d", n_mode[0], n_mode[1], n_mode[2], n_switch);
    $display("stopin stalls %0d, stopout stalls %0d, restarts %0d, dropped stray pushes %0d",
             n_stopin, n_stopout, n_resync, n_stray);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    checks++; if (n_switch  == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_stopin  == 0) begin failures++; $display("FAIL stopin never asserted"); end
    checks++; if (n_stopout == 0) begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_resync  == 0) begin failures++; $display("FAIL no restart"); end
    checks++; if (n_stray   == 0) begin failures++; $display("FAIL no stray push"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
