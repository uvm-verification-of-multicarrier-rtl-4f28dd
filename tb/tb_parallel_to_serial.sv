// tb_parallel_to_serial: random symbols streamed out under random stopout.
// Checked for every symbol: CP_LEN + N samples, the prefix equal to the last
// CP_LEN samples, then the N samples in order, firstout only on the first;
// samples held while stopout is high; back-to-back symbols without a gap
// when the sink never stalls.
module tb_parallel_to_serial;
  import fdm_pkg::*;

  localparam int N      = 64;
  localparam int CP_LEN = 16;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready;
  cplx_t in_samples [N];
  logic pushout, firstout, stopout = 0;
  logic [31:0] dataout;
  int checks = 0, failures = 0, stalls = 0;
  bit no_stall = 0;

  parallel_to_serial #(.N(N), .CP_LEN(CP_LEN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: got=%0d exp_q=%0d", got, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream, filled by the producer
  logic [31:0] exp_q [$];
  bit          expf_q [$];

  // producer
  cplx_t s [N];
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    // Inputs change on the falling edge; a load happens at the rising edge
    // that follows a falling edge with in_ready high.
    for (int f = 0; f < 30; f++) begin
      @(negedge clk);
      foreach (s[k]) begin
        s[k].re = sample_t'($urandom);
        s[k].im = sample_t'($urandom);
      end
      for (int c = 0; c < CP_LEN; c++) begin
        exp_q.push_back({s[N-CP_LEN+c].re, s[N-CP_LEN+c].im});
        expf_q.push_back(c == 0);
      end
      for (int k = 0; k < N; k++) begin
        exp_q.push_back({s[k].re, s[k].im});
        expf_q.push_back(k == 0 && CP_LEN == 0);
      end
      foreach (s[k]) in_samples[k] = s[k];
      in_valid = 1;
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  end

  // sink: random stalls for the first 20 symbols, none afterwards
  int got = 0, gap_checks = 0;
  logic [31:0] held;
  bit was_stalled = 0;
  always @(posedge clk) if (!rst) begin
    if (was_stalled) begin
      checks++;
      if (!pushout || dataout != held) begin failures++; $display("FAIL sample not held"); end
    end
    if (pushout && !stopout) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected sample");
      end else begin
        if (dataout != exp_q[0] || firstout != expf_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d got %h/%0b exp %h/%0b", got, dataout, firstout, exp_q[0], expf_q[0]);
        end
        void'(exp_q.pop_front());
        void'(expf_q.pop_front());
      end
      got++;
    end else if (no_stall && got > 0 && got < 30*(N+CP_LEN)) begin
      gap_checks++;
    end
    was_stalled = pushout && stopout;
    held = dataout;
    if (pushout && stopout) stalls++;
    no_stall = (got >= 20*(N+CP_LEN));
    stopout <= no_stall ? 1'b0 : ($urandom_range(3) == 0);
  end

  initial begin
    wait (got == 30*(N+CP_LEN));
    repeat (5) @(posedge clk);
    checks++;
    if (pushout) begin failures++; $display("FAIL extra output"); end
    checks++;
    if (gap_checks != 0 || stalls == 0) begin failures++; $display("FAIL gaps between unstalled symbols, or no stall"); end
    $display("stall cycles=%0d idle cycles while streaming unstalled=%0d", stalls, gap_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
