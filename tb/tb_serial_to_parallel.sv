// tb_serial_to_parallel: random frames in all modes with random push gaps
// and random consumer delays. The expected frame word is assembled by the
// testbench from the pushed bits. Also exercised and checked: a push before
// any firstin (dropped), a firstin in the middle of a frame (restart), and
// stopin staying high, with the word held, until the consumer takes it.
module tb_serial_to_parallel;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  localparam int NDATA = 48;
  localparam int DIN_W = 6;

  logic clk = 0, rst = 1;
  logic [1:0] mode_in = 0;
  logic pushin = 0, firstin = 0;
  logic [DIN_W-1:0] datain = 0;
  logic stopin, out_valid, out_ready = 0;
  logic [4*NDATA-1:0] out_bits;
  mode_t out_mode;
  int checks = 0, failures = 0;
  int restarts = 0, stalls = 0;

  serial_to_parallel #(.NDATA(NDATA), .DIN_W(DIN_W)) dut (
    .clk, .rst, .mode(mode_t'(mode_in)), .pushin, .firstin, .datain,
    .stopin, .out_valid, .out_ready, .out_bits, .out_mode);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Push one word. Inputs change on the falling edge; the push is taken at
  // the rising edge that follows a falling edge with stopin low.
  task automatic push(input logic first, input logic [DIN_W-1:0] d, input int m);
    @(negedge clk);
    pushin  = 1;
    firstin = first;
    datain  = d;
    mode_in = 2'(m);
    while (stopin) begin
      // the previous frame has always been taken before a new one starts,
      // so a stall here means a frame was closed too early
      checks++;
      failures++;
      $display("FAIL stopin high while a frame is being received");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    @(posedge clk);
    @(negedge clk);
    pushin  = 0;
    firstin = 0;
    mode_in = 2'($urandom);      // mode is only sampled with firstin
    repeat ($urandom_range(2)) @(negedge clk);
  endtask

  task automatic send_frame(input int m, input bit restart);
    logic [4*NDATA-1:0] exp_bits, mask;
    logic [DIN_W-1:0] d;
    int npush, hold;
    npush = NDATA * bps(m) / DIN_W;
    if (restart) begin
      // a partial frame in another mode, abandoned by the next firstin
      push(1, 6'($urandom), (m + 1) % 3);
      push(0, 6'($urandom), 0);
      restarts++;
    end
    exp_bits = '0;
    for (int p = 0; p < npush; p++) begin
      d = 6'($urandom);
      exp_bits[p*DIN_W +: DIN_W] = d;
      push(p == 0, d, m);
    end
    // the frame is now complete: it is offered, and pushes are stopped
    while (!out_valid) @(negedge clk);
    hold = $urandom_range(4);
    repeat (hold) begin
      checks++;
      if (!stopin) begin failures++; $display("FAIL stopin low with a full frame"); end
      stalls++;
      @(negedge clk);
    end
    checks++;
    mask = '0;
    for (int i = 0; i < NDATA*bps(m); i++) mask[i] = 1'b1;
    if ((out_bits & mask) != exp_bits || int'(out_mode) != m) begin
      failures++;
      $display("FAIL frame mode %0d: got %h exp %h", m, out_bits, exp_bits);
    end
    out_ready = 1;
    @(posedge clk);
    @(negedge clk);
    out_ready = 0;
    checks++;
    if (out_valid || stopin) begin failures++; $display("FAIL frame not released"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // stray pushes before any firstin are dropped
    push(0, 6'h3f, 0);
    push(0, 6'h15, 0);
    checks++;
    if (out_valid) begin failures++; $display("FAIL stray push made a frame"); end
    for (int f = 0; f < 40; f++) send_frame(f % 3, (f % 5) == 4);
    checks++;
    if (restarts == 0 || stalls == 0) begin failures++; $display("FAIL mechanisms not exercised"); end
    $display("restarts=%0d stall cycles=%0d", restarts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
