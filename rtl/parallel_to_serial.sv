// parallel_to_serial: sends one OFDM symbol as a sample stream with its
// cyclic prefix.
//
// The N time samples are copied into a buffer when in_valid and in_ready are
// both high. The block then sends CP_LEN + N samples, one per accepted cycle:
// first the last CP_LEN samples of the symbol (the cyclic prefix, the guard
// interval), then all N samples in order. firstout marks the first sample
// sent for each symbol. dataout is {re[15:0], im[15:0]}. A sample is taken
// by the sink when pushout is high and stopout is low; while stopout is high
// the same sample is held. The next symbol may be loaded in the cycle the
// last sample leaves, so back-to-back symbols stream without a gap.
// Converting back to serial, the cyclic prefix and the port names follow the
// published description; CP_LEN and the handshake rules are this design's
// choice.
module parallel_to_serial
  import fdm_pkg::*;
#(
  parameter int N      = 64,            // samples per OFDM symbol
  parameter int CP_LEN = 16             // cyclic-prefix samples, CP_LEN < N
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  output logic        in_ready,
  input  cplx_t       in_samples [N],
  output logic        pushout,
  output logic        firstout,
  output logic [31:0] dataout,
  input  logic        stopout
);

  localparam int TOTAL = N + CP_LEN;
  localparam int CW    = $clog2(TOTAL + 1);
  localparam int AW    = (N > 1) ? $clog2(N) : 1;

  if (CP_LEN >= N) begin : g_bad_cp
    $error("CP_LEN must be smaller than N");
  end

  cplx_t         buf_q [N];
  logic          busy_q;
  logic [CW-1:0] cnt_q;     // samples of this symbol already sent
  logic [AW-1:0] rd_idx;
  logic          send, last;
  cplx_t         cur;

  always_comb begin
    if (cnt_q < CW'(CP_LEN)) rd_idx = AW'(cnt_q + CW'(N - CP_LEN));
    else                     rd_idx = AW'(cnt_q - CW'(CP_LEN));
    cur = buf_q[rd_idx];
  end

  assign pushout  = busy_q;
  assign firstout = busy_q && (cnt_q == '0);
  assign dataout  = {cur.re, cur.im};
  assign send     = pushout && !stopout;
  assign last     = send && (cnt_q == CW'(TOTAL - 1));
  assign in_ready = !busy_q || last;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0;
      cnt_q  <= '0;
      for (int k = 0; k < N; k++) buf_q[k] <= '0;
    end else begin
      if (send) begin
        cnt_q <= cnt_q + CW'(1);
        if (last) begin
          busy_q <= 1'b0;
          cnt_q  <= '0;
        end
      end
      if (in_valid && in_ready) begin
        buf_q  <= in_samples;
        busy_q <= 1'b1;
        cnt_q  <= '0;
      end
    end
  end

  // While stalled, the offered sample must not change.
  property p_stall_hold;
    @(posedge clk) disable iff (rst) (pushout && stopout) |=> (pushout && $stable(dataout) && $stable(firstout));
  endproperty
  a_stall_hold: assert property (p_stall_hold);

endmodule : parallel_to_serial
