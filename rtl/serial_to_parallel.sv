// serial_to_parallel: gathers the serial input bits of one OFDM symbol.
//
// The source pushes DIN_W bits per cycle (datain[0] is the earliest bit) and
// marks the first push of each frame with firstin; the constellation mode is
// taken with that first push. Push p of a frame lands in bits
// [p*DIN_W +: DIN_W] of the frame word, so bit i of the word is the i-th bit
// of the stream. A frame is complete after NDATA*bits_per_symbol(mode)/DIN_W
// pushes (8, 16 or 32 with the defaults); the word is then offered on
// out_valid/out_ready and stopin stays high until it has been taken.
// A push is accepted when pushin is high and stopin is low. A push that is
// not part of a frame (no firstin seen yet) is dropped; a firstin in the
// middle of a frame drops the partial frame and starts again.
// Timing: out_valid rises the cycle after the last push; stopin is a register.
// The push/stop/first signal names are those of the transmitter's port list;
// their exact rules, the bit order and the resynchronisation are this
// design's choice.
module serial_to_parallel
  import fdm_pkg::*;
#(
  parameter int NDATA = 48,             // data subcarriers per OFDM symbol
  parameter int DIN_W = 6               // bits per push
) (
  input  logic               clk,
  input  logic               rst,
  input  mode_t              mode,
  input  logic               pushin,
  input  logic               firstin,
  input  logic [DIN_W-1:0]   datain,
  output logic               stopin,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [4*NDATA-1:0] out_bits,
  output mode_t              out_mode
);

  localparam int MAXBITS = 4*NDATA;
  localparam int MAXPUSH = MAXBITS / DIN_W;
  localparam int CW      = $clog2(MAXPUSH + 1);

  if ((NDATA % DIN_W) != 0) begin : g_bad_width
    $error("NDATA must be a multiple of DIN_W so that every mode fills whole pushes");
  end

  // Pushes that make up a frame of the given mode.
  function automatic logic [CW-1:0] pushes_per_frame(mode_t m);
    return CW'(NDATA * bits_per_symbol(m) / DIN_W);
  endfunction

  logic [MAXBITS-1:0] bits_q;
  logic [CW-1:0]      cnt_q;       // pushes received in the current frame
  logic               active_q;    // a frame is being received
  logic               full_q;      // a complete frame waits for the consumer
  mode_t              mode_q;
  logic               take;

  assign stopin    = full_q;
  assign take      = pushin && !stopin;
  assign out_valid = full_q;
  assign out_bits  = bits_q;
  assign out_mode  = mode_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bits_q   <= '0;
      cnt_q    <= '0;
      active_q <= 1'b0;
      full_q   <= 1'b0;
      mode_q   <= MODE_BPSK;
    end else begin
      if (out_valid && out_ready) full_q <= 1'b0;
      if (take) begin
        if (firstin) begin
          bits_q   <= MAXBITS'(datain);
          mode_q   <= mode;
          cnt_q    <= CW'(1);
          active_q <= (pushes_per_frame(mode) != CW'(1));
          full_q   <= (pushes_per_frame(mode) == CW'(1));
        end else if (active_q) begin
          bits_q[cnt_q*DIN_W +: DIN_W] <= datain;
          cnt_q <= cnt_q + CW'(1);
          if (cnt_q + CW'(1) == pushes_per_frame(mode_q)) begin
            active_q <= 1'b0;
            full_q   <= 1'b1;
          end
        end
      end
    end
  end

  // A frame word is held steady while it is offered.
  property p_hold;
    @(posedge clk) disable iff (rst) (out_valid && !out_ready) |=> (out_valid && $stable(out_bits));
  endproperty
  a_hold: assert property (p_hold);

endmodule : serial_to_parallel
