// fdm_tx_top: OFDM transmitter, from a serial bit stream to baseband samples.
//
// The chain follows the published transmitter flow: serial-to-parallel
// conversion of the input bits, a modulator mapping them onto NDATA
// subcarriers (BPSK, QPSK or Gray-coded 16-QAM, chosen per frame), zero
// padding to N bins and a radix-2 decimation-in-time inverse FFT, and
// parallel-to-serial conversion with a cyclic prefix in front of each symbol.
// The RF up-conversion that follows is analog and is not part of this RTL;
// dataout is the complex baseband signal that would feed it.
// Each stage holds one frame, so three OFDM symbols can be in flight: one
// being received, one in the IFFT and one being sent.
// Ports: the push/stop/first stream names, the 6-bit datain and the 32-bit
// dataout are those of the transmitter's published port list and waveforms;
// mode is an extra input of this design, sampled with firstin (0 BPSK,
// 1 QPSK, 2 16-QAM). A push is accepted when pushin is high and stopin low;
// an output sample is taken when pushout is high and stopout low.
// Timing (defaults): 8/16/32 pushes per frame for BPSK/QPSK/16-QAM, one cycle
// to hand the frame to the IFFT, 192 butterfly cycles, then 80 output samples
// (16 prefix + 64), so an unstalled symbol leaves every 194 cycles at best.
module fdm_tx_top
  import fdm_pkg::*;
#(
  parameter int N      = 64,            // IFFT size
  parameter int NDATA  = 48,            // data subcarriers (rest zero padded)
  parameter int CP_LEN = 16,            // cyclic-prefix samples
  parameter int DIN_W  = 6              // input bits per push
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [1:0]       mode,
  input  logic             pushin,
  input  logic             firstin,
  input  logic [DIN_W-1:0] datain,
  output logic             stopin,
  output logic             pushout,
  output logic             firstout,
  output logic [31:0]      dataout,
  input  logic             stopout
);

  logic               sp_valid, sp_ready;
  logic [4*NDATA-1:0] sp_bits;
  mode_t              sp_mode;
  cplx_t              syms [NDATA];
  logic               if_valid, if_ready;
  cplx_t              samples [N];

  serial_to_parallel #(.NDATA(NDATA), .DIN_W(DIN_W)) u_s2p (
    .clk       (clk),
    .rst       (rst),
    .mode      (mode_t'(mode)),
    .pushin    (pushin),
    .firstin   (firstin),
    .datain    (datain),
    .stopin    (stopin),
    .out_valid (sp_valid),
    .out_ready (sp_ready),
    .out_bits  (sp_bits),
    .out_mode  (sp_mode)
  );

  modulator #(.NDATA(NDATA)) u_mod (
    .mode (sp_mode),
    .bits (sp_bits),
    .syms (syms)
  );

  ifft #(.N(N), .NDATA(NDATA)) u_ifft (
    .clk         (clk),
    .rst         (rst),
    .in_valid    (sp_valid),
    .in_ready    (sp_ready),
    .in_syms     (syms),
    .out_valid   (if_valid),
    .out_ready   (if_ready),
    .out_samples (samples)
  );

  parallel_to_serial #(.N(N), .CP_LEN(CP_LEN)) u_p2s (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (if_valid),
    .in_ready   (if_ready),
    .in_samples (samples),
    .pushout    (pushout),
    .firstout   (firstout),
    .dataout    (dataout),
    .stopout    (stopout)
  );

endmodule : fdm_tx_top
