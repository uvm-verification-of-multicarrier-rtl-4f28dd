// fdm_pkg: types and constants shared by the OFDM transmitter.
//
// Samples are complex numbers with 16-bit signed real and imaginary parts in
// Q2.14 (16384 stands for 1.0), the format in which the transmitter's output
// word {re, im} is printed in its reference waveforms (16'hd2c0 = -0.7071).
// The twiddle factors are computed at elaboration from cos/sin, so no table
// file is needed.
package fdm_pkg;

  localparam int SAMPLE_W = 16;          // bits per real or imaginary part

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Constellation of a frame, chosen per frame on the mode input.
  typedef enum logic [1:0] {
    MODE_BPSK  = 2'd0,
    MODE_QPSK  = 2'd1,
    MODE_QAM16 = 2'd2
  } mode_t;

  // Bits carried by one symbol of the given mode.
  function automatic int unsigned bits_per_symbol(mode_t m);
    case (m)
      MODE_BPSK:  return 1;
      MODE_QPSK:  return 2;
      default:    return 4;
    endcase
  endfunction

  // Twiddle factor of the inverse transform, W = exp(+i*2*pi*k/n), in Q2.14.
  function automatic cplx_t twiddle(int k, int n);
    cplx_t w;
    real ang;
    ang  = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    w.re = sample_t'($rtoi($floor($cos(ang) * 16384.0 + 0.5)));
    w.im = sample_t'($rtoi($floor($sin(ang) * 16384.0 + 0.5)));
    return w;
  endfunction

endpackage : fdm_pkg
