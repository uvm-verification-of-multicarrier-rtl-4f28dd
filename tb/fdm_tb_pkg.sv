// fdm_tb_pkg: reference models for the OFDM transmitter testbenches.
//
// Everything here is computed in floating point straight from the
// definitions, independently of the RTL: the constellation levels from their
// textbook formulas, the Gray code by decoding, the inverse transform as the
// direct sum x(n) = 1/N * sum_k X(k) exp(+i*2*pi*n*k/N).
package fdm_tb_pkg;

  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = 16384.0;     // Q2.14 one

  // Expected constellation point for mode (0 BPSK, 1 QPSK, 2/3 16-QAM).
  // The QPSK level is the waveform-given 16'h2d40.
  function automatic void ref_map(input int mode, input logic [3:0] b, output int re, output int im);
    int gi;
    case (mode)
      0: begin re = b[0] ? 16384 : -16384; im = 0; end
      1: begin re = b[0] ? 11584 : -11584; im = b[1] ? 11584 : -11584; end
      default: begin
        // Gray decode of each pair gives the level index 0..3 -> -3,-1,1,3.
        gi = int'({b[1], b[1] ^ b[0]});
        re = $rtoi($floor((2*gi - 3) * SCALE / $sqrt(10.0) + 0.5));
        gi = int'({b[3], b[3] ^ b[2]});
        im = $rtoi($floor((2*gi - 3) * SCALE / $sqrt(10.0) + 0.5));
      end
    endcase
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int bps(int mode);
    return (mode == 0) ? 1 : (mode == 1) ? 2 : 4;
  endfunction

  // Direct inverse DFT of one bin vector, result in Q2.14 units (reals).
  function automatic void ref_idft(input int n, input real xr[], input real xi[],
                          output real yr[], output real yi[]);
    yr = new[n];
    yi = new[n];
    for (int t = 0; t < n; t++) begin
      real sr, si, ang;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < n; k++) begin
        ang = 2.0 * PI * real'((t * k) % n) / real'(n);
        sr += xr[k] * $cos(ang) - xi[k] * $sin(ang);
        si += xr[k] * $sin(ang) + xi[k] * $cos(ang);
      end
      yr[t] = sr / real'(n);
      yi[t] = si / real'(n);
    end
  endfunction

endpackage : fdm_tb_pkg
