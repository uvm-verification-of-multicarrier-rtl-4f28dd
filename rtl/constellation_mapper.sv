// constellation_mapper: one symbol's bits to one constellation point.
//
// Purely combinational. The mode selects how many of the low bits of `bits`
// form the symbol and how they are placed on the complex plane:
//   BPSK   bits[0]               re = +-1,            im = 0
//   QPSK   bits[0] -> re, bits[1] -> im, each +-1/sqrt(2)
//   16-QAM bits[1:0] -> re, bits[3:2] -> im, each Gray coded onto four levels
//          00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3 (times 1/sqrt(10))
// A 0 bit gives the negative level. The 16-QAM mapping (four-bit groups, the
// two upper bits imaginary and the two lower bits real, Gray coded, written as
// a case statement) follows the published description; the level values, the
// QPSK/BPSK bit order and polarity are this design's choice. The QPSK level is
// 16'h2d40, the value in the reference waveform of the transmitter output.
// Mode value 3 is unused and maps like 16-QAM.
module constellation_mapper
  import fdm_pkg::*;
(
  input  mode_t      mode,
  input  logic [3:0] bits,
  output cplx_t      sym
);

  // Levels in Q2.14: BPSK +-1, QPSK about +-1/sqrt(2), 16-QAM {+-1, +-3}/sqrt(10).
  localparam sample_t LVL_BPSK  = 16'sd16384;  // 1.0
  localparam sample_t LVL_QPSK  = 16'sd11584;  // 16'h2d40, about 16384/sqrt(2)
  localparam sample_t LVL_QAM1  = 16'sd5181;   // round(16384/sqrt(10))
  localparam sample_t LVL_QAM3  = 16'sd15543;  // round(3*16384/sqrt(10))

  // Gray-coded 16-QAM level of one axis.
  function automatic sample_t qam16_level(logic [1:0] b);
    case (b)
      2'b00:   return -LVL_QAM3;
      2'b01:   return -LVL_QAM1;
      2'b11:   return  LVL_QAM1;
      default: return  LVL_QAM3;   // 2'b10
    endcase
  endfunction

  always_comb begin
    case (mode)
      MODE_BPSK: begin
        sym.re = bits[0] ? LVL_BPSK : -LVL_BPSK;
        sym.im = '0;
      end
      MODE_QPSK: begin
        sym.re = bits[0] ? LVL_QPSK : -LVL_QPSK;
        sym.im = bits[1] ? LVL_QPSK : -LVL_QPSK;
      end
      default: begin
        sym.re = qam16_level(bits[1:0]);
        sym.im = qam16_level(bits[3:2]);
      end
    endcase
  end

endmodule : constellation_mapper
