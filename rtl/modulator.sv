// modulator: maps a whole frame of bits onto the data subcarriers.
//
// The frame word from the serial-to-parallel converter holds the bits in
// arrival order, bit 0 first. Symbol s takes the bits_per_symbol(mode) bits
// starting at bit s*bits_per_symbol(mode) (1, 2 or 4 bits), and NDATA
// constellation mappers work on all symbols at once, so the block is purely
// combinational. Bits above NDATA*bits_per_symbol(mode) are ignored.
// The modulator stage itself follows the transmitter's flow; mapping all
// subcarriers in parallel is this design's choice.
module modulator
  import fdm_pkg::*;
#(
  parameter int NDATA = 48              // data subcarriers per OFDM symbol
) (
  input  mode_t            mode,
  input  logic [4*NDATA-1:0] bits,
  output cplx_t            syms [NDATA]
);

  for (genvar s = 0; s < NDATA; s++) begin : g_sym
    logic [3:0] sbits;

    always_comb begin
      case (mode)
        MODE_BPSK: sbits = {3'b000, bits[s]};
        MODE_QPSK: sbits = {2'b00, bits[2*s +: 2]};
        default:   sbits = bits[4*s +: 4];
      endcase
    end

    constellation_mapper u_map (
      .mode (mode),
      .bits (sbits),
      .sym  (syms[s])
    );
  end

endmodule : modulator
