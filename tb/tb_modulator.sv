// tb_modulator: random frame words in every mode; each subcarrier symbol is
// compared with the reference mapping of the bits taken from the stream
// position s*bits_per_symbol.
module tb_modulator;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  localparam int NDATA = 48;
  int                 mode;
  logic [4*NDATA-1:0] bits;
  cplx_t              syms [NDATA];
  int checks = 0, failures = 0;

  modulator #(.NDATA(NDATA)) dut (.mode(mode_t'(mode[1:0])), .bits(bits), .syms(syms));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    logic [3:0] sb;
    for (int trial = 0; trial < 60; trial++) begin
      mode = trial % 3;
      for (int w = 0; w < 4*NDATA; w += 32) bits[w +: 32] = $urandom;
      #1;
      for (int s = 0; s < NDATA; s++) begin
        sb = '0;
        for (int q = 0; q < bps(mode); q++) sb[q] = bits[s*bps(mode) + q];
        ref_map(mode, sb, er, ei);
        checks++;
        if (int'(syms[s].re) != er || int'(syms[s].im) != ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL mode=%0d sym=%0d got (%0d,%0d) exp (%0d,%0d)", mode, s, syms[s].re, syms[s].im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
