// tb_constellation_mapper: exhaustive check of the constellation mapper.
// Every mode (including the unused code 3) and every 4-bit input is applied
// and the point compared with the floating-point reference.
module tb_constellation_mapper;
  import fdm_pkg::*;
  import fdm_tb_pkg::*;

  logic [1:0] mode;
  logic [3:0] bits;
  cplx_t      sym;
  int checks = 0, failures = 0;

  constellation_mapper dut (.mode(mode_t'(mode)), .bits(bits), .sym(sym));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei;
    for (int m = 0; m < 4; m++) begin
      for (int b = 0; b < 16; b++) begin
        mode = 2'(m);
        bits = 4'(b);
        #1;
        ref_map(m, bits, er, ei);
        checks++;
        if (int'(sym.re) != er || int'(sym.im) != ei) begin
          failures++;
          $display("FAIL mode=%0d bits=%b got (%0d,%0d) exp (%0d,%0d)", m, bits, sym.re, sym.im, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
