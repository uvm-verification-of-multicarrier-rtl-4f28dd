// fdm_if: the transmitter's pin bundle, shared by the DUT wrapper and the
// class-based testbench (driver, monitors, sink). dut_mp is the DUT's view.
interface fdm_if (input logic clk);
  logic        rst;
  logic [1:0]  mode;
  logic        pushin;
  logic        firstin;
  logic [5:0]  datain;
  logic        stopin;
  logic        pushout;
  logic        firstout;
  logic [31:0] dataout;
  logic        stopout;

  modport dut_mp (
    input  clk, rst, mode, pushin, firstin, datain, stopout,
    output stopin, pushout, firstout, dataout
  );
endinterface : fdm_if
