// fdm_tx_wrap: connects the pin bundle fdm_if to the transmitter, so that
// the testbench reaches the design through one interface.
module fdm_tx_wrap (fdm_if.dut_mp bus);
  fdm_tx_top u_dut (
    .clk      (bus.clk),
    .rst      (bus.rst),
    .mode     (bus.mode),
    .pushin   (bus.pushin),
    .firstin  (bus.firstin),
    .datain   (bus.datain),
    .stopin   (bus.stopin),
    .pushout  (bus.pushout),
    .firstout (bus.firstout),
    .dataout  (bus.dataout),
    .stopout  (bus.stopout)
  );
endmodule : fdm_tx_wrap
