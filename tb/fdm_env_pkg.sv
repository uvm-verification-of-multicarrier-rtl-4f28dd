// fdm_env_pkg: a class-based, black-box verification environment for the
// transmitter at its default size, organised like a standard layered
// testbench:
//   fdm_frame       sequence item: one frame (mode, bits, abandon flag)
//   fdm_sequence    produces the frames of a test; every fourth frame has
//                   the last two bytes of its payload pinned to ones
//   fdm_driver      drives frames onto the pins with the push/stop protocol
//   fdm_in_monitor  watches accepted pushes and rebuilds the frames the
//                   design will transmit, from the pins alone
//   fdm_out_monitor watches accepted output samples
//   fdm_sink        plays the downstream side, stalling with stopout
//   fdm_scoreboard  predictor (constellation map, zero padding, inverse DFT,
//                   cyclic prefix, in floating point) and checker
//   fdm_env         builds and runs them all
// Pins change on the falling clock edge and are sampled on the rising edge.
package fdm_env_pkg;
  import fdm_tb_pkg::*;

  localparam int N      = 64;
  localparam int NDATA  = 48;
  localparam int CP_LEN = 16;
  localparam int DIN_W  = 6;
  localparam int FBITS  = 4 * NDATA;
  localparam real TOL   = 4.0;

  class fdm_frame;
    int               mode;
    logic [FBITS-1:0] bits;
    bit               abandon;   // send only a few pushes, then restart

    function new(int m, bit ab);
      mode    = m;
      abandon = ab;
      for (int w = 0; w < FBITS; w += 32) bits[w +: 32] = $urandom;
    endfunction

    // Pin the last two bytes of the frame's payload to all ones.
    function void set_tail_ones();
      int nb;
      nb = NDATA * bps(mode);
      for (int i = nb - 16; i < nb; i++) bits[i] = 1'b1;
    endfunction

    function int pushes();
      return NDATA * bps(mode) / DIN_W;
    endfunction
  endclass

  class fdm_sequence;
    fdm_frame items [$];

    function new(int nframes);
      fdm_frame f;
      for (int i = 0; i < nframes; i++) begin
        if (i % 5 == 2) begin
          f = new($urandom_range(2), 1'b1);
          items.push_back(f);
        end
        f = new((i < 3) ? i : int'($urandom_range(2)), 1'b0);
        if (i % 4 == 3) f.set_tail_ones();
        items.push_back(f);
      end
    endfunction
  endclass

  class fdm_scoreboard;
    real exp_re [$], exp_im [$];
    int  checks, failures, got, predicted;

    function new();
      checks = 0; failures = 0; got = 0; predicted = 0;
    endfunction

    // Reference output of one frame, appended to the expected stream.
    function void predict(int mode, logic [FBITS-1:0] bits);
      real xr[], xi[], yr[], yi[];
      logic [3:0] sb;
      int er, ei;
      xr = new[N]; xi = new[N];
      for (int k = 0; k < N; k++) begin
        xr[k] = 0.0; xi[k] = 0.0;
        if (k < NDATA) begin
          sb = '0;
          for (int q = 0; q < bps(mode); q++) sb[q] = bits[k*bps(mode) + q];
          ref_map(mode, sb, er, ei);
          xr[k] = real'(er); xi[k] = real'(ei);
        end
      end
      ref_idft(N, xr, xi, yr, yi);
      for (int c = 0; c < CP_LEN; c++) begin
        exp_re.push_back(yr[N-CP_LEN+c]); exp_im.push_back(yi[N-CP_LEN+c]);
      end
      for (int t = 0; t < N; t++) begin
        exp_re.push_back(yr[t]); exp_im.push_back(yi[t]);
      end
      predicted++;
    endfunction

    function void check(logic [31:0] d, logic first);
      int gr, gi;
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL output sample with nothing expected");
        return;
      end
      gr = int'($signed(d[31:16]));
      gi = int'($signed(d[15:0]));
      if (rabs(real'(gr) - exp_re[0]) > TOL || rabs(real'(gi) - exp_im[0]) > TOL ||
          first != ((got % (N + CP_LEN)) == 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sample %0d: got (%0d,%0d) first=%0b exp (%f,%f)",
                   got, gr, gi, first, exp_re[0], exp_im[0]);
      end
      void'(exp_re.pop_front());
      void'(exp_im.pop_front());
      got++;
    endfunction
  endclass

  class fdm_driver;
    virtual fdm_if vif;
    int n_stopin, n_abandoned;
    bit done;

    function new(virtual fdm_if v);
      vif = v; n_stopin = 0; n_abandoned = 0; done = 0;
    endfunction

    task push(logic first, logic [DIN_W-1:0] d, int m);
      @(negedge vif.clk);
      vif.pushin  = 1'b1;
      vif.firstin = first;
      vif.datain  = d;
      vif.mode    = 2'(m);
      while (vif.stopin) begin
        n_stopin++;
        @(negedge vif.clk);
      end
      @(posedge vif.clk);
      @(negedge vif.clk);
      vif.pushin  = 1'b0;
      vif.firstin = 1'b0;
      vif.mode    = 2'($urandom);
      repeat ($urandom_range(1)) @(negedge vif.clk);
    endtask

    task run(fdm_sequence seq);
      foreach (seq.items[i]) begin
        fdm_frame f;
        int np;
        f  = seq.items[i];
        np = f.abandon ? ((f.pushes() > 2) ? 2 : 1) : f.pushes();
        for (int p = 0; p < np; p++) push(p == 0, f.bits[p*DIN_W +: DIN_W], f.mode);
        if (f.abandon) n_abandoned++;
      end
      done = 1;
    endtask
  endclass

  // Rebuilds frames from accepted pushes: firstin starts a frame and fixes
  // its mode, the frame ends after its number of pushes, and pushes outside
  // a frame are ignored.
  class fdm_in_monitor;
    virtual fdm_if vif;
    fdm_scoreboard sb;
    int n_stray, n_restart, n_switch, n_mode [3];

    function new(virtual fdm_if v, fdm_scoreboard s);
      vif = v; sb = s; n_stray = 0; n_restart = 0; n_switch = 0;
      n_mode = '{0, 0, 0};
    endfunction

    task run();
      logic [FBITS-1:0] bits;
      int cnt, mode, need, last_mode;
      bit active;
      active = 0; cnt = 0; mode = 0; need = 0; last_mode = -1;
      forever begin
        @(posedge vif.clk);
        if (!vif.rst && vif.pushin && !vif.stopin) begin
          if (vif.firstin) begin
            if (active) n_restart++;
            mode   = (vif.mode == 2'd3) ? 2 : int'(vif.mode);
            need   = NDATA * bps(mode) / DIN_W;
            bits   = '0;
            cnt    = 0;
            active = 1;
          end
          if (!active) begin
            n_stray++;
          end else begin
            bits[cnt*DIN_W +: DIN_W] = vif.datain;
            cnt++;
            if (cnt == need) begin
              sb.predict(mode, bits);
              n_mode[mode]++;
              if (last_mode >= 0 && last_mode != mode) n_switch++;
              last_mode = mode;
              active = 0;
            end
          end
        end
      end
    endtask
  endclass

  class fdm_out_monitor;
    virtual fdm_if vif;
    fdm_scoreboard sb;
    int n_stopout;

    function new(virtual fdm_if v, fdm_scoreboard s);
      vif = v; sb = s; n_stopout = 0;
    endfunction

    task run();
      forever begin
        @(posedge vif.clk);
        if (!vif.rst && vif.pushout) begin
          if (vif.stopout) n_stopout++;
          else             sb.check(vif.dataout, vif.firstout);
        end
      end
    endtask
  endclass

  // Downstream side: random stalls, with a long burst early on so that
  // back-pressure reaches the input.
  class fdm_sink;
    virtual fdm_if vif;

    function new(virtual fdm_if v);
      vif = v;
    endfunction

    task run();
      int cyc;
      cyc = 0;
      forever begin
        @(negedge vif.clk);
        cyc++;
        if (cyc > 1000 && cyc < 2500) vif.stopout = ($urandom_range(9) != 0);
        else                          vif.stopout = ($urandom_range(3) == 0);
      end
    endtask
  endclass

  class fdm_env;
    virtual fdm_if  vif;
    fdm_sequence    seq;
    fdm_scoreboard  sb;
    fdm_driver      drv;
    fdm_in_monitor  imon;
    fdm_out_monitor omon;
    fdm_sink        sink;

    function new(virtual fdm_if v, int nframes);
      vif  = v;
      seq  = new(nframes);
      sb   = new();
      drv  = new(v);
      imon = new(v, sb);
      omon = new(v, sb);
      sink = new(v);
    endfunction

    task run();
      fork
        imon.run();
        omon.run();
        sink.run();
      join_none
      drv.run(seq);
      while (sb.got < sb.predicted * (N + CP_LEN)) @(posedge vif.clk);
      repeat (400) @(posedge vif.clk);
    endtask

    // Final checks: nothing left over, and every mechanism happened.
    function void report();
      sb.checks++;
      if (sb.exp_re.size() != 0) begin sb.failures++; $display("FAIL %0d samples missing", sb.exp_re.size()); end
      for (int i = 0; i < 3; i++) begin
        sb.checks++;
        if (imon.n_mode[i] == 0) begin sb.failures++; $display("FAIL mode %0d never sent", i); end
      end
      sb.checks++; if (imon.n_switch  == 0) begin sb.failures++; $display("FAIL no mode switch"); end
      sb.checks++; if (imon.n_restart == 0) begin sb.failures++; $display("FAIL no restart"); end
      sb.checks++; if (drv.n_stopin   == 0) begin sb.failures++; $display("FAIL stopin never seen"); end
      sb.checks++; if (omon.n_stopout == 0) begin sb.failures++; $display("FAIL no output stall"); end
      sb.checks++; if (imon.n_restart != drv.n_abandoned) begin
        sb.failures++; $display("FAIL restarts seen %0d, sent %0d", imon.n_restart, drv.n_abandoned);
      end
      $display("frames: BPSK %0d QPSK %0d 16-QAM %0d; switches %0d; restarts %0d; stopin stalls %0d; stopout stalls %0d",
               imon.n_mode[0], imon.n_mode[1], imon.n_mode[2], imon.n_switch, imon.n_restart,
               drv.n_stopin, omon.n_stopout);
    endfunction
  endclass

endpackage : fdm_env_pkg
