// tb_memristor_emulator_system: end-to-end test of the emulator system.
//
// Runs the full design at its default size (five emulators with their FPGA
// channels, two neurons, 50 MHz FPGA clock, 1 MHz serial links):
//  1. Two periods of a +-3 V differential 400 Hz sine on every emulator:
//     emulator 0 must show the pinched hysteresis of a memristor - the same
//     positive voltage on the falling side of the sine drives more current
//     than on the rising side, because the conductance grew in between;
//  2. LTP then LTD on emulator 0: ten 3 V pulses of 500 us, then ten -3 V
//     pulses; the conductance must rise (fall) with each pulse;
//  3. 0 V for 1 ms; then the chip's switch code of every emulator must equal
//     the FPGA's X, and the chip's conductance must agree with the model's
//     G(x) to within two array steps.
// Meanwhile neuron 0 integrates -1 nA from 1 V to 2.7 V and must fire
// 25.5 ms after V_ph falls; neuron 1, with -2 nA, is driven as the external
// spike generator would: each firing raises V_ph for 1 ms (no firing then),
// after which it integrates again; it ends with an inhibitory current and
// must not fire.
// Mechanisms counted (each must occur): sample runs, X steps up and down,
// runs without a step, words applied to the chip, LTP and LTD pulses that moved G, neuron
// firings, spiking phases, inhibitory integration.
// Updates merged into a word already on the line are reported but not
// required: with one sample per 11-clock frame the link never needs them.
module tb_memristor_emulator_system;
  import memristor_pkg::*;
  import fp_ref_pkg::*;

  localparam int NE = 5, NN = 2;

  logic             clk = 1'b0, rst_n = 1'b0;
  real              emu_va [NE], emu_vb [NE], emu_i [NE], emu_gchip [NE];
  logic [XBITS-1:0] emu_x [NE], emu_sw [NE];
  float32_t         emu_g [NE];
  logic             emu_update [NE], emu_run [NE], emu_tx_busy [NE];
  real              neu_iin [NN], neu_vfb [NN], neu_vth [NN], neu_vop [NN];
  logic             neu_vph [NN], neu_vout [NN];

  int checks = 0, failures = 0;

  always #10ns clk = ~clk;

  memristor_emulator_system dut (.*);

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- mechanism counters
  int n_run = 0, n_up = 0, n_down = 0, n_nostep = 0, n_merge = 0, n_words = 0;
  int n_upd_all = 0;
  int n_ltp = 0, n_ltd = 0, n_fire = 0, n_spike = 0, n_inhib = 0;
  logic [XBITS-1:0] x_prev [NE];
  logic             nsn_prev [NE];

  for (genvar e = 0; e < NE; e++) begin : g_mon
    always @(posedge clk) begin
      if (emu_run[e]) n_run++;
      if (emu_update[e] && emu_tx_busy[e]) n_merge++;
      if (dut.g_emu[e].new_sample_n && !nsn_prev[e]) n_words++;
      nsn_prev[e] <= dut.g_emu[e].new_sample_n;
      if (emu_update[e]) n_upd_all++;
      if (emu_x[e] > x_prev[e] && emu_update[e]) n_up++;
      if (emu_x[e] < x_prev[e] && emu_update[e]) n_down++;
      x_prev[e] <= emu_x[e];
    end
  end

  // ---------------- emulator stimulus
  task automatic set_diff(input int e, input real vd);
    emu_va[e] = 1.65 + vd / 2.0;
    emu_vb[e] = 1.65 - vd / 2.0;
  endtask

  real i_rise, i_fall, g_rise, g_fall;

  initial begin
    real t, ph, g0, g1;
    for (int e = 0; e < NE; e++) set_diff(e, 0.0);
    for (int e = 0; e < NE; e++) begin x_prev[e] = '0; nsn_prev[e] = 1'b1; end
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    #100us;
    // 1. sine, 2 periods of 2.5 ms, sampled every 1 us of simulated time
    for (int step = 0; step < 5000; step++) begin
      ph = 2.0 * 3.14159265358979 * real'(step) / 2500.0;
      for (int e = 0; e < NE; e++) set_diff(e, 3.0 * $sin(ph));
      // second period: +2.1 V on the rising (45 deg) and falling (135 deg) side
      if (step == 2500 + 312) begin i_rise = emu_i[0]; g_rise = emu_gchip[0]; end
      if (step == 2500 + 937) begin i_fall = emu_i[0]; g_fall = emu_gchip[0]; end
      #1us;
    end
    $display("hysteresis: I(45deg)=%e A  I(135deg)=%e A", i_rise, i_fall);
    chk(i_fall > i_rise * 1.02, "pinched hysteresis: more current on the falling side");
    chk(g_fall > g_rise, "conductance grew during the positive half wave");
    // 2. LTP and LTD on emulator 0 (others at 0 V)
    for (int e = 1; e < NE; e++) set_diff(e, 0.0);
    set_diff(0, 0.0);
    #200us;
    for (int p = 0; p < 10; p++) begin
      g0 = emu_gchip[0];
      set_diff(0, 3.0);
      #500us;
      set_diff(0, 0.0);
      #500us;
      g1 = emu_gchip[0];
      if (g1 > g0) n_ltp++;
      chk(g1 >= g0, "LTP pulse does not lower G");
    end
    $display("after LTP: G=%e S", emu_gchip[0]);
    for (int p = 0; p < 10; p++) begin
      g0 = emu_gchip[0];
      set_diff(0, -3.0);
      #500us;
      set_diff(0, 0.0);
      #500us;
      g1 = emu_gchip[0];
      if (g1 < g0) n_ltd++;
      chk(g1 <= g0, "LTD pulse does not raise G");
    end
    $display("after LTD: G=%e S", emu_gchip[0]);
    chk(n_ltp >= 5 && n_ltd >= 5, "LTP and LTD moved the conductance");
    // 3. quiet: chip and FPGA agree
    #1ms;
    for (int e = 0; e < NE; e++) begin
      real lsb, gm;
      lsb = (e == 0) ? 1.0 / 204.8e6 : 1.0 / 5.12e6;
      gm  = f2r(emu_g[e]);
      chk(emu_sw[e] == emu_x[e], $sformatf("emulator %0d switch code = X", e));
      chk(gm - emu_gchip[e] <= 2.0 * lsb && emu_gchip[e] - gm <= 2.0 * lsb,
          $sformatf("emulator %0d chip G %e vs model G %e", e, emu_gchip[e], gm));
    end
    wait (neuron_done);
    n_nostep = n_run - (n_upd_all - NE);   // every run that raised no update
    $display("runs=%0d up=%0d down=%0d nostep=%0d merged=%0d words=%0d ltp=%0d ltd=%0d fire=%0d spike=%0d inhib=%0d",
             n_run, n_up, n_down, n_nostep, n_merge, n_words, n_ltp, n_ltd, n_fire, n_spike, n_inhib);
    chk(n_run > 5 * 2000, "sample runs");
    chk(n_up > 0,     "X steps up");
    chk(n_down > 0,   "X steps down");
    chk(n_nostep > 0, "runs without a step");
    chk(n_words > 0,  "words applied to the chip");
    chk(n_fire > 0,   "neuron firing");
    chk(n_spike > 0,  "spiking phase");
    chk(n_inhib > 0,  "inhibitory integration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- neurons
  bit neuron_done = 1'b0;

  initial begin
    for (int n = 0; n < NN; n++) begin
      neu_vfb[n] = 1.0;
      neu_vth[n] = 2.7;
      neu_vph[n] = 1'b1;
    end
    neu_iin[0] = -1.0e-9;
    neu_iin[1] = -2.0e-9;
    #5ms;
    fork
      begin : n0
        realtime t0;
        real     ms;
        neu_vph[0] = 1'b0;
        t0 = $realtime;
        @(posedge neu_vout[0]);
        n_fire++;
        ms = ($realtime - t0) / 1.0e6;
        $display("neuron 0 fired after %f ms", ms);
        chk(ms > 25.49 && ms < 25.51, "neuron 0 integration time 25.5 ms");
      end
      begin : n1
        neu_vph[1] = 1'b0;
        repeat (3) begin
          realtime t0;
          real     ms;
          t0 = $realtime;
          @(posedge neu_vout[1]);
          n_fire++;
          ms = ($realtime - t0) / 1.0e6;
          chk(ms > 12.74 && ms < 12.76, "neuron 1 integration time 12.75 ms");
          // spike generator: spiking phase for 1 ms
          neu_vph[1] = 1'b1;
          n_spike++;
          #2us;
          chk(!neu_vout[1] && neu_vop[1] == neu_vfb[1], "spiking phase resets the neuron");
          #998us;
          chk(!neu_vout[1], "no firing during the spiking phase");
          neu_vph[1] = 1'b0;
        end
        // inhibitory current: never fires
        neu_iin[1] = 1.0e-9;
        #20ms;
        n_inhib++;
        chk(!neu_vout[1] && neu_vop[1] < neu_vfb[1], "inhibitory current does not fire");
      end
    join
    neuron_done = 1'b1;
  end

endmodule
