// tb_workloads: the emulator experiments, run on the full default design.
//
// 1. Frequency dependence of the hysteresis: one period of a +-3 V
//    differential sine at 20, 35, 75 and 400 Hz on emulator 0, each starting
//    from reset (initial conductance 3.41 uS). The conductance swing over the
//    period - and with it the opening of the current/voltage loop - must not
//    grow as the frequency rises, and must be clearly smaller at 400 Hz.
//    With the model's constants a 3 V half wave drives x to its bound in a
//    few ms, so at 20..75 Hz the swing is the same (x saturates at 1023,
//    where the window is only delta and x hardly moves back); at 400 Hz the
//    one-step-per-sample limit of the DSP keeps it below saturation.
// 2. Synaptic plasticity: trains of 1 V potentiation pulses and, from a fresh
//    start, of -1 V depression pulses, with pulse widths of 500 us and of
//    900 us (gaps of 500 us). After the same number of pulses the wider
//    pulses must have changed the conductance more, both ways. The change is
//    taken after 5 pulses, before x reaches a bound; the trains continue to
//    50 pulses, which must leave the conductance inside its range.
// The 11 us sample period bounds the usable sine frequency at
// 1/(2 * 11 us) = 45 kHz.
module tb_workloads;
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
    #2s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic set_diff(input real vd);
    for (int e = 0; e < NE; e++) begin
      emu_va[e] = 1.65 + vd / 2.0;
      emu_vb[e] = 1.65 - vd / 2.0;
    end
  endtask

  task automatic restart();
    set_diff(0.0);
    rst_n = 1'b0;
    #1us;
    rst_n = 1'b1;
    #200us;     // initialisation sends the initial X to the chip
  endtask

  real swing [4];
  real freqs [4] = '{20.0, 35.0, 75.0, 400.0};

  initial begin
    real gmin, gmax, g0, dg [2][2];
    for (int n = 0; n < NN; n++) begin
      neu_iin[n] = 0.0; neu_vfb[n] = 1.0; neu_vth[n] = 2.7; neu_vph[n] = 1'b1;
    end
    // 1. hysteresis versus frequency
    for (int f = 0; f < 4; f++) begin
      int steps;
      restart();
      chk(emu_gchip[0] > 3.35e-6 && emu_gchip[0] < 3.45e-6, "initial conductance 3.41 uS");
      gmin = 1.0; gmax = 0.0;
      steps = $rtoi(1.0e6 / freqs[f]);       // 1 us resolution
      for (int s = 0; s < steps; s++) begin
        set_diff(3.0 * $sin(2.0 * 3.14159265358979 * real'(s) / real'(steps)));
        if (emu_gchip[0] < gmin) gmin = emu_gchip[0];
        if (emu_gchip[0] > gmax) gmax = emu_gchip[0];
        #1us;
      end
      swing[f] = gmax - gmin;
      $display("%6.1f Hz: conductance swing %e S (%0d array steps)", freqs[f], swing[f],
               $rtoi(swing[f] * 204.8e6 + 0.5));
    end
    chk(swing[0] >= swing[1] && swing[1] >= swing[2] && swing[2] >= swing[3],
        "hysteresis does not grow with the frequency");
    chk(swing[3] < 0.5 * swing[0], "smaller hysteresis at 400 Hz");
    chk(swing[3] > 0.0, "the device still moves at 400 Hz");
    // 2. plasticity versus pulse width
    for (int w = 0; w < 2; w++) begin
      for (int dir = 0; dir < 2; dir++) begin
        restart();
        g0 = emu_gchip[0];
        for (int p = 0; p < 50; p++) begin
          set_diff(dir == 0 ? 1.0 : -1.0);
          #((w == 0 ? 500 : 900) * 1us);
          set_diff(0.0);
          #500us;
          if (p == 4) dg[w][dir] = emu_gchip[0] - g0;
        end
        chk(emu_gchip[0] >= 4.88e-9 * 0.99 && emu_gchip[0] <= 4.99e-6 * 1.01,
            "conductance stays in range after 50 pulses");
        $display("%0d us pulses, %s: change after 5 pulses %e S, after 50 %e S",
                 w == 0 ? 500 : 900, dir == 0 ? "potentiation" : "depression",
                 dg[w][dir], emu_gchip[0] - g0);
      end
    end
    chk(dg[0][0] > 0.0 && dg[0][1] < 0.0, "500 us pulses potentiate and depress");
    chk(dg[1][0] > dg[0][0], "900 us pulses potentiate more");
    chk(dg[1][1] < dg[0][1], "900 us pulses depress more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
