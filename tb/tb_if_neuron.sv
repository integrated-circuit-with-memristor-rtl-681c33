// tb_if_neuron: reproduces the neuron's integration-time measurement.
//
// Resting potential 1 V, threshold 2.7 V, input current -1 nA into the
// 15 pF integrator: after V_ph goes low the output must fire after
// C (Vth - Vfb) / |I| = 25.5 ms (within two model steps). During the spiking
// phase (V_ph high) Vop must sit at Vfb and the output stay low; an
// inhibitory (positive) current must drive Vop below Vfb and never fire;
// doubling the current must halve the time.
module tb_if_neuron;
  real  iin = 0.0, vfb = 1.0, vth = 2.7, vop;
  logic vph = 1'b1, vout;
  int checks = 0, failures = 0;

  if_neuron dut (.iin, .vfb, .vth, .vph, .vop, .vout);

  initial begin
    #500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real i, input real expect_ms);
    realtime t0, t1;
    real     ms;
    iin = i;
    vph = 1'b1;
    #5ms;
    checks += 2;
    if (vout) failures++;
    if (vop != vfb) failures++;
    vph = 1'b0;
    t0 = $realtime;
    fork
      begin : wait_fire
        @(posedge vout);
      end
      begin : limit
        #100ms;
      end
    join_any
    disable fork;
    t1 = $realtime;
    ms = (t1 - t0) / 1.0e6;
    $display("integration time %f ms (expected %f)", ms, expect_ms);
    checks++;
    if (ms < expect_ms - 0.002 || ms > expect_ms + 0.002) failures++;
  endtask

  initial begin
    measure(-1.0e-9, 25.5);
    measure(-2.0e-9, 12.75);
    // spiking phase: back to rest, no firing
    vph = 1'b1;
    #2ms;
    checks += 2;
    if (vout) failures++;
    if (vop != vfb) failures++;
    // inhibitory current
    iin = 1.0e-9;
    vph = 1'b0;
    #30ms;
    checks += 2;
    if (vout) failures++;
    if (!(vop < vfb)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
