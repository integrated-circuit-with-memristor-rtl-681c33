// tb_dsp_unit: self-checking testbench of the memristor model processor.
//
// A reference model of the algorithm runs in the testbench in double
// precision, rounding after every step to single precision with fp_ref_pkg,
// so X, Q and G of the DUT must match it bit for bit. The window table is
// recomputed here from its formula. The stimulus is a sine of ADC codes of
// full amplitude, so X rises and falls, plus steady stretches at the rails
// that drive X into saturation. For every Run the testbench checks the
// cycle count (9 clocks without a step, 15 with one, within the 1 us
// processing budget at 50 MHz), the Update pulse and the registers, and
// also checks that a Run arriving while busy is not lost.
module tb_dsp_unit;
  import memristor_pkg::*;
  import fp_ref_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [XBITS-1:0] sample_in = '0;
  logic [XBITS-1:0] x;
  logic             update, busy;
  float32_t         g, q;

  int checks = 0, failures = 0;
  int n_steps = 0, n_nosteps = 0, n_sat = 0, n_pend = 0;

  always #10ns clk = ~clk;   // 50 MHz

  dsp_unit dut (.clk, .rst_n, .run, .sample_in, .x, .update, .g, .q, .busy);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model
  float32_t         r_gdiff, r_g, r_q;
  int               r_x;

  function automatic float32_t r_fw(input int xi);
    real n, d;
    n = 4.0 * real'(xi) * real'(1023 - xi) * 10000.0 + 3.0 * 1023.0 * 1023.0;
    d = 1023.0 * 1023.0 * 10000.0;
    return r2f(n / d);
  endfunction

  function automatic float32_t fl(input real r);
    return r2f(r);
  endfunction

  function automatic void ref_g();
    float32_t t;
    t   = fl(real'(r_x));
    t   = fl(f2r(t) / 1023.0);
    t   = fl(f2r(t) * f2r(r_gdiff));
    r_g = fl(f2r(t) + f2r(F_GMIN_E0));
  endfunction

  function automatic void ref_init();
    float32_t t;
    r_q     = '0;
    r_gdiff = fl(f2r(F_GMAX_E0) - f2r(F_GMIN_E0));
    t = fl(f2r(F_GINIT) - f2r(F_GMIN_E0));
    t = fl(f2r(t) / f2r(r_gdiff));
    t = fl(f2r(t) * 1023.0);
    t = fl(f2r(t) + 0.5);
    r_x = $rtoi(f2r(t));
    if (r_x > 1023) r_x = 1023;
    if (r_x < 0) r_x = 0;
    ref_g();
  endfunction

  // returns 1 when X steps
  function automatic bit ref_run(input int code);
    float32_t t, v;
    t   = fl(real'(2 * code - 1023));
    v   = fl(f2r(t) * f2r(F_VSCALE));
    t   = fl(f2r(F_K_E0) * f2r(v));
    t   = fl(f2r(t) * f2r(r_g));
    t   = fl(f2r(t) * f2r(r_fw(r_x)));
    t   = fl(f2r(t) * f2r(F_TS));
    r_q = fl(f2r(r_q) + f2r(t));
    if (f2r({1'b0, r_q[30:0]}) >= f2r(F_XTH)) begin
      if (!r_q[31]) begin
        r_q = fl(f2r(r_q) - f2r(F_XTH));
        if (r_x < 1023) r_x++; else n_sat++;
      end else begin
        r_q = fl(f2r(r_q) + f2r(F_XTH));
        if (r_x > 0) r_x--; else n_sat++;
      end
      ref_g();
      return 1'b1;
    end
    return 1'b0;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t: x=%0d/%0d g=%h/%h q=%h/%h",
                                  what, $time, x, r_x, g, r_g, q, r_q);
    end
  endtask

  int n_upd;
  always @(posedge clk) if (update) n_upd++;

  task automatic do_run(input int code);
    int  cyc, upd0;
    bit  step;
    sample_in = XBITS'(code);
    upd0 = n_upd;
    @(negedge clk) run = 1'b1;
    @(negedge clk) run = 1'b0;
    cyc = 1;
    while (busy) begin
      @(negedge clk);
      cyc++;
    end
    step = ref_run(code);
    if (step) n_steps++; else n_nosteps++;
    chk(cyc == (step ? 16 : 10), $sformatf("cycle count %0d", cyc));
    chk(cyc <= 50, "within 1 us");
    chk(n_upd - upd0 == int'(step), "update pulses");
    chk(x == XBITS'(r_x), "x");
    chk(g == r_g, "g");
    chk(q == r_q, "q");
  endtask

  initial begin
    int code;
    n_upd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    ref_init();
    while (busy) @(negedge clk);
    chk(n_upd == 1, "init update");
    chk(x == XBITS'(r_x), "init x");
    chk(g == r_g, "init g");
    $display("init: X=%0d G=%e", x, f2r(g));

    // sine of codes, 2 periods of 200 samples
    for (int i = 0; i < 400; i++) begin
      code = $rtoi(511.5 + 511.0 * $sin(2.0 * 3.14159265 * real'(i) / 200.0) + 0.5);
      do_run(code);
    end
    // drive to saturation at both rails
    repeat (1200) do_run(1023);
    repeat (2600) do_run(0);

    // Run during a busy computation is held and served afterwards
    begin
      sample_in = 10'd900;
      @(negedge clk) run = 1'b1;
      @(negedge clk) run = 1'b0;
      repeat (3) @(negedge clk);
      run = 1'b1;
      @(negedge clk) run = 1'b0;
      void'(ref_run(900));
      n_pend++;
      while (busy) @(negedge clk);     // first run ends: one idle clock
      @(negedge clk);
      chk(busy, "pending run restarts");
      while (busy) @(negedge clk);
      void'(ref_run(900));
      chk(x == XBITS'(r_x) && q == r_q, "pending run result");
    end

    $display("steps=%0d no-steps=%0d saturated=%0d", n_steps, n_nosteps, n_sat);
    chk(n_steps > 100 && n_nosteps > 10 && n_sat > 0, "all paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
