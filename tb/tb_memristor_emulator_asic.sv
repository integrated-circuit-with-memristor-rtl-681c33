// tb_memristor_emulator_asic: drives one emulator through its serial pins.
//
// The testbench acts as the FPGA: it sends random state words (bits change
// on the falling serial-clock edge while new_sample_n is low) and reads the
// ADC frames (EOC, then 10 bits, sampled on the falling edge). After each
// word the array conductance must be word / 204.8 MOhm and the current
// g (va - vb); every frame must carry the ADC code of the applied voltage.
module tb_memristor_emulator_asic;
  logic       sclk = 1'b1, rst_n = 1'b0, sdata = 1'b0, new_sample_n = 1'b1;
  logic       adc_data, eoc;
  real        va = 0.0, vb = 0.0, g, i_ab;
  logic [9:0] sw;
  int checks = 0, failures = 0, frames = 0;

  always #500ns sclk = ~sclk;

  memristor_emulator_asic dut (.sclk, .rst_n, .sdata, .new_sample_n, .adc_data, .eoc,
                               .va, .vb, .g, .i_ab, .sw);

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int adc_of(input real a, input real b);
    real y;
    y = ((a - b) / 2.0 + 1.65) / 3.3 * 1023.0;
    return $rtoi(y + 0.5);
  endfunction

  // frame reader; the voltage is held constant between frames
  int nbits = -1;
  logic [9:0] got;
  always @(negedge sclk) if (rst_n) begin
    if (nbits >= 0) begin
      got = {got[8:0], adc_data};
      nbits++;
      if (nbits == 10) begin
        checks++;
        frames++;
        if (frames > 2 && int'(got) != adc_of(va, vb)) begin
          failures++;
          $display("FAIL frame %0d expected %0d", got, adc_of(va, vb));
        end
        nbits = -1;
      end
    end else if (eoc) begin
      nbits = 0;
      got = '0;
    end
  end

  initial begin
    logic [9:0] w;
    repeat (2) @(negedge sclk);
    rst_n = 1'b1;
    for (int n = 0; n < 40; n++) begin
      w = 10'($urandom);
      for (int i = 9; i >= 0; i--) begin
        @(negedge sclk);
        new_sample_n = 1'b0;
        sdata = w[i];
      end
      @(negedge sclk) new_sample_n = 1'b1;
      @(negedge sclk);
      #100ns;
      va = 3.3 * real'($urandom_range(0, 1000)) / 1000.0;
      vb = 3.3 * real'($urandom_range(0, 1000)) / 1000.0;
      #1ns;
      checks += 3;
      if (sw !== w) failures++;
      if ((g - real'(w) / 204.8e6) > 1e-18 || (real'(w) / 204.8e6 - g) > 1e-18) begin
        failures++;
        $display("FAIL g=%e for word %0d", g, w);
      end
      if ((i_ab - g * (va - vb)) > 1e-15 || (g * (va - vb) - i_ab) > 1e-15) failures++;
      frames = 0;
      repeat (40) @(negedge sclk);      // complete frames at this voltage
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
