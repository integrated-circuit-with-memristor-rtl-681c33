// tb_resistor_array: checks the array's conductance and current.
//
// For random switch codes and terminal voltages the conductance must be
// code / 204.8 MOhm and the current g * (va - vb); the extreme codes must
// give 4.88 nS and 4.99 uS, and a branch whose gate lines agree is off.
module tb_resistor_array;
  logic [9:0] sw = '0, sw_n = '1;
  real        va = 0.0, vb = 0.0, g, i_ab;
  int checks = 0, failures = 0;

  resistor_array dut (.sw, .sw_n, .va, .vb, .g, .i_ab);

  function automatic bit close(input real a, input real b);
    real d;
    d = a - b;
    if (d < 0) d = -d;
    return d <= 1e-9 * ((b < 0 ? -b : b) + 1e-30);
  endfunction

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ge;
    sw = 10'd1; sw_n = ~sw; va = 1.0; #1ns;
    checks++; if (!close(g, 4.8828125e-9)) failures++;
    sw = 10'd1023; sw_n = ~sw; #1ns;
    checks++; if (!close(g, 1023.0 / 204.8e6)) failures++;
    checks++; if (g < 4.99e-6 || g > 5.0e-6) failures++;
    for (int n = 0; n < 500; n++) begin
      sw   = 10'($urandom);
      sw_n = ~sw;
      va   = 3.3 * real'($urandom_range(0, 1000)) / 1000.0;
      vb   = 3.3 * real'($urandom_range(0, 1000)) / 1000.0;
      #1ns;
      ge = real'(sw) / 204.8e6;
      checks += 2;
      if (!close(g, ge)) begin
        failures++;
        $display("FAIL code %0d g=%e expected %e", sw, g, ge);
      end
      if (!close(i_ab, ge * (va - vb))) failures++;
    end
    // branch 9 with both gate lines high counts as off
    sw = 10'h3FF; sw_n = 10'h200; #1ns;
    checks++; if (!close(g, 511.0 / 204.8e6)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
