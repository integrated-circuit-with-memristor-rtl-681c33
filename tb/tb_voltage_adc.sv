// tb_voltage_adc: checks the measurement chain's transfer function.
//
// The code must be round(((va - vb)/2 + 1.65) / 3.3 * 1023): 0 V difference
// reads mid-scale, +3.3 V reads 1023, -3.3 V reads 0. It changes only at a
// rising serial-clock edge with sample high.
module tb_voltage_adc;
  logic       sclk = 1'b0, rst_n = 1'b0, sample = 1'b0;
  real        va = 0.0, vb = 0.0;
  logic [9:0] code;
  int checks = 0, failures = 0;

  always #500ns sclk = ~sclk;

  voltage_adc dut (.sclk, .rst_n, .sample, .va, .vb, .code);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic conv(input real a, input real b, input int expect_code);
    logic [9:0] before_code;
    @(negedge sclk);
    va = a; vb = b;
    before_code = code;
    @(negedge sclk);
    checks++;
    if (code !== before_code) failures++;   // no strobe, no change
    sample = 1'b1;
    @(negedge sclk) sample = 1'b0;
    checks++;
    if (code !== 10'(expect_code)) begin
      failures++;
      $display("FAIL va=%f vb=%f code=%0d expected=%0d", a, b, code, expect_code);
    end
  endtask

  initial begin
    real a, b, y;
    repeat (2) @(negedge sclk);
    rst_n = 1'b1;
    conv(3.3, 0.0, 1023);
    conv(0.0, 3.3, 0);
    conv(1.0, 1.0, 512);
    conv(3.0, 0.0, 977);
    for (int n = 0; n < 300; n++) begin
      a = 3.3 * real'($urandom_range(0, 3300)) / 3300.0;
      b = 3.3 * real'($urandom_range(0, 3300)) / 3300.0;
      y = ((a - b) / 2.0 + 1.65) / 3.3 * 1023.0;
      conv(a, b, $rtoi(y + 0.5) > 1023 ? 1023 : $rtoi(y + 0.5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
