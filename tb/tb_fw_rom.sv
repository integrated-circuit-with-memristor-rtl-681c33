// tb_fw_rom: checks every entry of the window-function table.
//
// For each X = 0..1023 the expected value 1 - (2x-1)^2 + 0.0003 (x = X/1023)
// is computed in double precision and rounded to single precision; the
// table must match bit for bit, one clock after the address is applied.
// The ends must hold delta = 0.0003 and the table must be symmetric.
module tb_fw_rom;
  import memristor_pkg::*;
  import fp_ref_pkg::*;

  logic       clk = 1'b0;
  logic [9:0] addr = '0;
  float32_t   data;
  int checks = 0, failures = 0;
  float32_t   seen [1024];

  always #5ns clk = ~clk;

  fw_rom dut (.clk, .addr, .data);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, fwr;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk) addr = 10'(i);
      @(negedge clk);
      xr  = real'(i) / 1023.0;
      fwr = 1.0 - (2.0 * xr - 1.0) ** 2 + 0.0003;
      checks++;
      if (ulp_dist(data, r2f(fwr)) > 0) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d data=%h expected=%h", i, data, r2f(fwr));
      end
      seen[i] = data;
    end
    checks++;
    if (seen[0] != r2f(0.0003) || seen[1023] != r2f(0.0003)) failures++;
    for (int i = 0; i < 512; i++) begin
      checks++;
      if (seen[i] != seen[1023 - i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
