// tb_clock_divisor: checks the serial clock derived from the FPGA clock.
//
// With the default DIV = 50 the serial clock must have a period of 50 FPGA
// clocks (1 MHz from 50 MHz) with 25 high and 25 low, and sclk_rise /
// sclk_fall must be high exactly in the FPGA clock before sclk rises / falls.
module tb_clock_divisor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sclk, sclk_rise, sclk_fall;
  int checks = 0, failures = 0;

  always #10ns clk = ~clk;

  clock_divisor dut (.clk, .rst_n, .sclk, .sclk_rise, .sclk_fall);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev, prev_rise, prev_fall;
    int   hi, lo, n_rise, n_fall;
    hi = 0; lo = 0; n_rise = 0; n_fall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    prev = sclk; prev_rise = sclk_rise; prev_fall = sclk_fall;
    for (int c = 0; c < 50 * 20; c++) begin
      @(posedge clk);
      #1ns;
      // an edge of sclk happens exactly when the enable was high
      checks++;
      if ((sclk && !prev) != prev_rise || (!sclk && prev) != prev_fall) begin
        failures++;
        $display("FAIL enable/edge mismatch at %0t", $time);
      end
      if (sclk && !prev) begin
        n_rise++;
        if (n_rise > 1) begin
          checks++;
          if (hi != 25 || lo != 25) begin
            failures++;
            $display("FAIL high %0d low %0d", hi, lo);
          end
        end
        hi = 0; lo = 0;
      end
      if (sclk && !prev_rise) hi++;
      if (sclk && prev_rise) hi++;
      if (!sclk) lo++;
      if (!sclk && prev) n_fall++;
      prev = sclk; prev_rise = sclk_rise; prev_fall = sclk_fall;
    end
    checks++;
    if (n_rise != 20 || n_fall != 20) begin
      failures++;
      $display("FAIL %0d rises %0d falls in 20 periods", n_rise, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
