// tb_asic_parallel_to_serial: checks the chip's sample frame.
//
// The testbench plays the ADC: at each sample strobe its output register
// takes a new random code. Every 11 serial clocks EOC must be high for one
// clock, the strobe must come two clocks before it, and the 10 bits after
// EOC must be the code the ADC held when EOC rose, MSB first.
module tb_asic_parallel_to_serial;
  logic       sclk = 1'b0, rst_n = 1'b0;
  logic [9:0] code = '0;
  logic       sample, eoc, sdata;
  int checks = 0, failures = 0;

  always #500ns sclk = ~sclk;

  asic_parallel_to_serial dut (.sclk, .rst_n, .code, .sample, .eoc, .sdata);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC stand-in
  always @(posedge sclk) if (sample) code <= 10'($urandom);

  // frame monitor, sampling in the middle of each serial clock
  int         cyc = 0, strobe_cyc = -100, eoc_cyc = -100, nbits = -1, frames = 0;
  logic [9:0] expect_code, got;

  always @(negedge sclk) if (rst_n) begin
    cyc <= cyc + 1;
    if (sample) strobe_cyc <= cyc;
    if (nbits >= 0 && nbits < 10) begin
      got   = {got[8:0], sdata};
      nbits <= nbits + 1;
      checks++;
      if (eoc) failures++;
      if (nbits == 9) begin
        checks++;
        frames <= frames + 1;
        if (got !== expect_code) begin
          failures++;
          $display("FAIL frame %h expected %h", got, expect_code);
        end
      end
    end
    if (eoc) begin
      checks += 2;
      if (cyc - strobe_cyc != 2) begin
        failures++;
        $display("FAIL EOC %0d clocks after the strobe", cyc - strobe_cyc);
      end
      if (eoc_cyc >= 0 && cyc - eoc_cyc != 11) begin
        failures++;
        $display("FAIL frame period %0d", cyc - eoc_cyc);
      end
      eoc_cyc     <= cyc;
      expect_code <= code;
      got          = '0;
      nbits       <= 0;
    end
  end

  initial begin
    repeat (2) @(negedge sclk);
    rst_n = 1'b1;
    wait (frames == 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
