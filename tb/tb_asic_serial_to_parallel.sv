// tb_asic_serial_to_parallel: checks the chip's switch register.
//
// The testbench sends random words the way the FPGA does (bits change on
// the falling serial-clock edge, new_sample_n low for the 10 bits). The
// switch outputs must keep the old word while a new one is shifted in,
// take the new word right after new_sample_n returns high, and sw_n must
// always be the complement of sw.
module tb_asic_serial_to_parallel;
  logic       sclk = 1'b0, rst_n = 1'b0, sdata = 1'b0, new_sample_n = 1'b1;
  logic [9:0] sw, sw_n;
  int checks = 0, failures = 0;

  always #500ns sclk = ~sclk;

  asic_serial_to_parallel dut (.sclk, .rst_n, .sdata, .new_sample_n, .sw, .sw_n);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge sclk) begin
    checks++;
    if (sw_n !== ~sw) failures++;
  end

  initial begin
    logic [9:0] w, old;
    old = '0;
    repeat (2) @(negedge sclk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) begin
      w = 10'($urandom);
      repeat ($urandom_range(0, 3)) @(negedge sclk);
      for (int i = 9; i >= 0; i--) begin
        @(negedge sclk);
        new_sample_n = 1'b0;
        sdata = w[i];
        checks++;
        if (sw !== old) failures++;
      end
      @(negedge sclk) new_sample_n = 1'b1;
      sdata = 1'($urandom);
      checks++;
      if (sw !== old) failures++;
      @(negedge sclk);
      checks++;
      if (sw !== w) begin
        failures++;
        $display("FAIL sw=%h expected=%h", sw, w);
      end
      old = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
