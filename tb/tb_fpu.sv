// tb_fpu: self-checking testbench of the single-precision FPU.
//
// Applies random and corner-case operands to every operation and compares
// the result with a double-precision reference rounded to single precision
// (fp_ref_pkg). Add, subtract, multiply and integer-to-float must match bit
// for bit; division within one unit in the last place; float-to-integer
// must equal truncation toward zero; the compare flags must agree with real
// comparison. The FPU is combinational: each vector is checked 1 ns after it
// is applied.
module tb_fpu;
  import memristor_pkg::*;
  import fp_ref_pkg::*;

  fpu_op_e     op;
  logic [31:0] a, b, y;
  logic        lt, eq, gt;
  int          checks = 0, failures = 0;

  fpu dut (.op, .a, .b, .y, .lt, .eq, .gt);

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_exact(input fpu_op_e o, input logic [31:0] x, input logic [31:0] z,
                             input logic [31:0] exp_y);
    op = o; a = x; b = z;
    #1ns;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h y=%h expected=%h", o.name(), x, z, y, exp_y);
    end
  endtask

  task automatic check_ulp(input fpu_op_e o, input logic [31:0] x, input logic [31:0] z,
                           input logic [31:0] exp_y, input int tol);
    op = o; a = x; b = z;
    #1ns;
    checks++;
    if (ulp_dist(y, exp_y) > tol) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h y=%h expected=%h", o.name(), x, z, y, exp_y);
    end
  endtask

  initial begin
    logic [31:0] x, z;
    int          iv;
    real         rx, rz;
    // corner cases
    check_exact(FPU_ADD, 32'h3F800000, 32'h3F800000, 32'h40000000);  // 1+1 = 2
    check_exact(FPU_SUB, 32'h40400000, 32'h40400000, 32'h00000000);  // 3-3 = 0
    check_exact(FPU_MUL, 32'h447FC000, 32'h00000000, 32'h00000000);  // 1023*0
    check_exact(FPU_DIV, 32'h447FC000, 32'h447FC000, 32'h3F800000);  // 1023/1023
    check_exact(FPU_DIV, 32'h3F800000, 32'h00000000, 32'h7F800000);  // 1/0 = inf
    check_exact(FPU_ITOF, 32'hFFFFFC01, 32'h0, 32'hC47FC000);        // -1023
    check_exact(FPU_ITOF, 32'h0, 32'h0, 32'h0);
    check_exact(FPU_FTOI, 32'hC0600000, 32'h0, 32'hFFFFFFFD);        // -3.5 -> -3
    check_exact(FPU_MUL, 32'h7F000000, 32'h7F000000, 32'h7F800000);  // overflow -> inf
    check_exact(FPU_MUL, 32'h00800000, 32'h00800000, 32'h00000000);  // underflow -> 0
    check_exact(FPU_ADD, 32'h3F800000, 32'h33800000, 32'h3F800000);  // 1 + 2^-24: tie to even
    check_exact(FPU_ADD, 32'h3F800001, 32'h33800000, 32'h3F800002);  // tie, odd -> up

    for (int i = 0; i < 3000; i++) begin
      // add/sub with exponents close enough for an exact double reference
      x = rand_float(110, 140); z = rand_float(110, 140);
      check_exact(FPU_ADD, x, z, r2f(f2r(x) + f2r(z)));
      check_exact(FPU_SUB, x, z, r2f(f2r(x) - f2r(z)));
      // nearly cancelling operands
      z = {~x[31], x[30:8], 8'($urandom)};
      check_exact(FPU_ADD, x, z, r2f(f2r(x) + f2r(z)));
      // wide exponent gap: within one ulp
      x = rand_float(60, 190); z = rand_float(60, 190);
      check_ulp(FPU_ADD, x, z, r2f(f2r(x) + f2r(z)), 1);
      // multiply, exact in double
      x = rand_float(70, 180); z = rand_float(70, 180);
      check_exact(FPU_MUL, x, z, r2f(f2r(x) * f2r(z)));
      // divide
      check_ulp(FPU_DIV, x, z, r2f(f2r(x) / f2r(z)), 1);
      // compare
      rx = f2r(x); rz = f2r(z);
      op = FPU_CMP; a = x; b = z; #1ns;
      checks++;
      if (lt !== (rx < rz) || eq !== (rx == rz) || gt !== (rx > rz)) begin
        failures++;
        $display("FAIL cmp a=%h b=%h lt=%b eq=%b gt=%b", x, z, lt, eq, gt);
      end
      a = x; b = x; #1ns;
      checks++;
      if (!eq || lt || gt) failures++;
      // int -> float
      iv = int'($urandom) >>> $urandom_range(0, 31);
      check_exact(FPU_ITOF, iv, 32'h0, r2f(real'(iv)));
      // float -> int, truncation toward zero
      x = rand_float(100, 156);
      check_exact(FPU_FTOI, x, 32'h0, 32'($rtoi(f2r(x))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
