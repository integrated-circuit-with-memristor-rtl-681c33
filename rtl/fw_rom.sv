// fw_rom: precomputed window function table of the DSP unit.
//
// Holds f_w(x) = 1 - (2x - 1)^2 + delta with x = X/1023 and delta = 0.0003,
// as float32, for every integer state X = 0..1023. Looking the window up
// instead of computing it saves FPU operations in each model update.
// The window and delta are the model's; storing it as a table indexed by X
// follows the description of the DSP's "precomputed functions" memory.
//
// The contents are computed at elaboration with integer arithmetic only:
// f_w = (4X(1023-X)*10000 + 3*1023^2) / (1023^2 * 10000), which is exact
// because delta = 3/10000, and the quotient is rounded to nearest even
// into float32 by ratio_to_float().
//
// Timing: synchronous read, data is valid one clock after addr.
module fw_rom
  import memristor_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << XBITS   // 1024 entries
) (
  input  logic                      clk,
  input  logic [$clog2(DEPTH)-1:0]  addr,
  output float32_t                  data
);

  typedef float32_t table_t [DEPTH];

  // float32 of num/den (both positive, value below 2), rounded to nearest.
  function automatic float32_t ratio_to_float(input logic [127:0] num, input logic [127:0] den);
    int unsigned sh;
    logic [24:0]  quo;
    logic [127:0] r;
    logic [24:0]  mant;
    int           e;
    if (num == '0) return '0;
    sh = 0;
    while ((num << sh) < den) sh++;
    // value = (num << sh)/den in [1, 2); take 24 bits plus a guard bit
    quo  = 25'((num << (sh + 24)) / den);   // below 2^25
    r    = (num << (sh + 24)) % den;
    mant = quo[24:0] >> 1;
    e    = 127 - int'(sh);
    if (quo[0] && ((r != '0) || mant[0])) mant = mant + 25'd1;
    if (mant[24]) begin
      mant = mant >> 1;
      e    = e + 1;
    end
    ratio_to_float = {1'b0, e[7:0], mant[22:0]};
  endfunction

  function automatic table_t build_table();
    table_t t;
    longint unsigned n, d, xm;
    xm = 64'(DEPTH) - 64'd1;
    d  = xm * xm * 64'd10000;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      n    = 64'd4 * 64'(i) * (xm - 64'(i)) * 64'd10000 + 64'd3 * xm * xm;
      t[i] = ratio_to_float({64'd0, n}, {64'd0, d});
    end
    return t;
  endfunction

  localparam table_t FW_TABLE = build_table();

  always_ff @(posedge clk) data <= FW_TABLE[addr];

endmodule
