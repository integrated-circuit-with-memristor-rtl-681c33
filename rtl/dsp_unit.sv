// dsp_unit: memristor model processor of the emulator's FPGA side.
//
// On each Run pulse it takes the 10-bit ADC sample of the voltage across the
// emulator and advances the memristor model
//     I = G(x) v,  G(x) = Gmin + x (Gmax - Gmin),  x = X/1023
//     dx/dt = k G(x) v f_w(x),  f_w(x) = 1 - (2x-1)^2 + delta
// by one sampling period Ts: the increment q = k V G f_w Ts is added to an
// accumulator Q, and whenever |Q| reaches the one-LSB threshold Xth the
// integer state X steps by sign(Q), an Update pulse is raised so the new X is
// sent to the chip's switch array, and G is recomputed from X.
//
// Structure (follows the described DSP): a register set (voltage sample,
// constants, auxiliary values, X), one shared IEEE 754 FPU (fpu) and a table
// of precomputed f_w(X) (fw_rom), sequenced by a hard-coded FSM. The FSM
// states follow the published state diagram: start, idle, a..c (voltage),
// d..g (f, q and Q, compare), h (step X), i (update), j..l (conductance).
// The states between the labelled ones are this design's: one FPU operation
// per clock, so a run takes 9 clocks without a step and 15 with one.
//
// Design choices where the description is silent:
//  * V = (2*sample - 1023) * VSCALE, VSCALE = 3.3/1023, so codes 0..1023 span
//    -3.3..+3.3 V (the ADC sees the differential voltage halved and offset).
//  * Xth defaults to 1/1023: q already contains k, so one LSB of x is 1/1023.
//  * After a step Q keeps its remainder (Q -= sign(Q) Xth); X saturates.
//  * Initialisation sets Q = 0, stores Gmax - Gmin, sets
//    X = round((Ginit - Gmin)/(Gmax - Gmin) * 1023), computes G and raises
//    one Update so the chip starts at the initial conductance.
//  * A Run that arrives while a computation is in progress is held and
//    served next.
//
// Interface: run (1-clock pulse) starts a cycle with sample_in; x is the
// state variable, update pulses for one clock in the state after X changed;
// g and q expose the conductance and the accumulator (float32); busy is high
// outside idle.
module dsp_unit
  import memristor_pkg::*;
#(
  parameter float32_t GMIN   = F_GMIN_E0,
  parameter float32_t GMAX   = F_GMAX_E0,
  parameter float32_t K      = F_K_E0,
  parameter float32_t TS     = F_TS,
  parameter float32_t XTH    = F_XTH,
  parameter float32_t VSCALE = F_VSCALE,
  parameter float32_t GINIT  = F_GINIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [XBITS-1:0]  sample_in,
  output logic [XBITS-1:0]  x,
  output logic              update,
  output float32_t          g,
  output float32_t          q,
  output logic              busy
);

  typedef enum logic [4:0] {
    S_START, S_I_T0, S_I_DIV, S_I_MUL, S_I_RND, S_I_CVT,
    S_IDLE,
    S_A, S_B, S_C,                 // voltage from the digital sample
    S_D, S_E, S_F, S_G1, S_G2, S_G3, // f(x,v), q = f*Ts, Q += q, |Q| vs Xth
    S_H,                           // X = X + sign(Q)
    S_I,                           // update
    S_J, S_J2, S_K, S_L            // G = Gmin + x (Gmax - Gmin)
  } state_e;

  state_e state;

  // Registers: voltage sample, auxiliaries (v, t, gdiff), X, Q and G.
  logic [XBITS-1:0] vs;
  float32_t         v, t, gdiff;
  float32_t         fw;
  logic             run_pend;

  // FPU operand selection
  fpu_op_e  f_op;
  float32_t f_a, f_b, f_y;
  logic     f_eq, f_gt;

  fpu u_fpu (.op(f_op), .a(f_a), .b(f_b), .y(f_y), .lt(), .eq(f_eq), .gt(f_gt));
  fw_rom u_fw (.clk(clk), .addr(x), .data(fw));

  logic signed [31:0] vint;
  assign vint = 32'(signed'({1'b0, vs, 1'b0})) - 32'sd1023;   // 2*vs - 1023

  always_comb begin
    f_op = FPU_CMP;
    f_a  = t;
    f_b  = t;
    unique case (state)
      S_START: begin f_op = FPU_SUB;  f_a = GMAX;  f_b = GMIN;   end
      S_I_T0:  begin f_op = FPU_SUB;  f_a = GINIT; f_b = GMIN;   end
      S_I_DIV: begin f_op = FPU_DIV;  f_a = t;     f_b = gdiff;  end
      S_I_MUL: begin f_op = FPU_MUL;  f_a = t;     f_b = F_1023; end
      S_I_RND: begin f_op = FPU_ADD;  f_a = t;     f_b = F_HALF; end
      S_I_CVT: begin f_op = FPU_FTOI; f_a = t;                   end
      S_B:     begin f_op = FPU_ITOF; f_a = vint;                end
      S_C:     begin f_op = FPU_MUL;  f_a = t;     f_b = VSCALE; end
      S_D:     begin f_op = FPU_MUL;  f_a = K;     f_b = v;      end
      S_E:     begin f_op = FPU_MUL;  f_a = t;     f_b = g;      end
      S_F:     begin f_op = FPU_MUL;  f_a = t;     f_b = fw;     end
      S_G1:    begin f_op = FPU_MUL;  f_a = t;     f_b = TS;     end
      S_G2:    begin f_op = FPU_ADD;  f_a = q;     f_b = t;      end
      S_G3:    begin f_op = FPU_CMP;  f_a = {1'b0, q[30:0]}; f_b = XTH; end
      S_H:     begin f_op = FPU_SUB;  f_a = q;     f_b = {q[31], XTH[30:0]}; end
      S_J:     begin f_op = FPU_ITOF; f_a = {22'd0, x};          end
      S_J2:    begin f_op = FPU_DIV;  f_a = t;     f_b = F_1023; end
      S_K:     begin f_op = FPU_MUL;  f_a = t;     f_b = gdiff;  end
      S_L:     begin f_op = FPU_ADD;  f_a = t;     f_b = GMIN;   end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_START;
      vs       <= '0;
      x        <= '0;
      v        <= '0;
      t        <= '0;
      gdiff    <= '0;
      q        <= '0;
      g        <= '0;
      run_pend <= 1'b0;
    end else begin
      if (run && state != S_IDLE) run_pend <= 1'b1;
      unique case (state)
        S_START: begin q <= '0; gdiff <= f_y; state <= S_I_T0; end
        S_I_T0:  begin t <= f_y; state <= S_I_DIV; end
        S_I_DIV: begin t <= f_y; state <= S_I_MUL; end
        S_I_MUL: begin t <= f_y; state <= S_I_RND; end
        S_I_RND: begin t <= f_y; state <= S_I_CVT; end
        S_I_CVT: begin
          if ($signed(f_y) < 0)               x <= '0;
          else if ($signed(f_y) > int'(XMAX)) x <= XBITS'(XMAX);
          else                                x <= f_y[XBITS-1:0];
          state <= S_I;
        end
        S_IDLE: begin
          if (run || run_pend) begin
            run_pend <= 1'b0;
            state    <= S_A;
          end
        end
        S_A:  begin vs <= sample_in; state <= S_B; end
        S_B:  begin t <= f_y; state <= S_C; end
        S_C:  begin v <= f_y; state <= S_D; end
        S_D:  begin t <= f_y; state <= S_E; end
        S_E:  begin t <= f_y; state <= S_F; end
        S_F:  begin t <= f_y; state <= S_G1; end
        S_G1: begin t <= f_y; state <= S_G2; end
        S_G2: begin q <= f_y; state <= S_G3; end
        S_G3: state <= (f_gt || f_eq) ? S_H : S_IDLE;
        S_H: begin
          q <= f_y;
          if (!q[31] && x != XBITS'(XMAX)) x <= x + 1'b1;
          else if (q[31] && x != '0)       x <= x - 1'b1;
          state <= S_I;
        end
        S_I:  state <= S_J;
        S_J:  begin t <= f_y; state <= S_J2; end
        S_J2: begin t <= f_y; state <= S_K; end
        S_K:  begin t <= f_y; state <= S_L; end
        S_L:  begin g <= f_y; state <= S_IDLE; end
        default: state <= S_START;
      endcase
    end
  end

  assign update = (state == S_I);
  assign busy   = (state != S_IDLE);

  // Update lasts exactly one clock.
  a_update_pulse: assert property (@(posedge clk) update |=> !update);

endmodule
