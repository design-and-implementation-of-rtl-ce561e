// twiddle_mult: multiplication block of one dragonfly branch, computing
//   xb' = P*Cb - T*(-Sb)        yb' = T*Cb + P*(-Sb)
// i.e. (P + jT) * W_N^EXP with W_N^EXP = Cb + j(-Sb) a constant.
//
// How it works. Cb and -Sb are fixed, so each is a shift-add constant
// multiplier (shift_add_mult) working on magnitudes: the "ABS" step splits P
// and T into sign and magnitude, and the "Return ABS" step divides a product
// by the expanding factor 2^TW_FRAC and puts the sign back (sign of operand
// XOR sign of coefficient). There are only two constant multipliers, one for
// Cb and one for -Sb, and each is used twice per frame clock. The block runs
// on clk2x, twice the frame clock:
//   first half  (edge at mid-period): the Cb multiplier gets |P| and the -Sb
//               multiplier gets |T|; their products P*Cb and T*(-Sb), the
//               parts of xb', go into output registers, and |P|, |T| go into
//               input registers.
//   second half (edge that is also a clk edge): the operands are crossed -
//               the Cb multiplier gets the stored |T|, the -Sb multiplier the
//               stored |P| - and their products are added to give yb'; at
//               the same edge the two stored products are subtracted to give
//               xb'. Both results are registered together.
// For a twiddle of angle 0 (EXP mod N = 0) nothing is multiplied: P and T
// are only registered on clk so that the branch keeps the same latency.
//
// Rounding: each product magnitude is rounded to the nearest multiple of
// 2^TW_FRAC (halves up) before its sign is restored, so every product is
// rounded to the nearest integer with halves away from zero. The
// multiplier pairing, the two-pass schedule and the theta = 0 bypass follow
// the multiplication block of the design; the rounding rule, the
// register placement at the output and the first_half phase signal are
// choices of this implementation.
//
// Interface: p_in, t_in (W-bit signed, from a clk register, stable for a
// whole clk period); xb, yb (W-bit signed). first_half comes from
// clk2x_phase. Timing: latency one clk, a new operand pair every clk.
// W must leave room for |P + jT| in each output component (the FFT chooses
// W with one guard bit for this). Only one of clk / clk2x+first_half is
// used by a given instance (register-only or multiplying), so the lint tool
// reports the other as unused.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int N       = 256,
  parameter int EXP     = 1,
  parameter int W       = 8,
  parameter int TW_FRAC = 10
) (
  input  logic                clk,
  input  logic                clk2x,
  input  logic                first_half,
  input  logic signed [W-1:0] p_in,
  input  logic signed [W-1:0] t_in,
  output logic signed [W-1:0] xb,
  output logic signed [W-1:0] yb
);

  localparam int  CB     = tw_cos(N, EXP, TW_FRAC);
  localparam int  NSB    = -tw_sin(N, EXP, TW_FRAC);   // coefficient -Sb
  localparam bit  CB_NEG  = (CB < 0);
  localparam bit  NSB_NEG = (NSB < 0);
  localparam int unsigned CB_MAG  = CB_NEG  ? -CB  : CB;
  localparam int unsigned NSB_MAG = NSB_NEG ? -NSB : NSB;
  localparam int  K_W    = TW_FRAC + 1;                // |coefficient| <= 2^TW_FRAC
  localparam int  PR_W   = W + K_W;                    // product magnitude width
  localparam int  HALF   = 1 << (TW_FRAC - 1);         // rounding constant
  localparam bit  BYPASS = ((EXP % N) == 0);

  if (BYPASS) begin : g_bypass
    // theta = 0: multiplication by 1 is only a register
    always_ff @(posedge clk) begin
      xb <= p_in;
      yb <= t_in;
    end
  end else begin : g_mult
    // ---- ABS ----
    logic         p_neg, t_neg;
    logic [W-1:0] p_mag, t_mag;
    assign p_neg = p_in[W-1];
    assign t_neg = t_in[W-1];
    assign p_mag = p_neg ? W'(-p_in) : W'(p_in);
    assign t_mag = t_neg ? W'(-t_in) : W'(t_in);

    // input registers (R) for the second pass
    logic         p_neg_r, t_neg_r;
    logic [W-1:0] p_mag_r, t_mag_r;

    // operand multiplexers in front of the two constant multipliers
    logic         c_op_neg, s_op_neg;
    logic [W-1:0] c_op, s_op;
    always_comb begin
      if (first_half) begin
        c_op = p_mag;    c_op_neg = p_neg;     // P * Cb
        s_op = t_mag;    s_op_neg = t_neg;     // T * (-Sb)
      end else begin
        c_op = t_mag_r;  c_op_neg = t_neg_r;   // T * Cb
        s_op = p_mag_r;  s_op_neg = p_neg_r;   // P * (-Sb)
      end
    end

    logic [PR_W-1:0] c_prod, s_prod;
    shift_add_mult #(.A_W(W), .K_W(K_W), .K(CB_MAG))  u_mul_c (.a(c_op), .p(c_prod));
    shift_add_mult #(.A_W(W), .K_W(K_W), .K(NSB_MAG)) u_mul_s (.a(s_op), .p(s_prod));

    // ---- Return ABS: scale by 2^-TW_FRAC, rounding the magnitude to the
    // nearest integer (halves away from zero), and restore the sign
    function automatic logic signed [W+1:0] ret_abs(input logic [PR_W-1:0] mag,
                                                     input logic neg);
      logic [PR_W:0] r;
      logic [W+1:0]  m;
      r = (PR_W + 1)'(mag) + (PR_W + 1)'(HALF);
      m = (W + 2)'(r >> TW_FRAC);
      return neg ? -$signed(m) : $signed(m);
    endfunction

    // output registers (R) holding the first-pass products
    logic [PR_W-1:0] c_prod_r, s_prod_r;
    logic            c_neg_r, s_neg_r;

    // the sums are formed on W+2 bits and fit in W by the choice of W
    logic signed [W-1:0] xb_full, yb_full;
    assign xb_full = W'(ret_abs(c_prod_r, c_neg_r) - ret_abs(s_prod_r, s_neg_r));
    assign yb_full = W'(ret_abs(c_prod, c_op_neg ^ CB_NEG) + ret_abs(s_prod, s_op_neg ^ NSB_NEG));

    always_ff @(posedge clk2x) begin
      if (first_half) begin
        p_mag_r  <= p_mag;
        p_neg_r  <= p_neg;
        t_mag_r  <= t_mag;
        t_neg_r  <= t_neg;
        c_prod_r <= c_prod;
        c_neg_r  <= c_op_neg ^ CB_NEG;
        s_prod_r <= s_prod;
        s_neg_r  <= s_op_neg ^ NSB_NEG;
      end else begin
        xb <= xb_full;
        yb <= yb_full;
      end
    end
  end

endmodule
