// fft_stage: one stage of the fully parallel radix-4 decimation-in-frequency
// FFT, made of an adder block and, except in the last stage, a
// multiplication block.
//
// Stage s (0-based) of an N-point transform works on groups of 4*L samples,
// L = N / 4^(s+1). Dragonfly d (0 <= d < N/4) takes the samples at
// positions base + q*L (q = 0..3), base = (d / L)*4L + (d mod L), and writes
// its four results back to the same positions (in-place order). The adder
// block holds the N/4 dragonfly adder sub-blocks (r4_adder_subblock). In the
// multiplication block, result q of dragonfly d is multiplied by the
// twiddle W_N^(q*j*4^s) with j = d mod L; results with a zero exponent
// (q = 0, or j = 0) have angle 0 and are only registered. The last stage
// has L = 1, so all its twiddles are 1 and it has no multiplication block.
// For N = 256 this gives four stages of 64 sub-blocks each, and 189, 180,
// 144 real twiddle multiplications in stages 1, 2 and 3 (the rest bypass).
//
// Interface: re_in/im_in[N] of stage_w(IN_W, STAGE) bits, re_out/im_out[N]
// of stage_w(IN_W, STAGE+1) bits, all signed, in in-place position order.
// first_half comes from clk2x_phase. Timing: latency 2 clk (adder block and
// multiplication block), 1 clk in the last stage; one frame per clk.
// The stage make-up (adder block of N/4 sub-blocks, multiplication block in
// all but the last stage, register-only angle-0 branches) follows the
// published architecture; the in-place index mapping is the standard
// radix-4 DIF order, chosen here because the description does not spell it
// out. In the last stage clk2x and first_half are unused, and the lint tool
// reports them; the ports stay so that all stages share one interface.
module fft_stage
  import fft_pkg::*;
#(
  parameter int N       = 256,
  parameter int STAGE   = 0,
  parameter int IN_W    = 5,
  parameter int TW_FRAC = 10
) (
  input  logic                                   clk,
  input  logic                                   clk2x,
  input  logic                                   first_half,
  input  logic signed [stage_w(IN_W, STAGE)-1:0]   re_in  [N],
  input  logic signed [stage_w(IN_W, STAGE)-1:0]   im_in  [N],
  output logic signed [stage_w(IN_W, STAGE+1)-1:0] re_out [N],
  output logic signed [stage_w(IN_W, STAGE+1)-1:0] im_out [N]
);

  localparam int STAGES = log4(N);
  localparam int W_I    = stage_w(IN_W, STAGE);
  localparam int W_O    = stage_w(IN_W, STAGE + 1);
  localparam int L      = N / (4 ** (STAGE + 1));
  localparam bit LAST   = (STAGE == STAGES - 1);

  for (genvar d = 0; d < N / 4; d++) begin : g_node
    localparam int J    = d % L;
    localparam int BASE = (d / L) * 4 * L + J;

    logic signed [W_I-1:0] a_re [4];
    logic signed [W_I-1:0] a_im [4];
    logic signed [W_O-1:0] s_re [4];
    logic signed [W_O-1:0] s_im [4];

    for (genvar q = 0; q < 4; q++) begin : g_in
      assign a_re[q] = re_in[BASE + q * L];
      assign a_im[q] = im_in[BASE + q * L];
    end

    r4_adder_subblock #(.W_IN(W_I), .W_OUT(W_O)) u_add (
      .clk    (clk),
      .re_in  (a_re),
      .im_in  (a_im),
      .re_out (s_re),
      .im_out (s_im)
    );

    for (genvar q = 0; q < 4; q++) begin : g_out
      if (LAST) begin : g_direct
        assign re_out[BASE + q * L] = s_re[q];
        assign im_out[BASE + q * L] = s_im[q];
      end else begin : g_tw
        twiddle_mult #(
          .N       (N),
          .EXP     ((q * J * (4 ** STAGE)) % N),
          .W       (W_O),
          .TW_FRAC (TW_FRAC)
        ) u_mul (
          .clk        (clk),
          .clk2x      (clk2x),
          .first_half (first_half),
          .p_in       (s_re[q]),
          .t_in       (s_im[q]),
          .xb         (re_out[BASE + q * L]),
          .yb         (im_out[BASE + q * L])
        );
      end
    end
  end

endmodule
