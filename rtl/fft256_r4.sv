// fft256_r4: fully parallel 256-point radix-4 decimation-in-frequency FFT.
//
// All N complex input samples enter in one clock and all N bins leave
// together, so the core accepts a new frame every clock: at a 312.5 MHz frame
// clock this is 80 Gsample/s of complex data with no buffering in front of
// the transform. The structure is log4(N) = 4 stages (fft_stage); stages 1
// to 3 are an adder block of 64 dragonfly adder sub-blocks followed by a
// multiplication block of constant twiddle multipliers, stage 4 is an adder
// block only. No general multiplier is used: every twiddle factor is a
// constant scaled by 2^TW_FRAC and realised with shift-and-add logic, and
// each pair of constant multipliers is used twice per frame clock on clk2x.
//
// Pipeline, in clk periods:
//   1   input register
//   2-7 stages 1-3 (adder block, multiplication block)
//   8   stage 4 adder block
//   9   output register, after the base-4 digit reversal that puts the bins
//       into natural order (pure wiring)
// so a frame presented with in_valid at edge t appears on the outputs, with
// out_valid, after edge t+9: a latency of nine clocks.
//
// Number format: inputs are IN_W-bit two's complement (5 bits in the main
// configuration). The transform is not scaled: X(k) = sum x(n) W^kn, so the
// outputs have IN_W + 2*log4(N) + 1 = 14 bits; a DC input of value v gives
// X(0) = N*v. Twiddle products are rounded toward zero, which gives errors
// of a few units against the exact transform.
//
// Interface: clk is the frame clock, clk2x a clock of twice its frequency
// whose rising edges include every rising edge of clk; rst_n
// (asynchronous, active low) clears the valid pipeline and the clk2x phase
// tracker, the data registers have no reset. The stage structure, the
// shift-add twiddle multipliers, their two-pass schedule, the theta = 0
// bypass, the nine-clock latency and the 5-bit / 1024 number format follow
// the published design; the valid signal, the word widths, the reset and
// the exact placement of the input and output registers are this
// implementation's choices.
module fft256_r4
  import fft_pkg::*;
#(
  parameter int N       = 256,
  parameter int IN_W    = 5,
  parameter int TW_FRAC = 10
) (
  input  logic                                          clk,
  input  logic                                          clk2x,
  input  logic                                          rst_n,
  input  logic                                          in_valid,
  input  logic signed [IN_W-1:0]                        i_in  [N],
  input  logic signed [IN_W-1:0]                        q_in  [N],
  output logic                                          out_valid,
  output logic signed [stage_w(IN_W, log4(N))-1:0]      i_out [N],
  output logic signed [stage_w(IN_W, log4(N))-1:0]      q_out [N]
);

  localparam int STAGES  = log4(N);
  localparam int LATENCY = 2 * STAGES + 1;

  // clk2x phase for the multiplication blocks
  logic first_half;
  clk2x_phase u_phase (
    .clk        (clk),
    .clk2x      (clk2x),
    .rst_n      (rst_n),
    .first_half (first_half)
  );

  // input register
  logic signed [IN_W-1:0] in_re_r [N];
  logic signed [IN_W-1:0] in_im_r [N];
  always_ff @(posedge clk) begin
    in_re_r <= i_in;
    in_im_r <= q_in;
  end

  // stage outputs; chain[s] feeds stage s
  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic signed [stage_w(IN_W, s+1)-1:0] re [N];
    logic signed [stage_w(IN_W, s+1)-1:0] im [N];
    if (s == 0) begin : g_first
      fft_stage #(.N(N), .STAGE(s), .IN_W(IN_W), .TW_FRAC(TW_FRAC)) u_stage (
        .clk (clk), .clk2x (clk2x), .first_half (first_half),
        .re_in (in_re_r), .im_in (in_im_r),
        .re_out (re), .im_out (im)
      );
    end else begin : g_next
      fft_stage #(.N(N), .STAGE(s), .IN_W(IN_W), .TW_FRAC(TW_FRAC)) u_stage (
        .clk (clk), .clk2x (clk2x), .first_half (first_half),
        .re_in (g_stage[s-1].re), .im_in (g_stage[s-1].im),
        .re_out (re), .im_out (im)
      );
    end
  end

  // digit reversal into natural order, then the output register
  for (genvar k = 0; k < N; k++) begin : g_out
    always_ff @(posedge clk) begin
      i_out[k] <= g_stage[STAGES-1].re[digit_rev4(k, STAGES)];
      q_out[k] <= g_stage[STAGES-1].im[digit_rev4(k, STAGES)];
    end
  end

  // frame-valid pipeline, LATENCY clocks long
  logic [LATENCY-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

  initial begin
    assert (N == 4 ** STAGES) else $fatal(1, "fft256_r4: N must be a power of 4");
  end

endmodule
