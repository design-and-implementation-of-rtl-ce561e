// r4_adder_subblock: the addition part of one radix-4 decimation-in-frequency
// dragonfly.
//
// Inputs are the four complex samples a = x(n), b = x(n+N/4), c = x(n+N/2),
// d = x(n+3N/4), each as a real (x) and an imaginary (y) part. The four
// outputs are
//   0:  xa+xb+xc+xd        ya+yb+yc+yd        (a + b + c + d)
//   1:  xa+yb-xc-yd        ya-xb-yc+xd        (a - jb - c + jd)
//   2:  xa-xb+xc-xd        ya-yb+yc-yd        (a - b + c - d)
//   3:  xa-yb-xc+yd        ya+xb-yc-xd        (a + jb - c - jd)
// so the multiplications by +-j of a radix-4 node are only swaps and sign
// changes. Outputs 1 to 3 are the P (real) and T (imaginary) operands of the
// twiddle multiplication that follows in the stage.
//
// Interface: re_in/im_in[0..3] (W_IN-bit signed), re_out/im_out[0..3]
// (W_OUT-bit signed). W_OUT must be at least W_IN+2 so that no sum can
// overflow. Timing: one register stage, latency one clk, a new set of inputs
// every clk. The data registers have no reset; validity is tracked by the
// enclosing pipeline. The eight output expressions are those of the
// published dragonfly; the shared partial sums, the output register and
// the widths are choices of this implementation.
module r4_adder_subblock #(
  parameter int W_IN  = 5,
  parameter int W_OUT = 8
) (
  input  logic                    clk,
  input  logic signed [W_IN-1:0]  re_in  [4],
  input  logic signed [W_IN-1:0]  im_in  [4],
  output logic signed [W_OUT-1:0] re_out [4],
  output logic signed [W_OUT-1:0] im_out [4]
);

  logic signed [W_OUT-1:0] xa, xb, xc, xd, ya, yb, yc, yd;

  assign xa = W_OUT'(re_in[0]);
  assign xb = W_OUT'(re_in[1]);
  assign xc = W_OUT'(re_in[2]);
  assign xd = W_OUT'(re_in[3]);
  assign ya = W_OUT'(im_in[0]);
  assign yb = W_OUT'(im_in[1]);
  assign yc = W_OUT'(im_in[2]);
  assign yd = W_OUT'(im_in[3]);

  // sums and differences shared by the four outputs
  logic signed [W_OUT-1:0] sxac, dxac, syac, dyac, sxbd, dxbd, sybd, dybd;

  always_comb begin
    sxac = xa + xc;
    dxac = xa - xc;
    syac = ya + yc;
    dyac = ya - yc;
    sxbd = xb + xd;
    dxbd = xb - xd;
    sybd = yb + yd;
    dybd = yb - yd;
  end

  always_ff @(posedge clk) begin
    re_out[0] <= sxac + sxbd;
    im_out[0] <= syac + sybd;
    re_out[1] <= dxac + dybd;
    im_out[1] <= dyac - dxbd;
    re_out[2] <= sxac - sxbd;
    im_out[2] <= syac - sybd;
    re_out[3] <= dxac - dybd;
    im_out[3] <= dyac + dxbd;
  end

  initial begin
    assert (W_OUT >= W_IN + 2)
      else $fatal(1, "r4_adder_subblock: W_OUT must be at least W_IN+2");
  end

endmodule
