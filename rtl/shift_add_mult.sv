// shift_add_mult: multiplies an unsigned variable by a fixed unsigned
// constant without a hardware multiplier.
//
// The constant K is known at elaboration. For every bit of K that is 1 the
// variable, shifted left by that bit's position, is added to the result;
// bits that are 0 cost nothing. 84*x is thus x<<2 + x<<4 + x<<6. The number
// of adders is the number of 1 bits in K less one, which is why the twiddle
// constants of the FFT are implemented this way instead of with dedicated
// multipliers or a lookup RAM.
//
// Interface: a (A_W bits, unsigned) in, p = a*K (A_W+K_W bits) out.
// Timing: purely combinational; the caller registers the result.
// The shift-add scheme is the one the FFT design prescribes for its
// twiddle constants; the widths are chosen by the caller.
module shift_add_mult #(
  parameter int          A_W = 14,
  parameter int          K_W = 11,   // bits of K that are examined
  parameter int unsigned K   = 84
) (
  input  logic [A_W-1:0]     a,
  output logic [A_W+K_W-1:0] p
);

  localparam int P_W = A_W + K_W;

  always_comb begin
    p = '0;
    for (int b = 0; b < K_W; b++) begin
      if (((K >> b) & 1) != 0) p = p + (P_W'(a) << b);
    end
  end

endmodule
