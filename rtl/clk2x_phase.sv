// clk2x_phase: tells logic clocked by clk2x which half of the frame clock
// period it is in.
//
// The multiplication blocks of the FFT run on a clock of twice the frame
// rate and do two passes per frame clock. clk and clk2x come from the same
// source with their rising edges aligned (every second clk2x edge coincides
// with a clk edge). A toggle flip-flop on clk changes at every frame clock
// edge; a copy of it taken on clk2x follows half a frame clock later. While
// the two differ the frame clock is in its first half, so
//   first_half = 1  during the clk2x period that starts at a clk edge,
//   first_half = 0  during the clk2x period that ends at the next clk edge.
// Sampled at a clk2x edge, first_half = 1 therefore means "this is the
// mid-period edge" and first_half = 0 "this edge is also a clk edge".
//
// Interface: clk, clk2x, rst_n (asynchronous, active low) in; first_half
// out. Timing: valid from the first clk edge after reset is released; held
// at 0 during reset. The design only requires the multipliers to run at
// twice the frame clock; how they tell the two passes apart is this
// implementation's choice.
module clk2x_phase (
  input  logic clk,
  input  logic clk2x,
  input  logic rst_n,
  output logic first_half
);

  logic tgl;       // toggles on every clk edge
  logic tgl_2x;    // tgl as seen half a frame clock later

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tgl <= 1'b0;
    else        tgl <= ~tgl;
  end

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) tgl_2x <= 1'b0;
    else        tgl_2x <= tgl;
  end

  assign first_half = tgl ^ tgl_2x;

endmodule
