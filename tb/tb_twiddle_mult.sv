// tb_twiddle_mult: checks the two-pass constant twiddle multiplier.
//
// Four instances cover the cases that differ in hardware: theta = 0 (pure
// register), W^1 (both coefficients non-zero), W^64 = -j (Cb = 0) and W^160
// (third quadrant, Cb < 0 and -Sb > 0). A new random operand pair is applied
// every clk and each result must appear exactly one clk later. The expected
// value is (P*Cb)/1024 - (T*(-Sb))/1024 and (T*Cb)/1024 + (P*(-Sb))/1024
// with every quotient rounded to the nearest integer (halves away from zero), Cb and Sb being 1024*cos and
// 1024*sin of the angle rounded to the nearest integer. Each result must also
// lie within 1.5 of the exact complex product.
module tb_twiddle_mult;
  localparam int  N  = 256;
  localparam int  W  = 8;
  localparam int  NI = 4;
  localparam int  EXPS [NI] = '{0, 1, 64, 160};
  localparam real PI = 3.14159265358979323846;

  logic clk, clk2x, rst_n, first_half;
  logic signed [W-1:0] p [NI];
  logic signed [W-1:0] t [NI];
  logic signed [W-1:0] xb [NI];
  logic signed [W-1:0] yb [NI];

  clk2x_phase u_phase (.clk, .clk2x, .rst_n, .first_half);

  for (genvar i = 0; i < NI; i++) begin : g_dut
    twiddle_mult #(.N(N), .EXP(EXPS[i]), .W(W), .TW_FRAC(10)) dut (
      .clk, .clk2x, .first_half, .p_in(p[i]), .t_in(t[i]), .xb(xb[i]), .yb(yb[i])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #1 clk2x = ~clk2x;
      if (clk2x) clk = ~clk;
    end
  end

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // v / 1024 rounded to nearest, halves away from zero
  function automatic int rdiv(input int v);
    return (v < 0) ? -((-v + 512) / 1024) : (v + 512) / 1024;
  endfunction

  int pp [NI], tt [NI];    // operands applied in the previous clk

  initial begin
    rst_n = 0;
    for (int i = 0; i < NI; i++) begin p[i] = 0; t[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      // operands change right after a clk edge, as from a clk register
      @(posedge clk);
      #0.5;
      for (int i = 0; i < NI; i++) begin
        // keep |P + jT| below 2^(W-1) so results fit in W bits
        pp[i] = int'($urandom_range(178)) - 89;
        tt[i] = int'($urandom_range(178)) - 89;
        if (it % 50 == 0) begin pp[i] = -89; tt[i] = 89; end
        p[i] = W'(pp[i]);
        t[i] = W'(tt[i]);
      end
      @(posedge clk);
      #0.5;
      for (int i = 0; i < NI; i++) begin
        int  c, s, ex, ey;
        real th, fx, fy;
        th = 2.0 * PI * EXPS[i] / N;
        c  = int'($cos(th) * 1024.0);
        s  = -int'($sin(th) * 1024.0);
        ex = rdiv(pp[i] * c) - rdiv(tt[i] * s);
        ey = rdiv(tt[i] * c) + rdiv(pp[i] * s);
        fx = pp[i] * $cos(th) + tt[i] * $sin(th);
        fy = tt[i] * $cos(th) - pp[i] * $sin(th);
        checks++;
        if (int'(xb[i]) != ex || int'(yb[i]) != ey ||
            fx - xb[i] > 1.5 || xb[i] - fx > 1.5 || fy - yb[i] > 1.5 || yb[i] - fy > 1.5) begin
          failures++;
          if (failures < 10)
            $display("EXP=%0d P=%0d T=%0d: got %0d,%0d expected %0d,%0d",
                     EXPS[i], pp[i], tt[i], xb[i], yb[i], ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
