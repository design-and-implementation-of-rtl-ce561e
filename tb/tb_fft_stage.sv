// tb_fft_stage: checks both kinds of stage of a 16-point transform: stage 0
// (adder block and multiplication block, latency 2 clk) and stage 1, the
// last one (adder block only, latency 1 clk). Random frames enter every
// clk. The expected outputs are computed here in place: for group g, offset
// j and L = N/4^(s+1), the dragonfly over positions g+j+q*L, then for
// stage 0 a multiplication by W_16^(q*j) with 1024-scaled rounded twiddles
// and products rounded to nearest (halves away from zero); angle-0 results
// pass unchanged.
module tb_fft_stage;
  import fft_pkg::*;
  localparam int  N    = 16;
  localparam int  IN_W = 5;
  localparam int  W0   = stage_w(IN_W, 0);
  localparam int  W1   = stage_w(IN_W, 1);
  localparam int  W2   = stage_w(IN_W, 2);
  localparam real PI   = 3.14159265358979323846;

  logic clk, clk2x, rst_n, first_half;
  logic signed [W0-1:0] a_re [N], a_im [N];
  logic signed [W1-1:0] b_re [N], b_im [N];
  logic signed [W1-1:0] c_re [N], c_im [N];
  logic signed [W2-1:0] d_re [N], d_im [N];

  clk2x_phase u_phase (.clk, .clk2x, .rst_n, .first_half);

  fft_stage #(.N(N), .STAGE(0), .IN_W(IN_W), .TW_FRAC(10)) dut0 (
    .clk, .clk2x, .first_half, .re_in(a_re), .im_in(a_im), .re_out(b_re), .im_out(b_im));
  fft_stage #(.N(N), .STAGE(1), .IN_W(IN_W), .TW_FRAC(10)) dut1 (
    .clk, .clk2x, .first_half, .re_in(c_re), .im_in(c_im), .re_out(d_re), .im_out(d_im));

  int checks = 0, failures = 0;

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #1 clk2x = ~clk2x;
      if (clk2x) clk = ~clk;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rdiv(input int v);
    return (v < 0) ? -((-v + 512) / 1024) : (v + 512) / 1024;
  endfunction

  typedef int vec_t [N];

  // reference of stage s on N points
  task automatic ref_stage(input int s, input vec_t xr, input vec_t xi,
                           output vec_t yr, output vec_t yi);
    int l, m;
    l = N / (4 ** (s + 1));
    m = 4 ** s;
    for (int g = 0; g < N; g += 4 * l) begin
      for (int j = 0; j < l; j++) begin
        int ar [4], ai [4], pr [4], pi [4];
        for (int q = 0; q < 4; q++) begin ar[q] = xr[g+j+q*l]; ai[q] = xi[g+j+q*l]; end
        pr[0] = ar[0] + ar[1] + ar[2] + ar[3]; pi[0] = ai[0] + ai[1] + ai[2] + ai[3];
        pr[1] = ar[0] + ai[1] - ar[2] - ai[3]; pi[1] = ai[0] - ar[1] - ai[2] + ar[3];
        pr[2] = ar[0] - ar[1] + ar[2] - ar[3]; pi[2] = ai[0] - ai[1] + ai[2] - ai[3];
        pr[3] = ar[0] - ai[1] - ar[2] + ai[3]; pi[3] = ai[0] + ar[1] - ai[2] - ar[3];
        for (int q = 0; q < 4; q++) begin
          int e, c, sn;
          e = (q * j * m) % N;
          c = int'($cos(2.0 * PI * e / N) * 1024.0);
          sn = int'($sin(2.0 * PI * e / N) * 1024.0);
          if (e == 0 || s == 1) begin
            yr[g+j+q*l] = pr[q]; yi[g+j+q*l] = pi[q];
          end else begin
            yr[g+j+q*l] = rdiv(pr[q] * c) + rdiv(pi[q] * sn);
            yi[g+j+q*l] = rdiv(pi[q] * c) - rdiv(pr[q] * sn);
          end
        end
      end
    end
  endtask

  // inputs in flight: stage 0 two clk deep, stage 1 one clk deep
  vec_t h0r [2], h0i [2], h1r, h1i;
  int   n0 = 0, n1 = 0;

  initial begin
    vec_t xr, xi, yr, yi, zr, zi;
    rst_n = 0;
    for (int k = 0; k < N; k++) begin a_re[k] = 0; a_im[k] = 0; c_re[k] = 0; c_im[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      // compare what entered 2 clk (stage 0) and 1 clk (stage 1) ago
      if (n0 >= 2) begin
        xr = h0r[1]; xi = h0i[1];
        ref_stage(0, xr, xi, yr, yi);
        for (int k = 0; k < N; k++) begin
          checks++;
          if (int'(b_re[k]) != yr[k] || int'(b_im[k]) != yi[k]) begin
            failures++;
            if (failures < 10) $display("stage 0 pos %0d: got %0d,%0d expected %0d,%0d", k, b_re[k], b_im[k], yr[k], yi[k]);
          end
        end
      end
      if (n1 >= 1) begin
        xr = h1r; xi = h1i;
        ref_stage(1, xr, xi, zr, zi);
        for (int k = 0; k < N; k++) begin
          checks++;
          if (int'(d_re[k]) != zr[k] || int'(d_im[k]) != zi[k]) begin
            failures++;
            if (failures < 10) $display("stage 1 pos %0d: got %0d,%0d expected %0d,%0d", k, d_re[k], d_im[k], zr[k], zi[k]);
          end
        end
      end
      // new inputs
      for (int k = 0; k < N; k++) begin
        xr[k] = int'($urandom_range(31)) - 16;
        xi[k] = int'($urandom_range(31)) - 16;
        a_re[k] = W0'(xr[k]); a_im[k] = W0'(xi[k]);
      end
      h0r[1] = h0r[0]; h0i[1] = h0i[0];
      h0r[0] = xr;     h0i[0] = xi;
      n0++;
      for (int k = 0; k < N; k++) begin
        // stage-1 inputs: anything a stage-0 output can hold (|z| <= 88)
        xr[k] = int'($urandom_range(124)) - 62;
        xi[k] = int'($urandom_range(124)) - 62;
        c_re[k] = W1'(xr[k]); c_im[k] = W1'(xi[k]);
      end
      h1r = xr; h1i = xi;
      n1++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
