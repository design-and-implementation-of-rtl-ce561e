// fft_mae_probe: testbench helper that drives one fft256_r4 instance of a
// given input width and twiddle scaling with NF random full-scale frames
// (one per clock), checks every bin against a sequential bit-exact model of
// the arithmetic, and measures the mean absolute error of the real and the
// imaginary parts against a double-precision DFT. Results are reported on
// its output ports when done rises.
module fft_mae_probe #(
  parameter int IN_W    = 5,
  parameter int TW_FRAC = 10,
  parameter int NF      = 8
) (
  input  logic clk,
  input  logic clk2x,
  input  logic rst_n,
  output logic done,
  output int   n_checks,
  output int   n_fail,
  output real  mae_re,
  output real  mae_im
);
  localparam int  N     = 256;
  localparam int  OUT_W = IN_W + 9;
  localparam real PI    = 3.14159265358979323846;
  localparam int  HALF  = 1 << (TW_FRAC - 1);
  localparam int  ONE   = 1 << TW_FRAC;

  logic in_valid, out_valid;
  logic signed [IN_W-1:0]  i_in  [N];
  logic signed [IN_W-1:0]  q_in  [N];
  logic signed [OUT_W-1:0] i_out [N];
  logic signed [OUT_W-1:0] q_out [N];

  fft256_r4 #(.N(N), .IN_W(IN_W), .TW_FRAC(TW_FRAC)) dut (.*);

  real cs [N], sn [N];
  int  tc [N], ts [N];
  initial for (int k = 0; k < N; k++) begin
    cs[k] = $cos(2.0 * PI * k / N);
    sn[k] = $sin(2.0 * PI * k / N);
    tc[k] = int'(cs[k] * real'(ONE));
    ts[k] = int'(sn[k] * real'(ONE));
  end

  function automatic int rdiv(input int v);
    return (v < 0) ? -((-v + HALF) >>> TW_FRAC) : (v + HALF) >>> TW_FRAC;
  endfunction

  function automatic int drev(input int k);
    int r;
    r = 0;
    for (int d = 0; d < 4; d++) begin r = (r << 2) | (k & 3); k = k >> 2; end
    return r;
  endfunction

  typedef int vec_t [N];
  vec_t in_r [NF], in_i [NF];

  task automatic model(input vec_t xr, input vec_t xi, output vec_t mr, output vec_t mi);
    vec_t vr, vi;
    vr = xr; vi = xi;
    for (int s = 0; s < 4; s++) begin
      int l, m;
      l = N / (4 ** (s + 1));
      m = 4 ** s;
      for (int g = 0; g < N; g += 4 * l) begin
        for (int j = 0; j < l; j++) begin
          int ar [4], ai [4], pr [4], pi [4];
          for (int q = 0; q < 4; q++) begin ar[q] = vr[g+j+q*l]; ai[q] = vi[g+j+q*l]; end
          pr[0] = ar[0] + ar[1] + ar[2] + ar[3]; pi[0] = ai[0] + ai[1] + ai[2] + ai[3];
          pr[1] = ar[0] + ai[1] - ar[2] - ai[3]; pi[1] = ai[0] - ar[1] - ai[2] + ar[3];
          pr[2] = ar[0] - ar[1] + ar[2] - ar[3]; pi[2] = ai[0] - ai[1] + ai[2] - ai[3];
          pr[3] = ar[0] - ai[1] - ar[2] + ai[3]; pi[3] = ai[0] + ar[1] - ai[2] - ar[3];
          for (int q = 0; q < 4; q++) begin
            int e;
            e = (q * j * m) % N;
            if (e == 0) begin
              vr[g+j+q*l] = pr[q]; vi[g+j+q*l] = pi[q];
            end else begin
              vr[g+j+q*l] = rdiv(pr[q] * tc[e]) + rdiv(pi[q] * ts[e]);
              vi[g+j+q*l] = rdiv(pi[q] * tc[e]) - rdiv(pr[q] * ts[e]);
            end
          end
        end
      end
    end
    for (int k = 0; k < N; k++) begin mr[k] = vr[drev(k)]; mi[k] = vi[drev(k)]; end
  endtask

  int  n_out = 0;
  real sum_re = 0.0, sum_im = 0.0;

  always @(negedge clk) begin
    if (rst_n && out_valid && n_out < NF) begin
      vec_t mr, mi;
      model(in_r[n_out], in_i[n_out], mr, mi);
      for (int k = 0; k < N; k++) begin
        real er, ei;
        er = 0.0; ei = 0.0;
        for (int n = 0; n < N; n++) begin
          int m;
          m = (k * n) % N;
          er += in_r[n_out][n] * cs[m] + in_i[n_out][n] * sn[m];
          ei += in_i[n_out][n] * cs[m] - in_r[n_out][n] * sn[m];
        end
        sum_re += (i_out[k] > er) ? i_out[k] - er : er - i_out[k];
        sum_im += (q_out[k] > ei) ? q_out[k] - ei : ei - q_out[k];
        n_checks++;
        if (int'(i_out[k]) != mr[k] || int'(q_out[k]) != mi[k]) n_fail++;
      end
      n_out++;
      if (n_out == NF) begin
        mae_re = sum_re / (NF * N);
        mae_im = sum_im / (NF * N);
        done   = 1;
      end
    end
  end

  initial begin
    done = 0; n_checks = 0; n_fail = 0; mae_re = 0.0; mae_im = 0.0;
    in_valid = 0;
    for (int n = 0; n < N; n++) begin i_in[n] = '0; q_in[n] = '0; end
    @(posedge rst_n);
    @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      for (int n = 0; n < N; n++) begin
        in_r[f][n] = int'($urandom_range((1 << IN_W) - 1)) - (1 << (IN_W - 1));
        in_i[f][n] = int'($urandom_range((1 << IN_W) - 1)) - (1 << (IN_W - 1));
        i_in[n] = IN_W'(in_r[f][n]);
        q_in[n] = IN_W'(in_i[f][n]);
      end
      in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
  end
endmodule
