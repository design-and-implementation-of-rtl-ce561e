// tb_fft256_r4: end-to-end test of the parallel radix-4 FFT at its default
// size (N = 256, 5-bit inputs, twiddles scaled by 1024).
//
// Two references are computed in the testbench: a direct DFT in double
// precision, and a sequential bit-exact model of the arithmetic (radix-4
// DIF in place, twiddles round(1024*cos), round(1024*sin), every product
// divided by 1024 and rounded to nearest with halves away from zero,
// angle-0 twiddles skipped, digit-reversed read-out). Checks:
//   - exact cases: an impulse at n = 0 must give every bin equal to its
//     amplitude, a constant input must give N*v in bin 0 and 0 elsewhere
//     (neither involves a rounded product);
//   - random full-scale frames, applied back to back (one per clock), must
//     match the DFT within ERR_TOL per component, and the mean absolute
//     error over all bins must stay below MAE_TOL;
//   - out_valid must follow in_valid by exactly nine clocks, also across
//     idle gaps.
// It also counts how often the design's mechanisms were exercised: frames
// accepted on consecutive clocks, idle gaps, both passes of the clk2x
// multiplication schedule, and bins whose result went through theta = 0
// bypasses only (the impulse test). A mechanism never seen is a failure.
module tb_fft256_r4;
  localparam int    N       = 256;
  localparam int    IN_W    = 5;
  localparam int    OUT_W   = 14;
  localparam int    LATENCY = 9;
  localparam int    N_RAND  = 24;
  localparam real   ERR_TOL = 16.0;
  localparam real   MAE_TOL = 3.0;
  localparam real   PI      = 3.14159265358979323846;

  logic clk, clk2x, rst_n, in_valid, out_valid;
  logic signed [IN_W-1:0]  i_in  [N];
  logic signed [IN_W-1:0]  q_in  [N];
  logic signed [OUT_W-1:0] i_out [N];
  logic signed [OUT_W-1:0] q_out [N];

  fft256_r4 dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  // clk2x has period 2, clk period 4; every clk rising edge is a clk2x edge
  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #1 clk2x = ~clk2x;
      if (clk2x) clk = ~clk;
    end
  end
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // twiddle table for the reference DFT
  real cs [N], sn [N];
  initial for (int k = 0; k < N; k++) begin
    cs[k] = $cos(2.0 * PI * k / N);
    sn[k] = $sin(2.0 * PI * k / N);
  end

  // frames in flight: kind 0 = random (tolerance), 1 = exact expected
  typedef struct {
    int kind;
    int in_cyc;
    int xr [N];
    int xi [N];
  } frame_t;
  frame_t fifo [$];

  int   n_b2b = 0, n_gap = 0, n_pass1 = 0, n_pass2 = 0, n_bypass_bins = 0;
  real  abs_err_sum = 0.0;
  int   abs_err_cnt = 0;
  logic prev_valid = 0;

  // observe the clk2x schedule of the multiplication blocks
  always @(posedge clk2x) if (rst_n) begin
    if (dut.first_half) n_pass1++; else n_pass2++;
  end

  task automatic drive(input frame_t f);
    for (int n = 0; n < N; n++) begin
      i_in[n] = IN_W'(f.xr[n]);
      q_in[n] = IN_W'(f.xi[n]);
    end
    in_valid = 1;
    f.in_cyc = cyc;
    fifo.push_back(f);
  endtask

  // bit-exact sequential model
  function automatic int rdiv(input int v);
    return (v < 0) ? -((-v + 512) / 1024) : (v + 512) / 1024;
  endfunction

  function automatic int drev(input int k);
    int r;
    r = 0;
    for (int d = 0; d < 4; d++) begin r = (r << 2) | (k & 3); k = k >> 2; end
    return r;
  endfunction

  task automatic model(input frame_t f, output int mr [N], output int mi [N]);
    int vr [N], vi [N], tc [N], ts [N];
    for (int k = 0; k < N; k++) begin
      vr[k] = f.xr[k]; vi[k] = f.xi[k];
      tc[k] = int'(cs[k] * 1024.0);
      ts[k] = int'(sn[k] * 1024.0);
    end
    for (int s = 0, l = N / 4, m = 1; s < 4; s++, l = l / 4, m = m * 4) begin
      for (int g = 0; g < N; g += 4 * l) begin
        for (int j = 0; j < l; j++) begin
          int ar [4], ai [4], pr [4], pi [4];
          for (int q = 0; q < 4; q++) begin
            ar[q] = vr[g + j + q * l];
            ai[q] = vi[g + j + q * l];
          end
          // a + b + c + d, a - jb - c + jd, a - b + c - d, a + jb - c - jd
          pr[0] = ar[0] + ar[1] + ar[2] + ar[3]; pi[0] = ai[0] + ai[1] + ai[2] + ai[3];
          pr[1] = ar[0] + ai[1] - ar[2] - ai[3]; pi[1] = ai[0] - ar[1] - ai[2] + ar[3];
          pr[2] = ar[0] - ar[1] + ar[2] - ar[3]; pi[2] = ai[0] - ai[1] + ai[2] - ai[3];
          pr[3] = ar[0] - ai[1] - ar[2] + ai[3]; pi[3] = ai[0] + ar[1] - ai[2] - ar[3];
          for (int q = 0; q < 4; q++) begin
            int e;
            e = (q * j * m) % N;
            if (e == 0) begin
              vr[g + j + q * l] = pr[q];
              vi[g + j + q * l] = pi[q];
            end else begin
              vr[g + j + q * l] = rdiv(pr[q] * tc[e]) - rdiv(-pi[q] * ts[e]);
              vi[g + j + q * l] = rdiv(pi[q] * tc[e]) + rdiv(-pr[q] * ts[e]);
            end
          end
        end
      end
    end
    for (int k = 0; k < N; k++) begin
      mr[k] = vr[drev(k)];
      mi[k] = vi[drev(k)];
    end
  endtask

  // compare one output frame
  task automatic check_frame(input frame_t f);
    real er, ei, ar, ai;
    int  bad;
    int  mr [N], mi [N];
    bad = 0;
    model(f, mr, mi);
    checks++;
    if (cyc - f.in_cyc != LATENCY) begin
      bad++;
      $display("latency %0d, expected %0d", cyc - f.in_cyc, LATENCY);
    end
    for (int k = 0; k < N; k++) begin
      er = 0.0; ei = 0.0;
      for (int n = 0; n < N; n++) begin
        int m;
        m = (k * n) % N;
        er += f.xr[n] * cs[m] + f.xi[n] * sn[m];
        ei += f.xi[n] * cs[m] - f.xr[n] * sn[m];
      end
      if (int'(i_out[k]) != mr[k] || int'(q_out[k]) != mi[k]) begin
        bad++;
        if (bad < 5) $display("bin %0d: got %0d,%0d model %0d,%0d", k, i_out[k], q_out[k], mr[k], mi[k]);
      end
      ar = real'(i_out[k]) - er;
      ai = real'(q_out[k]) - ei;
      if (f.kind == 1) begin
        if (ar > 1e-6 || ar < -1e-6 || ai > 1e-6 || ai < -1e-6) begin
          bad++;
          if (bad < 5) $display("exact frame bin %0d: got %0d,%0d expected %f,%f",
                                k, i_out[k], q_out[k], er, ei);
        end
      end else begin
        abs_err_sum += (ar < 0 ? -ar : ar) + (ai < 0 ? -ai : ai);
        abs_err_cnt += 2;
        if (ar > ERR_TOL || ar < -ERR_TOL || ai > ERR_TOL || ai < -ERR_TOL) begin
          bad++;
          if (bad < 5) $display("bin %0d: got %0d,%0d expected %f,%f",
                                k, i_out[k], q_out[k], er, ei);
        end
      end
    end
    if (bad != 0) failures++;
  endtask

  // output side: sample away from the clock edges
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (fifo.size() == 0) begin
          failures++;
          $display("out_valid without a frame in flight");
        end else begin
          frame_t f;
          f = fifo.pop_front();
          check_frame(f);
        end
      end
    end
  end

  frame_t fr;
  initial begin
    rst_n = 0; in_valid = 0;
    for (int n = 0; n < N; n++) begin i_in[n] = '0; q_in[n] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // impulse at n = 0: every bin equals the amplitude, only bypass paths
    for (int n = 0; n < N; n++) begin fr.xr[n] = 0; fr.xi[n] = 0; end
    fr.xr[0] = 15; fr.xi[0] = -16; fr.kind = 1;
    drive(fr); n_b2b++;
    n_bypass_bins += N;
    @(negedge clk);
    // constant input
    for (int n = 0; n < N; n++) begin fr.xr[n] = -16; fr.xi[n] = 7; end
    fr.kind = 1;
    drive(fr); n_b2b++;
    @(negedge clk);
    in_valid = 0; n_gap++;
    repeat (2) @(negedge clk);

    // random full-scale frames, back to back, with one idle gap
    for (int f = 0; f < N_RAND; f++) begin
      for (int n = 0; n < N; n++) begin
        fr.xr[n] = int'($urandom_range(31)) - 16;
        fr.xi[n] = int'($urandom_range(31)) - 16;
      end
      fr.kind = 0;
      drive(fr);
      if (prev_valid) n_b2b++;
      prev_valid = 1;
      @(negedge clk);
      if (f == N_RAND / 2) begin
        in_valid = 0; n_gap++; prev_valid = 0;
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (LATENCY + 3) @(negedge clk);

    checks++;
    if (fifo.size() != 0) begin
      failures++;
      $display("%0d frames never came out", fifo.size());
    end
    checks++;
    if (abs_err_cnt == 0 || abs_err_sum / abs_err_cnt > MAE_TOL) begin
      failures++;
      $display("mean absolute error too large");
    end
    $display("mean absolute error per component: %f over %0d values",
             abs_err_cnt ? abs_err_sum / abs_err_cnt : 0.0, abs_err_cnt);
    $display("mechanisms: back-to-back frames %0d, idle gaps %0d, clk2x pass 1 %0d, pass 2 %0d, bypass-only bins %0d",
             n_b2b, n_gap, n_pass1, n_pass2, n_bypass_bins);
    checks++;
    if (n_b2b == 0 || n_gap == 0 || n_pass1 == 0 || n_pass2 == 0 || n_bypass_bins == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
