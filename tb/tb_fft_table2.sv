// tb_fft_table2: accuracy of the 256-point transform at two points of the
// input-width / expanding-factor trade-off where the twiddle quantisation
// dominates the error: 5-bit inputs with twiddles scaled by 16, and 8-bit
// inputs with twiddles scaled by 64. Each configuration runs random
// full-scale frames, one per clock; every bin must equal the bit-exact
// model, and the mean absolute error against the exact DFT must fall in a
// band around the published figures for these points (3.4-3.9 and
// 9.1-9.8): [2.5, 6.0] and [7.0, 13.0]. The main configuration (5 bits,
// 1024) is covered by tb_fft256_r4.
module tb_fft_table2;
  logic clk, clk2x, rst_n;
  localparam int NC = 2;
  localparam int  IW [NC]     = '{5, 8};
  localparam int  FR [NC]     = '{4, 6};
  localparam real MAE_LO [NC] = '{2.5, 7.0};
  localparam real MAE_HI [NC] = '{6.0, 13.0};
  logic done [NC];
  int   n_checks [NC], n_fail [NC];
  real  mae_re [NC], mae_im [NC];

  fft_mae_probe #(.IN_W(5), .TW_FRAC(4)) p0 (.clk, .clk2x, .rst_n, .done(done[0]),
    .n_checks(n_checks[0]), .n_fail(n_fail[0]), .mae_re(mae_re[0]), .mae_im(mae_im[0]));
  fft_mae_probe #(.IN_W(8), .TW_FRAC(6)) p1 (.clk, .clk2x, .rst_n, .done(done[1]),
    .n_checks(n_checks[1]), .n_fail(n_fail[1]), .mae_re(mae_re[1]), .mae_im(mae_im[1]));

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

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    for (int c = 0; c < NC; c++) begin
      $display("input bits %0d, expanding factor %0d: MAE real %f imag %f, bins %0d, model mismatches %0d",
               IW[c], 1 << FR[c], mae_re[c], mae_im[c], n_checks[c], n_fail[c]);
      checks += n_checks[c] + 1;
      failures += n_fail[c];
      if (mae_re[c] < MAE_LO[c] || mae_re[c] > MAE_HI[c] ||
          mae_im[c] < MAE_LO[c] || mae_im[c] > MAE_HI[c]) begin
        failures++;
        $display("MAE outside [%f, %f]", MAE_LO[c], MAE_HI[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
