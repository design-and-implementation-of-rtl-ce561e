// tb_shift_add_mult: checks the shift-and-add constant multiplier for
// several constants (the 84 of the worked example, 0, 1, 1024, the largest
// twiddle magnitude, and arbitrary values) against the * operator, over
// random and extreme multiplicands.
module tb_shift_add_mult;
  localparam int A_W = 14;
  localparam int K_W = 11;
  localparam int NK  = 6;
  localparam int unsigned KS [NK] = '{84, 0, 1, 1024, 1023, 25};

  logic [A_W-1:0]     a;
  logic [A_W+K_W-1:0] p [NK];

  for (genvar i = 0; i < NK; i++) begin : g_dut
    shift_add_mult #(.A_W(A_W), .K_W(K_W), .K(KS[i])) dut (.a(a), .p(p[i]));
  end

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 500; it++) begin
      case (it)
        0:       a = '0;
        1:       a = '1;
        2:       a = A_W'(6);
        default: a = A_W'($urandom);
      endcase
      #1;
      for (int i = 0; i < NK; i++) begin
        longint exp_p;
        exp_p = longint'(a) * longint'(KS[i]);
        checks++;
        if (longint'(p[i]) != exp_p) begin
          failures++;
          if (failures < 10) $display("a=%0d K=%0d: got %0d expected %0d", a, KS[i], p[i], exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
