// tb_r4_adder_subblock: checks the dragonfly adder sub-block. Random and
// full-scale 5-bit complex inputs change every clk; one clk later the four
// outputs must equal a+b+c+d, a-jb-c+jd, a-b+c-d and a+jb-c-jd, worked out
// here with complex arithmetic on integers.
module tb_r4_adder_subblock;
  localparam int W_IN  = 5;
  localparam int W_OUT = 8;

  logic clk;
  logic signed [W_IN-1:0]  re_in  [4];
  logic signed [W_IN-1:0]  im_in  [4];
  logic signed [W_OUT-1:0] re_out [4];
  logic signed [W_OUT-1:0] im_out [4];

  r4_adder_subblock #(.W_IN(W_IN), .W_OUT(W_OUT)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    clk = 0;
    forever #1 clk = ~clk;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vr [4], vi [4];
  // multiply (r + ji) by j^m
  task automatic rot(input int r, input int i, input int m, output int orr, output int oi);
    case (m & 3)
      0: begin orr = r;  oi = i;  end
      1: begin orr = -i; oi = r;  end
      2: begin orr = -r; oi = -i; end
      default: begin orr = i; oi = -r; end
    endcase
  endtask

  initial begin
    for (int q = 0; q < 4; q++) begin re_in[q] = '0; im_in[q] = '0; end
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      for (int q = 0; q < 4; q++) begin
        vr[q] = int'($urandom_range(31)) - 16;
        vi[q] = int'($urandom_range(31)) - 16;
        if (it == 0) begin vr[q] = -16; vi[q] = -16; end
        if (it == 1) begin vr[q] = 15;  vi[q] = 15;  end
        re_in[q] = W_IN'(vr[q]);
        im_in[q] = W_IN'(vi[q]);
      end
      @(negedge clk);
      // output k = sum over q of x_q * (-j)^(q*k)
      for (int k = 0; k < 4; k++) begin
        int er, ei;
        er = 0; ei = 0;
        for (int q = 0; q < 4; q++) begin
          int rr, ri;
          rot(vr[q], vi[q], 4 - ((q * k) & 3), rr, ri);
          er += rr; ei += ri;
        end
        checks++;
        if (int'(re_out[k]) != er || int'(im_out[k]) != ei) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d,%0d expected %0d,%0d", k, re_out[k], im_out[k], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
