// tb_clk2x_phase: checks the half-period marker. clk and clk2x are driven
// with aligned rising edges; after reset, first_half must be 1 exactly in
// the clk2x periods that begin with a clk rising edge (where clk is high)
// and 0 in the others, and 0 while reset is held.
module tb_clk2x_phase;
  logic clk, clk2x, rst_n, first_half;

  clk2x_phase dut (.*);

  int checks = 0, failures = 0;
  int n_first = 0, n_second = 0;

  initial begin
    clk = 0; clk2x = 0;
    forever begin
      #1 clk2x = ~clk2x;
      if (clk2x) clk = ~clk;
    end
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (3) @(negedge clk2x);
    checks++;
    if (first_half !== 1'b0) failures++;
    @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int it = 0; it < 200; it++) begin
      @(negedge clk2x);
      checks++;
      if (first_half != clk) begin
        failures++;
        $display("cycle %0d: first_half=%0d while clk=%0d", it, first_half, clk);
      end
      if (clk) n_first++; else n_second++;
    end
    checks++;
    if (n_first != 100 || n_second != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
