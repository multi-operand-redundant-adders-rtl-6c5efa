// Self-checking testbench of the binary CPA: exhaustive over all x, y and carry-in
// at the default width of 7 bits, against integer addition.
module tb_cpa;
  localparam int W = 7;
  logic [W-1:0] x, y, s;
  logic         cin, cout;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0, cycles = 0;

  cpa dut (.x_i(x), .y_i(y), .cin_i(cin), .sum_o(s), .cout_o(cout));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int expected;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < (1 << W); i++)
        for (int j = 0; j < (1 << W); j++) begin
          x = W'(i); y = W'(j); cin = c[0];
          #1;
          expected = i + j + c;
          checks++;
          if ({cout, s} != (W+1)'(expected)) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%0d y=%0d cin=%0d got %0d expected %0d", i, j, c, {cout, s}, expected);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
