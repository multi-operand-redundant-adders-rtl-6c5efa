// End-to-end testbench of the carry-save linear array at its default size
// (9 operands of 16 bits, seven chained 3:2 CSAs).
//
// Each vector is applied, and after 1 time unit (the array is combinational: the result
// is valid in the same cycle) three things are checked: carry_o + sum_o equals the
// modular sum of the operands; sum_o and carry_o equal, bit for bit, a word-level model
// of the chained CSAs; bit 0 of the carry word is 0. Vectors: all zero, all ones, each
// operand alone at several values, every operand at its maximum, and random words.
// The mechanisms of the array are counted and each must occur: a nonzero carry word
// passed from one CSA to the next, a nonzero partial sum word fed back into a later CSA,
// a carry dropped out of bit N-1 inside the array, and a total that wraps modulo 2^N.
module tb_csa_linear_array;
  import mora_ref_pkg::*;

  localparam int NOP = 9;
  localparam int N   = 16;
  localparam int NRANDOM = 20000;

  logic [N-1:0] op [NOP];
  logic [N-1:0] sum_w, carry_w;
  logic         clk = 1'b0;
  int checks = 0, failures = 0;
  int n_chained = 0, n_fed = 0, n_drop = 0, n_wrap = 0;

  csa_linear_array dut (.op_i(op), .sum_o(sum_w), .carry_o(carry_w));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check();
    word_t       ops[];
    ref_result_t r;
    word_t       msum;
    ops = new[NOP];
    foreach (op[i]) ops[i] = word_t'(op[i]);
    @(negedge clk);  // settle inside the same cycle: no latency
    r    = compress(ops, N);
    msum = mod_sum(ops, N);
    n_chained += r.chained;
    n_fed     += r.fed_sums;
    n_drop    += r.msb_drops;
    if (wraps(ops, N)) n_wrap++;
    checks++;
    if (N'(sum_w + carry_w) != N'(msum)) begin
      failures++;
      if (failures < 10) $display("FAIL sum: S=%h C=%h expected total %h", sum_w, carry_w, N'(msum));
    end
    checks++;
    if (sum_w != N'(r.sf) || carry_w != N'(r.cf)) begin
      failures++;
      if (failures < 10)
        $display("FAIL words: S=%h C=%h model S=%h C=%h", sum_w, carry_w, N'(r.sf), N'(r.cf));
    end
    checks++;
    if (carry_w[0] != 1'b0) failures++;
  endtask

  initial begin : stim
    foreach (op[i]) op[i] = '0;
    @(posedge clk);
    apply_and_check();
    foreach (op[i]) op[i] = '1;
    @(posedge clk);
    apply_and_check();
    for (int i = 0; i < NOP; i++)
      for (int v = 0; v < 4; v++) begin
        foreach (op[m]) op[m] = '0;
        op[i] = (v == 0) ? N'(1) : (v == 1) ? N'(1) << (N - 1) : (v == 2) ? '1 : N'($urandom);
        @(posedge clk);
        apply_and_check();
      end
    for (int t = 0; t < NRANDOM; t++) begin
      foreach (op[i]) op[i] = N'($urandom);
      // every fourth vector uses small operands, so that sums stay in range
      if (t % 4 == 0) foreach (op[i]) op[i] = op[i] >> 4;
      @(posedge clk);
      apply_and_check();
    end
    $display("mechanisms: chained_carry=%0d fed_back_sums=%0d msb_carry_dropped=%0d wrapped_totals=%0d",
             n_chained, n_fed, n_drop, n_wrap);
    checks++;
    if (n_chained == 0 || n_fed == 0 || n_drop == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
