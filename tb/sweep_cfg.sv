// One configuration of the operand-count / width sweep: instantiates the linear
// array at NOP operands of N bits, drives NVEC vectors (a few directed, the rest
// random) and compares the outputs with the modular sum and with the word-level
// model of the chained CSAs. Reports its counts when done_o rises.
module sweep_cfg #(
  parameter int NOP  = 4,
  parameter int N    = 16,
  parameter int NVEC = 200
) (
  input  logic clk,
  output int   checks_o,
  output int   failures_o,
  output int   wraps_o,
  output logic done_o
);
  import mora_ref_pkg::*;

  logic [N-1:0] op [NOP];
  logic [N-1:0] sum_w, carry_w;

  csa_linear_array #(.NOP(NOP), .N(N)) dut (.op_i(op), .sum_o(sum_w), .carry_o(carry_w));

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] w;
    for (int i = 0; i < N; i += 32) w = (w << 32) | N'($urandom);
    return w;
  endfunction

  initial begin
    word_t       ops[];
    ref_result_t r;
    checks_o = 0; failures_o = 0; wraps_o = 0; done_o = 1'b0;
    ops = new[NOP];
    for (int t = 0; t < NVEC; t++) begin
      foreach (op[i]) begin
        case (t)
          0: op[i] = '1;
          1: op[i] = (i == NOP - 1) ? '1 : '0;
          2: op[i] = (i == 0) ? '1 : '0;
          default: op[i] = rand_word();
        endcase
        // about one vector in three uses operands extended by enough guard bits
        // for the total to fit
        if (t % 3 == 0 && t > 2) op[i] = op[i] >> $clog2(NOP);
      end
      @(negedge clk);
      foreach (op[i]) ops[i] = word_t'(op[i]);
      r = compress(ops, N);
      if (wraps(ops, N)) wraps_o++;
      checks_o += 2;
      if (N'(sum_w + carry_w) != N'(mod_sum(ops, N))) failures_o++;
      if (sum_w != N'(r.sf) || carry_w != N'(r.cf)) begin
        failures_o++;
        $display("FAIL NOP=%0d N=%0d vector %0d", NOP, N, t);
      end
      @(posedge clk);
    end
    done_o = 1'b1;
  end
endmodule
