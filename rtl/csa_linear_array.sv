// Multi-operand carry-save compressor built as a linear array of 3:2 CSAs whose
// carry words run along the FPGA fast carry chain.
//
// Function: reduces NOP operands op_i[0..NOP-1] of N bits each to a carry-save pair,
// carry_o (Cf) and sum_o (Sf), with carry_o + sum_o == sum of all operands (mod 2^N).
// Operands must already be zero- or sign-extended so the true sum fits in N bits;
// otherwise the result wraps modulo 2^N. Purely combinational, no clock or reset.
//
// Structure. There are K = NOP-2 carry-save adders (CSA 0 .. K-1), each with regular
// inputs A and B, a carry input Ci, a sum word S and a carry word Co. Only the carry
// word goes from one CSA to the next (Co of CSA k, shifted up one bit, is Ci of CSA
// k+1); sum words go to later CSAs. Operand 0 is the Ci of CSA 0. The A/B inputs take,
// in order, operands 1..NOP-1 and then the partial sums S0, S1, ... oldest first
// (mora_pkg gives the rule). The last CSA's Co and S are Cf and Sf.
//
// Mapping on CPAs. Because each CSA's carry bit j feeds bit j+1 of the next CSA, the
// full adder of CSA k at bit j and those at (k+1, j+1), (k+2, j+2), ... form one ripple
// chain: a binary CPA along a diagonal of the array. The array is written as one CPA
// per diagonal (N+K-1 of them), each at most K bits long and shorter near bit 0 and
// bit N-1, so a synthesis tool puts every CSA-to-CSA carry on the carry chain. The
// carry-in of a diagonal starting in CSA 0 is a bit of operand 0; the carry-out of a
// diagonal ending in the last CSA is a bit of Cf; a carry out of bit N-1 is dropped.
// A diagonal's CPA reads only sum bits made by diagonals further up, so there is no
// combinational loop.
//
// Taken from the structure as published: the chaining of carry words, the use of
// operand 0 as first carry input, the order in which operands and sum words enter, and
// the expression of the array through CPAs. Own choices: the port names, the operand
// order on A versus B, and wrapping modulo 2^N (inputs and output share the width N).
module csa_linear_array
  import mora_pkg::*;
#(
  parameter int NOP = NOP_DEFAULT,  // number of operands, >= 3
  parameter int N   = N_DEFAULT     // bits per operand and per output word
) (
  input  logic [N-1:0] op_i [NOP],
  output logic [N-1:0] sum_o,    // Sf, final sum word
  output logic [N-1:0] carry_o   // Cf, final carry word, already shifted (bit 0 is 0)
);

  localparam int K     = num_csa(NOP);  // number of 3:2 CSAs
  localparam int NDIAG = N + K - 1;     // number of diagonal CPAs

  if (NOP < 3) begin : g_bad_nop
    $error("csa_linear_array needs NOP >= 3");
  end

  // One cell per CSA k and bit j: the full adder's two regular inputs and its sum bit.
  for (genvar k = 0; k < K; k++) begin : row
    for (genvar j = 0; j < N; j++) begin : col
      localparam int IA = src_a(k);
      localparam int IB = src_b(k);
      localparam int G  = j - k + K - 1;          // diagonal holding this cell
      localparam int P  = (k < j) ? k : j;        // position of the cell in that CPA
      logic a, b, s;

      if (src_is_operand(IA, NOP)) begin : g_a_op
        assign a = op_i[IA+1][j];
      end else begin : g_a_sum
        assign a = row[IA-(NOP-1)].col[j].s;
      end

      if (src_is_operand(IB, NOP)) begin : g_b_op
        assign b = op_i[IB+1][j];
      end else begin : g_b_sum
        assign b = row[IB-(NOP-1)].col[j].s;
      end

      assign s = diag[G].r[P];
    end
  end

  // One CPA per diagonal g, holding cells (k, k+D) for D = g-(K-1), k = KS .. KE.
  for (genvar g = 0; g < NDIAG; g++) begin : diag
    localparam int D  = g - (K - 1);
    localparam int KS = (D < 0) ? -D : 0;
    localparam int KE = (N - 1 - D < K - 1) ? N - 1 - D : K - 1;
    localparam int L  = KE - KS + 1;
    logic [L-1:0] x, y, r;
    logic         cin, cout;

    for (genvar i = 0; i < L; i++) begin : bitsel
      assign x[i] = row[KS+i].col[KS+i+D].a;
      assign y[i] = row[KS+i].col[KS+i+D].b;
    end

    // A diagonal that starts in CSA 0 takes its carry-in from operand 0; one that
    // starts at bit 0 of a later CSA has no carry into it.
    if (KS == 0) begin : g_cin_op
      assign cin = op_i[0][D];
    end else begin : g_cin_zero
      assign cin = 1'b0;
    end

    cpa #(.W(L)) u_cpa (
      .x_i   (x),
      .y_i   (y),
      .cin_i (cin),
      .sum_o (r),
      .cout_o(cout)
    );
  end

  // Outputs: Sf is the sum word of the last CSA; Cf bit j is the carry out of the
  // diagonal ending at bit j-1 of the last CSA (diagonal j-1). Diagonals ending at bit
  // N-1 carry out of the word and are dropped.
  for (genvar j = 0; j < N; j++) begin : g_out
    assign sum_o[j] = row[K-1].col[j].s;
    if (j == 0) begin : g_c0
      assign carry_o[j] = 1'b0;
    end else begin : g_cj
      assign carry_o[j] = diag[j-1].cout;
    end
  end

endmodule
