// Binary carry-propagate adder (CPA) with carry in and carry out.
//
// Adds two W-bit words and a carry-in bit: {cout_o, sum_o} = x_i + y_i + cin_i.
// It is written as a plain '+' so that an FPGA synthesis tool maps it on the
// device's dedicated carry chain. In the linear carry-save array each CPA is one
// diagonal of the array: bit i of the CPA is a full adder of CSA (first+i), and
// its internal carries are the carry words passed from one CSA to the next.
// Purely combinational, no clock.
module cpa #(
  parameter int W = 7  // width; 7 = the number of CSAs of the default 9-operand array
) (
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] y_i,
  input  logic         cin_i,
  output logic [W-1:0] sum_o,
  output logic         cout_o
);

  assign {cout_o, sum_o} = (W+1)'(x_i) + (W+1)'(y_i) + (W+1)'(cin_i);

endmodule
