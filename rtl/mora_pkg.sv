// Shared constants and wiring rules of the multi-operand carry-save linear array.
//
// The array reduces NOP operands of N bits each to a carry-save pair (a carry word
// and a sum word) with NOP-2 chained 3:2 carry-save adders (CSAs). The default size,
// nine operands of 16 bits, is the 9:2 example the structure is usually drawn with;
// any NOP >= 3 and N >= 1 can be built.
//
// Operand order. Operand 0 enters as the carry input Ci of the first CSA. All other
// words that the CSAs add on their regular A and B inputs are taken from one list,
// in order: first operands 1 .. NOP-1, then the partial sum words S0, S1, ... in the
// order in which the CSAs produce them. CSA k takes list entry 2k on B and entry
// 2k+1 on A; its Ci is the carry word of CSA k-1, shifted up one bit. The last CSA
// gives the final carry word Cf and the final sum word Sf.
package mora_pkg;

  // Default number of operands and operand width.
  localparam int NOP_DEFAULT = 9;
  localparam int N_DEFAULT   = 16;

  // Number of 3:2 CSAs in a linear array of nop operands.
  function automatic int num_csa(input int nop);
    return nop - 2;
  endfunction

  // List index fed to the B input of CSA k.
  function automatic int src_b(input int k);
    return 2 * k;
  endfunction

  // List index fed to the A input of CSA k.
  function automatic int src_a(input int k);
    return 2 * k + 1;
  endfunction

  // A list entry below nop-1 is operand (index+1); entry nop-1+m is the sum word of CSA m.
  function automatic bit src_is_operand(input int idx, input int nop);
    return idx < nop - 1;
  endfunction

endpackage
