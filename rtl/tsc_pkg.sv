// tsc_pkg: types, constants and elaboration-time functions shared by the
// totally self-checking (TSC) blocks.
//
// Check-bit code. A data word o_1..o_m (o_i is bit i-1 of the vector) is
// protected by k check bits x_1..x_k, x_j = a_1j o_1 ^ a_2j o_2 ^ ... ^ a_mj o_m.
// Two codes are provided:
//   CODE_SINGLE_PARITY  one check bit, a_i1 = 1 for all i (XOR of all outputs);
//   CODE_HAMMING        the reduced Hamming-like code: k = clog2(m) + 1 check
//                       bits. Column k is all ones (overall parity); column j
//                       (j < k) holds bit j-1 of (2**(k-1) - i) for row i, so row 1
//                       is all ones and row 2**(k-1) has only the last column set.
//                       With m = 8 this gives the 8x4 matrix whose rows run
//                       1111, 0111, 1011, 0011, 1101, 0101, 1001, 0001 (columns
//                       x_1..x_4 left to right). Column 1 alternates 1/0 and the
//                       columns halve the set of suspect outputs in turn, so the
//                       syndrome of a single erroneous output locates it like a
//                       binary search.
// The number of check bits this rule gives (4 for 8 outputs, 5 for 12, 6 for 31,
// 7 for 47, 2 for 2) equals the parity-net counts of the published benchmark
// results. ODD selects odd parity: every check bit is inverted.
//
// Circuits. The protected ("original") circuits are given as truth tables:
//   CIRC_TABLE1  3 inputs {c,b,a} = in[2:0], 2 outputs {f,e} = out[1:0],
//                the worked example of the check-bit generator (its truth table
//                is copied row for row).
//   CIRC_C17     the 5-input, 2-output c17 benchmark, six 2-input NAND gates:
//                in[0..4] = N1,N2,N3,N6,N7, out[0] = N22, out[1] = N23.
package tsc_pkg;

  typedef enum logic [0:0] {
    CODE_HAMMING       = 1'b0,
    CODE_SINGLE_PARITY = 1'b1
  } code_e;

  // How the check bits generator is built (both share nothing with the
  // original circuit):
  //   FLOW_PLA  the check bits are their own truth table of the primary
  //             inputs (two-level network of the parity outputs);
  //   FLOW_XOR  a private copy of the original circuit followed by XOR trees.
  typedef enum logic [0:0] {
    FLOW_PLA = 1'b0,
    FLOW_XOR = 1'b1
  } flow_e;

  typedef enum logic [0:0] {
    CIRC_TABLE1 = 1'b0,
    CIRC_C17    = 1'b1
  } circuit_e;

  // Widest data word / check word any function here handles.
  localparam int unsigned MAX_M = 64;
  localparam int unsigned MAX_K = 8;
  localparam int unsigned MAX_IN = 5;

  // Number of check bits for an m-bit data word.
  function automatic int unsigned num_check_bits(int unsigned m, code_e code);
    if (code == CODE_SINGLE_PARITY || m <= 1) return 1;
    return $clog2(m) + 1;
  endfunction

  // Matrix element a_ij, with row i = 1..m and column j = 1..k.
  function automatic bit matrix_bit(int unsigned i, int unsigned j,
                                    int unsigned k);
    int unsigned v;
    if (j == k) return 1'b1;
    v = (1 << (k - 1)) - i;
    return bit'((v >> (j - 1)) & 1);
  endfunction

  // Check bits of an m-bit word (bit j-1 of the result is x_j).
  function automatic logic [MAX_K-1:0] encode(logic [MAX_M-1:0] data,
                                              int unsigned m, code_e code,
                                              bit odd);
    logic [MAX_K-1:0] x;
    int unsigned k;
    k = num_check_bits(m, code);
    x = '0;
    for (int unsigned j = 1; j <= k; j++) begin
      for (int unsigned i = 1; i <= m; i++)
        if (matrix_bit(i, j, k)) x[j-1] ^= data[i-1];
      x[j-1] ^= odd;
    end
    return x;
  endfunction

  function automatic int unsigned circ_inputs(circuit_e c);
    return (c == CIRC_C17) ? 5 : 3;
  endfunction

  function automatic int unsigned circ_outputs(circuit_e c);
    // both circuits have two outputs
    return (c == CIRC_C17 || c == CIRC_TABLE1) ? 2 : 0;
  endfunction

  // Output word of a circuit for one input word.
  function automatic logic [1:0] circ_eval(circuit_e c, logic [MAX_IN-1:0] in);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19;
    logic [7:0] f_col, e_col;
    if (c == CIRC_C17) begin
      {n7, n6, n3, n2, n1} = in[4:0];
      n10 = ~(n1 & n3);
      n11 = ~(n3 & n6);
      n16 = ~(n2 & n11);
      n19 = ~(n11 & n7);
      return {~(n16 & n19), ~(n10 & n16)};
    end
    // Table 1 columns f and e, row index {c,b,a} = 0..7 (bit r = row r).
    f_col = 8'b0100_1110;
    e_col = 8'b0111_0001;
    return {f_col[in[2:0]], e_col[in[2:0]]};
  endfunction

endpackage
