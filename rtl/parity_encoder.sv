// parity_encoder: the check-bit equations x_j = a_1j o_1 ^ ... ^ a_mj o_m.
//
// Each check bit is an XOR tree over the data bits selected by one column of
// the code matrix (tsc_pkg::matrix_bit). CODE_HAMMING uses K = clog2(M) + 1
// check bits from the reduced Hamming-like matrix (last column all ones, the
// others the binary-search columns); CODE_SINGLE_PARITY uses one bit, the XOR
// of all data bits. ODD inverts every check bit (odd parity).
//
// Interface: data[i-1] is o_i, chk[j-1] is x_j.
// Timing: purely combinational.
// The equation, the matrix rule and both codes follow the design description;
// the bit numbering is this implementation's choice.
module parity_encoder
  import tsc_pkg::*;
#(
  parameter int unsigned  M    = 8,
  parameter code_e        CODE = CODE_HAMMING,
  parameter bit           ODD  = 1'b0,
  localparam int unsigned K    = num_check_bits(M, CODE)
) (
  input  logic [M-1:0] data,
  output logic [K-1:0] chk
);

  // Column masks of the code matrix: bit i-1 of COLS[j-1] is a_ij.
  function automatic logic [K*M-1:0] build_cols();
    logic [K*M-1:0] c;
    c = '0;
    for (int unsigned j = 1; j <= K; j++)
      for (int unsigned i = 1; i <= M; i++)
        c[(j-1)*M + (i-1)] = (CODE == CODE_SINGLE_PARITY) ? 1'b1
                                                           : matrix_bit(i, j, K);
    return c;
  endfunction

  localparam logic [K*M-1:0] COLS = build_cols();

  for (genvar j = 0; j < K; j++) begin : g_chk
    assign chk[j] = (^(data & COLS[j*M +: M])) ^ ODD;
  end

endmodule
