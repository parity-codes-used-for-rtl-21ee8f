// tsc_checker: checks that a data word and its check bits form a code word.
//
// The check bits of data are recomputed and compared with the received ones.
// OK and FAIL come from two independent copies of the encoder and separate
// compare logic: OK = all bits agree, FAIL = some bit differs. In a fault-free
// checker exactly one of them is 1; a fault inside one rail makes them equal
// (both 0 or both 1), so a broken checker signals itself instead of reporting
// a false OK.
// syndrome is the XOR of recomputed and received check bits (zero for a code
// word). With the Hamming-like code a single wrong data bit o_i gives the
// syndrome equal to row i of the code matrix, so err_loc = 2**(K-1) -
// syndrome[K-2:0] names the wrong output (1-based); err_loc is 0 when the
// syndrome is not that of a single data-bit error, and always 0 for the
// single-parity code.
//
// Interface: data[i-1] = o_i, chk[j-1] = x_j. Timing: purely combinational.
// The checker's function and its OK/FAIL outputs follow the design
// description; the two-rail construction and err_loc are this
// implementation's choices.
module tsc_checker
  import tsc_pkg::*;
#(
  parameter int unsigned  M    = 8,
  parameter code_e        CODE = CODE_HAMMING,
  parameter bit           ODD  = 1'b0,
  localparam int unsigned K    = num_check_bits(M, CODE),
  localparam int unsigned LW   = $clog2(M + 1)
) (
  input  logic [M-1:0]  data,
  input  logic [K-1:0]  chk,
  output logic          ok,
  output logic          fail,
  output logic [K-1:0]  syndrome,
  output logic [LW-1:0] err_loc
);

  logic [K-1:0] rec_ok, rec_fail;

  parity_encoder #(.M(M), .CODE(CODE), .ODD(ODD)) u_enc_ok (
    .data(data),
    .chk (rec_ok)
  );

  parity_encoder #(.M(M), .CODE(CODE), .ODD(ODD)) u_enc_fail (
    .data(data),
    .chk (rec_fail)
  );

  assign ok       = &(rec_ok ~^ chk);
  assign fail     = |(rec_fail ^ chk);
  assign syndrome = rec_ok ^ chk;

  if (K > 1) begin : g_locate
    int unsigned pos;
    always_comb begin
      pos = (1 << (K - 1)) - int'(syndrome[K-2:0]);
      if (syndrome[K-1] && pos >= 1 && pos <= M) err_loc = LW'(pos);
      else                                       err_loc = '0;
    end
  end else begin : g_no_locate
    assign err_loc = '0;
  end

endmodule
