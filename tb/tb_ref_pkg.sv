// tb_ref_pkg: reference models shared by the testbenches, written
// independently of the RTL.
//   ref_c17     the c17 benchmark as six NAND gates (in[0..4] = N1,N2,N3,N6,N7,
//               result {N23,N22});
//   ref_t1      the three-input example circuit from its printed truth table
//               (index {c,b,a}, result {f,e});
//   ref_hamming check bits from the printed 8x4 right-hand matrix, for words of
//               3 to 8 bits (4 check bits: its first m rows), 2 bits (rows 11
//               and 01) or 1 bit;
//   ref_parity  the single parity bit.
package tb_ref_pkg;

  function automatic logic [1:0] ref_c17(logic [4:0] i);
    logic g10, g11, g16, g19;
    g10 = !(i[0] && i[2]);
    g11 = !(i[2] && i[3]);
    g16 = !(i[1] && g11);
    g19 = !(g11 && i[4]);
    return {!(g16 && g19), !(g10 && g16)};
  endfunction

  function automatic logic [1:0] ref_t1(logic [2:0] cba);
    case (cba)
      3'd0: return 2'b01;
      3'd1: return 2'b10;
      3'd2: return 2'b10;
      3'd3: return 2'b10;
      3'd4: return 2'b01;
      3'd5: return 2'b01;
      3'd6: return 2'b11;
      default: return 2'b00;
    endcase
  endfunction

  localparam string ROWS8 [8] = '{"1111", "0111", "1011", "0011",
                                  "1101", "0101", "1001", "0001"};

  // m in 3..8: 4 check bits; m = 2: 2 check bits; odd inverts all.
  function automatic logic [3:0] ref_hamming(logic [7:0] d, int m, bit odd);
    logic [3:0] x = '0;
    if (m == 2) begin
      x[0] = d[0];
      x[1] = d[0] ^ d[1];
      return odd ? (x ^ 4'b0011) : x;
    end
    for (int i = 0; i < m; i++)
      for (int j = 0; j < 4; j++)
        if (ROWS8[i][j] == "1") x[j] ^= d[i];
    return odd ? ~x : x;
  endfunction

  function automatic logic ref_parity(logic [7:0] d, int m, bit odd);
    logic p = odd;
    for (int i = 0; i < m; i++) p ^= d[i];
    return p;
  endfunction

endpackage
