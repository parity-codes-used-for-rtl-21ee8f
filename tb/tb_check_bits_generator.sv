// tb_check_bits_generator: self-checking testbench for check_bits_generator.
// Six generators are driven exhaustively and compared with reference check
// bits of the reference circuit outputs:
//   - the three-input example with one odd-parity check bit, both
//     constructions: x must equal the printed column x, i.e. x = b&c;
//   - the three-input example with the 2-bit Hamming-like code (PLA);
//   - c17 with the Hamming-like code (2 check bits), both constructions;
//   - c17 with single even parity (XOR construction).
// Then one stored bit of the PLA-style generator's LUT is flipped and the
// check bits must change at that input value only.
module tb_check_bits_generator;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  logic [2:0]  t1_in;
  logic [4:0]  c_in;
  logic        x_pla, x_xor;
  logic [1:0]  t1h;
  logic [1:0]  c_pla, c_xor;
  logic        c_par;
  logic [15:0] seu_t1h;
  int checks = 0, failures = 0;

  check_bits_generator #(.CIRCUIT(CIRC_TABLE1), .CODE(CODE_SINGLE_PARITY),
                         .FLOW(FLOW_PLA), .ODD(1'b1))
    g_t1_pla (.in(t1_in), .seu(8'h00), .chk(x_pla));
  check_bits_generator #(.CIRCUIT(CIRC_TABLE1), .CODE(CODE_SINGLE_PARITY),
                         .FLOW(FLOW_XOR), .ODD(1'b1))
    g_t1_xor (.in(t1_in), .seu(16'h0000), .chk(x_xor));
  check_bits_generator #(.CIRCUIT(CIRC_TABLE1), .CODE(CODE_HAMMING),
                         .FLOW(FLOW_PLA))
    g_t1_ham (.in(t1_in), .seu(seu_t1h), .chk(t1h));
  check_bits_generator #(.CIRCUIT(CIRC_C17), .CODE(CODE_HAMMING),
                         .FLOW(FLOW_PLA))
    g_c_pla (.in(c_in), .seu(64'h0), .chk(c_pla));
  check_bits_generator #(.CIRCUIT(CIRC_C17), .CODE(CODE_HAMMING),
                         .FLOW(FLOW_XOR))
    g_c_xor (.in(c_in), .seu(64'h0), .chk(c_xor));
  check_bits_generator #(.CIRCUIT(CIRC_C17), .CODE(CODE_SINGLE_PARITY),
                         .FLOW(FLOW_XOR))
    g_c_par (.in(c_in), .seu(64'h0), .chk(c_par));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seu_t1h = '0;
    for (int a = 0; a < 8; a++) begin
      t1_in = 3'(a); #1;
      chk(x_pla == (t1_in[2] & t1_in[1]), $sformatf("table1 x (PLA) cba=%b", t1_in));
      chk(x_xor == (t1_in[2] & t1_in[1]), $sformatf("table1 x (XOR) cba=%b", t1_in));
      chk(x_pla == ref_parity({6'b0, ref_t1(t1_in)}, 2, 1'b1), "table1 odd parity of f,e");
      chk(t1h == ref_hamming({6'b0, ref_t1(t1_in)}, 2, 1'b0)[1:0], "table1 hamming");
    end
    for (int a = 0; a < 32; a++) begin
      logic [1:0] o;
      c_in = 5'(a); #1;
      o = ref_c17(c_in);
      chk(c_pla == ref_hamming({6'b0, o}, 2, 1'b0)[1:0], $sformatf("c17 PLA in=%0d", a));
      chk(c_xor == ref_hamming({6'b0, o}, 2, 1'b0)[1:0], $sformatf("c17 XOR in=%0d", a));
      chk(c_par == ref_parity({6'b0, o}, 2, 1'b0), $sformatf("c17 parity in=%0d", a));
    end
    // upset: cell 5, check bit x_2
    seu_t1h = 16'b1 << (5 * 2 + 1);
    for (int a = 0; a < 8; a++) begin
      logic [1:0] e;
      t1_in = 3'(a); #1;
      e = ref_hamming({6'b0, ref_t1(t1_in)}, 2, 1'b0)[1:0];
      if (a == 5) e[1] = ~e[1];
      chk(t1h == e, $sformatf("table1 hamming seu cba=%b", t1_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
