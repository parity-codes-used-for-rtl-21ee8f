// tb_tsc_block: self-checking testbench for tsc_block.
// A c17 block (Hamming-like code, check bits as their own table) and a
// three-input example block (two checked inputs plus one side input, check
// bits from a duplicate circuit and XOR trees) receive random input code words.
// In each trial one bit of one numbered net (1..6) or one stored LUT bit is
// flipped, and outputs, check bits and the block's OK/FAIL are compared with a
// reference model of the block. The trial also checks where the error is
// caught: errors on nets 1, 2, 4 and 5 must raise this block's FAIL; errors on
// nets 3 and 6 must leave this checker silent and leave an output word whose
// check bits disagree (caught by the next checker) unless the circuit masks
// them. Every net must have been hit and caught at least once.
module tb_tsc_block;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  // c17 block
  logic [4:0]  a_pi, a_n5, a_n4, a_n2, a_n3, a_n6;
  logic [3:0]  a_pi_chk, a_n1, a_syn;
  logic [1:0]  a_po, a_po_chk;
  logic        a_ok, a_fail;
  logic [2:0]  a_loc;
  logic [63:0] a_seu_orig, a_seu_gen;
  // example-circuit block
  logic [2:0]  b_pi, b_n5, b_n4, b_n3, b_n6;
  logic [1:0]  b_n2, b_pi_chk, b_n1, b_syn, b_po, b_po_chk, b_loc;
  logic        b_ok, b_fail;
  logic [15:0] b_seu_orig, b_seu_gen;

  int checks = 0, failures = 0;
  int hit [2][8];
  int caught [2][8];

  tsc_block dut_a (
    .pi(a_pi), .pi_chk(a_pi_chk), .po(a_po), .po_chk(a_po_chk),
    .ok(a_ok), .fail(a_fail), .syndrome(a_syn), .err_loc(a_loc),
    .inj_n1(a_n1), .inj_n5(a_n5), .inj_n4(a_n4), .inj_n2(a_n2),
    .inj_n3(a_n3), .inj_n6(a_n6), .seu_orig(a_seu_orig), .seu_gen(a_seu_gen));

  tsc_block #(.CIRCUIT(CIRC_TABLE1), .N_CHECKED(2), .FLOW(FLOW_XOR)) dut_b (
    .pi(b_pi), .pi_chk(b_pi_chk), .po(b_po), .po_chk(b_po_chk),
    .ok(b_ok), .fail(b_fail), .syndrome(b_syn), .err_loc(b_loc),
    .inj_n1(b_n1), .inj_n5(b_n5), .inj_n4(b_n4), .inj_n2(b_n2),
    .inj_n3(b_n3), .inj_n6(b_n6), .seu_orig(b_seu_orig), .seu_gen(b_seu_gen));

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic clear();
    {a_n1, a_n5, a_n4, a_n2, a_n3, a_n6, a_seu_orig, a_seu_gen} = '0;
    {b_n1, b_n5, b_n4, b_n2, b_n3, b_n6, b_seu_orig, b_seu_gen} = '0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int net;
      logic [4:0] x5, x4, x3, x6, x2;
      logic [3:0] x1;
      logic [2:0] y5, y4, y3, y6;
      logic [1:0] y2, y1;
      logic [1:0] e_po, e_chk, f_po, f_chk;
      bit e_flag, f_flag;
      clear();
      a_pi = 5'($urandom);
      a_pi_chk = ref_hamming({3'b0, a_pi}, 5, 0);
      b_pi = 3'($urandom);
      b_pi_chk = ref_hamming({6'b0, b_pi[2:1]}, 2, 0)[1:0];
      net = (n < 16) ? 0 : $urandom_range(1, 7);  // 7 = LUT upsets
      case (net)
        1: begin a_n1 = 4'(1 << $urandom_range(0, 3)); b_n1 = 2'(1 << $urandom_range(0, 1)); end
        2: begin a_n2 = 5'(1 << $urandom_range(0, 4)); b_n2 = 2'(1 << $urandom_range(0, 1)); end
        3: begin a_n3 = 5'(1 << $urandom_range(0, 4)); b_n3 = 3'(1 << $urandom_range(0, 2)); end
        4: begin a_n4 = 5'(1 << $urandom_range(0, 4)); b_n4 = 3'(1 << $urandom_range(1, 2)); end
        5: begin a_n5 = 5'(1 << $urandom_range(0, 4)); b_n5 = 3'(1 << $urandom_range(1, 2)); end
        6: begin a_n6 = 5'(1 << $urandom_range(0, 4)); b_n6 = 3'(1 << $urandom_range(0, 2)); end
        7: begin
          a_seu_orig = 64'(1) << $urandom_range(0, 63);
          a_seu_gen  = 64'(1) << $urandom_range(0, 63);
          b_seu_orig = 16'(1) << $urandom_range(0, 15);
          b_seu_gen  = 16'(1) << $urandom_range(0, 15);
          if ($urandom_range(0, 1) == 1) begin a_seu_orig = '0; b_seu_orig = '0; end
          else begin a_seu_gen = '0; b_seu_gen = '0; end
        end
        default: ;
      endcase
      #1;
      // reference, c17 block
      x5 = a_pi ^ a_n5; x4 = x5 ^ a_n4; x6 = x5 ^ a_n6; x3 = x4 ^ a_n3;
      x2 = x4 ^ a_n2; x1 = a_pi_chk ^ a_n1;
      e_flag = ref_hamming({3'b0, x2}, 5, 0) != x1;
      e_po   = ref_c17(x6) ^ a_seu_orig[x6*2 +: 2];
      e_chk  = ref_hamming({6'b0, ref_c17(x3)}, 2, 0)[1:0] ^ a_seu_gen[x3*2 +: 2];
      chk(a_ok == !e_flag && a_fail == e_flag, $sformatf("c17 block ok/fail net %0d", net));
      chk(a_po == e_po && a_po_chk == e_chk, $sformatf("c17 block outputs net %0d", net));
      // reference, example block (XOR construction: seu_gen hits the duplicate)
      y5 = b_pi ^ b_n5; y4 = y5 ^ b_n4; y6 = y5 ^ b_n6; y3 = y4 ^ b_n3;
      y2 = y4[2:1] ^ b_n2; y1 = b_pi_chk ^ b_n1;
      f_flag = ref_hamming({6'b0, y2}, 2, 0)[1:0] != y1;
      f_po   = ref_t1(y6) ^ b_seu_orig[y6*2 +: 2];
      f_chk  = ref_hamming({6'b0, ref_t1(y3) ^ b_seu_gen[y3*2 +: 2]}, 2, 0)[1:0];
      chk(b_ok == !f_flag && b_fail == f_flag, $sformatf("example block ok/fail net %0d", net));
      chk(b_po == f_po && b_po_chk == f_chk, $sformatf("example block outputs net %0d", net));
      // where the error is caught
      if (net inside {[1:7]}) begin
        bit next_a, next_b;
        next_a = ref_hamming({6'b0, a_po}, 2, 0)[1:0] != a_po_chk;
        next_b = ref_hamming({6'b0, b_po}, 2, 0)[1:0] != b_po_chk;
        hit[0][net]++; hit[1][net]++;
        if (net inside {1, 2, 4, 5}) begin
          chk(a_fail && b_fail, $sformatf("net %0d caught by own checker", net));
          caught[0][net] += a_fail; caught[1][net] += b_fail;
        end else begin
          if (net inside {3, 6})
            chk(!a_fail && !b_fail, $sformatf("net %0d not seen by own checker", net));
          caught[0][net] += next_a; caught[1][net] += next_b;
          // masked exactly when the circuit output is unchanged
          if (net == 6) chk(next_a == (ref_c17(x6) != ref_c17(x5)), "c17 net 6 masking");
          if (net == 3) chk(next_a == (ref_c17(x3) != ref_c17(x5)), "c17 net 3 masking");
        end
      end else begin
        chk(a_ok && !a_fail && b_ok && !b_fail, "fault-free");
      end
    end
    for (int blk = 0; blk < 2; blk++)
      for (int net = 1; net <= 7; net++) begin
        $display("block %0d net %0d: injected %0d, caught %0d", blk, net,
                 hit[blk][net], caught[blk][net]);
        chk(hit[blk][net] > 0 && caught[blk][net] > 0,
            $sformatf("block %0d net %0d exercised", blk, net));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
