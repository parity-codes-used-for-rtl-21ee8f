// tb_tsc_chain: end-to-end testbench of the two-block TSC chain at its
// default configuration (Hamming-like code, check bits as their own table,
// even parity).
// Phase 1 applies all 64 combinations of the five system inputs and the side
// input with correct input check bits: the outputs must equal c17 followed by
// the example circuit, the output check bits must match, and no checker may
// complain. Phase 2 injects random single-bit errors on the numbered nets and
// LUT memories of both blocks and compares every output, check bit and checker
// flag with a reference model of the whole chain. It counts each mechanism:
// an error caught by the block's own checker (nets 1, 2, 4, 5), an error caught
// one checker later (nets 3, 6), an error masked by the logic, a LUT upset
// that stays hidden because its sel_cell is not selected, a LUT upset caught once
// selected, and a single wrong data bit located by err_loc. A mechanism that
// never happens counts as a failure.
module tb_tsc_chain;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  logic [4:0]  pi;
  logic [3:0]  pi_chk;
  logic        side_a;
  logic [1:0]  po, po_chk;
  logic [2:0]  ok, fail;
  logic        error;
  logic [3:0]  syndrome_a;
  logic [1:0]  syndrome_b, syndrome_t;
  logic [2:0]  err_loc_a;
  logic [1:0]  err_loc_b, err_loc_t;
  logic [3:0]  a_inj_n1;
  logic [4:0]  a_inj_n5, a_inj_n4, a_inj_n2, a_inj_n3, a_inj_n6;
  logic [63:0] a_seu_orig, a_seu_gen;
  logic [1:0]  b_inj_n1, b_inj_n2;
  logic [2:0]  b_inj_n5, b_inj_n4, b_inj_n3, b_inj_n6;
  logic [15:0] b_seu_orig, b_seu_gen;

  tsc_chain dut (.*);

  int checks = 0, failures = 0;
  typedef enum int {
    M_OWN, M_NEXT, M_MASKED, M_SEU_HIDDEN, M_SEU_CAUGHT, M_LOCATED, M_NUM
  } mech_e;
  int mech [M_NUM];
  localparam string MECH_NAME [M_NUM] = '{"caught by own checker",
    "caught by next checker", "masked by the logic", "LUT upset hidden",
    "LUT upset caught", "wrong bit located"};

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic clear();
    {a_inj_n1, a_inj_n5, a_inj_n4, a_inj_n2, a_inj_n3, a_inj_n6, a_seu_orig, a_seu_gen} = '0;
    {b_inj_n1, b_inj_n5, b_inj_n4, b_inj_n2, b_inj_n3, b_inj_n6, b_seu_orig, b_seu_gen} = '0;
  endtask

  function automatic logic [1:0] enc2(logic [1:0] d);
    return ref_hamming({6'b0, d}, 2, 0)[1:0];
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    // phase 1: fault-free, exhaustive
    for (int v = 0; v < 64; v++) begin
      logic [1:0] mid;
      pi = 5'(v); side_a = v[5];
      pi_chk = ref_hamming({3'b0, pi}, 5, 0);
      #1;
      mid = ref_c17(pi);
      chk(po == ref_t1({mid, side_a}), $sformatf("function v=%0d", v));
      chk(po_chk == enc2(po), $sformatf("check bits v=%0d", v));
      chk(ok == 3'b111 && fail == 3'b000 && !error, $sformatf("no alarm v=%0d", v));
    end

    // phase 2: single injected errors
    for (int n = 0; n < 3000; n++) begin
      int blk, net;
      bit is_seu, seu_sel;
      logic [4:0] x5, x4, x3, x6, x2;
      logic [3:0] x1;
      logic [2:0] y5, y4, y3, y6;
      logic [1:0] y2, y1;
      logic [1:0] a_po, a_chk, e_po, e_chk;
      logic [2:0] e_fail;
      int sel_cell;
      clear();
      pi = 5'($urandom); side_a = 1'($urandom);
      pi_chk = ref_hamming({3'b0, pi}, 5, 0);
      blk = $urandom_range(0, 1);
      net = $urandom_range(1, 7);
      is_seu = (net == 7);
      seu_sel = 0;
      sel_cell = 0;
      if (blk == 0) begin
        case (net)
          1: a_inj_n1 = 4'(1 << $urandom_range(0, 3));
          2: a_inj_n2 = 5'(1 << $urandom_range(0, 4));
          3: a_inj_n3 = 5'(1 << $urandom_range(0, 4));
          4: a_inj_n4 = 5'(1 << $urandom_range(0, 4));
          5: a_inj_n5 = 5'(1 << $urandom_range(0, 4));
          6: a_inj_n6 = 5'(1 << $urandom_range(0, 4));
          default: begin
            sel_cell = $urandom_range(0, 31);
            seu_sel = (sel_cell == int'(pi));
            if ($urandom_range(0, 1) == 1) a_seu_orig = 64'(1) << (sel_cell * 2 + $urandom_range(0, 1));
            else                           a_seu_gen  = 64'(1) << (sel_cell * 2 + $urandom_range(0, 1));
          end
        endcase
      end else begin
        case (net)
          1: b_inj_n1 = 2'(1 << $urandom_range(0, 1));
          2: b_inj_n2 = 2'(1 << $urandom_range(0, 1));
          3: b_inj_n3 = 3'(1 << $urandom_range(0, 2));
          4: b_inj_n4 = 3'(1 << $urandom_range(1, 2));
          5: b_inj_n5 = 3'(1 << $urandom_range(1, 2));
          6: b_inj_n6 = 3'(1 << $urandom_range(0, 2));
          default: begin
            sel_cell = $urandom_range(0, 7);
            seu_sel = (sel_cell == int'({ref_c17(pi), side_a}));
            if ($urandom_range(0, 1) == 1) b_seu_orig = 16'(1) << (sel_cell * 2 + $urandom_range(0, 1));
            else                           b_seu_gen  = 16'(1) << (sel_cell * 2 + $urandom_range(0, 1));
          end
        endcase
      end
      #1;
      // reference: block N-1
      x5 = pi ^ a_inj_n5; x4 = x5 ^ a_inj_n4; x6 = x5 ^ a_inj_n6; x3 = x4 ^ a_inj_n3;
      x2 = x4 ^ a_inj_n2; x1 = pi_chk ^ a_inj_n1;
      e_fail[0] = ref_hamming({3'b0, x2}, 5, 0) != x1;
      a_po  = ref_c17(x6) ^ a_seu_orig[x6*2 +: 2];
      a_chk = enc2(ref_c17(x3)) ^ a_seu_gen[x3*2 +: 2];
      // reference: block N
      y5 = {a_po, side_a} ^ b_inj_n5; y4 = y5 ^ b_inj_n4; y6 = y5 ^ b_inj_n6; y3 = y4 ^ b_inj_n3;
      y2 = y4[2:1] ^ b_inj_n2; y1 = a_chk ^ b_inj_n1;
      e_fail[1] = enc2(y2) != y1;
      e_po  = ref_t1(y6) ^ b_seu_orig[y6*2 +: 2];
      e_chk = enc2(ref_t1(y3)) ^ b_seu_gen[y3*2 +: 2];
      // reference: terminal checker
      e_fail[2] = enc2(e_po) != e_chk;

      chk(po == e_po && po_chk == e_chk, $sformatf("outputs blk %0d net %0d", blk, net));
      chk(fail == e_fail && ok == ~e_fail, $sformatf("flags blk %0d net %0d: %b/%b", blk, net, ok, fail));
      chk(error == (e_fail != 0), "error summary");

      // the design's detection rule
      if (!is_seu) begin
        if (net inside {1, 2, 4, 5}) begin
          chk(fail[blk], $sformatf("blk %0d net %0d caught by own checker", blk, net));
          mech[M_OWN]++;
        end else begin
          chk(!fail[blk], $sformatf("blk %0d net %0d not seen by own checker", blk, net));
          if (fail[blk + 1]) mech[M_NEXT]++;
          else               mech[M_MASKED]++;
        end
        if (net == 5 && blk == 0)
          chk(!fail[1] && !fail[2], "stem error carried on consistently");
      end else begin
        if (!seu_sel) begin
          chk(!error, "unselected LUT sel_cell stays hidden");
          mech[M_SEU_HIDDEN]++;
        end else begin
          chk(fail[blk + 1], "selected LUT sel_cell caught by next checker");
          mech[M_SEU_CAUGHT]++;
        end
      end
      // a single wrong data bit at a checker is located
      if (blk == 0 && net == 2) begin
        chk(err_loc_a == 3'($clog2(int'(a_inj_n2)) + 1), "err_loc of block N-1");
        mech[M_LOCATED]++;
      end
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("%-24s %0d", MECH_NAME[m], mech[m]);
      chk(mech[m] > 0, $sformatf("mechanism '%s' exercised", MECH_NAME[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
