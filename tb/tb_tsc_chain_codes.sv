// tb_tsc_chain_codes: the TSC chain in its other two configurations.
//   X: Hamming-like code, check bits from duplicate circuits and XOR trees;
//   P: single even parity (one check bit per word), check bits as tables.
// Both are driven through all 64 input combinations fault-free (function,
// check bits, no alarm). Then, on random inputs, one or two bits of block
// N-1's input stem (net 5) are flipped: a single flip must be caught by both
// configurations; a double flip must be caught by the Hamming-like code and
// slips past single parity. Errors on the generator-only branch (net 3) of
// block N-1 are checked to be caught one checker later in configuration X.
module tb_tsc_chain_codes;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  logic [4:0]  pi;
  logic        side_a;
  logic [3:0]  x_pi_chk;
  logic        p_pi_chk;
  logic [4:0]  a_n5, a_n3;

  // configuration X outputs
  logic [1:0]  x_po, x_po_chk;
  logic [2:0]  x_ok, x_fail;
  logic        x_error;
  logic [3:0]  x_syn_a;
  logic [1:0]  x_syn_b, x_syn_t;
  logic [2:0]  x_loc_a;
  logic [1:0]  x_loc_b, x_loc_t;
  // configuration P outputs
  logic [1:0]  p_po;
  logic        p_po_chk;
  logic [2:0]  p_ok, p_fail;
  logic        p_error;
  logic        p_syn_a, p_syn_b, p_syn_t;
  logic [2:0]  p_loc_a;
  logic [1:0]  p_loc_b, p_loc_t;

  tsc_chain #(.CODE(CODE_HAMMING), .FLOW(FLOW_XOR)) dut_x (
    .pi(pi), .pi_chk(x_pi_chk), .side_a(side_a), .po(x_po), .po_chk(x_po_chk),
    .ok(x_ok), .fail(x_fail), .error(x_error),
    .syndrome_a(x_syn_a), .syndrome_b(x_syn_b), .syndrome_t(x_syn_t),
    .err_loc_a(x_loc_a), .err_loc_b(x_loc_b), .err_loc_t(x_loc_t),
    .a_inj_n1('0), .a_inj_n5(a_n5), .a_inj_n4('0), .a_inj_n2('0),
    .a_inj_n3(a_n3), .a_inj_n6('0), .a_seu_orig('0), .a_seu_gen('0),
    .b_inj_n1('0), .b_inj_n5('0), .b_inj_n4('0), .b_inj_n2('0),
    .b_inj_n3('0), .b_inj_n6('0), .b_seu_orig('0), .b_seu_gen('0));

  tsc_chain #(.CODE(CODE_SINGLE_PARITY), .FLOW(FLOW_PLA)) dut_p (
    .pi(pi), .pi_chk(p_pi_chk), .side_a(side_a), .po(p_po), .po_chk(p_po_chk),
    .ok(p_ok), .fail(p_fail), .error(p_error),
    .syndrome_a(p_syn_a), .syndrome_b(p_syn_b), .syndrome_t(p_syn_t),
    .err_loc_a(p_loc_a), .err_loc_b(p_loc_b), .err_loc_t(p_loc_t),
    .a_inj_n1('0), .a_inj_n5(a_n5), .a_inj_n4('0), .a_inj_n2('0),
    .a_inj_n3(a_n3), .a_inj_n6('0), .a_seu_orig('0), .a_seu_gen('0),
    .b_inj_n1('0), .b_inj_n5('0), .b_inj_n4('0), .b_inj_n2('0),
    .b_inj_n3('0), .b_inj_n6('0), .b_seu_orig('0), .b_seu_gen('0));

  int checks = 0, failures = 0;
  int n_double_missed = 0, n_next = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_n5 = '0; a_n3 = '0;
    for (int v = 0; v < 64; v++) begin
      logic [1:0] e;
      pi = 5'(v); side_a = v[5];
      x_pi_chk = ref_hamming({3'b0, pi}, 5, 0);
      p_pi_chk = ref_parity({3'b0, pi}, 5, 0);
      #1;
      e = ref_t1({ref_c17(pi), side_a});
      chk(x_po == e && x_po_chk == ref_hamming({6'b0, e}, 2, 0)[1:0], "X function");
      chk(p_po == e && p_po_chk == ref_parity({6'b0, e}, 2, 0), "P function");
      chk(x_ok == 3'b111 && x_fail == 0 && !x_error, "X no alarm");
      chk(p_ok == 3'b111 && p_fail == 0 && !p_error, "P no alarm");
    end
    for (int n = 0; n < 400; n++) begin
      int i, j;
      pi = 5'($urandom); side_a = 1'($urandom);
      x_pi_chk = ref_hamming({3'b0, pi}, 5, 0);
      p_pi_chk = ref_parity({3'b0, pi}, 5, 0);
      i = $urandom_range(0, 4);
      j = (i + 1 + $urandom_range(0, 3)) % 5;
      a_n5 = 5'(1 << i); a_n3 = '0;
      #1;
      chk(x_fail[0] && p_fail[0], "single stem error caught by both codes");
      a_n5 = 5'((1 << i) | (1 << j));
      #1;
      chk(x_fail[0], "double stem error caught by the Hamming-like code");
      chk(!p_fail[0], "double stem error missed by single parity");
      n_double_missed += !p_fail[0];
      a_n5 = '0; a_n3 = 5'(1 << i);
      #1;
      chk(!x_fail[0], "generator-branch error not seen by own checker");
      chk(x_fail[1] == (ref_c17(pi) != ref_c17(pi ^ a_n3)), "generator-branch error caught next");
      n_next += x_fail[1];
    end
    chk(n_double_missed > 0 && n_next > 0, "mechanisms exercised");
    $display("double errors missed by single parity: %0d, caught next: %0d",
             n_double_missed, n_next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
