// tb_tsc_checker: self-checking testbench for tsc_checker.
// Checkers for 8-bit and 5-bit words with the Hamming-like code, 8-bit words
// with single even parity and 2-bit words with odd Hamming-like check bits
// receive random code words (check bits from the reference encoder), then the
// same words with one or two data bits or one check bit flipped. Expected:
// ok=1/fail=0 on code words; ok=0/fail=1 on any single or double error for the
// Hamming-like code; err_loc naming a single wrong data bit; single parity
// catching odd errors and missing double errors.
module tb_tsc_checker;
  import tsc_pkg::*;
  import tb_ref_pkg::*;

  logic [7:0] d8, dp;
  logic [4:0] d5;
  logic [1:0] d2;
  logic [3:0] c8, c5;
  logic       cp;
  logic [1:0] c2;
  logic ok8, fail8, ok5, fail5, okp, failp, ok2, fail2;
  logic [3:0] syn8, syn5;
  logic       synp;
  logic [1:0] syn2;
  logic [3:0] loc8;
  logic [2:0] loc5;
  logic [3:0] locp;
  logic [1:0] loc2;
  int checks = 0, failures = 0;

  tsc_checker #(.M(8), .CODE(CODE_HAMMING)) u8 (
    .data(d8), .chk(c8), .ok(ok8), .fail(fail8), .syndrome(syn8), .err_loc(loc8));
  tsc_checker #(.M(5), .CODE(CODE_HAMMING)) u5 (
    .data(d5), .chk(c5), .ok(ok5), .fail(fail5), .syndrome(syn5), .err_loc(loc5));
  tsc_checker #(.M(8), .CODE(CODE_SINGLE_PARITY)) up (
    .data(dp), .chk(cp), .ok(okp), .fail(failp), .syndrome(synp), .err_loc(locp));
  tsc_checker #(.M(2), .CODE(CODE_HAMMING), .ODD(1'b1)) u2 (
    .data(d2), .chk(c2), .ok(ok2), .fail(fail2), .syndrome(syn2), .err_loc(loc2));

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
    for (int n = 0; n < 300; n++) begin
      int i, j;
      logic [7:0] w;
      w = 8'($urandom);
      i = $urandom_range(0, 7);
      j = (i + 1 + $urandom_range(0, 6)) % 8;
      // code words
      d8 = w; c8 = ref_hamming(w, 8, 0);
      d5 = w[4:0]; c5 = ref_hamming({3'b0, w[4:0]}, 5, 0);
      dp = w; cp = ref_parity(w, 8, 0);
      d2 = w[1:0]; c2 = ref_hamming({6'b0, w[1:0]}, 2, 1)[1:0];
      #1;
      chk(ok8 && !fail8 && syn8 == 0 && loc8 == 0, "m=8 code word");
      chk(ok5 && !fail5 && syn5 == 0 && loc5 == 0, "m=5 code word");
      chk(okp && !failp && synp == 0, "parity code word");
      chk(ok2 && !fail2 && syn2 == 0, "m=2 odd code word");
      // one data bit wrong
      d8 = w ^ (8'b1 << i);
      d5 = w[4:0] ^ 5'(1 << (i % 5));
      dp = w ^ (8'b1 << i);
      d2 = w[1:0] ^ 2'(1 << (i % 2));
      #1;
      chk(!ok8 && fail8 && loc8 == 4'(i + 1), $sformatf("m=8 single error bit %0d loc=%0d", i, loc8));
      chk(!ok5 && fail5 && loc5 == 3'(i % 5 + 1), $sformatf("m=5 single error loc=%0d", loc5));
      chk(!okp && failp, "parity single error");
      chk(!ok2 && fail2 && loc2 == 2'(i % 2 + 1), "m=2 single error");
      // two data bits wrong
      d8 = w ^ (8'b1 << i) ^ (8'b1 << j);
      dp = w ^ (8'b1 << i) ^ (8'b1 << j);
      d2 = ~w[1:0];
      #1;
      chk(!ok8 && fail8, "m=8 double error");
      chk(okp && !failp, "parity misses double error");
      chk(!ok2 && fail2, "m=2 double error");
      // one check bit wrong
      d8 = w; c8 = ref_hamming(w, 8, 0) ^ (4'b1 << (i % 4));
      dp = w; cp = ~ref_parity(w, 8, 0);
      #1;
      chk(!ok8 && fail8, "m=8 check bit error");
      chk(!okp && failp, "parity check bit error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
