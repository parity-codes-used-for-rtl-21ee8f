// tb_tsc_fault_coverage: fault-coverage evaluation of the TSC chain in four
// configurations (Hamming-like code or single even parity; check bits as their
// own table or from a duplicate circuit and XOR trees), by exhaustive-test-set
// fault simulation (see tsc_coverage_bench). It prints the self-testing (ST)
// and fault-secure (FS) percentages.
// Checked: no alarm without a fault; with the Hamming-like code every fault is
// both detected and fault-secure (a single fault gives at most a single-bit
// error at a checker input, or some error on a two-bit output word, and the
// code detects both) except the two stuck-at faults on the stem of block N's
// side input, which carries no check bits; single parity misses some faults
// (a fault that changes both output bits of c17 keeps the parity).
module tb_tsc_fault_coverage;
  import tsc_pkg::*;

  int nf [4], st [4], fs [4], ffe [4], ns [4];
  bit dn [4];
  int checks = 0, failures = 0;
  localparam string NAME [4] = '{"Hamming-like, table", "Hamming-like, XOR",
                                 "single parity, table", "single parity, XOR"};

  tsc_coverage_bench #(.CODE(CODE_HAMMING),       .FLOW(FLOW_PLA)) c0 (nf[0], st[0], fs[0], ffe[0], ns[0], dn[0]);
  tsc_coverage_bench #(.CODE(CODE_HAMMING),       .FLOW(FLOW_XOR)) c1 (nf[1], st[1], fs[1], ffe[1], ns[1], dn[1]);
  tsc_coverage_bench #(.CODE(CODE_SINGLE_PARITY), .FLOW(FLOW_PLA)) c2 (nf[2], st[2], fs[2], ffe[2], ns[2], dn[2]);
  tsc_coverage_bench #(.CODE(CODE_SINGLE_PARITY), .FLOW(FLOW_XOR)) c3 (nf[3], st[3], fs[3], ffe[3], ns[3], dn[3]);

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (dn[0] && dn[1] && dn[2] && dn[3]);
    for (int c = 0; c < 4; c++) begin
      $display("%-22s faults %4d  ST %6.2f%%  FS %6.2f%%", NAME[c], nf[c],
               100.0 * st[c] / nf[c], 100.0 * fs[c] / nf[c]);
      chk(nf[c] > 0 && ffe[c] == 0, $sformatf("%s fault-free run", NAME[c]));
    end
    chk(ns[0] == 2 && st[0] == nf[0] - 2 && fs[0] == nf[0] - 2,
        "Hamming-like (table): ST and FS for all but the side-input stem");
    chk(ns[1] == 2 && st[1] == nf[1] - 2 && fs[1] == nf[1] - 2,
        "Hamming-like (XOR): ST and FS for all but the side-input stem");
    chk(fs[2] < nf[2] && fs[3] < nf[3], "single parity misses some faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
