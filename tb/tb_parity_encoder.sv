// tb_parity_encoder: self-checking testbench for parity_encoder.
// 8-bit and 5-bit Hamming-like encoders are compared with the printed 8x4
// right-hand matrix (rows 1111, 0111, 1011, 0011, 1101, 0101, 1001, 0001 for
// x_1..x_4), the single-parity encoder with a plain XOR, and odd parity with
// its inverse. For the output counts of the benchmark set (8, 12, 31, 47, 2)
// the number of check bits must equal the published parity-net counts
// (4, 5, 6, 7, 2), the last check bit must be the overall parity, and every
// single-bit data error must give a distinct syndrome.
module tb_parity_encoder;
  import tsc_pkg::*;

  int checks = 0, failures = 0;

  localparam string ROWS [8] = '{"1111", "0111", "1011", "0011",
                                 "1101", "0101", "1001", "0001"};

  function automatic logic [3:0] ref_fig5(logic [7:0] d, int m);
    logic [3:0] x = '0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < 4; j++)
        if (ROWS[i][j] == "1") x[j] ^= d[i];
    return x;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [7:0]  d8;
  logic [4:0]  d5;
  logic [3:0]  x8, x5;
  logic        p8;
  logic [1:0]  d2;
  logic        p2_odd;
  logic [11:0] d12;
  logic [30:0] d31;
  logic [46:0] d47;
  logic [4:0]  x12;
  logic [5:0]  x31;
  logic [6:0]  x47;
  logic [1:0]  x2h;

  parity_encoder #(.M(8),  .CODE(CODE_HAMMING))                 u8  (.data(d8),  .chk(x8));
  parity_encoder #(.M(5),  .CODE(CODE_HAMMING))                 u5  (.data(d5),  .chk(x5));
  parity_encoder #(.M(8),  .CODE(CODE_SINGLE_PARITY))           u8p (.data(d8),  .chk(p8));
  parity_encoder #(.M(2),  .CODE(CODE_SINGLE_PARITY), .ODD(1))  u2o (.data(d2),  .chk(p2_odd));
  parity_encoder #(.M(2),  .CODE(CODE_HAMMING))                 u2h (.data(d2),  .chk(x2h));
  parity_encoder #(.M(12), .CODE(CODE_HAMMING))                 u12 (.data(d12), .chk(x12));
  parity_encoder #(.M(31), .CODE(CODE_HAMMING))                 u31 (.data(d31), .chk(x31));
  parity_encoder #(.M(47), .CODE(CODE_HAMMING))                 u47 (.data(d47), .chk(x47));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // check-bit counts against the parity-net column of the results
    chk($bits(x8) == 4 && $bits(x12) == 5 && $bits(x31) == 6 &&
        $bits(x47) == 7 && $bits(x2h) == 2 && $bits(p8) == 1, "check-bit counts");

    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v); d5 = 5'(v); d2 = 2'(v); #1;
      chk(x8 == ref_fig5(d8, 8), $sformatf("m=8 data=%h x=%b", d8, x8));
      chk(x5 == ref_fig5({3'b0, d5}, 5), $sformatf("m=5 data=%h x=%b", d5, x5));
      chk(p8 == ^d8, "single even parity");
      chk(p2_odd == ~^d2, "single odd parity");
      chk(x2h == {^d2, d2[0]}, "m=2 hamming");
    end

    // random words: last check bit is the overall parity
    for (int n = 0; n < 200; n++) begin
      d12 = 12'($urandom);
      d31 = 31'($urandom);
      d47 = {15'($urandom), $urandom};
      #1;
      chk(x12[4] == ^d12 && x31[5] == ^d31 && x47[6] == ^d47, "overall parity");
    end

    // distinct single-error syndromes (the code is linear: syndrome = chk(e_i))
    begin
      logic [6:0] seen [int];
      d47 = '0; #1;
      for (int i = 0; i < 47; i++) begin
        d47 = 47'(1) << i; #1;
        chk(x47[6] == 1'b1 && !seen.exists(int'(x47)), $sformatf("m=47 row %0d", i + 1));
        seen[int'(x47)] = x47;
      end
    end
    begin
      logic [5:0] seen [int];
      for (int i = 0; i < 31; i++) begin
        d31 = 31'(1) << i; #1;
        chk(x31[5] == 1'b1 && !seen.exists(int'(x31)), $sformatf("m=31 row %0d", i + 1));
        seen[int'(x31)] = x31;
      end
    end
    begin
      logic [4:0] seen [int];
      for (int i = 0; i < 12; i++) begin
        d12 = 12'(1) << i; #1;
        chk(x12[4] == 1'b1 && !seen.exists(int'(x12)), $sformatf("m=12 row %0d", i + 1));
        seen[int'(x12)] = x12;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
