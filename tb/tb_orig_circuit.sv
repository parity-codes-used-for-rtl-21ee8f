// tb_orig_circuit: self-checking testbench for orig_circuit.
// Both circuits are driven exhaustively and compared with independent models:
// the c17 benchmark as its six NAND gates, and the three-input example as its
// printed truth table. A configuration upset in one LUT cell is then checked
// to show at that input value only.
module tb_orig_circuit;
  import tsc_pkg::*;

  logic [4:0]  c17_in;
  logic [1:0]  c17_out;
  logic [63:0] c17_seu;
  logic [2:0]  t1_in;
  logic [1:0]  t1_out;
  logic [15:0] t1_seu;
  int checks = 0, failures = 0;

  orig_circuit #(.CIRCUIT(CIRC_C17)) dut_c17 (
    .in(c17_in), .seu(c17_seu), .out(c17_out));
  orig_circuit #(.CIRCUIT(CIRC_TABLE1)) dut_t1 (
    .in(t1_in), .seu(t1_seu), .out(t1_out));

  // c17: inputs N1,N2,N3,N6,N7 = in[0..4], outputs {N23,N22}
  function automatic logic [1:0] ref_c17(logic [4:0] i);
    logic g10, g11, g16, g19;
    g10 = !(i[0] && i[2]);
    g11 = !(i[2] && i[3]);
    g16 = !(i[1] && g11);
    g19 = !(g11 && i[4]);
    return {!(g16 && g19), !(g10 && g16)};
  endfunction

  // rows c b a = 000..111: {f,e}
  localparam logic [1:0] T1 [8] = '{2'b01, 2'b10, 2'b10, 2'b10,
                                    2'b01, 2'b01, 2'b11, 2'b00};

  task automatic check(input logic [1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
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
    c17_seu = '0;
    t1_seu  = '0;
    for (int a = 0; a < 32; a++) begin
      c17_in = 5'(a); #1;
      check(c17_out, ref_c17(5'(a)), $sformatf("c17 in=%0d", a));
    end
    for (int a = 0; a < 8; a++) begin
      t1_in = 3'(a); #1;
      check(t1_out, T1[a], $sformatf("table1 in=%0d", a));
    end
    // upset of cell 0 bit 0 (output e at c=b=a=0)
    t1_seu = 16'h0001;
    for (int a = 0; a < 8; a++) begin
      t1_in = 3'(a); #1;
      check(t1_out, (a == 0) ? (T1[a] ^ 2'b01) : T1[a], $sformatf("table1 seu in=%0d", a));
    end
    // upset of c17 cell 21, output N23
    c17_seu = 64'b1 << (21 * 2 + 1);
    for (int a = 0; a < 32; a++) begin
      c17_in = 5'(a); #1;
      check(c17_out, (a == 21) ? (ref_c17(5'(a)) ^ 2'b10) : ref_c17(5'(a)),
            $sformatf("c17 seu in=%0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
