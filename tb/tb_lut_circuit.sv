// tb_lut_circuit: self-checking testbench for lut_circuit.
// A 4-input, 2-output LUT with a known table is read at every address; then
// each stored bit is flipped in turn through seu and the test checks that the
// output changes at the flipped cell's address only (an upset in an unselected
// cell stays hidden).
module tb_lut_circuit;
  localparam int unsigned N_IN  = 4;
  localparam int unsigned N_OUT = 2;
  localparam logic [31:0] TBL = 32'hC35A_96E1;

  logic [N_IN-1:0]   in;
  logic [31:0]       seu;
  logic [N_OUT-1:0]  out;
  int checks = 0, failures = 0;

  lut_circuit #(.N_IN(N_IN), .N_OUT(N_OUT), .TABLE(TBL)) dut (
    .in(in), .seu(seu), .out(out));

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL %s: in=%0d out=%b exp=%b", what, in, out, exp);
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
    seu = '0;
    for (int a = 0; a < 16; a++) begin
      in = 4'(a); #1;
      check({TBL[2*a+1], TBL[2*a]}, "read");
    end
    for (int b = 0; b < 32; b++) begin
      seu = 32'b1 << b;
      for (int a = 0; a < 16; a++) begin
        logic [1:0] exp;
        exp = {TBL[2*a+1], TBL[2*a]};
        if (a == b / 2) exp[b % 2] = ~exp[b % 2];
        in = 4'(a); #1;
        check(exp, "seu");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
