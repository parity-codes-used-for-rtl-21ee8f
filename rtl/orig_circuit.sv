// orig_circuit: the original (protected) combinational circuit of a TSC block,
// mapped onto a look-up table.
//
// The circuit is chosen by CIRCUIT (see tsc_pkg): the three-input worked
// example {c,b,a} -> {f,e}, or the c17 benchmark {N7,N6,N3,N2,N1} ->
// {N23,N22}. Its truth table is computed at elaboration from
// tsc_pkg::circ_eval and stored in one lut_circuit, the way an FPGA maps a
// small function into LUT memory. seu flips stored table bits (configuration
// upsets).
//
// Timing: purely combinational.
// The two functions follow the design description (the c17 netlist is the
// standard benchmark's); putting the whole function in a single LUT is this
// implementation's choice.
module orig_circuit
  import tsc_pkg::*;
#(
  parameter circuit_e    CIRCUIT = CIRC_C17,
  localparam int unsigned N_IN   = circ_inputs(CIRCUIT),
  localparam int unsigned N_OUT  = circ_outputs(CIRCUIT)
) (
  input  logic [N_IN-1:0]            in,
  input  logic [(2**N_IN)*N_OUT-1:0] seu,
  output logic [N_OUT-1:0]           out
);

  function automatic logic [(2**N_IN)*N_OUT-1:0] build_table();
    logic [(2**N_IN)*N_OUT-1:0] t;
    t = '0;
    for (int unsigned r = 0; r < 2**N_IN; r++)
      t[r*N_OUT +: N_OUT] = N_OUT'(circ_eval(CIRCUIT, MAX_IN'(r)));
    return t;
  endfunction

  localparam logic [(2**N_IN)*N_OUT-1:0] TABLE = build_table();

  lut_circuit #(
    .N_IN (N_IN),
    .N_OUT(N_OUT),
    .TABLE(TABLE)
  ) u_lut (
    .in (in),
    .seu(seu),
    .out(out)
  );

endmodule
