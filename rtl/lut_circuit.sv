// lut_circuit: an FPGA look-up table with N_IN address inputs and N_OUT output
// bits per cell, holding a fixed truth table.
//
// The inputs select one cell of the table and its content is driven on the
// output, exactly as an SRAM-based FPGA LUT does. The table is the parameter
// TABLE, cell r (input value r) in bits [r*N_OUT +: N_OUT]. The seu input
// models an upset of the configuration memory: each set bit flips the
// corresponding stored table bit. A flipped cell changes the output only while
// its address is applied, so an upset stays hidden until the inputs select it.
// Tie seu to zero in a fault-free build.
//
// Timing: purely combinational, no clock.
// The LUT behaviour and the upset model follow the fault model of the design;
// the parameter names, the table layout and the seu port are this
// implementation's choices.
module lut_circuit #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 1,
  // Default: the 16-cell, 1-output LUT of the fault-model example with the
  // cell contents all zero.
  parameter logic [(2**N_IN)*N_OUT-1:0] TABLE = '0
) (
  input  logic [N_IN-1:0]             in,
  input  logic [(2**N_IN)*N_OUT-1:0]  seu,
  output logic [N_OUT-1:0]            out
);

  logic [(2**N_IN)*N_OUT-1:0] cells;

  assign cells = TABLE ^ seu;
  assign out   = cells[in*N_OUT +: N_OUT];

endmodule
