// tsc_block: one totally self-checking (TSC) circuit of a chain.
//
// Three parts share the primary inputs: the original combinational circuit,
// the check bits generator, which predicts the check bits of the original
// circuit's outputs, and a checker. The checker does not look at this block's
// own outputs: it checks the block's primary inputs (the previous block's
// primary outputs, the top N_CHECKED bits of pi) against the check bits that
// came with them (pi_chk). Error detection is thus moved from a block's
// outputs to the inputs of the block that follows, and a block's outputs are
// checked by the next block in the chain. The low N_IN - N_CHECKED bits of pi
// are side inputs that bypass the checker.
//
// Fault injection. The inj_n* inputs XOR an error onto the six numbered nets of
// the block (tie them to zero in normal use):
//   n1  incoming check bits at the checker
//   n5  the primary-input stem, before any branch
//   n4  the branch that feeds both checker and check bits generator
//   n2  the checker's data input only
//   n3  the check bits generator's input only
//   n6  the original circuit's input only
// Errors on n1, n2, n4 and n5 are flagged by this block's checker; errors on
// n3 and n6 produce an output word and check bits that disagree, flagged by
// the next checker. seu_orig and seu_gen flip stored LUT bits of the original
// circuit and of the check bits generator.
//
// Timing: purely combinational.
// The structure, the net numbering and where each error is caught follow the
// design description; the side inputs, injection ports and widths are this
// implementation's choices.
module tsc_block
  import tsc_pkg::*;
#(
  parameter circuit_e     CIRCUIT   = CIRC_C17,
  parameter int unsigned  N_CHECKED = circ_inputs(CIRCUIT),
  parameter code_e        CODE      = CODE_HAMMING,
  parameter flow_e        FLOW      = FLOW_PLA,
  parameter bit           ODD       = 1'b0,
  localparam int unsigned N_IN      = circ_inputs(CIRCUIT),
  localparam int unsigned N_OUT     = circ_outputs(CIRCUIT),
  localparam int unsigned K_IN      = num_check_bits(N_CHECKED, CODE),
  localparam int unsigned K_OUT     = num_check_bits(N_OUT, CODE),
  localparam int unsigned LW        = $clog2(N_CHECKED + 1),
  localparam int unsigned GEN_W     = (FLOW == FLOW_PLA) ? K_OUT : N_OUT
) (
  input  logic [N_IN-1:0]            pi,
  input  logic [K_IN-1:0]            pi_chk,
  output logic [N_OUT-1:0]           po,
  output logic [K_OUT-1:0]           po_chk,
  output logic                       ok,
  output logic                       fail,
  output logic [K_IN-1:0]            syndrome,
  output logic [LW-1:0]              err_loc,
  input  logic [K_IN-1:0]            inj_n1,
  input  logic [N_IN-1:0]            inj_n5,
  input  logic [N_IN-1:0]            inj_n4,
  input  logic [N_CHECKED-1:0]       inj_n2,
  input  logic [N_IN-1:0]            inj_n3,
  input  logic [N_IN-1:0]            inj_n6,
  input  logic [(2**N_IN)*N_OUT-1:0] seu_orig,
  input  logic [(2**N_IN)*GEN_W-1:0] seu_gen
);

  logic [N_IN-1:0]      net5, net4, net3, net6;
  logic [N_CHECKED-1:0] net2;
  logic [K_IN-1:0]      net1;

  assign net5 = pi ^ inj_n5;
  assign net4 = net5 ^ inj_n4;
  assign net6 = net5 ^ inj_n6;
  assign net3 = net4 ^ inj_n3;
  assign net2 = net4[N_IN-1 -: N_CHECKED] ^ inj_n2;
  assign net1 = pi_chk ^ inj_n1;

  tsc_checker #(
    .M   (N_CHECKED),
    .CODE(CODE),
    .ODD (ODD)
  ) u_checker (
    .data    (net2),
    .chk     (net1),
    .ok      (ok),
    .fail    (fail),
    .syndrome(syndrome),
    .err_loc (err_loc)
  );

  check_bits_generator #(
    .CIRCUIT(CIRCUIT),
    .CODE   (CODE),
    .FLOW   (FLOW),
    .ODD    (ODD)
  ) u_gen (
    .in (net3),
    .seu(seu_gen),
    .chk(po_chk)
  );

  orig_circuit #(
    .CIRCUIT(CIRCUIT)
  ) u_orig (
    .in (net6),
    .seu(seu_orig),
    .out(po)
  );

endmodule
