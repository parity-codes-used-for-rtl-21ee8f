// check_bits_generator: the parity (check bits) predictor of a TSC block.
//
// It computes, from the primary inputs alone, the check bits the original
// circuit's outputs should carry, and shares no logic with the original
// circuit, so one fault cannot corrupt a data word and its check bits alike.
// Two constructions are selectable:
//   FLOW_PLA  the check bits are minimised as functions of their own: their
//             truth table (tsc_pkg::encode applied to every output word) is
//             computed at elaboration and held in a separate LUT;
//   FLOW_XOR  a private copy of the original circuit drives a parity_encoder
//             (XOR trees), i.e. duplication plus an XOR tree.
// Both give the same function; they differ in structure and in which upsets
// (seu) can reach them. seu flips stored bits of this block's LUT: the check
// bit table for FLOW_PLA, the copied original table for FLOW_XOR.
//
// Interface: in[N_IN] primary inputs, chk[K] check bits of the predicted
// output word (chk[j-1] = x_j). Timing: purely combinational.
// Both constructions and both codes follow the design description; holding
// each construction in LUTs is this implementation's choice.
module check_bits_generator
  import tsc_pkg::*;
#(
  parameter circuit_e     CIRCUIT = CIRC_C17,
  parameter code_e        CODE    = CODE_HAMMING,
  parameter flow_e        FLOW    = FLOW_PLA,
  parameter bit           ODD     = 1'b0,
  localparam int unsigned N_IN    = circ_inputs(CIRCUIT),
  localparam int unsigned N_OUT   = circ_outputs(CIRCUIT),
  localparam int unsigned K       = num_check_bits(N_OUT, CODE),
  localparam int unsigned GEN_W   = (FLOW == FLOW_PLA) ? K : N_OUT
) (
  input  logic [N_IN-1:0]            in,
  input  logic [(2**N_IN)*GEN_W-1:0] seu,
  output logic [K-1:0]               chk
);

  // Check bits of every output word, cell r = input value r.
  function automatic logic [(2**N_IN)*K-1:0] build_parity_table();
    logic [(2**N_IN)*K-1:0] t;
    logic [MAX_M-1:0]       word;
    t = '0;
    for (int unsigned r = 0; r < 2**N_IN; r++) begin
      word = MAX_M'(circ_eval(CIRCUIT, MAX_IN'(r)));
      t[r*K +: K] = K'(encode(word, N_OUT, CODE, ODD));
    end
    return t;
  endfunction

  if (FLOW == FLOW_PLA) begin : g_pla
    localparam logic [(2**N_IN)*K-1:0] TABLE = build_parity_table();

    lut_circuit #(
      .N_IN (N_IN),
      .N_OUT(K),
      .TABLE(TABLE)
    ) u_parity_lut (
      .in (in),
      .seu(seu),
      .out(chk)
    );
  end else begin : g_xor
    logic [N_OUT-1:0] dup;

    orig_circuit #(
      .CIRCUIT(CIRCUIT)
    ) u_dup (
      .in (in),
      .seu(seu),
      .out(dup)
    );

    parity_encoder #(
      .M   (N_OUT),
      .CODE(CODE),
      .ODD (ODD)
    ) u_xor_tree (
      .data(dup),
      .chk (chk)
    );
  end

endmodule
