// tsc_chain: two TSC blocks in a chain, as the design proposes for circuits
// too large for one self-checking block, plus a terminal checker.
//
//   block N-1 (c17, 5 inputs -> 2 outputs) receives the system inputs pi and
//     their check bits pi_chk from upstream and checks them;
//   block N (3-input example circuit {c,b,a} -> {f,e}) takes c = N23 and
//     b = N22 from block N-1 and a = side_a from the system; its checker checks
//     {c,b} against block N-1's check bits;
//   the terminal checker (checker N+1) checks block N's outputs against
//     block N's check bits, which are also brought out (po, po_chk) for a
//     further block.
// side_a carries no check bits, so a fault on its wire before it branches
// inside block N goes undetected; every other single fault on the numbered
// nets or in the LUTs is caught.
// ok[i]/fail[i], syndrome_* and err_loc_* are the checker outputs
// (0 = block N-1, 1 = block N, 2 = terminal); a healthy checker has
// ok != fail. error is raised when any checker does not report ok = 1,
// fail = 0.
// The a_inj_* / b_inj_* / a_seu_* / b_seu_* ports inject errors into the six
// numbered nets and the LUT memories of each block (see tsc_block); tie them
// to zero in normal use.
//
// Timing: purely combinational; each checker flags an error in the same
// evaluation in which it appears.
// The chaining scheme follows the design description. Which two circuits are
// chained, the side input a (block N needs 3 inputs where block N-1 gives 2),
// and the terminal checker are this implementation's choices.
module tsc_chain
  import tsc_pkg::*;
#(
  parameter code_e        CODE  = CODE_HAMMING,
  parameter flow_e        FLOW  = FLOW_PLA,
  parameter bit           ODD   = 1'b0,
  localparam int unsigned KA_IN = num_check_bits(5, CODE),
  localparam int unsigned KO    = num_check_bits(2, CODE),
  localparam int unsigned GW    = (FLOW == FLOW_PLA) ? KO : 2
) (
  input  logic [4:0]        pi,
  input  logic [KA_IN-1:0]  pi_chk,
  input  logic              side_a,
  output logic [1:0]        po,
  output logic [KO-1:0]     po_chk,
  output logic [2:0]        ok,
  output logic [2:0]        fail,
  output logic              error,
  output logic [KA_IN-1:0]  syndrome_a,
  output logic [KO-1:0]     syndrome_b,
  output logic [KO-1:0]     syndrome_t,
  output logic [2:0]        err_loc_a,
  output logic [1:0]        err_loc_b,
  output logic [1:0]        err_loc_t,
  // block N-1 fault injection
  input  logic [KA_IN-1:0]  a_inj_n1,
  input  logic [4:0]        a_inj_n5,
  input  logic [4:0]        a_inj_n4,
  input  logic [4:0]        a_inj_n2,
  input  logic [4:0]        a_inj_n3,
  input  logic [4:0]        a_inj_n6,
  input  logic [63:0]       a_seu_orig,
  input  logic [32*GW-1:0]  a_seu_gen,
  // block N fault injection
  input  logic [KO-1:0]     b_inj_n1,
  input  logic [2:0]        b_inj_n5,
  input  logic [2:0]        b_inj_n4,
  input  logic [1:0]        b_inj_n2,
  input  logic [2:0]        b_inj_n3,
  input  logic [2:0]        b_inj_n6,
  input  logic [15:0]       b_seu_orig,
  input  logic [8*GW-1:0]   b_seu_gen
);

  logic [1:0]    a_po;
  logic [KO-1:0] a_po_chk;

  tsc_block #(
    .CIRCUIT  (CIRC_C17),
    .N_CHECKED(5),
    .CODE     (CODE),
    .FLOW     (FLOW),
    .ODD      (ODD)
  ) u_blk_a (
    .pi      (pi),
    .pi_chk  (pi_chk),
    .po      (a_po),
    .po_chk  (a_po_chk),
    .ok      (ok[0]),
    .fail    (fail[0]),
    .syndrome(syndrome_a),
    .err_loc (err_loc_a),
    .inj_n1  (a_inj_n1),
    .inj_n5  (a_inj_n5),
    .inj_n4  (a_inj_n4),
    .inj_n2  (a_inj_n2),
    .inj_n3  (a_inj_n3),
    .inj_n6  (a_inj_n6),
    .seu_orig(a_seu_orig),
    .seu_gen (a_seu_gen)
  );

  tsc_block #(
    .CIRCUIT  (CIRC_TABLE1),
    .N_CHECKED(2),
    .CODE     (CODE),
    .FLOW     (FLOW),
    .ODD      (ODD)
  ) u_blk_b (
    .pi      ({a_po[1], a_po[0], side_a}),
    .pi_chk  (a_po_chk),
    .po      (po),
    .po_chk  (po_chk),
    .ok      (ok[1]),
    .fail    (fail[1]),
    .syndrome(syndrome_b),
    .err_loc (err_loc_b),
    .inj_n1  (b_inj_n1),
    .inj_n5  (b_inj_n5),
    .inj_n4  (b_inj_n4),
    .inj_n2  (b_inj_n2),
    .inj_n3  (b_inj_n3),
    .inj_n6  (b_inj_n6),
    .seu_orig(b_seu_orig),
    .seu_gen (b_seu_gen)
  );

  tsc_checker #(
    .M   (2),
    .CODE(CODE),
    .ODD (ODD)
  ) u_checker_next (
    .data    (po),
    .chk     (po_chk),
    .ok      (ok[2]),
    .fail    (fail[2]),
    .syndrome(syndrome_t),
    .err_loc (err_loc_t)
  );

  assign error = ~(&(ok & ~fail));

endmodule
