// tsc_coverage_bench: fault-coverage measurement of one tsc_chain
// configuration, used by tb_tsc_fault_coverage.
//
// Fault universe: every stuck-at-0 and stuck-at-1 fault on every bit of the six
// numbered nets of both blocks (nets 1..6), and every single upset of a stored
// LUT bit in both blocks' original circuits and check bits generators. Each
// fault is simulated alone over the exhaustive test set (all 64 input
// combinations, with correct input check bits). A stuck-at fault is applied
// through the error-injection ports: at each input the injected bit is 1
// exactly when the fault-free net value differs from the stuck value.
// Per fault:
//   ST (self-testing):  some input makes a checker report an error;
//   FS (fault secure):  no input gives wrong outputs or check bits while every
//                       checker reports OK.
// The stem of block N's side input (net 5, bit 0 of block N) carries no check
// bits, so its two stuck-at faults are counted apart in n_side.
// Results: fault count, faults meeting ST, faults meeting FS, done.
module tsc_coverage_bench
  import tsc_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter code_e CODE = CODE_HAMMING,
  parameter flow_e FLOW = FLOW_PLA
) (
  output int  n_faults,
  output int  n_st,
  output int  n_fs,
  output int  fault_free_errors,
  output int  n_side,
  output bit  done
);
  localparam int unsigned KA = num_check_bits(5, CODE);
  localparam int unsigned KO = num_check_bits(2, CODE);
  localparam int unsigned GW = (FLOW == FLOW_PLA) ? KO : 2;

  logic [4:0]    pi;
  logic [KA-1:0] pi_chk;
  logic          side_a;
  logic [1:0]    po;
  logic [KO-1:0] po_chk;
  logic [2:0]    ok, fail;
  logic          error;
  logic [KA-1:0] syndrome_a;
  logic [KO-1:0] syndrome_b, syndrome_t;
  logic [2:0]    err_loc_a;
  logic [1:0]    err_loc_b, err_loc_t;
  logic [KA-1:0] a_inj_n1;
  logic [4:0]    a_inj_n5, a_inj_n4, a_inj_n2, a_inj_n3, a_inj_n6;
  logic [63:0]   a_seu_orig;
  logic [32*GW-1:0] a_seu_gen;
  logic [KO-1:0] b_inj_n1;
  logic [1:0]    b_inj_n2;
  logic [2:0]    b_inj_n5, b_inj_n4, b_inj_n3, b_inj_n6;
  logic [15:0]   b_seu_orig;
  logic [8*GW-1:0] b_seu_gen;

  tsc_chain #(.CODE(CODE), .FLOW(FLOW)) dut (.*);

  function automatic logic [3:0] enc5(logic [4:0] d);
    return (CODE == CODE_HAMMING) ? ref_hamming({3'b0, d}, 5, 0)
                                  : {3'b0, ref_parity({3'b0, d}, 5, 0)};
  endfunction

  function automatic logic [1:0] enc2(logic [1:0] d);
    return (CODE == CODE_HAMMING) ? ref_hamming({6'b0, d}, 2, 0)[1:0]
                                  : {1'b0, ref_parity({6'b0, d}, 2, 0)};
  endfunction

  task automatic clear();
    {a_inj_n1, a_inj_n5, a_inj_n4, a_inj_n2, a_inj_n3, a_inj_n6, a_seu_orig, a_seu_gen} = '0;
    {b_inj_n1, b_inj_n5, b_inj_n4, b_inj_n2, b_inj_n3, b_inj_n6, b_seu_orig, b_seu_gen} = '0;
  endtask

  // One fault: a stuck-at on a net bit, or an upset of a stored LUT bit.
  typedef struct {
    int blk;     // 0 = block N-1, 1 = block N
    int net;     // 1..6, or 7 = original-circuit LUT, 8 = generator LUT
    int bitpos;
    bit value;   // stuck value (nets only)
  } fault_t;

  fault_t faults [$];

  task automatic apply(input fault_t f, input logic [4:0] v_pi, input logic v_a);
    logic [4:0]    ga;     // fault-free inputs of block N-1
    logic [KA-1:0] ga_chk;
    logic [2:0]    gb;     // fault-free inputs of block N
    logic [KO-1:0] gb_chk;
    logic          good;
    ga = v_pi; ga_chk = KA'(enc5(v_pi));
    gb = {ref_c17(v_pi), v_a}; gb_chk = KO'(enc2(ref_c17(v_pi)));
    clear();
    if (f.net == 1) good = (f.blk == 0) ? ga_chk[f.bitpos] : gb_chk[f.bitpos];
    else if (f.net == 2 && f.blk == 1) good = gb[f.bitpos + 1];
    else good = (f.blk == 0) ? ga[f.bitpos] : gb[f.bitpos];
    if (f.blk == 0) begin
      case (f.net)
        1: a_inj_n1[f.bitpos] = good ^ f.value;
        2: a_inj_n2[f.bitpos] = good ^ f.value;
        3: a_inj_n3[f.bitpos] = good ^ f.value;
        4: a_inj_n4[f.bitpos] = good ^ f.value;
        5: a_inj_n5[f.bitpos] = good ^ f.value;
        6: a_inj_n6[f.bitpos] = good ^ f.value;
        7: a_seu_orig[f.bitpos] = 1'b1;
        default: a_seu_gen[f.bitpos] = 1'b1;
      endcase
    end else begin
      case (f.net)
        1: b_inj_n1[f.bitpos] = good ^ f.value;
        2: b_inj_n2[f.bitpos] = good ^ f.value;
        3: b_inj_n3[f.bitpos] = good ^ f.value;
        4: b_inj_n4[f.bitpos] = good ^ f.value;
        5: b_inj_n5[f.bitpos] = good ^ f.value;
        6: b_inj_n6[f.bitpos] = good ^ f.value;
        7: b_seu_orig[f.bitpos] = 1'b1;
        default: b_seu_gen[f.bitpos] = 1'b1;
      endcase
    end
  endtask

  initial begin
    fault_t f;
    done = 0; n_side = 0; n_faults = 0; n_st = 0; n_fs = 0; fault_free_errors = 0;
    // fault list
    for (int blk = 0; blk < 2; blk++)
      for (int net = 1; net <= 8; net++) begin
        int w;
        case (net)
          1: w = (blk == 0) ? KA : KO;
          2: w = (blk == 0) ? 5 : 2;
          7: w = (blk == 0) ? 64 : 16;
          8: w = (blk == 0) ? 32 * GW : 8 * GW;
          default: w = (blk == 0) ? 5 : 3;
        endcase
        for (int b = 0; b < w; b++)
          for (int s = 0; s < ((net >= 7) ? 1 : 2); s++) begin
            f.blk = blk; f.net = net; f.bitpos = b; f.value = s[0];
            faults.push_back(f);
          end
      end
    // fault-free pass
    clear();
    for (int v = 0; v < 64; v++) begin
      pi = 5'(v); side_a = v[5]; pi_chk = KA'(enc5(pi));
      #1;
      if (error || po != ref_t1({ref_c17(pi), side_a}) || po_chk != KO'(enc2(po)))
        fault_free_errors++;
    end
    // fault simulation
    foreach (faults[i]) begin
      bit detected, unsafe;
      detected = 0; unsafe = 0;
      for (int v = 0; v < 64; v++) begin
        logic [1:0] gpo;
        pi = 5'(v); side_a = v[5]; pi_chk = KA'(enc5(pi));
        apply(faults[i], pi, side_a);
        #1;
        gpo = ref_t1({ref_c17(pi), side_a});
        if (error) detected = 1;
        else if (po != gpo || po_chk != KO'(enc2(gpo))) unsafe = 1;
      end
      n_faults++;
      if (faults[i].blk == 1 && faults[i].net == 5 && faults[i].bitpos == 0) n_side++;
      n_st += detected;
      n_fs += !unsafe;
    end
    clear();
    done = 1;
  end
endmodule
