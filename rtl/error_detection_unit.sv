// error_detection_unit: checks the self-test results of a testing-mode
// matmul and classifies a fault per column.
//
// After the three test vectors have passed through the array and the
// accumulators, column j offers a_j (R0), a*_j (R1), the raw checksums C_SA_j
// and notC_SA_j and the result of the zero vector. Fault-free values are
// a_j = 0, a*_j = all ones, C_SA_j XOR notC_SA_j = all ones and a zero
// result of 0. All comparisons are XOR reductions. Diagnosis per column:
//   zero result not 0                               -> SA column fault
//   pair (a_j, a*_j) fault-free and C_SA pair complementary -> no fault
//   pair wrong but complementary, C_SA pair complementary   -> weight bitflip
//                                                      (transient, reload weights)
//   pair not complementary, C_SA pair complementary  -> accumulator j fault
//   otherwise                                        -> SA column j fault
// The last two are structural faults that need the configuration refreshed.
// chk_valid starts an evaluation; one cycle later res_valid pulses with
// the per-column flags, an overall error bit and the most severe class
// (SA column > accumulator > weight).
//
// The diagnosis rules follow the described method. Reading the zero-vector
// result as an SA column check and requiring a complementary C_SA pair before
// calling a fault a weight bitflip are this design's reading.
module error_detection_unit
  import tpu_pkg::*;
#(
  parameter int unsigned N     = 14,
  parameter int unsigned ACC_W = 32,
  parameter int unsigned CHK_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chk_valid,
  input  logic [CHK_W-1:0]  r0   [N],
  input  logic [CHK_W-1:0]  r1   [N],
  input  logic [ACC_W-1:0]  csa  [N],
  input  logic [ACC_W-1:0]  ncsa [N],
  input  logic [ACC_W-1:0]  zres [N],
  output logic              res_valid,
  output logic              error,
  output fault_class_e      fclass,
  output logic [N-1:0]      wgt_flt,
  output logic [N-1:0]      acc_flt,
  output logic [N-1:0]      sa_flt
);
  logic [N-1:0] c_wgt, c_acc, c_sa;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic pair_ok, pair_compl, sa_compl, zero_ok;
      pair_ok    = ~|(r0[j] ^ {CHK_W{1'b0}}) && &(r1[j] ^ {CHK_W{1'b0}});
      pair_compl = &(r0[j] ^ r1[j]);
      sa_compl   = &(csa[j] ^ ncsa[j]);
      zero_ok    = ~|zres[j];
      c_wgt[j] = 1'b0;
      c_acc[j] = 1'b0;
      c_sa[j]  = 1'b0;
      if (!zero_ok)                          c_sa[j]  = 1'b1;
      else if (pair_ok && sa_compl)          ; // fault-free column
      else if (pair_compl && sa_compl)       c_wgt[j] = 1'b1;
      else if (!pair_compl && sa_compl)      c_acc[j] = 1'b1;
      else                                   c_sa[j]  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      error     <= 1'b0;
      fclass    <= FC_NONE;
      wgt_flt   <= '0;
      acc_flt   <= '0;
      sa_flt    <= '0;
    end else begin
      res_valid <= chk_valid;
      if (chk_valid) begin
        wgt_flt <= c_wgt;
        acc_flt <= c_acc;
        sa_flt  <= c_sa;
        error   <= |{c_wgt, c_acc, c_sa};
        if (|c_sa)       fclass <= FC_SA_COLUMN;
        else if (|c_acc) fclass <= FC_ACCUM;
        else if (|c_wgt) fclass <= FC_WEIGHT;
        else             fclass <= FC_NONE;
      end
    end
  end
endmodule
