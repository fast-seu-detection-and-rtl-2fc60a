// systolic_data_setup: feeds vectors into the systolic array with the
// diagonal skew the array needs, and substitutes the self-test vectors.
//
// Each cycle one vector enters (in_valid). vsel picks what enters: the data
// vector from the unified buffer, or one of the three test vectors of the
// checksum self-test: all +1 (columns then produce C_SA = sum of the column's
// weights), all -1 together with -1 on the first row's adder operand (columns
// produce -C_SA-1 = not C_SA), and all 0 (columns produce 0, which exposes a
// stuck-at-1 least significant bit). Element i of a vector reaches row i of
// the array i cycles after the vector entered (row 0 without delay), and the
// first-row adder operand of column j is delayed by j cycles so that it meets
// the vector's first element in column j. Cycles without in_valid feed zeros.
//
// The three test vectors, their order (+1, -1, 0) and the -1 adder operand
// follow the described self-test; the shift-register skew is this design's
// choice.
module systolic_data_setup
  import tpu_pkg::*;
#(
  parameter int unsigned N      = 14,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  vsel_e                    vsel,
  input  logic signed [DATA_W-1:0] x_vec    [N],
  output logic signed [DATA_W-1:0] x_in     [N],
  output logic signed [ACC_W-1:0]  psum_top [N]
);
  logic signed [DATA_W-1:0] sel_vec [N];
  logic                     sel_neg;    // first-row adder operand is -1

  always_comb begin
    sel_neg = in_valid && (vsel == VSEL_MONES);
    for (int i = 0; i < N; i++) begin
      if (!in_valid) sel_vec[i] = '0;
      else begin
        unique case (vsel)
          VSEL_DATA:  sel_vec[i] = x_vec[i];
          VSEL_ONES:  sel_vec[i] = DATA_W'(1);
          VSEL_MONES: sel_vec[i] = '1;
          default:    sel_vec[i] = '0;
        endcase
      end
    end
  end

  // row 0 and column 0 pass straight through
  assign x_in[0]     = sel_vec[0];
  assign psum_top[0] = sel_neg ? '1 : '0;

  for (genvar i = 1; i < N; i++) begin : g_skew
    logic signed [DATA_W-1:0] xs [i];
    logic                     ns [i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < i; k++) begin
          xs[k] <= '0;
          ns[k] <= 1'b0;
        end
      end else begin
        xs[0] <= sel_vec[i];
        ns[0] <= sel_neg;
        for (int k = 1; k < i; k++) begin
          xs[k] <= xs[k-1];
          ns[k] <= ns[k-1];
        end
      end
    end
    assign x_in[i]     = xs[i-1];
    assign psum_top[i] = ns[i-1] ? '1 : '0;
  end
endmodule
