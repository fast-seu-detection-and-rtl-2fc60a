// accumulator_bank: the column accumulators of the accelerator, including
// the checksum registers R0/R1 of the self-test.
//
// The column outputs of the systolic array arrive skewed (column j one cycle
// after column j-1); a triangle of registers delays column j by N-1-j cycles
// so that a whole result vector is aligned. The aligned vector is then
// handled as the operation op says: written to or added into accumulator
// register acc_addr (normal matmul), or combined with the checksum registers:
//   AOP_CSA  : R0_j <= C_SA_j - R0_j        (a_j,  Eq. 4)
//   AOP_NCSA : R1_j <= notC_SA_j + R1_j     (a*_j, Eq. 5)
//   AOP_ZERO : the zero-vector result is captured; chk_done pulses next cycle.
// The raw C_SA, not C_SA and zero results are kept for the detection unit.
// op and acc_addr must be presented in the cycle the aligned vector is
// available, i.e. 2N cycles after the vector entered systolic_data_setup's
// input when the first-row input path has no delay (see tinytpu).
//
// R0/R1 live in a CHK_W-bit SIMD lane beside the ACC_W-bit accumulation lane
// (a 48-bit DSP split 32 + 16): while a weight vector is loaded (w_valid),
// each column adds its int8 weight, giving C_A_j = sum_i w_ij in both R0 and
// R1 (w_first restarts the sum). A read port (rd_en/rd_addr, one cycle
// latency) serves the activation unit.
//
// The operations follow the described checksum scheme; the lane width of 16
// bits, keeping R0/R1 as separate registers rather than two words of the
// accumulator memory, and the memory depth are this design's choices.
module accumulator_bank
  import tpu_pkg::*;
#(
  parameter int unsigned N         = 14,
  parameter int unsigned DATA_W    = 8,
  parameter int unsigned ACC_W     = 32,
  parameter int unsigned CHK_W     = 16,
  parameter int unsigned ACC_DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // skewed column outputs of the systolic array
  input  logic signed [ACC_W-1:0]  psum_col [N],
  // operation for the aligned vector of this cycle
  input  accop_e                   op,
  input  logic [$clog2(ACC_DEPTH)-1:0] acc_addr,
  // weight checksum lane
  input  logic                     w_valid,
  input  logic                     w_first,
  input  logic signed [DATA_W-1:0] w_row [N],
  // read port for the activation unit
  input  logic                     rd_en,
  input  logic [$clog2(ACC_DEPTH)-1:0] rd_addr,
  output logic signed [ACC_W-1:0]  rd_data [N],
  // checksum results for the detection unit
  output logic [CHK_W-1:0]         r0 [N],
  output logic [CHK_W-1:0]         r1 [N],
  output logic [ACC_W-1:0]         csa  [N],
  output logic [ACC_W-1:0]         ncsa [N],
  output logic [ACC_W-1:0]         zres [N],
  output logic                     chk_done
);
  logic signed [ACC_W-1:0] aligned [N];
  logic signed [ACC_W-1:0] mem [ACC_DEPTH][N];

  // ---------------------------------------------------------------- de-skew
  for (genvar j = 0; j < N; j++) begin : g_deskew
    localparam int unsigned D = N - 1 - j;
    if (D == 0) begin : g_nodly
      assign aligned[j] = psum_col[j];
    end else begin : g_dly
      logic signed [ACC_W-1:0] sr [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < int'(D); k++) sr[k] <= '0;
        end else begin
          sr[0] <= psum_col[j];
          for (int k = 1; k < int'(D); k++) sr[k] <= sr[k-1];
        end
      end
      assign aligned[j] = sr[D-1];
    end
  end

  // ---------------------------------------------------------------- accumulation lane
  always_ff @(posedge clk) begin
    for (int j = 0; j < N; j++) begin
      if (op == AOP_WRITE)      mem[acc_addr][j] <= aligned[j];
      else if (op == AOP_ACCUM) mem[acc_addr][j] <= mem[acc_addr][j] + aligned[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) rd_data[j] <= '0;
    end else if (rd_en) begin
      for (int j = 0; j < N; j++) rd_data[j] <= mem[rd_addr][j];
    end
  end

  // ---------------------------------------------------------------- checksum lane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) begin
        r0[j]   <= '0;
        r1[j]   <= '0;
        csa[j]  <= '0;
        ncsa[j] <= '0;
        zres[j] <= '0;
      end
      chk_done <= 1'b0;
    end else begin
      chk_done <= (op == AOP_ZERO);
      for (int j = 0; j < N; j++) begin
        if (w_valid) begin
          r0[j] <= (w_first ? '0 : r0[j]) + CHK_W'(w_row[j]);
          r1[j] <= (w_first ? '0 : r1[j]) + CHK_W'(w_row[j]);
        end else begin
          if (op == AOP_CSA) begin
            r0[j]  <= CHK_W'(aligned[j]) - r0[j];
            csa[j] <= aligned[j];
          end
          if (op == AOP_NCSA) begin
            r1[j]   <= CHK_W'(aligned[j]) + r1[j];
            ncsa[j] <= aligned[j];
          end
          if (op == AOP_ZERO) zres[j] <= aligned[j];
        end
      end
    end
  end

  // The controller never loads weights while checksum vectors are in flight.
  assert property (@(posedge clk) disable iff (!rst_n)
                   w_valid |-> !(op inside {AOP_CSA, AOP_NCSA}))
    else $error("weight checksum load collides with a checksum vector");
endmodule
