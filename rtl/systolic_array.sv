// systolic_array: the N x N matrix multiply unit (MMU) of weight-stationary
// MAC cells.
//
// Row i receives its input stream x_in[i] at the left edge; inputs move one
// column to the right per cycle. Partial sums move one row down per cycle,
// starting from psum_top[j] at the top of column j and leaving at the bottom
// as psum_out[j]. With a weight matrix W held in the cells, feeding input
// vector x with row i delayed by i cycles and psum_top[j] delayed by j cycles
// makes column j produce sum_i x[i]*W[i][j] + psum_top[j] N+j cycles after the
// vector entered row 0.
//
// Weights are written one row per cycle: w_row_load[r] writes w_row[] into
// row r. w_clear zeroes every row not loaded in the same cycle. The
// per-row write port is this design's choice; the document only says weight
// vectors are loaded into the grid one vector at a time.
module systolic_array #(
  parameter int unsigned N      = 14,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             w_row_load,
  input  logic                     w_clear,
  input  logic signed [DATA_W-1:0] w_row    [N],
  input  logic signed [DATA_W-1:0] x_in     [N],
  input  logic signed [ACC_W-1:0]  psum_top [N],
  output logic signed [ACC_W-1:0]  psum_out [N],
  output logic signed [DATA_W-1:0] w_q      [N][N]
);
  // x_h[i][j]: input entering cell (i,j); psum_v[i][j]: partial sum entering (i,j)
  logic signed [DATA_W-1:0] x_h    [N][N+1];
  logic signed [ACC_W-1:0]  psum_v [N+1][N];

  for (genvar i = 0; i < N; i++) begin : g_edge_row
    assign x_h[i][0] = x_in[i];
  end
  for (genvar j = 0; j < N; j++) begin : g_edge_col
    assign psum_v[0][j] = psum_top[j];
    assign psum_out[j]  = psum_v[N][j];
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      mac_cell #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_mac (
        .clk      (clk),
        .rst_n    (rst_n),
        .w_load   (w_row_load[i]),
        .w_clear  (w_clear),
        .w_in     (w_row[j]),
        .x_in     (x_h[i][j]),
        .psum_in  (psum_v[i][j]),
        .x_out    (x_h[i][j+1]),
        .psum_out (psum_v[i+1][j]),
        .w_q      (w_q[i][j])
      );
    end
  end
endmodule
