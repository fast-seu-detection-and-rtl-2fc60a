// mac_cell: one weight-stationary processing element of the systolic array.
//
// The cell keeps one signed weight. Every cycle it multiplies the input
// arriving from the left by that weight, adds the partial sum arriving from
// the cell above and registers the result for the cell below; the input is
// registered unchanged for the cell to the right. A weight is written with
// w_load (w_clear zeroes it; w_load wins). Latency: one cycle for both the
// horizontal input path and the vertical partial-sum path.
//
// The dataflow follows the described array; the separate clear input, used
// so that a load of fewer than N weight vectors leaves zeros in the unused
// rows, is this design's choice.
module mac_cell #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_load,
  input  logic                     w_clear,
  input  logic signed [DATA_W-1:0] w_in,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [ACC_W-1:0]  psum_in,
  output logic signed [DATA_W-1:0] x_out,
  output logic signed [ACC_W-1:0]  psum_out,
  output logic signed [DATA_W-1:0] w_q
);
  logic signed [2*DATA_W-1:0] prod;

  always_comb prod = x_in * w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q      <= '0;
      x_out    <= '0;
      psum_out <= '0;
    end else begin
      if (w_load)       w_q <= w_in;
      else if (w_clear) w_q <= '0;
      x_out    <= x_in;
      psum_out <= psum_in + ACC_W'(prod);
    end
  end
endmodule
