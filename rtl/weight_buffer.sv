// weight_buffer: on-chip memory holding the weight vectors of the network.
//
// The host writes it one 32-bit word at a time: vector wr_addr, word wr_word
// (bytes 4*wr_word .. 4*wr_word+3 of the vector), with per-byte strobes;
// bytes past the N-th are dropped. The datapath reads one whole vector of N
// int8 weights per cycle (rd_en/rd_addr, data one cycle later).
//
// The buffer and its role follow the described accelerator; the depth of
// 32768 vectors and the host word layout are this design's choices.
module weight_buffer #(
  parameter int unsigned N      = 14,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 32768
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [1:0]               wr_word,
  input  logic [31:0]              wr_data,
  input  logic [3:0]               wr_strb,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic signed [DATA_W-1:0] rd_data [N]
);
  logic [DATA_W-1:0] mem [DEPTH][N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < 4; b++) begin
        if (wr_strb[b] && (int'(wr_word) * 4 + b < int'(N)))
          mem[wr_addr][int'(wr_word) * 4 + b] <= wr_data[8*b +: 8];
      end
    end
    if (rd_en) begin
      for (int j = 0; j < N; j++) rd_data[j] <= mem[rd_addr][j];
    end
  end
endmodule
