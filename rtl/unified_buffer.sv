// unified_buffer: input/output activation memory, protected by a single-
// error-correcting, double-error-detecting (SECDED) code.
//
// A vector of N int8 values is kept as four 32-bit words (bytes past the
// N-th read as zero), each stored as a 39-bit Hamming(38,32) codeword plus an
// overall parity bit. Every read corrects a single flipped bit and counts it
// in ecc_corrected; a double error is counted in ecc_uncorrectable and the
// data is returned as stored. A vector read counts only the words that hold
// elements of the vector. Stored words are not scrubbed.
//   Port A (host, through the accelerator's host interface): one 32-bit word
//     per access; writes take per-byte strobes and merge with the corrected
//     old word. Read data one cycle after a_en.
//   Port B (datapath): reads a whole vector (operands of matmul) and writes a
//     whole vector (results of activation); read data one cycle after b_rd_en.
//   A write on port B wins over a write on port A to the same word.
// The buffer sits outside the reconfigurable region of the accelerator, so
// its content survives a partial reconfiguration.
//
// Placing the buffer outside the reconfigured region and protecting it with
// ECC follow the described platform. The code (per 32-bit word), the depth of
// 4096 vectors and the port arrangement are this design's choices.
module unified_buffer #(
  parameter int unsigned N      = 14,
  parameter int unsigned DEPTH  = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // port A: host words
  input  logic                     a_en,
  input  logic                     a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [1:0]               a_word,
  input  logic [31:0]              a_wdata,
  input  logic [3:0]               a_strb,
  output logic [31:0]              a_rdata,
  // port B: datapath vectors
  input  logic                     b_rd_en,
  input  logic [$clog2(DEPTH)-1:0] b_rd_addr,
  output logic signed [7:0]        b_rd_data [N],
  input  logic                     b_wr_en,
  input  logic [$clog2(DEPTH)-1:0] b_wr_addr,
  input  logic signed [7:0]        b_wr_data [N],
  // ECC event counters
  output logic [15:0]              ecc_corrected,
  output logic [15:0]              ecc_uncorrectable
);
  localparam int unsigned CW = 39;

  // codeword position p (1..38) holds a data bit unless p is a power of two
  function automatic logic [CW-1:0] ecc_encode(logic [31:0] d);
    logic [CW-1:0] c;
    int            k;
    c = '0;
    k = 0;
    for (int p = 1; p < CW; p++) begin
      if ((p & (p - 1)) != 0) begin
        c[p] = d[k];
        k++;
      end
    end
    for (int b = 0; b < 6; b++) begin
      logic par;
      par = 1'b0;
      for (int p = 1; p < CW; p++) if (((p >> b) & 1) == 1) par ^= c[p];
      c[1 << b] = par;
    end
    c[0] = ^c[CW-1:1];
    return c;
  endfunction

  // returns {uncorrectable, corrected, data}
  function automatic logic [33:0] ecc_decode(logic [CW-1:0] c_in);
    logic [CW-1:0] c;
    logic [5:0]    syn;
    logic          par;
    logic          corr, unc;
    logic [31:0]   d;
    int            k;
    c   = c_in;
    syn = '0;
    for (int p = 1; p < CW; p++) if (c[p]) syn ^= 6'(p);
    par  = ^c;
    corr = 1'b0;
    unc  = 1'b0;
    if (par) begin
      corr = 1'b1;
      if (int'(syn) < CW) c[syn] = ~c[syn];
      else unc = 1'b1;
    end else if (syn != 0) begin
      unc = 1'b1;
    end
    d = '0;
    k = 0;
    for (int p = 1; p < CW; p++) begin
      if ((p & (p - 1)) != 0) begin
        d[k] = c[p];
        k++;
      end
    end
    return {unc, corr && !unc, d};
  endfunction

  logic [CW-1:0] mem [DEPTH][4];

  // port A write merge and port B write packing
  logic [33:0]   a_old;
  logic [31:0]   a_new;
  logic [31:0]   b_words [4];

  always_comb begin
    a_old = ecc_decode(mem[a_addr][a_word]);
    for (int b = 0; b < 4; b++)
      a_new[8*b +: 8] = a_strb[b] ? a_wdata[8*b +: 8] : a_old[8*b +: 8];
    for (int w = 0; w < 4; w++) begin
      for (int b = 0; b < 4; b++) begin
        if (4*w + b < int'(N)) b_words[w][8*b +: 8] = b_wr_data[4*w + b];
        else                   b_words[w][8*b +: 8] = 8'h00;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (a_en && a_we && !(b_wr_en && b_wr_addr == a_addr))
      mem[a_addr][a_word] <= ecc_encode(a_new);
    if (b_wr_en)
      for (int w = 0; w < 4; w++) mem[b_wr_addr][w] <= ecc_encode(b_words[w]);
  end

  // reads and ECC counters
  logic [33:0] a_dec;
  logic [33:0] b_dec [4];
  logic        n_corr_a, n_unc_a;
  logic [2:0]  n_corr_b, n_unc_b;

  always_comb begin
    a_dec = ecc_decode(mem[a_addr][a_word]);
    n_corr_a = a_en && !a_we && a_dec[32];
    n_unc_a  = a_en && !a_we && a_dec[33];
    n_corr_b = '0;
    n_unc_b  = '0;
    for (int w = 0; w < 4; w++) begin
      b_dec[w] = ecc_decode(mem[b_rd_addr][w]);
      // only words that carry vector elements are counted
      if (b_rd_en && 4*w < int'(N) && b_dec[w][32]) n_corr_b += 3'd1;
      if (b_rd_en && 4*w < int'(N) && b_dec[w][33]) n_unc_b  += 3'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rdata           <= '0;
      ecc_corrected     <= '0;
      ecc_uncorrectable <= '0;
      for (int j = 0; j < N; j++) b_rd_data[j] <= '0;
    end else begin
      if (a_en && !a_we) a_rdata <= a_dec[31:0];
      if (b_rd_en)
        for (int j = 0; j < N; j++) b_rd_data[j] <= b_dec[j/4][8*(j%4) +: 8];
      ecc_corrected     <= ecc_corrected + 16'(n_corr_a) + 16'(n_corr_b);
      ecc_uncorrectable <= ecc_uncorrectable + 16'(n_unc_a) + 16'(n_unc_b);
    end
  end
endmodule
