// unified_buffer_tb: checks both ports of the ECC-protected buffer against a
// reference copy: host word writes with byte strobes, vector writes and
// vector/word reads (one cycle latency). It then flips stored codeword bits
// directly in the memory: a single flip must be corrected on read and
// counted in ecc_corrected, two flips in one word must be counted in
// ecc_uncorrectable.
module unified_buffer_tb;
  localparam int N = 14;
  localparam int D = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic        a_en, a_we;
  logic [5:0]  a_addr;
  logic [1:0]  a_word;
  logic [31:0] a_wdata, a_rdata;
  logic [3:0]  a_strb;
  logic        b_rd_en, b_wr_en;
  logic [5:0]  b_rd_addr, b_wr_addr;
  logic signed [7:0] b_rd_data [N];
  logic signed [7:0] b_wr_data [N];
  logic [15:0] ecc_corrected, ecc_uncorrectable;
  logic [7:0]  model [D][16];

  unified_buffer #(.N(N), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic read_word(int a, int w, output logic [31:0] d);
    a_en = 1; a_we = 0; a_addr = 6'(a); a_word = 2'(w);
    @(negedge clk);
    a_en = 0;
    d = a_rdata;
  endtask

  initial begin
    logic [31:0] d;
    a_en = 0; a_we = 0; a_addr = 0; a_word = 0; a_wdata = 0; a_strb = 0;
    b_rd_en = 0; b_wr_en = 0; b_rd_addr = 0; b_wr_addr = 0;
    for (int j = 0; j < N; j++) b_wr_data[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // vector writes fill everything
    for (int a = 0; a < D; a++) begin
      b_wr_en = 1; b_wr_addr = 6'(a);
      for (int j = 0; j < 16; j++) model[a][j] = 0;
      for (int j = 0; j < N; j++) begin b_wr_data[j] = 8'($urandom); model[a][j] = b_wr_data[j]; end
      @(negedge clk);
    end
    b_wr_en = 0;
    // host partial writes
    for (int t = 0; t < 200; t++) begin
      int a, w;
      a = $urandom % D; w = $urandom % 4;
      a_en = 1; a_we = 1; a_addr = 6'(a); a_word = 2'(w); a_wdata = $urandom; a_strb = 4'($urandom);
      for (int b = 0; b < 4; b++) if (a_strb[b]) model[a][4*w+b] = a_wdata[8*b +: 8];
      @(negedge clk);
    end
    a_en = 0; a_we = 0;
    // host word reads
    for (int a = 0; a < D; a++) for (int w = 0; w < 4; w++) begin
      read_word(a, w, d);
      check(d == {model[a][4*w+3], model[a][4*w+2], model[a][4*w+1], model[a][4*w]},
            $sformatf("word read %0d.%0d", a, w));
    end
    // vector reads (bytes beyond N may have been written by the host but are not part of the vector)
    for (int a = 0; a < D; a++) begin
      b_rd_en = 1; b_rd_addr = 6'(a);
      @(negedge clk);
      for (int j = 0; j < N; j++) check(b_rd_data[j] == model[a][j], $sformatf("vector read %0d.%0d", a, j));
    end
    b_rd_en = 0;
    check(ecc_corrected == 0 && ecc_uncorrectable == 0, "no ECC events on clean memory");
    // single-bit upsets: corrected
    for (int t = 0; t < 20; t++) begin
      int a, w, bit_i;
      logic [38:0] cw;
      a = $urandom % D; w = $urandom % 4; bit_i = $urandom % 39;
      cw = dut.mem[a][w];
      cw[bit_i] = ~cw[bit_i];
      dut.mem[a][w] = cw;
      read_word(a, w, d);
      check(d == {model[a][4*w+3], model[a][4*w+2], model[a][4*w+1], model[a][4*w]}, "single upset corrected");
      @(negedge clk);
      check(ecc_corrected == 16'(t + 1), $sformatf("corrected count %0d", ecc_corrected));
      // rewrite the word to clean it
      a_en = 1; a_we = 1; a_addr = 6'(a); a_word = 2'(w); a_strb = 4'hF;
      a_wdata = {model[a][4*w+3], model[a][4*w+2], model[a][4*w+1], model[a][4*w]};
      @(negedge clk);
      a_en = 0; a_we = 0;
    end
    // double upset: detected, not corrected
    begin
      logic [38:0] cw;
      cw = dut.mem[5][1];
      cw[3] = ~cw[3];
      cw[17] = ~cw[17];
      dut.mem[5][1] = cw;
      b_rd_en = 1; b_rd_addr = 6'd5;
      @(negedge clk);
      b_rd_en = 0;
      @(negedge clk);
      check(ecc_uncorrectable == 1, "double upset detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
