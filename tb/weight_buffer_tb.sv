// weight_buffer_tb: writes random vectors word by word with random byte
// strobes, keeps a reference copy, and checks that vector reads return it
// one cycle after the request.
module weight_buffer_tb;
  localparam int N = 14;
  localparam int D = 256;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic        wr_en, rd_en;
  logic [7:0]  wr_addr, rd_addr;
  logic [1:0]  wr_word;
  logic [31:0] wr_data;
  logic [3:0]  wr_strb;
  logic signed [7:0] rd_data [N];
  logic [7:0] model [D][N];

  weight_buffer #(.N(N), .DEPTH(D)) dut (.*);
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

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_word = 0; wr_data = 0; wr_strb = 0;
    @(negedge clk);
    // full writes first
    for (int a = 0; a < D; a++) for (int w = 0; w < 4; w++) begin
      wr_en = 1; wr_addr = 8'(a); wr_word = 2'(w); wr_data = $urandom; wr_strb = 4'hF;
      for (int b = 0; b < 4; b++) if (4*w + b < N) model[a][4*w+b] = wr_data[8*b +: 8];
      @(negedge clk);
    end
    // partial byte writes
    for (int t = 0; t < 300; t++) begin
      int a, w;
      a = $urandom % D; w = $urandom % 4;
      wr_en = 1; wr_addr = 8'(a); wr_word = 2'(w); wr_data = $urandom; wr_strb = 4'($urandom);
      for (int b = 0; b < 4; b++) if (wr_strb[b] && 4*w + b < N) model[a][4*w+b] = wr_data[8*b +: 8];
      @(negedge clk);
    end
    wr_en = 0;
    for (int a = 0; a < D; a++) begin
      rd_en = 1; rd_addr = 8'(a);
      @(negedge clk);
      for (int j = 0; j < N; j++) check(rd_data[j] == model[a][j], $sformatf("addr %0d byte %0d", a, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
