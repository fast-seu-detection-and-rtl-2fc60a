// accumulator_bank_tb: drives skewed column outputs (column j one cycle
// after column j-1) and checks that
//  - write and accumulate land in the addressed registers once the vector is
//    aligned (N-1 cycles after column 0 arrived) and read back with one
//    cycle of latency;
//  - weight vectors summed in the checksum lane give C_A in R0 and R1;
//  - a C_SA vector gives R0 = C_SA - C_A (0 when they match), a not C_SA
//    vector gives R1 = notC_SA + C_A (all ones), the raw values are kept,
//    and chk_done pulses one cycle after the zero vector;
//  - a second weight load restarts both checksums from zero.
module accumulator_bank_tb;
  import tpu_pkg::*;
  localparam int N = 14;
  localparam int D = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic signed [31:0] psum_col [N];
  accop_e             op;
  logic [5:0]         acc_addr;
  logic               w_valid, w_first;
  logic signed [7:0]  w_row [N];
  logic               rd_en;
  logic [5:0]         rd_addr;
  logic signed [31:0] rd_data [N];
  logic [15:0]        r0 [N];
  logic [15:0]        r1 [N];
  logic [31:0]        csa [N];
  logic [31:0]        ncsa [N];
  logic [31:0]        zres [N];
  logic               chk_done;

  accumulator_bank #(.N(N), .ACC_DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // a vector stream: vector v enters column j at step v+j, aligned at v+N-1
  localparam int V = 12;
  logic signed [31:0] vec [V][N];
  accop_e             vop [V];
  logic [5:0]         vad [V];
  logic signed [31:0] model [D][N];
  int                 ca [N];

  initial begin
    op = AOP_NONE; acc_addr = 0; w_valid = 0; w_first = 0; rd_en = 0; rd_addr = 0;
    for (int j = 0; j < N; j++) begin psum_col[j] = 0; w_row[j] = 0; ca[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // weight checksum: 5 rows
    for (int r = 0; r < 5; r++) begin
      w_valid = 1; w_first = (r == 0);
      for (int j = 0; j < N; j++) begin
        w_row[j] = 8'($urandom);
        ca[j] += int'(w_row[j]);
      end
      @(negedge clk);
    end
    w_valid = 0; w_first = 0;
    for (int j = 0; j < N; j++)
      check(r0[j] == 16'(ca[j]) && r1[j] == 16'(ca[j]), $sformatf("C_A col %0d", j));
    // vectors: 0..8 data, 9 C_SA, 10 not C_SA, 11 zero
    for (int v = 0; v < V; v++) begin
      for (int j = 0; j < N; j++) begin
        if (v < 9)        vec[v][j] = $signed($urandom);
        else if (v == 9)  vec[v][j] = ca[j];
        else if (v == 10) vec[v][j] = ~ca[j];
        else              vec[v][j] = 0;
      end
      vad[v] = 6'(v < 6 ? v * 3 : 7);   // vectors 6,7,8 accumulate into 7
      vop[v] = (v < 6) ? AOP_WRITE : (v == 6) ? AOP_WRITE : (v < 9) ? AOP_ACCUM :
               (v == 9) ? AOP_CSA : (v == 10) ? AOP_NCSA : AOP_ZERO;
    end
    for (int s = 0; s < V + N + 2; s++) begin
      for (int j = 0; j < N; j++) begin
        int v;
        v = s - j;
        psum_col[j] = (v >= 0 && v < V) ? vec[v][j] : 32'sd0;
      end
      begin
        int v;
        v = s - (N - 1);
        op       = (v >= 0 && v < V) ? vop[v] : AOP_NONE;
        acc_addr = (v >= 0 && v < V) ? vad[v] : 6'd0;
        if (v >= 0 && v < 9)
          for (int j = 0; j < N; j++)
            model[vad[v]][j] = (vop[v] == AOP_ACCUM) ? model[vad[v]][j] + vec[v][j] : vec[v][j];
        @(negedge clk);
        if (v == 11) check(chk_done, "chk_done one cycle after zero vector");
        else         check(!chk_done, "chk_done idle");
      end
    end
    op = AOP_NONE;
    for (int j = 0; j < N; j++) begin
      check(r0[j] == 16'h0000, $sformatf("a_j = 0 col %0d", j));
      check(r1[j] == 16'hFFFF, $sformatf("a*_j = all ones col %0d", j));
      check(csa[j] == 32'(ca[j]) && ncsa[j] == ~32'(ca[j]) && zres[j] == 0, "raw checksums kept");
    end
    // read back
    for (int a = 0; a < 6; a++) begin
      rd_en = 1; rd_addr = 6'(a < 6 ? a * 3 : 7);
      if (a == 5) rd_addr = 7;
      @(negedge clk);
      for (int j = 0; j < N; j++)
        check(rd_data[j] == model[rd_addr][j], $sformatf("read addr %0d col %0d", rd_addr, j));
    end
    rd_en = 0;
    // a second weight load starts both checksums afresh
    for (int j = 0; j < N; j++) ca[j] = 0;
    for (int r = 0; r < 3; r++) begin
      w_valid = 1; w_first = (r == 0);
      for (int j = 0; j < N; j++) begin
        w_row[j] = 8'($urandom);
        ca[j] += int'(w_row[j]);
      end
      @(negedge clk);
    end
    w_valid = 0; w_first = 0;
    for (int j = 0; j < N; j++)
      check(r0[j] == 16'(ca[j]) && r1[j] == 16'(ca[j]), $sformatf("C_A of second load col %0d", j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
