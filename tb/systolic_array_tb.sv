// systolic_array_tb: loads a random 14 x 14 weight matrix one row per cycle,
// streams random input vectors with the diagonal skew the array expects,
// and checks that column j delivers sum_i x[i]*W[i][j] + top operand exactly
// N+j cycles after the vector entered row 0. Also checks that a partial
// load clears the rows not written.
module systolic_array_tb;
  localparam int N = 14;
  localparam int V = 40;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic [N-1:0]       w_row_load;
  logic               w_clear;
  logic signed [7:0]  w_row [N];
  logic signed [7:0]  x_in [N];
  logic signed [31:0] psum_top [N];
  logic signed [31:0] psum_out [N];
  logic signed [7:0]  w_q [N][N];

  systolic_array #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0]  W [N][N];
  logic signed [7:0]  X [V][N];
  logic signed [31:0] T [V][N];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int t0;
    w_row_load = '0; w_clear = 0;
    for (int i = 0; i < N; i++) begin w_row[i] = 0; x_in[i] = 0; psum_top[i] = 0; end
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) W[i][j] = 8'($urandom);
    for (int v = 0; v < V; v++) for (int i = 0; i < N; i++) begin
      X[v][i] = 8'($urandom);
      T[v][i] = (v % 3 == 0) ? -1 : 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load rows
    for (int r = 0; r < N; r++) begin
      w_row_load = '0; w_row_load[r] = 1'b1;
      w_clear = (r == 0);
      for (int j = 0; j < N; j++) w_row[j] = W[r][j];
      @(negedge clk);
    end
    w_row_load = '0; w_clear = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      check(w_q[i][j] == W[i][j], "weight stored");
    // stream: vector v enters row 0 at step v; row i sees it at step v+i
    t0 = cyc;
    for (int s = 0; s < V + 2 * N + 2; s++) begin
      for (int i = 0; i < N; i++) begin
        int v;
        v = s - i;
        x_in[i] = (v >= 0 && v < V) ? X[v][i] : 8'sd0;
      end
      for (int j = 0; j < N; j++) begin
        int v;
        v = s - j;
        psum_top[j] = (v >= 0 && v < V) ? T[v][j] : 32'sd0;
      end
      // column j outputs vector v at step v + N + j
      for (int j = 0; j < N; j++) begin
        int v;
        v = s - N - j;
        if (v >= 0 && v < V) begin
          logic signed [31:0] ref_val;
          ref_val = T[v][j];
          for (int i = 0; i < N; i++) ref_val += 32'(X[v][i]) * 32'(W[i][j]);
          check(psum_out[j] == ref_val, $sformatf("col %0d vec %0d", j, v));
        end
      end
      @(negedge clk);
    end
    // partial load: only row 0 written, the rest must be cleared
    w_row_load = '0; w_row_load[0] = 1'b1; w_clear = 1'b1;
    for (int j = 0; j < N; j++) w_row[j] = 8'sd3;
    @(negedge clk);
    w_row_load = '0; w_clear = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      check(w_q[i][j] == ((i == 0) ? 8'sd3 : 8'sd0), "partial load clears");
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
endmodule
