// systolic_data_setup_tb: feeds a sequence of data and test vectors and
// checks that element i of each vector appears on row i exactly i cycles
// after it entered, that the test vectors are +1, -1 and 0, and that the
// first-row adder operand of column j is -1 exactly j cycles after the
// all -1 vector entered (0 otherwise).
module systolic_data_setup_tb;
  import tpu_pkg::*;
  localparam int N = 14;
  localparam int V = 30;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic               in_valid;
  vsel_e              vsel;
  logic signed [7:0]  x_vec [N];
  logic signed [7:0]  x_in [N];
  logic signed [31:0] psum_top [N];

  systolic_data_setup #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] X [V][N];
  vsel_e             S [V];
  logic              Vv [V];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic signed [7:0] expect_elem(int v, int i);
    if (v < 0 || v >= V || !Vv[v]) return 0;
    case (S[v])
      VSEL_DATA:  return X[v][i];
      VSEL_ONES:  return 1;
      VSEL_MONES: return -1;
      default:    return 0;
    endcase
  endfunction

  initial begin
    for (int v = 0; v < V; v++) begin
      for (int i = 0; i < N; i++) X[v][i] = 8'($urandom);
      Vv[v] = (v % 7 != 5);
      S[v]  = (v < V - 6) ? VSEL_DATA : vsel_e'((v - (V - 6)) % 3 + 1);
    end
    in_valid = 0; vsel = VSEL_DATA;
    for (int i = 0; i < N; i++) x_vec[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < V + N + 2; s++) begin
      if (s < V) begin
        in_valid = Vv[s];
        vsel     = S[s];
        for (int i = 0; i < N; i++) x_vec[i] = X[s][i];
      end else begin
        in_valid = 0;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        check(x_in[i] == expect_elem(s - i, i), $sformatf("row %0d step %0d", i, s));
        begin
          int v;
          logic signed [31:0] e;
          v = s - i;
          e = (v >= 0 && v < V && Vv[v] && S[v] == VSEL_MONES) ? -1 : 0;
          check(psum_top[i] == e, $sformatf("top %0d step %0d", i, s));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
