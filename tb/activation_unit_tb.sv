// activation_unit_tb: drives random and boundary accumulator values with
// random shifts through ReLU and sigmoid and compares each output, one cycle
// later, with a reference: s = saturate16(v >>> shift); ReLU = clamp(s, 0,
// 127); sigmoid = clamp(s + 64, 0, 127).
module activation_unit_tb;
  localparam int N = 14;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic in_valid, sigmoid, out_valid;
  logic [4:0] shift;
  logic signed [31:0] acc [N];
  logic signed [7:0]  act [N];

  activation_unit #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_act(longint v, int sh, bit sg);
    longint s;
    s = v;
    for (int k = 0; k < sh; k++) s = (s < 0) ? -((-s + 1) / 2) : s / 2; // floor division
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    if (sg) s = s + 64;
    if (s < 0) return 0;
    if (s > 127) return 127;
    return int'(s);
  endfunction

  initial begin
    int exp_v [N];
    in_valid = 0; sigmoid = 0; shift = 0;
    for (int j = 0; j < N; j++) acc[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      in_valid = 1;
      sigmoid  = t[0];
      shift    = (t < 100) ? 5'd0 : 5'($urandom);
      for (int j = 0; j < N; j++) begin
        case ($urandom % 4)
          0: acc[j] = $signed($urandom);
          1: acc[j] = $signed($urandom % 400) - 200;
          2: acc[j] = (j % 2) ? 32'sh7fffffff : 32'sh80000000;
          default: acc[j] = $signed($urandom % 70000) - 35000;
        endcase
        exp_v[j] = ref_act(longint'(acc[j]), int'(shift), sigmoid);
      end
      @(negedge clk);
      check(out_valid, "valid after one cycle");
      for (int j = 0; j < N; j++)
        check(int'(act[j]) == exp_v[j], $sformatf("t=%0d j=%0d acc=%0d sh=%0d sg=%0d got %0d exp %0d",
              t, j, acc[j], shift, sigmoid, act[j], exp_v[j]));
    end
    in_valid = 0;
    @(negedge clk);
    check(!out_valid, "valid drops");
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
