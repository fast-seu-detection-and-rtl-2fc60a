// error_detection_unit_tb: presents checksum results for the fault-free case
// and for each fault class and checks the per-column flags, the error bit
// and the class one cycle after chk_valid:
//   weight bitflip  : C_SA = S+d, notC_SA = not(S+d), so a = d, a* = not d
//   accumulator     : one of R0/R1 corrupted, the C_SA pair still complementary
//   SA column       : the same bit stuck in C_SA and notC_SA
//   zero vector     : a stuck-at-1 LSB leaves the zero result at 1
module error_detection_unit_tb;
  import tpu_pkg::*;
  localparam int N = 14;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic chk_valid, res_valid, error;
  logic [15:0] r0 [N];
  logic [15:0] r1 [N];
  logic [31:0] csa [N];
  logic [31:0] ncsa [N];
  logic [31:0] zres [N];
  fault_class_e fclass;
  logic [N-1:0] wgt_flt, acc_flt, sa_flt;

  error_detection_unit #(.N(N)) dut (.*);
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

  // build the values the accumulators would hold for column sums s_sa (seen
  // by the array) and s_a (seen by the accumulator lane)
  task automatic column(int j, int s_sa_p, int s_sa_n, int s_a0, int s_a1, int z);
    logic [31:0] c, nc;
    c  = 32'(s_sa_p);
    nc = ~32'(s_sa_n);
    csa[j]  = c;
    ncsa[j] = nc;
    r0[j]   = 16'(c) - 16'(s_a0);
    r1[j]   = 16'(nc) + 16'(s_a1);
    zres[j] = 32'(z);
  endtask

  task automatic run(int kind, int col, fault_class_e exp_cls);
    int s;
    for (int j = 0; j < N; j++) begin
      s = $signed($urandom % 3000) - 1500;
      column(j, s, s, s, s, 0);
    end
    s = $signed($urandom % 3000) - 1500;
    case (kind)
      1: column(col, s + 4, s + 4, s, s, 0);                 // weight bitflip d=4
      2: column(col, s, s, s ^ 32'h10, s, 0);                 // accumulator R0 lane fault
      4: column(col, s, s, s, s, 1);                          // stuck-at-1 LSB
      5: begin                                                // SA stuck bit in both
        logic [31:0] c, nc;
        c  = 32'(s) | 32'h0001_0000;
        nc = ~32'(s) | 32'h0001_0000;
        csa[col] = c; ncsa[col] = nc;
        r0[col] = 16'(c) - 16'(s);
        r1[col] = 16'(nc) + 16'(s);
        zres[col] = 0;
      end
      default: ;
    endcase
    chk_valid = 1;
    @(negedge clk);
    chk_valid = 0;
    check(res_valid, "result valid after one cycle");
    check(fclass == exp_cls, $sformatf("kind %0d class %0d exp %0d (s=%0d)", kind, fclass, exp_cls, s));
    check(error == (exp_cls != FC_NONE), "error bit");
    if (exp_cls == FC_WEIGHT)    check(wgt_flt == (N'(1) << col) && acc_flt == 0 && sa_flt == 0, "weight flag column");
    if (exp_cls == FC_ACCUM)     check(acc_flt == (N'(1) << col) && wgt_flt == 0 && sa_flt == 0, "acc flag column");
    if (exp_cls == FC_SA_COLUMN) check(sa_flt == (N'(1) << col) && wgt_flt == 0 && acc_flt == 0, "sa flag column");
    if (exp_cls == FC_NONE)      check(wgt_flt == 0 && acc_flt == 0 && sa_flt == 0, "no flags");
    @(negedge clk);
    check(!res_valid, "single-cycle result");
  endtask

  initial begin
    chk_valid = 0;
    for (int j = 0; j < N; j++) column(j, 0, 0, 0, 0, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int col;
      col = $urandom % N;
      case (t % 5)
        0: run(0, col, FC_NONE);
        1: run(1, col, FC_WEIGHT);
        2: run(2, col, FC_ACCUM);
        3: run(4, col, FC_SA_COLUMN);
        default: run(5, col, FC_SA_COLUMN);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
