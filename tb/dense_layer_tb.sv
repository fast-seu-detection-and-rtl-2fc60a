// dense_layer_tb: a tiled fully connected layer on the accelerator at its
// default size (14 x 14 array, default memory depths), driven over AXI4-Lite
// as the host processor drives it.
//
// The layer has K = 2N inputs and M = 2N outputs, so the weight matrix is cut
// into 2 x 2 tiles of N x N; a batch of B input vectors is streamed through
// each tile. Output tile o is computed as
//   load_weights(tile o,0); matmul(x[:, 0:N])            -> acc 0..B-1
//   load_weights(tile o,1); matmul+accumulate(x[:, N:2N]) -> acc 0..B-1
//   activation(acc 0..B-1) -> unified buffer
// with ReLU for output tile 0 and the hard sigmoid for tile 1, and the layer
// ends with synchronize and halt. The results are compared with a reference computed
// here.
//
// The same layer runs under three test policies: no testing mode, testing
// mode on every multiplication, and testing mode only on the last
// multiplication of the layer. The cycles from start to the synchronize
// interrupt are measured: testing mode must cost exactly 3 cycles per
// testing-mode multiplication (12 and 3 cycles here) and no fault may be
// reported. Every mechanism used is counted; one that never happened is a
// failure.
module dense_layer_tb;
  import tpu_pkg::*;
  localparam int N     = 14;
  localparam int KT    = 2;          // input tiles
  localparam int OT    = 2;          // output tiles
  localparam int B     = 32;         // input vectors (batch)
  localparam int SHIFT = 8;
  localparam int OUT   = 1024;       // unified-buffer vector where outputs go
  localparam int UDW   = 12;         // address width of the default unified buffer (4096)

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  axil_req_t host_req;
  axil_rsp_t host_rsp;
  logic ub_a_en, ub_a_we; logic [UDW-1:0] ub_a_addr; logic [1:0] ub_a_word;
  logic [31:0] ub_a_wdata, ub_a_rdata; logic [3:0] ub_a_strb;
  logic ub_b_rd_en, ub_b_wr_en; logic [UDW-1:0] ub_b_rd_addr, ub_b_wr_addr;
  logic signed [7:0] ub_b_rd_data [N];
  logic signed [7:0] ub_b_wr_data [N];
  logic [15:0] ecc_corr, ecc_unc, pc;
  logic alive, sync_irq, error_irq;

  tinytpu dut (
    .clk, .rst_n, .axil_req (host_req), .axil_rsp (host_rsp),
    .ub_a_en, .ub_a_we, .ub_a_addr, .ub_a_word, .ub_a_wdata, .ub_a_strb, .ub_a_rdata,
    .ub_b_rd_en, .ub_b_rd_addr, .ub_b_rd_data, .ub_b_wr_en, .ub_b_wr_addr, .ub_b_wr_data,
    .ub_ecc_corr (ecc_corr), .ub_ecc_unc (ecc_unc), .pc, .alive, .sync_irq, .error_irq
  );
  unified_buffer u_ub (
    .clk, .rst_n,
    .a_en (ub_a_en), .a_we (ub_a_we), .a_addr (ub_a_addr), .a_word (ub_a_word),
    .a_wdata (ub_a_wdata), .a_strb (ub_a_strb), .a_rdata (ub_a_rdata),
    .b_rd_en (ub_b_rd_en), .b_rd_addr (ub_b_rd_addr), .b_rd_data (ub_b_rd_data),
    .b_wr_en (ub_b_wr_en), .b_wr_addr (ub_b_wr_addr), .b_wr_data (ub_b_wr_data),
    .ecc_corrected (ecc_corr), .ecc_uncorrectable (ecc_unc)
  );
  always #5 clk = ~clk;

  `include "tb/tpu_host_tasks.svh"

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int cyc = 0, start_cyc = 0, sync_cyc = 0;
  int n_test_vec = 0, n_tmatmul = 0, n_accum = 0, n_relu = 0, n_sigm = 0, n_sync = 0, n_clean = 0;
  logic sync_q = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.start) start_cyc = cyc;
    if (sync_irq && !sync_q) begin sync_cyc = cyc; n_sync++; end
    sync_q = sync_irq;
    if (dut.sa_in_valid && dut.sa_vsel != VSEL_DATA) n_test_vec++;
    if (dut.if_pop && dut.if_rdata.opcode[2:0] == OP_MATMUL) begin
      if (dut.if_rdata.opcode[3]) n_tmatmul++;
      if (dut.if_rdata.opcode[4]) n_accum++;
    end
    if (dut.if_pop && dut.if_rdata.opcode[2:0] == OP_ACT) begin
      if (dut.if_rdata.opcode[4]) n_sigm++; else n_relu++;
    end
    if (dut.edu_valid && !dut.edu_error) n_clean++;
  end

  // ---------------------------------------------------------------- layer data
  logic signed [7:0] wmat [KT*N][OT*N];
  logic signed [7:0] xmat [B][KT*N];

  task automatic load_layer();
    logic signed [7:0] v [];
    v = new[N];
    // weight tile (o, t) row i at weight-buffer vector (o*KT + t)*N + i
    for (int o = 0; o < OT; o++)
      for (int t = 0; t < KT; t++)
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N; j++) v[j] = wmat[t*N + i][o*N + j];
          write_vec(0, (o*KT + t)*N + i, v, N);
        end
    // input tile t, vector b at unified-buffer vector t*B + b
    for (int t = 0; t < KT; t++)
      for (int b = 0; b < B; b++) begin
        for (int i = 0; i < N; i++) v[i] = xmat[b][t*N + i];
        write_vec(1, t*B + b, v, N);
      end
  endtask

  // policy 0: no testing mode, 1: every multiplication, 2: last one only
  task automatic run_layer(int policy, output int cycles);
    int guard = 0;
    write_ctrl({19'd0, 5'(SHIFT), 8'h0A});        // clear sync and program counter
    for (int o = 0; o < OT; o++) begin
      for (int t = 0; t < KT; t++) begin
        bit last = (o == OT - 1) && (t == KT - 1);
        bit tst  = (policy == 1) || (policy == 2 && last);
        logic [7:0] opc;
        push(tst ? OPC_T_LOADW : OPC_LOADW, (o*KT + t)*N, 0, N);
        if (t == 0) opc = tst ? OPC_T_MATMUL : OPC_MATMUL;
        else        opc = tst ? OPC_T_MATMUL_ACC : OPC_MATMUL_ACC;
        push(opc, t*B, 0, B);
      end
      push(o == 0 ? OPC_RELU : OPC_SIGMOID, OUT + o*B, 0, B);
    end
    push(OPC_SYNC, 0, 0, 0);
    push(OPC_HALT, 0, 0, 0);                      // stop fetching so the next layer waits for start
    write_ctrl({19'd0, 5'(SHIFT), 8'h01});        // start
    while (!sync_irq && guard < 50000) begin @(posedge clk); #1; guard++; end
    check(sync_irq, $sformatf("policy %0d: synchronize interrupt", policy));
    check(!error_irq, $sformatf("policy %0d: no fault reported", policy));
    @(posedge clk); #1;                           // let the counter record the edge
    cycles = sync_cyc - start_cyc;
    guard = 0;
    while (dut.running && guard < 1000) begin @(posedge clk); #1; guard++; end
    check(!dut.running, $sformatf("policy %0d: halted", policy));
  endtask

  task automatic check_outputs(int policy);
    logic signed [7:0] got [];
    for (int o = 0; o < OT; o++)
      for (int b = 0; b < B; b++) begin
        read_vec(OUT + o*B + b, N, got);
        for (int j = 0; j < N; j++) begin
          longint acc = 0;
          for (int k = 0; k < KT*N; k++) acc += longint'(xmat[b][k]) * longint'(wmat[k][o*N + j]);
          check(got[j] == ref_act(acc, SHIFT, o == 1),
                $sformatf("policy %0d: output %0d of vector %0d = %0d, expected %0d",
                          policy, o*N + j, b, got[j], ref_act(acc, SHIFT, o == 1)));
        end
      end
  endtask

  initial begin
    int c_plain, c_all, c_last;
    host_req = '0;
    for (int k = 0; k < KT*N; k++)
      for (int m = 0; m < OT*N; m++) wmat[k][m] = 8'($urandom);
    for (int b = 0; b < B; b++)
      for (int k = 0; k < KT*N; k++) xmat[b][k] = 8'($urandom);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    load_layer();

    run_layer(0, c_plain);
    check_outputs(0);
    run_layer(1, c_all);
    check_outputs(1);
    run_layer(2, c_last);
    check_outputs(2);

    $display("layer cycles: plain %0d, testing on every multiplication %0d, testing on the last one %0d",
             c_plain, c_all, c_last);
    check(c_all - c_plain == 3 * OT * KT, $sformatf("testing every multiplication costs %0d cycles, expected %0d",
                                                   c_all - c_plain, 3 * OT * KT));
    check(c_last - c_plain == 3, $sformatf("testing the last multiplication costs %0d cycles, expected 3",
                                          c_last - c_plain));
    check(ecc_unc == 0, "no uncorrectable buffer error");

    $display("mechanisms: test vectors %0d, t_matmul %0d, clean checks %0d, accumulate %0d, relu %0d, sigmoid %0d, sync %0d",
             n_test_vec, n_tmatmul, n_clean, n_accum, n_relu, n_sigm, n_sync);
    check(n_tmatmul == OT*KT + 1, "testing-mode multiplications ran");
    check(n_test_vec == 3 * (OT*KT + 1), "three test vectors per testing-mode multiplication");
    check(n_clean == OT*KT + 1, "every check came back clean");
    check(n_accum > 0 && n_relu > 0 && n_sigm > 0 && n_sync == 3, "accumulate, both activations and synchronize used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
