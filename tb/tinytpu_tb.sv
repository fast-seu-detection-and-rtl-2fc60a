// tinytpu_tb: end-to-end test of the accelerator core with its unified
// buffer, driven over AXI4-Lite the way the host processor drives it.
//  - runs load_weights / matmul / activation / synchronize programs, in
//    normal and testing mode, and compares the results in the unified buffer
//    with a reference computed here (x * W per column, shift, saturate,
//    ReLU or hard sigmoid), including matmul with the accumulate flag;
//  - measures the cycles from start to the synchronize interrupt: the
//    testing-mode program must take exactly three cycles more than the plain
//    one, and doubling the vector count must add one cycle per vector;
//  - injects the three fault types of the self-test while a t_matmul runs
//    (a flipped stored weight, a stuck bit in a MAC's partial-sum register,
//    a corrupted checksum register) and checks the interrupt, the fault
//    class and column flags, the failing program counter, the error counter
//    and that the instruction FIFO was flushed;
//  - flips a bit in the unified buffer and checks the ECC correction count,
//    fills the instruction FIFO until a push is refused, and halts.
// Every mechanism is counted; one that never happened is a failure.
module tinytpu_tb;
  import tpu_pkg::*;
  localparam int N   = 8;
  localparam int WD  = 1024;
  localparam int UD  = 256;
  localparam int AD  = 64;
  localparam int FD  = 8;
  localparam int SHIFT = 5;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  axil_req_t host_req;
  axil_rsp_t host_rsp;
  logic ub_a_en, ub_a_we; logic [7:0] ub_a_addr; logic [1:0] ub_a_word;
  logic [31:0] ub_a_wdata, ub_a_rdata; logic [3:0] ub_a_strb;
  logic ub_b_rd_en, ub_b_wr_en; logic [7:0] ub_b_rd_addr, ub_b_wr_addr;
  logic signed [7:0] ub_b_rd_data [N];
  logic signed [7:0] ub_b_wr_data [N];
  logic [15:0] ecc_corr, ecc_unc, pc;
  logic alive, sync_irq, error_irq;

  tinytpu #(.N(N), .WB_DEPTH(WD), .UB_DEPTH(UD), .ACC_DEPTH(AD), .FIFO_DEPTH(FD)) dut (
    .clk, .rst_n, .axil_req (host_req), .axil_rsp (host_rsp),
    .ub_a_en, .ub_a_we, .ub_a_addr, .ub_a_word, .ub_a_wdata, .ub_a_strb, .ub_a_rdata,
    .ub_b_rd_en, .ub_b_rd_addr, .ub_b_rd_data, .ub_b_wr_en, .ub_b_wr_addr, .ub_b_wr_data,
    .ub_ecc_corr (ecc_corr), .ub_ecc_unc (ecc_unc), .pc, .alive, .sync_irq, .error_irq
  );
  unified_buffer #(.N(N), .DEPTH(UD)) u_ub (
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int cyc = 0;
  int start_cyc = 0, sync_cyc = 0;
  int n_test_vec = 0, n_clean = 0, n_wgt = 0, n_acc = 0, n_sa = 0, n_flush = 0;
  int n_stall = 0, n_sync = 0, n_relu = 0, n_sigm = 0, n_accum = 0, n_halt = 0;
  int n_ecc = 0, n_full = 0, n_loadw = 0;
  logic sync_q = 0, running_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.start) start_cyc = cyc;
    if (sync_irq && !sync_q) begin sync_cyc = cyc; n_sync++; end
    sync_q = sync_irq;
    if (running_q && !dut.running && !error_irq) n_halt++;
    running_q = dut.running;
    if (dut.sa_in_valid && dut.sa_vsel != VSEL_DATA) n_test_vec++;
    if (dut.edu_valid && !dut.edu_error) n_clean++;
    if (dut.edu_valid && dut.edu_error && dut.fclass == FC_WEIGHT)    n_wgt++;
    if (dut.edu_valid && dut.edu_error && dut.fclass == FC_ACCUM)     n_acc++;
    if (dut.edu_valid && dut.edu_error && dut.fclass == FC_SA_COLUMN) n_sa++;
    if (dut.if_flush) n_flush++;
    if (dut.running && !dut.if_empty && dut.u_ctrl.state == 0 && !dut.if_pop && !dut.edu_valid) n_stall++;
    if (dut.act_valid && !dut.act_sigmoid) n_relu++;
    if (dut.act_valid && dut.act_sigmoid) n_sigm++;
    if (dut.acc_op == AOP_ACCUM) n_accum++;
    if (dut.w_clear) n_loadw++;
  end

  // ---------------------------------------------------------------- data and reference
  logic signed [7:0] W [N][N];
  logic signed [7:0] X [64][N];

  task automatic load_data();
    for (int i = 0; i < N; i++) begin
      logic signed [7:0] v [];
      v = new[N];
      for (int j = 0; j < N; j++) begin W[i][j] = 8'($urandom % 61) - 8'sd30; v[j] = W[i][j]; end
      write_vec(0, i, v, N);
    end
    for (int r = 0; r < 64; r++) begin
      logic signed [7:0] v [];
      v = new[N];
      for (int j = 0; j < N; j++) begin X[r][j] = 8'($urandom % 81) - 8'sd40; v[j] = X[r][j]; end
      write_vec(1, r, v, N);
    end
  endtask

  function automatic longint dotcol(int r, int j);
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'(X[r][i]) * longint'(W[i][j]);
    return s;
  endfunction

  task automatic wait_sync(string what);
    int guard = 0;
    while (!sync_irq && guard < 20000) begin @(posedge clk); #1; guard++; end
    check(sync_irq, {what, ": synchronize interrupt"});
    write_ctrl({19'd0, 5'(SHIFT), 8'h02});   // clear sync, keep shift
  endtask

  task automatic wait_error(string what);
    int guard = 0;
    while (!error_irq && guard < 20000) begin @(posedge clk); #1; guard++; end
    check(error_irq, {what, ": error interrupt"});
  endtask

  task automatic start_run();
    write_ctrl({19'd0, 5'(SHIFT), 8'h01});
  endtask

  // results of rows xr0.. (optionally plus rows xr1..) at unified-buffer out..
  task automatic check_out(int out, int xr0, int xr1, int L, bit sigmoid, string what);
    for (int r = 0; r < L; r++) begin
      logic signed [7:0] v [];
      read_vec(out + r, N, v);
      for (int j = 0; j < N; j++) begin
        longint a = dotcol(xr0 + r, j);
        if (xr1 >= 0) a += dotcol(xr1 + r, j);
        check(v[j] == ref_act(a, SHIFT, sigmoid), $sformatf("%s row %0d col %0d: %0d vs %0d", what, r, j, v[j], ref_act(a, SHIFT, sigmoid)));
      end
    end
  endtask

  // ---------------------------------------------------------------- fault scenarios
  task automatic fault_run(int kind, int col);
    logic [31:0] d;
    int cnt0;
    read_csr(CSR_ERR_CNT, d);
    cnt0 = int'(d);
    write_ctrl({19'd0, 5'(SHIFT), 8'h08});  // clear the program counter
    push(OPC_T_LOADW, 0, 0, N);             // pc 0
    push(OPC_SYNC, 0, 0, 0);                // pc 1
    start_run();
    wait_sync("fault setup");
    if (kind == 0) begin
      // single-event upset in a stored weight of row 2
      logic signed [7:0] w;
      unique case (col)
        1: begin w = dut.u_mmu.g_row[2].g_col[1].u_mac.w_q; dut.u_mmu.g_row[2].g_col[1].u_mac.w_q = w ^ 8'h08; end
        default: begin w = dut.u_mmu.g_row[2].g_col[5].u_mac.w_q; dut.u_mmu.g_row[2].g_col[5].u_mac.w_q = w ^ 8'h08; end
      endcase
    end else if (kind == 1) begin
      force dut.u_mmu.g_row[4].g_col[6].u_mac.psum_out[0] = 1'b1;  // stuck-at-1
    end else begin
      force dut.u_acc.r0[3] = 16'h0123;                            // corrupted checksum register
    end
    push(OPC_T_MATMUL, 1, 0, 6);            // pc 2
    push(OPC_RELU, 200, 0, 6);              // pc 3, must be flushed
    push(OPC_SYNC, 0, 0, 0);                // pc 4, must be flushed
    wait_error("fault");
    if (kind == 1) release dut.u_mmu.g_row[4].g_col[6].u_mac.psum_out[0];
    if (kind == 2) release dut.u_acc.r0[3];
    read_csr(CSR_STATUS, d);
    check(d[2] && !d[0], "error status, fetching stopped");
    check(d[4], "instruction FIFO flushed");
    check(d[9:8] == ((kind == 0) ? FC_WEIGHT : (kind == 1) ? FC_SA_COLUMN : FC_ACCUM),
          $sformatf("fault class %0d for kind %0d", d[9:8], kind));
    read_csr(CSR_ERR_WGT, d);
    check(kind != 0 || d == 32'(1) << col, $sformatf("weight flag column %0d: %h", col, d));
    read_csr(CSR_ERR_SA, d);
    check(kind != 1 || d[6], $sformatf("array column flag: %h", d));
    read_csr(CSR_ERR_ACC, d);
    check(kind != 2 || d == 32'(1) << 3, $sformatf("accumulator flag: %h", d));
    read_csr(CSR_ERR_PC, d);
    check(d == 32'd2, $sformatf("failing program counter %0d", d));
    read_csr(CSR_ERR_CNT, d);
    check(int'(d) == cnt0 + 1, "error counter");
    check(!sync_irq, "flushed synchronize did not run");
    write_ctrl({19'd0, 5'(SHIFT), 8'h04});  // clear error
    // recovery: reload the weights and repeat the checked matmul
    push(OPC_T_LOADW, 0, 0, N);
    push(OPC_T_MATMUL, 1, 0, 6);
    push(OPC_RELU, 200, 0, 6);
    push(OPC_SYNC, 0, 0, 0);
    start_run();
    wait_sync("recovery");
    check(!error_irq, "recovered run passes its check");
    check_out(200, 1, -1, 6, 1'b0, "recovered relu");
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    logic [31:0] d;
    logic [1:0] resp;
    int t_plain, t_test, t_plain2;
    host_req = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    check(alive, "alive after reset");
    load_data();

    // testing-mode layer: t_load_weights, t_matmul, ReLU
    push(OPC_T_LOADW, 0, 0, N);
    push(OPC_T_MATMUL, 0, 0, 12);
    push(OPC_RELU, 100, 0, 12);
    push(OPC_SYNC, 0, 0, 0);
    start_run();
    wait_sync("test-mode layer");
    check(!error_irq, "no fault reported on a clean run");
    check_out(100, 0, -1, 12, 1'b0, "relu");

    // accumulate flag and sigmoid
    push(OPC_LOADW, 0, 0, N);
    push(OPC_MATMUL, 20, 16, 10);
    push(OPC_MATMUL_ACC, 40, 16, 10);
    push(OPC_SIGMOID, 120, 16, 10);
    push(OPC_SYNC, 0, 0, 0);
    start_run();
    wait_sync("accumulate layer");
    check_out(120, 20, 40, 10, 1'b1, "sigmoid of accumulated");

    // cycle counts: test penalty and one vector per cycle
    push(OPC_LOADW, 0, 0, N); push(OPC_MATMUL, 0, 0, 12); push(OPC_SYNC, 0, 0, 0);
    start_run(); wait_sync("plain timing"); t_plain = sync_cyc - start_cyc;
    push(OPC_T_LOADW, 0, 0, N); push(OPC_T_MATMUL, 0, 0, 12); push(OPC_SYNC, 0, 0, 0);
    start_run(); wait_sync("test timing"); t_test = sync_cyc - start_cyc;
    push(OPC_LOADW, 0, 0, N); push(OPC_MATMUL, 0, 0, 24); push(OPC_SYNC, 0, 0, 0);
    start_run(); wait_sync("double timing"); t_plain2 = sync_cyc - start_cyc;
    check(t_test - t_plain == 3, $sformatf("testing mode costs %0d cycles, expected 3", t_test - t_plain));
    check(t_plain2 - t_plain == 12, $sformatf("12 more vectors cost %0d cycles", t_plain2 - t_plain));
    $display("start to sync: plain %0d, testing %0d, plain with 24 vectors %0d cycles", t_plain, t_test, t_plain2);

    // the three fault classes
    fault_run(0, 5);
    fault_run(0, 1);
    fault_run(1, 6);
    fault_run(2, 3);

    // ECC correction of an upset in the unified buffer
    begin
      logic [38:0] cw;
      logic [31:0] before_v, after_v;
      axi_read(tpu_addr(1, 7, 1), before_v);
      cw = u_ub.mem[7][1];
      cw[11] = ~cw[11];
      u_ub.mem[7][1] = cw;
      axi_read(tpu_addr(1, 7, 1), after_v);
      check(after_v == before_v, "upset corrected on read");
      read_csr(CSR_UB_ECC, d);
      check(d[15:0] == 16'd1 && d[31:16] == 16'd0, $sformatf("ECC counters %h", d));
      if (d[15:0] == 16'd1) n_ecc++;
    end

    // halt, then fill the instruction FIFO: the push after FD is refused
    push(OPC_HALT, 0, 0, 0);
    repeat (10) @(posedge clk);
    #1;
    read_csr(CSR_STATUS, d);
    check(!d[0], "halt stops the core");
    for (int t = 0; t < FD; t++) push(OPC_NOP, 0, 0, 0);
    push_instr(OPC_NOP, 0, 0, 0, resp);
    check(resp == 2'b10, "push into a full FIFO refused");
    if (resp == 2'b10) n_full++;
    read_csr(CSR_STATUS, d);
    check(d[5], "FIFO full status");
    start_run();
    repeat (20) @(posedge clk);
    #1;
    read_csr(CSR_STATUS, d);
    check(d[4] && d[0], "NOPs drained, still running");
    push(OPC_HALT, 0, 0, 0);
    repeat (10) @(posedge clk);
    #1;
    read_csr(CSR_STATUS, d);
    check(!d[0], "halt stops the core");
    read_csr(CSR_PC, d);
    check(d == 32'(pc), "program counter register");

    $display("mechanisms: test vectors %0d, clean checks %0d, weight %0d, accumulator %0d, array %0d, flushes %0d, stalls %0d, sync %0d, relu %0d, sigmoid %0d, accumulate %0d, halts %0d, ecc %0d, fifo full %0d, weight loads %0d",
             n_test_vec, n_clean, n_wgt, n_acc, n_sa, n_flush, n_stall, n_sync, n_relu, n_sigm, n_accum, n_halt, n_ecc, n_full, n_loadw);
    check(n_test_vec > 0, "test vectors issued");
    check(n_clean > 0, "clean checks");
    check(n_wgt == 2, "weight bitflips detected");
    check(n_acc == 1, "accumulator fault detected");
    check(n_sa == 1, "array fault detected");
    check(n_flush == 4, "flushes");
    check(n_stall > 0, "hazard stalls");
    check(n_sync > 0, "synchronize interrupts");
    check(n_relu > 0 && n_sigm > 0, "both activations");
    check(n_accum > 0, "accumulate flag");
    check(n_halt > 0, "halt");
    check(n_ecc > 0, "ECC correction");
    check(n_full > 0, "FIFO full");
    check(n_loadw > 0, "weight loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
