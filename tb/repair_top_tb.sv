// repair_top_tb: end-to-end test of the whole platform at its default sizes
// (14 x 14 array, full buffer depths). The testbench plays the three
// processor replicas (one program, driven on all three request ports), the
// partial-reconfiguration controller and the board's reboot.
//
// The host program is one network layer of four tiles: each tile loads its
// 14 weight vectors with t_load_weights, multiplies 16 operand vectors with
// t_matmul (the last tile with a plain matmul followed by an accumulating
// t_matmul), and applies ReLU or sigmoid into the unified buffer; a
// synchronize and a halt end the layer. Outputs are compared with a reference computed
// here. The host follows the error-handling flow of the platform:
//   error interrupt -> read the failing program counter -> request partial
//   reconfiguration (one GPIO line per replica, majority-voted) -> the
//   controller decouples the region, reloads it (modelled: region reset,
//   weight buffer contents lost, configuration faults repaired) and
//   recouples it -> poll `alive` -> rewrite weights -> resume from the
//   t_load_weights that precedes the failing instruction.
//   An error in the run that follows a reconfiguration increments an error
//   counter; when it exceeds 2 the board is rebooted (cold start: all
//   memories lost, the layer restarts from the beginning).
// Scenarios: clean run with a corrected upset in the unified buffer; a
// weight upset, a stuck partial-sum bit and a corrupted checksum register,
// each repaired by one reconfiguration; the same weight upset cured by a
// host that, seeing the weight-upset class, only clears the error, rewrites
// the weights and resumes (no reconfiguration); a fault that reconfiguration does
// not repair, ending in a reboot; one processor replica issuing wrong bus
// requests and a lone reconfiguration request, both outvoted.
// Every mechanism is counted and one that never happened is a failure.
module repair_top_tb;
  import tpu_pkg::*;
  localparam int N      = 14;
  localparam int NT     = 4;     // tiles in the layer
  localparam int L      = 16;    // operand vectors per tile
  localparam int SHIFT  = 6;
  localparam int RECONF = 400;   // cycles the region stays decoupled while reloading
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  axil_req_t host_req, req_c;
  axil_rsp_t host_rsp;
  logic dpr_req = 1'b0, dpr_req_c_extra = 1'b0;
  logic [18:0] gpio;
  logic tmr_mismatch, dfx_trigger;
  logic dfx_decouple = 1'b0, rp_rst_n = 1'b1;
  logic [15:0] ecc_corr, ecc_unc;
  logic [31:0] corrupt_c = '0;

  assign req_c = (corrupt_c != 0) ? axil_req_t'($bits(axil_req_t)'(host_req) ^ $bits(axil_req_t)'(corrupt_c)) : host_req;

  repair_top dut (
    .clk, .rst_n,
    .core_req_a (host_req), .core_req_b (host_req), .core_req_c (req_c), .core_rsp (host_rsp),
    .core_dpr_req_a (dpr_req), .core_dpr_req_b (dpr_req), .core_dpr_req_c (dpr_req || dpr_req_c_extra),
    .core_gpio_i (gpio), .tmr_mismatch, .dfx_trigger, .dfx_decouple, .rp_rst_n,
    .ub_ecc_corrected (ecc_corr), .ub_ecc_uncorrectable (ecc_unc)
  );
  always #5 clk = ~clk;

  `include "tb/tpu_host_tasks.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_test_vec = 0, n_clean = 0, n_wgt = 0, n_acc = 0, n_sa = 0, n_flush = 0, n_stall = 0;
  int n_relu = 0, n_sigm = 0, n_accum = 0, n_sync = 0, n_dpr = 0, n_decoupled = 0;
  int n_alive_poll = 0, n_resume = 0, n_post_dpr_err = 0, n_reboot = 0, n_mismatch = 0;
  int n_outvoted_dpr = 0, n_ecc = 0, n_results = 0, n_halt = 0, n_wreload = 0;
  bit soft_policy = 0;   // host cures a weight upset by reloading weights only
  logic trig_q = 0;
  always @(posedge clk) begin
    if (dut.u_tpu.sa_in_valid && dut.u_tpu.sa_vsel != VSEL_DATA) n_test_vec++;
    if (dut.u_tpu.edu_valid && !dut.u_tpu.edu_error) n_clean++;
    if (dut.u_tpu.edu_valid && dut.u_tpu.edu_error && dut.u_tpu.fclass == FC_WEIGHT)    n_wgt++;
    if (dut.u_tpu.edu_valid && dut.u_tpu.edu_error && dut.u_tpu.fclass == FC_ACCUM)     n_acc++;
    if (dut.u_tpu.edu_valid && dut.u_tpu.edu_error && dut.u_tpu.fclass == FC_SA_COLUMN) n_sa++;
    if (dut.u_tpu.if_flush) n_flush++;
    if (dut.u_tpu.running && !dut.u_tpu.if_empty && dut.u_tpu.u_ctrl.state == 0 &&
        !dut.u_tpu.if_pop && !dut.u_tpu.edu_valid) n_stall++;
    if (dut.u_tpu.act_valid && !dut.u_tpu.act_sigmoid) n_relu++;
    if (dut.u_tpu.act_valid && dut.u_tpu.act_sigmoid) n_sigm++;
    if (dut.u_tpu.acc_op == AOP_ACCUM) n_accum++;
    if (tmr_mismatch) n_mismatch++;
    if (dut_ecc_seen != ecc_corr) n_ecc++;
    dut_ecc_seen = ecc_corr;
  end
  logic [15:0] dut_ecc_seen = '0;

  // ---------------------------------------------------------------- fault injection
  // arm_kind: 0 none, 1 weight upset, 2 stuck partial-sum bit, 3 checksum register
  // the fault is injected right after the instruction at program index arm_pc
  // (a t_matmul) has been fetched, while its weights are in the array
  int  arm_kind = 0, arm_pc = 0;
  bit  persistent = 0, sa_forced = 0, acc_forced = 0;
  always @(posedge clk) begin
    if (arm_kind != 0 && dut.u_tpu.if_pop && dut.u_tpu.pc == 16'(arm_pc)) begin
      check(dut.u_tpu.if_rdata.opcode[3] && dut.u_tpu.if_rdata.opcode[2:0] == 3'(OP_MATMUL),
            "fault injected during a t_matmul");
      begin
        @(negedge clk);
        unique case (arm_kind)
          1: dut.u_tpu.u_mmu.g_row[3].g_col[9].u_mac.w_q = dut.u_tpu.u_mmu.g_row[3].g_col[9].u_mac.w_q ^ 8'h20;
          2: begin force dut.u_tpu.u_mmu.g_row[6].g_col[2].u_mac.psum_out[1] = 1'b1; sa_forced = 1; end
          default: begin force dut.u_tpu.u_acc.r0[11] = 16'h00F0; acc_forced = 1; end
        endcase
        arm_kind = 0;
      end
    end
  end

  task automatic repair_config();
    if (sa_forced)  begin release dut.u_tpu.u_mmu.g_row[6].g_col[2].u_mac.psum_out[1]; sa_forced = 0; end
    if (acc_forced) begin release dut.u_tpu.u_acc.r0[11]; acc_forced = 0; end
  endtask

  // ---------------------------------------------------------------- reconfiguration controller
  always @(posedge clk) begin
    if (dfx_trigger && !trig_q) begin
      n_dpr++;
      @(negedge clk);
      dfx_decouple = 1'b1;
      @(negedge clk);
      rp_rst_n = 1'b0;
      // the new partial bitstream: configuration repaired, block RAMs of the region initialised
      if (!persistent) repair_config();
      for (int v = 0; v < NT * N; v++) for (int j = 0; j < N; j++) dut.u_tpu.u_wb.mem[v][j] = '0;
      repeat (RECONF) begin
        @(negedge clk);
        n_decoupled++;
        check(gpio == '0 && host_rsp == '0, "region isolated while decoupled");
      end
      rp_rst_n = 1'b1;
      repeat (2) @(negedge clk);
      dfx_decouple = 1'b0;
    end
    trig_q = dfx_trigger;
  end

  // ---------------------------------------------------------------- data, program, reference
  logic signed [7:0] W [NT*N][N];
  logic signed [7:0] X [NT*2*L][N];
  instr_t prog [$];

  function automatic int xbase(int t);   return 2 * L * t; endfunction
  function automatic int obase(int t);   return 2000 + 2 * L * t; endfunction

  task automatic build_program();
    prog.delete();
    for (int t = 0; t < NT; t++) begin
      prog.push_back(make_instr(OPC_T_LOADW, 24'(N * t), 16'd0, 32'(N)));
      if (t == NT - 1) begin
        prog.push_back(make_instr(OPC_MATMUL, 24'(xbase(t)), 16'(64 * t), 32'(L)));
        prog.push_back(make_instr(OPC_T_MATMUL_ACC, 24'(xbase(t) + L), 16'(64 * t), 32'(L)));
      end else begin
        prog.push_back(make_instr(OPC_T_MATMUL, 24'(xbase(t)), 16'(64 * t), 32'(L)));
      end
      prog.push_back(make_instr((t % 2) ? OPC_SIGMOID : OPC_RELU, 24'(obase(t)), 16'(64 * t), 32'(L)));
    end
    prog.push_back(make_instr(OPC_SYNC, 24'd0, 16'd0, 32'd0));
    prog.push_back(make_instr(OPC_HALT, 24'd0, 16'd0, 32'd0));
  endtask

  task automatic write_weights();
    for (int v = 0; v < NT * N; v++) begin
      logic signed [7:0] e [];
      e = new[N];
      for (int j = 0; j < N; j++) e[j] = W[v][j];
      write_vec(0, v, e, N);
    end
  endtask

  task automatic write_all();
    for (int v = 0; v < NT * N; v++) for (int j = 0; j < N; j++) W[v][j] = 8'($urandom % 41) - 8'sd20;
    for (int v = 0; v < NT * 2 * L; v++) for (int j = 0; j < N; j++) X[v][j] = 8'($urandom % 61) - 8'sd30;
    write_weights();
    for (int v = 0; v < NT * 2 * L; v++) begin
      logic signed [7:0] e [];
      e = new[N];
      for (int j = 0; j < N; j++) e[j] = X[v][j];
      write_vec(1, v, e, N);
    end
  endtask

  task automatic clear_outputs();
    for (int t = 0; t < NT; t++) for (int r = 0; r < L; r++) for (int w = 0; w < 4; w++)
      axi_wr(tpu_addr(1, obase(t) + r, w), 32'h5555_5555);
  endtask

  function automatic longint dotcol(int t, int xr, int j);
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'(X[xr][i]) * longint'(W[N * t + i][j]);
    return s;
  endfunction

  task automatic check_layer(string what);
    for (int t = 0; t < NT; t++) begin
      for (int r = 0; r < L; r++) begin
        logic signed [7:0] v [];
        read_vec(obase(t) + r, N, v);
        for (int j = 0; j < N; j++) begin
          longint a = dotcol(t, xbase(t) + r, j);
          if (t == NT - 1) a += dotcol(t, xbase(t) + L + r, j);
          check(v[j] == ref_act(a, SHIFT, t % 2 == 1),
                $sformatf("%s: tile %0d row %0d col %0d got %0d expected %0d", what, t, r, j, v[j], ref_act(a, SHIFT, t % 2 == 1)));
        end
      end
    end
    n_results++;
  endtask

  // ---------------------------------------------------------------- host flow
  task automatic start_run();
    write_ctrl({19'd0, 5'(SHIFT), 8'h01});
  endtask

  task automatic reboot();
    n_reboot++;
    rst_n = 1'b0;
    repair_config();
    persistent = 0;
    for (int v = 0; v < 4096; v++) for (int w = 0; w < 4; w++) dut.u_ub.mem[v][w] = '0;
    for (int v = 0; v < NT * N; v++) for (int j = 0; j < N; j++) dut.u_tpu.u_wb.mem[v][j] = '0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    dut_ecc_seen = '0;
  endtask

  task automatic run_layer(string what);
    int idx = 0, err_cnt = 0;
    bit post_dpr = 0;
    int guard = 0;
    forever begin
      int w;
      logic [31:0] d;
      guard++;
      if (guard > 20) begin check(0, {what, ": recovery does not converge"}); break; end
      // program counter 0 is the first instruction pushed now
      write_ctrl({19'd0, 5'(SHIFT), 8'h08});
      for (int i = idx; i < prog.size(); i++) begin
        logic [1:0] resp;
        push_instr(prog[i].opcode, int'(prog[i].buf_addr), int'(prog[i].acc_addr), int'(prog[i].length), resp);
        check(resp == 2'b00, "instruction accepted");
      end
      start_run();
      w = 0;
      while (!gpio[17] && !gpio[18] && w < 50000) begin @(posedge clk); #1; w++; end
      if (gpio[17]) begin
        n_sync++;
        write_ctrl({19'd0, 5'(SHIFT), 8'h02});
        read_csr(CSR_STATUS, d);
        check(!d[0] && d[4] && !d[6], "halted and idle after the layer");
        if (!d[0]) n_halt++;
        break;
      end
      check(gpio[18], {what, ": run ends with an interrupt"});
      // error interrupt: find the failing instruction
      read_csr(CSR_ERR_PC, d);
      begin
        int fail_idx = idx + int'(d);
        int resume = fail_idx;
        logic [31:0] st;
        read_csr(CSR_STATUS, st);
        $display("%s: error at instruction %0d (resumed at %0d), class %0d, after reconfiguration %0d, t=%0t", what, fail_idx, idx, st[9:8], post_dpr, $time);
        check(fail_idx < prog.size() && prog[fail_idx].opcode[3] && prog[fail_idx].opcode[2:0] == 3'(OP_MATMUL),
              $sformatf("%s: failing instruction %0d is a t_matmul", what, fail_idx));
        while (resume > 0 && prog[resume].opcode != OPC_T_LOADW) resume--;
        read_csr(CSR_STATUS, d);
        check(d[4], "FIFO flushed on error");
        if (post_dpr) begin
          err_cnt++;
          n_post_dpr_err++;
        end
        if (soft_policy && st[9:8] == 2'(FC_WEIGHT) && !post_dpr) begin
          // a weight upset is transient: clear the error, reload and re-run
          write_ctrl({19'd0, 5'(SHIFT), 8'h04});
          read_csr(CSR_STATUS, d);
          check(!d[2], "error cleared by the host");
          write_weights();
          n_wreload++;
          idx = resume;
          if (idx > 0) n_resume++;
          continue;
        end
        if (err_cnt > 2) begin
          reboot();
          write_all();
          clear_outputs();
          idx = 0; err_cnt = 0; post_dpr = 0;
          continue;
        end
        // partial reconfiguration, requested by all three replicas
        @(negedge clk); dpr_req = 1'b1; @(negedge clk); dpr_req = 1'b0;
        w = 0;
        while (gpio[16] && w < 100) begin @(posedge clk); #1; w++; end
        check(!gpio[16], "alive drops during reconfiguration");
        w = 0;
        while (!gpio[16] && w < 10 * RECONF) begin @(posedge clk); #1; w++; n_alive_poll++; end
        check(gpio[16] && !gpio[18], "alive again after reconfiguration, no error pending");
        write_weights();
        post_dpr = 1;
        idx = resume;
        if (idx > 0) n_resume++;
      end
    end
    check_layer(what);
  endtask

  // ---------------------------------------------------------------- scenarios
  initial begin
    logic [31:0] d;
    host_req = '0;
    build_program();
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    check(gpio[16], "alive after power-up");
    write_all();
    check(prog.size() <= 32, "layer fits the instruction FIFO");

    // 1: clean layer, with an upset in an operand word that ECC corrects
    begin
      logic [38:0] cw;
      cw = dut.u_ub.mem[xbase(1) + 3][2];
      cw[20] = ~cw[20];
      dut.u_ub.mem[xbase(1) + 3][2] = cw;
    end
    clear_outputs();
    run_layer("clean");
    check(ecc_corr == 16'd1 && ecc_unc == 16'd0, $sformatf("ECC corrected %0d uncorrectable %0d", ecc_corr, ecc_unc));

    // 2-4: one fault each, repaired by one reconfiguration
    for (int k = 1; k <= 3; k++) begin
      int dpr0;
      dpr0 = n_dpr;
      clear_outputs();
      arm_pc = (k == 1) ? 4 : (k == 2) ? 7 : 11; arm_kind = k;
      run_layer($sformatf("fault %0d", k));
      check(n_dpr == dpr0 + 1, $sformatf("fault %0d: one reconfiguration", k));
    end

    // 5a: the same weight upset, cured without reconfiguration by a host that
    // reloads the weights when the fault class is a weight upset
    begin
      int dpr0;
      dpr0 = n_dpr;
      clear_outputs();
      soft_policy = 1;
      arm_pc = 4; arm_kind = 1;
      run_layer("weight upset, reload only");
      soft_policy = 0;
      check(n_dpr == dpr0 && n_wreload == 1, $sformatf("weight upset cured by a reload (%0d reconfigurations)", n_dpr - dpr0));
    end

    // 5: a fault that reconfiguration does not repair ends in a reboot
    begin
      int dpr0;
      dpr0 = n_dpr;
      clear_outputs();
      persistent = 1;
      arm_pc = 1; arm_kind = 2;
      run_layer("persistent fault");
      check(n_dpr == dpr0 + 3, $sformatf("three reconfigurations before the reboot (%0d)", n_dpr - dpr0));
      check(n_reboot == 1, "one reboot");
    end

    // 6: one replica misbehaves and is outvoted
    begin
      int dpr0, mm0;
      dpr0 = n_dpr;
      mm0 = n_mismatch;
      clear_outputs();
      corrupt_c = 32'h0030_0104;   // region, vector and word bits of its addresses
      @(negedge clk); dpr_req_c_extra = 1'b1; repeat (3) @(negedge clk); dpr_req_c_extra = 1'b0;
      repeat (5) @(negedge clk);
      check(n_dpr == dpr0, $sformatf("a lone reconfiguration request is outvoted (%0d %0d %0d)", n_dpr, dpr0, dfx_trigger));
      if (n_dpr == dpr0) n_outvoted_dpr++;
      run_layer("one faulty replica");
      corrupt_c = '0;
      check(n_mismatch > mm0, "voter reports the disagreement");
    end

    $display("mechanisms: test vectors %0d, clean checks %0d, weight %0d, accumulator %0d, array %0d, flushes %0d, stalls %0d, relu %0d, sigmoid %0d, accumulate %0d, sync %0d, halt %0d",
             n_test_vec, n_clean, n_wgt, n_acc, n_sa, n_flush, n_stall, n_relu, n_sigm, n_accum, n_sync, n_halt);
    $display("mechanisms: reconfigurations %0d, decoupled cycles %0d, alive polls %0d, resumes %0d, errors after reconfiguration %0d, reboots %0d, voter mismatch cycles %0d, outvoted requests %0d, ECC corrections %0d, layers checked %0d, weight reloads %0d",
             n_dpr, n_decoupled, n_alive_poll, n_resume, n_post_dpr_err, n_reboot, n_mismatch, n_outvoted_dpr, n_ecc, n_results, n_wreload);
    check(n_test_vec > 0, "test vectors issued");
    check(n_clean > 0, "clean checks");
    check(n_wgt > 0, "weight upset detected");
    check(n_acc > 0, "accumulator fault detected");
    check(n_sa > 0, "array fault detected");
    check(n_flush > 0, "pipeline flushed");
    check(n_stall > 0, "hazard stalls");
    check(n_relu > 0 && n_sigm > 0, "both activations");
    check(n_accum > 0, "accumulate flag");
    check(n_sync > 0, "synchronize");
    check(n_halt > 0, "halt");
    check(n_dpr > 0, "partial reconfiguration");
    check(n_decoupled > 0, "decoupling");
    check(n_alive_poll > 0, "alive polling");
    check(n_resume > 0, "resume from the failing instruction");
    check(n_post_dpr_err > 0, "error after reconfiguration counted");
    check(n_reboot > 0, "reboot");
    check(n_mismatch > 0, "voter mismatch");
    check(n_outvoted_dpr > 0, "outvoted reconfiguration request");
    check(n_ecc > 0, "ECC correction");
    check(n_wreload > 0, "weight upset cured by reloading weights");
    check(n_results == 7, "all layers checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
