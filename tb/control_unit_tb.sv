// control_unit_tb: runs random instruction streams through the sequencer,
// with a queue standing in for the instruction FIFO. A reference model turns
// each popped instruction into the events it must cause, each at a fixed
// offset from the pop cycle (weight-buffer reads and row loads,
// unified-buffer reads, array inputs with their test-vector selection,
// accumulator operations 2N cycles after issue, accumulator reads,
// activation and result writes), and every cycle compares all of these
// outputs with the schedule. Further checks: the hazard spacing between
// instructions, that back-to-back matmuls overlap (L+1 cycles each) and that
// the testing variant costs exactly three cycles more, the synchronize and
// halt flags, the program counter, and that a reported fault flushes the
// queue, stops fetching and records the failing t_matmul's program counter.
module control_unit_tb;
  import tpu_pkg::*;
  localparam int N   = 5;
  localparam int WD  = 256;
  localparam int UD  = 64;
  localparam int AD  = 64;
  localparam int DRN = 2 * N + 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  instr_t instr;
  logic fifo_empty, fifo_pop, fifo_flush;
  logic start, clear_sync, clear_error, clear_pc;
  logic running, busy, sync_flag, error_flag;
  logic [15:0] pc, err_pc, err_count;
  logic edu_valid, edu_error;
  logic wb_rd_en; logic [7:0] wb_rd_addr;
  logic [N-1:0] w_row_load; logic w_clear, chk_w_valid, chk_w_first;
  logic ub_rd_en, ub_wr_en; logic [5:0] ub_rd_addr, ub_wr_addr;
  logic sa_in_valid; vsel_e sa_vsel;
  accop_e acc_op; logic [5:0] acc_addr;
  logic acc_rd_en; logic [5:0] acc_rd_addr;
  logic act_valid, act_sigmoid;

  control_unit #(.N(N), .WB_DEPTH(WD), .UB_DEPTH(UD), .ACC_DEPTH(AD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instruction FIFO stand-in
  instr_t q[$];
  assign fifo_empty = (q.size() == 0);
  assign instr      = fifo_empty ? '0 : q[0];

  // expected schedule, keyed by cycle
  int exp_wb[int], exp_row[int], exp_first[int], exp_ub_rd[int], exp_vsel[int];
  int exp_accop[int], exp_accaddr[int], exp_acc_rd[int], exp_act[int], exp_ub_wr[int];
  int cyc = 0;
  int last_mm_issue = -1000, last_act_issue = -1000;
  int pops[$];
  instr_t popped[$];
  int n_sync = 0, n_halt = 0, n_pop = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // compare outputs with the schedule
      check(wb_rd_en == exp_wb.exists(cyc), "weight read enable");
      if (wb_rd_en && exp_wb.exists(cyc)) check(int'(wb_rd_addr) == exp_wb[cyc], "weight read address");
      check((w_row_load != 0) == exp_row.exists(cyc) && chk_w_valid == exp_row.exists(cyc), "row load");
      if (exp_row.exists(cyc)) check(w_row_load == N'(1) << exp_row[cyc], "row one-hot");
      check(w_clear == exp_first.exists(cyc) && chk_w_first == exp_first.exists(cyc), "first row / clear");
      check(ub_rd_en == exp_ub_rd.exists(cyc), "operand read enable");
      if (ub_rd_en && exp_ub_rd.exists(cyc)) check(int'(ub_rd_addr) == exp_ub_rd[cyc], "operand read address");
      check(sa_in_valid == exp_vsel.exists(cyc), "array input valid");
      if (sa_in_valid && exp_vsel.exists(cyc)) check(int'(sa_vsel) == exp_vsel[cyc], "test vector select");
      check((acc_op != AOP_NONE) == exp_accop.exists(cyc), "accumulator op present");
      if (exp_accop.exists(cyc)) begin
        check(int'(acc_op) == exp_accop[cyc], $sformatf("accumulator op %0d exp %0d", acc_op, exp_accop[cyc]));
        if (exp_accaddr[cyc] >= 0) check(int'(acc_addr) == exp_accaddr[cyc], "accumulator address");
      end
      check(acc_rd_en == exp_acc_rd.exists(cyc), "accumulator read enable");
      if (acc_rd_en && exp_acc_rd.exists(cyc)) check(int'(acc_rd_addr) == exp_acc_rd[cyc], "accumulator read address");
      check(act_valid == exp_act.exists(cyc), "activation valid");
      if (act_valid && exp_act.exists(cyc)) check(int'(act_sigmoid) == exp_act[cyc], "sigmoid select");
      check(ub_wr_en == exp_ub_wr.exists(cyc), "result write enable");
      if (ub_wr_en && exp_ub_wr.exists(cyc)) check(int'(ub_wr_addr) == exp_ub_wr[cyc], "result write address");

      if (fifo_pop) begin
        instr_t i;
        int p, L, b, a;
        check(!fifo_empty, "pop only when not empty");
        i = q.pop_front();
        p = cyc; L = int'(i.length); b = int'(i.buf_addr); a = int'(i.acc_addr);
        pops.push_back(p); popped.push_back(i);
        n_pop++;
        unique case (op_e'(i.opcode[2:0]))
          OP_LOADW: begin
            check(p >= last_mm_issue + DRN + 1 && p >= last_act_issue + 4, "load_weights waits for drain");
            if (L > N) L = N;
            for (int k = 0; k < L; k++) begin
              exp_wb[p+1+k] = (b + k) % WD;
              exp_row[p+2+k] = k;
            end
            if (L > 0) exp_first[p+2] = 1;
          end
          OP_MATMUL: begin
            int m;
            check(p >= last_act_issue + 4, "matmul waits for activation writes");
            for (int k = 0; k < L; k++) begin
              exp_ub_rd[p+1+k] = (b + k) % UD;
              exp_vsel[p+2+k]  = VSEL_DATA;
              exp_accop[p+1+k+2*N]   = i.opcode[4] ? AOP_ACCUM : AOP_WRITE;
              exp_accaddr[p+1+k+2*N] = (a + k) % AD;
              last_mm_issue = p + 1 + k;
            end
            if (i.opcode[3]) begin
              for (m = 0; m < 3; m++) begin
                exp_vsel[p+2+L+m] = (m == 0) ? VSEL_ONES : (m == 1) ? VSEL_MONES : VSEL_ZEROS;
                exp_accop[p+1+L+m+2*N]   = (m == 0) ? AOP_CSA : (m == 1) ? AOP_NCSA : AOP_ZERO;
                exp_accaddr[p+1+L+m+2*N] = -1;
                last_mm_issue = p + 1 + L + m;
              end
            end
          end
          OP_ACT: begin
            check(p >= last_mm_issue + DRN + 1, "activation waits for the array to drain");
            for (int k = 0; k < L; k++) begin
              exp_acc_rd[p+1+k] = (a + k) % AD;
              exp_act[p+2+k]    = i.opcode[4];
              exp_ub_wr[p+3+k]  = (b + k) % UD;
              last_act_issue = p + 1 + k;
            end
          end
          OP_SYNC: begin
            check(p >= last_mm_issue + DRN + 1 && p >= last_act_issue + 4, "synchronize waits for idle");
            n_sync++;
          end
          OP_HALT: begin
            check(p >= last_mm_issue + DRN + 1 && p >= last_act_issue + 4, "halt waits for idle");
            n_halt++;
          end
          default: ;
        endcase
      end
      if (fifo_flush) q.delete();
    end
    cyc++;
  end

  task automatic push_random(int count);
    for (int t = 0; t < count; t++) begin
      logic [7:0] opc;
      int r;
      r = $urandom % 10;
      unique case (r)
        0, 1:    opc = ($urandom % 2) ? OPC_LOADW : OPC_T_LOADW;
        2, 3, 4: opc = ($urandom % 2) ? OPC_T_MATMUL : OPC_MATMUL;
        5:       opc = ($urandom % 2) ? OPC_MATMUL_ACC : OPC_T_MATMUL_ACC;
        6, 7:    opc = ($urandom % 2) ? OPC_RELU : OPC_SIGMOID;
        8:       opc = OPC_SYNC;
        default: opc = OPC_NOP;
      endcase
      q.push_back(make_instr(opc, 24'($urandom % 300), 16'($urandom % 100), $urandom % 9));
    end
  endtask

  task automatic wait_idle();
    int guard = 0;
    while ((q.size() != 0 || busy) && guard < 20000) begin @(negedge clk); guard++; end
    repeat (2 * N + 10) @(negedge clk);
  endtask

  initial begin
    {start, clear_sync, clear_error, clear_pc, edu_valid, edu_error} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // nothing happens before start
    q.push_back(make_instr(OPC_MATMUL, 24'd0, 16'd0, 32'd2));
    repeat (5) @(negedge clk);
    check(n_pop == 0 && !running, "no fetch before start");
    start = 1; @(negedge clk); start = 0;
    check(running, "running after start");
    wait_idle();
    check(n_pop == 1, "first instruction popped");

    // timing: matmul after matmul overlaps; the test variant costs three cycles
    begin
      int p0;
      p0 = pops.size();
      q.push_back(make_instr(OPC_MATMUL,   24'd0, 16'd0, 32'd6));
      q.push_back(make_instr(OPC_MATMUL,   24'd0, 16'd8, 32'd6));
      q.push_back(make_instr(OPC_T_MATMUL, 24'd0, 16'd0, 32'd6));
      q.push_back(make_instr(OPC_MATMUL,   24'd0, 16'd8, 32'd6));
      wait_idle();
      check(pops[p0+1] - pops[p0] == 7, $sformatf("matmul of 6 vectors takes 7 issue cycles (%0d)", pops[p0+1] - pops[p0]));
      check(pops[p0+3] - pops[p0+2] == 10, "t_matmul of 6 vectors takes 10 issue cycles");
      check((pops[p0+3] - pops[p0+2]) - (pops[p0+1] - pops[p0]) == 3, "test penalty is three cycles");
    end

    // synchronize raises the flag only after the datapath is idle
    q.push_back(make_instr(OPC_MATMUL, 24'd0, 16'd0, 32'd4));
    q.push_back(make_instr(OPC_SYNC, 24'd0, 16'd0, 32'd0));
    wait_idle();
    check(sync_flag, "sync flag set");
    clear_sync = 1; @(negedge clk); clear_sync = 0;
    check(!sync_flag, "sync flag cleared");

    // random streams
    for (int r = 0; r < 30; r++) begin
      push_random(20);
      wait_idle();
      check(q.size() == 0 && !busy, "stream drained");
    end
    check(pc == 16'(n_pop), $sformatf("program counter %0d vs pops %0d", pc, n_pop));

    // halt stops fetching
    q.push_back(make_instr(OPC_HALT, 24'd0, 16'd0, 32'd0));
    q.push_back(make_instr(OPC_NOP, 24'd0, 16'd0, 32'd0));
    wait_idle();
    check(!running && q.size() == 1, "halt stops fetching");
    start = 1; @(negedge clk); start = 0;
    wait_idle();
    check(q.size() == 0, "restart after halt");

    // a reported fault flushes the queue and records the failing t_matmul
    begin
      int pc_t;
      clear_pc = 1; @(negedge clk); clear_pc = 0;
      q.push_back(make_instr(OPC_T_LOADW, 24'd0, 16'd0, 32'(N)));
      q.push_back(make_instr(OPC_T_MATMUL, 24'd0, 16'd0, 32'd3));
      q.push_back(make_instr(OPC_RELU, 24'd0, 16'd0, 32'd3));
      for (int t = 0; t < 6; t++) q.push_back(make_instr(OPC_MATMUL, 24'd0, 16'd0, 32'd5));
      pc_t = 1;  // t_matmul is the second instruction after clearing
      // wait until the relu has been popped, then report a clean check
      while (popped[$].opcode != OPC_RELU) @(negedge clk);
      edu_valid = 1; edu_error = 0; @(negedge clk); edu_valid = 0;
      check(running && !error_flag, "a clean check does nothing");
      repeat (3) @(negedge clk);
      edu_valid = 1; edu_error = 1;
      #1 check(fifo_flush, "flush on a failed check");
      @(negedge clk); edu_valid = 0; edu_error = 0;
      check(error_flag && !running, "error flag set and fetching stopped");
      check(err_pc == 16'(pc_t), $sformatf("error program counter %0d", err_pc));
      check(err_count == 16'd1, "error count");
      check(q.size() == 0, "queue flushed");
      wait_idle();
      clear_error = 1; @(negedge clk); clear_error = 0;
      check(!error_flag, "error flag cleared");
    end
    check(n_sync > 0, "synchronize exercised");
    check(n_halt > 0, "halt exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
