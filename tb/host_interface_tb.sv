// host_interface_tb: acts as the AXI4-Lite master of the host interface.
// Checks that weight-buffer and unified-buffer writes appear on the buffer
// ports with the right vector, word, data and strobes; that three writes to
// the instruction window push one 80-bit instruction, and that a push into a
// full FIFO is refused with SLVERR; that control-register bits become
// single-cycle pulses and set the activation shift; that every status
// register reads back what the inputs show; and that a unified-buffer read
// returns the data of the addressed word. It also checks the response
// timing: bvalid one cycle after the write is taken, rvalid two cycles after
// the read address.
module host_interface_tb;
  import tpu_pkg::*;
  localparam int N  = 14;
  localparam int WD = 256;
  localparam int UD = 64;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  axil_req_t req;
  axil_rsp_t rsp;
  logic wb_wr_en; logic [7:0] wb_wr_addr; logic [1:0] wb_wr_word; logic [31:0] wb_wr_data; logic [3:0] wb_wr_strb;
  logic ub_en, ub_we; logic [5:0] ub_addr; logic [1:0] ub_word; logic [31:0] ub_wdata, ub_rdata; logic [3:0] ub_strb;
  logic if_push, if_full, if_empty; instr_t if_wdata;
  logic start, clear_sync, clear_error, clear_pc; logic [4:0] act_shift;
  logic running, busy, sync_flag, error_flag, alive;
  fault_class_e fclass;
  logic [15:0] pc, err_pc, err_count, ub_ecc_corr, ub_ecc_unc;
  logic [N-1:0] wgt_flt, acc_flt, sa_flt;

  host_interface #(.N(N), .WB_DEPTH(WD), .UB_DEPTH(UD)) dut (.*);
  always #5 clk = ~clk;

  // unified buffer stand-in: one cycle read latency, data derived from address
  always_ff @(posedge clk) if (ub_en && !ub_we) ub_rdata <= {ub_addr, ub_word, 24'hA5C300} ^ 32'h1234_5678;

  // event log of single-cycle outputs
  int n_wb = 0, n_ub_wr = 0, n_push = 0, n_start = 0, n_csync = 0, n_cerr = 0, n_cpc = 0;
  logic [7:0] last_wb_addr; logic [1:0] last_wb_word; logic [31:0] last_wb_data; logic [3:0] last_wb_strb;
  logic [5:0] last_ub_addr; logic [1:0] last_ub_word; logic [31:0] last_ub_data; logic [3:0] last_ub_strb;
  instr_t last_instr;
  always_ff @(posedge clk) begin
    if (wb_wr_en) begin n_wb++; last_wb_addr <= wb_wr_addr; last_wb_word <= wb_wr_word; last_wb_data <= wb_wr_data; last_wb_strb <= wb_wr_strb; end
    if (ub_en && ub_we) begin n_ub_wr++; last_ub_addr <= ub_addr; last_ub_word <= ub_word; last_ub_data <= ub_wdata; last_ub_strb <= ub_strb; end
    if (if_push) begin n_push++; last_instr <= if_wdata; end
    if (start) n_start++;
    if (clear_sync) n_csync++;
    if (clear_error) n_cerr++;
    if (clear_pc) n_cpc++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 40) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  task automatic axi_write(logic [31:0] addr, logic [31:0] data, logic [3:0] strb, output logic [1:0] resp);
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = strb; req.wvalid = 1; req.bready = 1;
    forever begin
      logic taken;
      #1 taken = rsp.awready && rsp.wready;
      @(posedge clk);
      if (taken) break;
    end
    #1;
    req.awvalid = 0; req.wvalid = 0;
    check(rsp.bvalid, "bvalid one cycle after the write is taken");
    resp = rsp.bresp;
    @(posedge clk); #1;
    check(!rsp.bvalid, "bvalid dropped after bready");
  endtask

  task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
    int lat;
    req.araddr = addr; req.arvalid = 1; req.rready = 0;
    @(negedge clk);
    check(rsp.arready, "arready");
    @(posedge clk); #1;
    req.arvalid = 0;
    lat = 1;
    while (!rsp.rvalid && lat < 20) begin @(posedge clk); #1; lat++; end
    check(lat == 2, $sformatf("read latency %0d", lat));
    // hold rready low for a cycle: data must stay
    data = rsp.rdata;
    @(posedge clk); #1;
    check(rsp.rvalid && rsp.rdata == data, "read data held until rready");
    req.rready = 1;
    @(posedge clk); #1;
    req.rready = 0;
    check(!rsp.rvalid, "rvalid dropped after rready");
  endtask

  initial begin
    logic [1:0] resp;
    logic [31:0] d;
    req = '0;
    if_full = 0; if_empty = 1;
    {running, busy, sync_flag, error_flag, alive} = '0;
    fclass = FC_NONE; pc = 0; err_pc = 0; err_count = 0; ub_ecc_corr = 0; ub_ecc_unc = 0;
    wgt_flt = 0; acc_flt = 0; sa_flt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weight-buffer writes
    for (int t = 0; t < 50; t++) begin
      logic [7:0] v; logic [1:0] w; logic [31:0] dd; logic [3:0] s; int n_prev;
      v = 8'($urandom); w = 2'($urandom); dd = $urandom; s = 4'($urandom);
      n_prev = n_wb;
      axi_write({10'd0, REG_WB, 8'd0, v, w, 2'b00}, dd, s, resp);
      check(n_wb == n_prev + 1 && resp == 2'b00, $sformatf("one weight write %0d %0d %0d", n_wb, n_prev, resp));
      check(last_wb_addr == v && last_wb_word == w && last_wb_data == dd && last_wb_strb == s, "weight write fields");
    end
    // unified-buffer writes and reads
    for (int t = 0; t < 50; t++) begin
      logic [5:0] v; logic [1:0] w; logic [31:0] dd; logic [3:0] s; int n_prev;
      v = 6'($urandom); w = 2'($urandom); dd = $urandom; s = 4'($urandom);
      n_prev = n_ub_wr;
      axi_write({10'd0, REG_UB, 10'd0, v, w, 2'b00}, dd, s, resp);
      check(n_ub_wr == n_prev + 1, "one unified-buffer write");
      check(last_ub_addr == v && last_ub_word == w && last_ub_data == dd && last_ub_strb == s, "unified-buffer write fields");
      axi_read({10'd0, REG_UB, 10'd0, v, w, 2'b00}, d);
      check(d == ({v, w, 24'hA5C300} ^ 32'h1234_5678), "unified-buffer read data");
    end
    check(n_wb == 50, "no stray weight writes");
    // instruction pushes
    for (int t = 0; t < 20; t++) begin
      instr_t ins; int n_prev;
      ins = make_instr(8'($urandom), 24'($urandom), 16'($urandom), $urandom);
      n_prev = n_push;
      axi_write({10'd0, REG_IF, 20'h0}, ins[31:0], 4'hF, resp);
      axi_write({10'd0, REG_IF, 20'h4}, ins[63:32], 4'hF, resp);
      check(n_push == n_prev, "no push n_prev the last word");
      axi_write({10'd0, REG_IF, 20'h8}, {16'd0, ins[79:64]}, 4'hF, resp);
      check(n_push == n_prev + 1 && resp == 2'b00, "push on the last word");
      check(last_instr == ins, "instruction assembled");
    end
    if_full = 1;
    axi_write({10'd0, REG_IF, 20'h8}, 32'h0, 4'hF, resp);
    check(resp == 2'b10 && n_push == 20, "full FIFO refuses the push with SLVERR");
    if_full = 0;
    // control pulses
    axi_write({10'd0, REG_CSR, 20'h0}, 32'h0000_0D01, 4'hF, resp);
    check(n_start == 1 && n_csync == 0 && n_cerr == 0 && n_cpc == 0, "start pulse");
    check(act_shift == 5'd13, "activation shift");
    axi_write({10'd0, REG_CSR, 20'h0}, 32'h0000_070E, 4'hF, resp);
    check(n_start == 1 && n_csync == 1 && n_cerr == 1 && n_cpc == 1, "clear pulses");
    check(act_shift == 5'd7, "activation shift updated");
    axi_read({10'd0, REG_CSR, 20'h0}, d);
    check(d == 32'h0000_0700, "control readback");
    // status registers
    for (int t = 0; t < 30; t++) begin
      {running, busy, sync_flag, error_flag, alive, if_full, if_empty} = 7'($urandom);
      fclass = fault_class_e'($urandom % 4);
      pc = 16'($urandom); err_pc = 16'($urandom); err_count = 16'($urandom);
      wgt_flt = N'($urandom); acc_flt = N'($urandom); sa_flt = N'($urandom);
      ub_ecc_corr = 16'($urandom); ub_ecc_unc = 16'($urandom);
      axi_read({10'd0, REG_CSR, 12'd0, CSR_STATUS, 2'b00}, d);
      check(d == {22'd0, fclass, 1'b0, busy, if_full, if_empty, alive, error_flag, sync_flag, running}, "status word");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_PC, 2'b00}, d);      check(d == 32'(pc), "pc");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_ERR_PC, 2'b00}, d);  check(d == 32'(err_pc), "err pc");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_ERR_WGT, 2'b00}, d); check(d == 32'(wgt_flt), "weight flags");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_ERR_ACC, 2'b00}, d); check(d == 32'(acc_flt), "accumulator flags");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_ERR_SA, 2'b00}, d);  check(d == 32'(sa_flt), "array flags");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_ERR_CNT, 2'b00}, d); check(d == 32'(err_count), "error count");
      axi_read({10'd0, REG_CSR, 12'd0, CSR_UB_ECC, 2'b00}, d);  check(d == {ub_ecc_unc, ub_ecc_corr}, "ECC counters");
    end
    if_full = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
