// host_interface: AXI4-Lite slave through which the host processor drives
// the accelerator as a memory-mapped peripheral.
//
// Address map (byte address, region in addr[21:20]):
//   0: weight buffer   - write only; vector = addr[19:4], word = addr[3:2]
//   1: unified buffer  - read/write; same layout
//   2: instruction FIFO- write the 80-bit instruction as three words: offset
//                        0x0 bits 31:0, 0x4 bits 63:32, 0x8 bits 79:64; the
//                        write at 0x8 pushes it (SLVERR if the FIFO is full)
//   3: registers       - word addr[7:2], see tpu_pkg CSR_* (control writes:
//                        bit0 start, bit1 clear sync, bit2 clear error,
//                        bit3 clear program counter, bits 12:8 activation
//                        shift)
// One transaction at a time: a write is taken when both address and data
// are valid and answered with bvalid the next cycle; a read is answered two
// cycles after arvalid (one cycle of buffer latency). Writes win over reads
// when both arrive together.
//
// Host access to the weight buffer, unified buffer and instruction FIFO over
// AXI follows the described system; the address map, register layout and
// transaction timing are this design's choices.
module host_interface
  import tpu_pkg::*;
#(
  parameter int unsigned N        = 14,
  parameter int unsigned WB_DEPTH = 32768,
  parameter int unsigned UB_DEPTH = 4096
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  axil_req_t                   req,
  output axil_rsp_t                   rsp,
  // weight buffer write port
  output logic                        wb_wr_en,
  output logic [$clog2(WB_DEPTH)-1:0] wb_wr_addr,
  output logic [1:0]                  wb_wr_word,
  output logic [31:0]                 wb_wr_data,
  output logic [3:0]                  wb_wr_strb,
  // unified buffer host port
  output logic                        ub_en,
  output logic                        ub_we,
  output logic [$clog2(UB_DEPTH)-1:0] ub_addr,
  output logic [1:0]                  ub_word,
  output logic [31:0]                 ub_wdata,
  output logic [3:0]                  ub_strb,
  input  logic [31:0]                 ub_rdata,
  // instruction FIFO
  output logic                        if_push,
  output instr_t                      if_wdata,
  input  logic                        if_full,
  input  logic                        if_empty,
  // control
  output logic                        start,
  output logic                        clear_sync,
  output logic                        clear_error,
  output logic                        clear_pc,
  output logic [4:0]                  act_shift,
  // status
  input  logic                        running,
  input  logic                        busy,
  input  logic                        sync_flag,
  input  logic                        error_flag,
  input  logic                        alive,
  input  fault_class_e                fclass,
  input  logic [15:0]                 pc,
  input  logic [15:0]                 err_pc,
  input  logic [15:0]                 err_count,
  input  logic [N-1:0]                wgt_flt,
  input  logic [N-1:0]                acc_flt,
  input  logic [N-1:0]                sa_flt,
  input  logic [15:0]                 ub_ecc_corr,
  input  logic [15:0]                 ub_ecc_unc
);
  logic        do_wr, do_rd;
  logic [1:0]  wr_reg, rd_reg_q;
  logic [63:0] if_stage;
  logic        rd_pend;
  logic [5:0]  rd_addr_q;
  logic        b_valid, r_valid;
  logic [1:0]  b_resp, r_resp;
  logic [31:0] r_data;
  logic [31:0] csr_rdata;

  assign do_wr  = req.awvalid && req.wvalid && !b_valid && !rd_pend && !r_valid;
  assign do_rd  = req.arvalid && !do_wr && !rd_pend && !r_valid && !b_valid;
  assign wr_reg = req.awaddr[21:20];

  always_comb begin
    rsp         = '0;
    rsp.awready = do_wr;
    rsp.wready  = do_wr;
    rsp.bvalid  = b_valid;
    rsp.bresp   = b_resp;
    rsp.arready = do_rd;
    rsp.rvalid  = r_valid;
    rsp.rresp   = r_resp;
    rsp.rdata   = r_data;
  end

  // weight buffer
  assign wb_wr_en   = do_wr && (wr_reg == REG_WB);
  assign wb_wr_addr = req.awaddr[4 +: $clog2(WB_DEPTH)];
  assign wb_wr_word = req.awaddr[3:2];
  assign wb_wr_data = req.wdata;
  assign wb_wr_strb = req.wstrb;

  // unified buffer (write or read)
  assign ub_en    = (do_wr && wr_reg == REG_UB) || (do_rd && req.araddr[21:20] == REG_UB);
  assign ub_we    = do_wr;
  assign ub_addr  = do_wr ? req.awaddr[4 +: $clog2(UB_DEPTH)] : req.araddr[4 +: $clog2(UB_DEPTH)];
  assign ub_word  = do_wr ? req.awaddr[3:2] : req.araddr[3:2];
  assign ub_wdata = req.wdata;
  assign ub_strb  = req.wstrb;

  // instruction FIFO
  assign if_push  = do_wr && wr_reg == REG_IF && req.awaddr[3:2] == 2'd2 && !if_full;
  assign if_wdata = instr_t'({req.wdata[15:0], if_stage});

  // control register pulses
  logic ctrl_wr;
  assign ctrl_wr     = do_wr && wr_reg == REG_CSR && req.awaddr[7:2] == CSR_CTRL;
  assign start       = ctrl_wr && req.wdata[0];
  assign clear_sync  = ctrl_wr && req.wdata[1];
  assign clear_error = ctrl_wr && req.wdata[2];
  assign clear_pc    = ctrl_wr && req.wdata[3];

  always_comb begin
    unique case (rd_addr_q)
      CSR_CTRL:    csr_rdata = {19'd0, act_shift, 8'd0};
      CSR_STATUS:  csr_rdata = {22'd0, fclass, 1'b0, busy, if_full, if_empty,
                                alive, error_flag, sync_flag, running};
      CSR_PC:      csr_rdata = {16'd0, pc};
      CSR_ERR_PC:  csr_rdata = {16'd0, err_pc};
      CSR_ERR_WGT: csr_rdata = 32'(wgt_flt);
      CSR_ERR_ACC: csr_rdata = 32'(acc_flt);
      CSR_ERR_SA:  csr_rdata = 32'(sa_flt);
      CSR_ERR_CNT: csr_rdata = {16'd0, err_count};
      CSR_UB_ECC:  csr_rdata = {ub_ecc_unc, ub_ecc_corr};
      default:     csr_rdata = 32'h0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_resp  <= 2'b00;
      r_valid <= 1'b0;
      r_resp  <= 2'b00;
      r_data  <= '0;
      rd_pend    <= 1'b0;
      rd_addr_q  <= '0;
      rd_reg_q   <= '0;
      if_stage   <= '0;
      act_shift  <= '0;
    end else begin
      // write channel
      if (do_wr) begin
        b_valid <= 1'b1;
        b_resp  <= (wr_reg == REG_IF && req.awaddr[3:2] == 2'd2 && if_full) ? 2'b10 : 2'b00;
        if (wr_reg == REG_IF && req.awaddr[3:2] == 2'd0) if_stage[31:0]  <= req.wdata;
        if (wr_reg == REG_IF && req.awaddr[3:2] == 2'd1) if_stage[63:32] <= req.wdata;
        if (ctrl_wr) act_shift <= req.wdata[12:8];
      end else if (b_valid && req.bready) begin
        b_valid <= 1'b0;
      end
      // read channel
      if (do_rd) begin
        rd_pend   <= 1'b1;
        rd_addr_q <= req.araddr[7:2];
        rd_reg_q  <= req.araddr[21:20];
      end else if (rd_pend) begin
        rd_pend    <= 1'b0;
        r_valid <= 1'b1;
        r_resp  <= 2'b00;
        unique case (rd_reg_q)
          REG_UB:  r_data <= ub_rdata;
          REG_CSR: r_data <= csr_rdata;
          default: r_data <= 32'h0;
        endcase
      end else if (r_valid && req.rready) begin
        r_valid <= 1'b0;
      end
    end
  end

  // AXI rule: a response is held until it is accepted
  assert property (@(posedge clk) disable iff (!rst_n)
                   b_valid && !req.bready |=> b_valid)
    else $error("bvalid dropped before bready");
  assert property (@(posedge clk) disable iff (!rst_n)
                   r_valid && !req.rready |=> r_valid && $stable(r_data))
    else $error("rvalid dropped or rdata changed before rready");
endmodule
