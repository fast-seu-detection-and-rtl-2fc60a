// tinytpu: the accelerator core with runtime self-test, i.e. everything that
// is reconfigured when a fault is found. The unified buffer is outside and
// is reached through the ub_* ports.
//
// A host writes weights, operands and instructions over AXI4-Lite
// (host_interface), starts execution, and is interrupted by `sync_irq` when
// a synchronize instruction completes or by `error_irq` when a testing-mode
// matmul fails its check. The control unit streams one vector per cycle
// from the weight buffer into the N x N weight-stationary systolic array, or
// from the unified buffer through the systolic data setup into the array
// and on into the accumulators; the activation unit writes results back to
// the unified buffer. In testing mode (t_load_weights, t_matmul) the
// accumulators also sum the weights into R0/R1 (C_A), three test vectors
// follow the operands through the array (C_SA, not C_SA, 0), the
// accumulators form a = C_SA - C_A and a* = notC_SA + C_A, and the error
// detection unit classifies every column. `alive` rises one cycle after
// reset is released, telling the host that a freshly reconfigured core is
// usable. `pc` is the 16-bit count of executed instructions.
//
// Latencies: see control_unit (vector issue to accumulator 2N cycles, to the
// detection result 2N+2 cycles). The composition follows the described
// accelerator and its test extension; the sizes of the buffers and FIFO
// are this design's choices (see the submodules). The array's stored
// weights (w_q) and the FIFO fill level are left unused here: they are
// observation points for test and debug.
module tinytpu
  import tpu_pkg::*;
#(
  parameter int unsigned N          = 14,
  parameter int unsigned WB_DEPTH   = 32768,
  parameter int unsigned UB_DEPTH   = 4096,
  parameter int unsigned ACC_DEPTH  = 512,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host bus
  input  axil_req_t                   axil_req,
  output axil_rsp_t                   axil_rsp,
  // unified buffer, host word port
  output logic                        ub_a_en,
  output logic                        ub_a_we,
  output logic [$clog2(UB_DEPTH)-1:0] ub_a_addr,
  output logic [1:0]                  ub_a_word,
  output logic [31:0]                 ub_a_wdata,
  output logic [3:0]                  ub_a_strb,
  input  logic [31:0]                 ub_a_rdata,
  // unified buffer, datapath vector port
  output logic                        ub_b_rd_en,
  output logic [$clog2(UB_DEPTH)-1:0] ub_b_rd_addr,
  input  logic signed [7:0]           ub_b_rd_data [N],
  output logic                        ub_b_wr_en,
  output logic [$clog2(UB_DEPTH)-1:0] ub_b_wr_addr,
  output logic signed [7:0]           ub_b_wr_data [N],
  input  logic [15:0]                 ub_ecc_corr,
  input  logic [15:0]                 ub_ecc_unc,
  // status lines to the host's GPIO
  output logic [15:0]                 pc,
  output logic                        alive,
  output logic                        sync_irq,
  output logic                        error_irq
);
  localparam int unsigned DATA_W = 8;
  localparam int unsigned ACC_W  = 32;
  localparam int unsigned CHK_W  = 16;

  // host interface <-> internals
  logic                        wb_wr_en;
  logic [$clog2(WB_DEPTH)-1:0] wb_wr_addr;
  logic [1:0]                  wb_wr_word;
  logic [31:0]                 wb_wr_data;
  logic [3:0]                  wb_wr_strb;
  logic                        if_push, if_empty, if_full, if_pop, if_flush;
  instr_t                      if_wdata, if_rdata;
  logic                        start, clear_sync, clear_error, clear_pc;
  logic [4:0]                  act_shift;
  logic                        running, busy;
  logic [15:0]                 err_pc, err_count;

  // control <-> datapath
  logic                         wb_rd_en;
  logic [$clog2(WB_DEPTH)-1:0]  wb_rd_addr;
  logic signed [DATA_W-1:0]     wb_rd_data [N];
  logic [N-1:0]                 w_row_load;
  logic                         w_clear, chk_w_valid, chk_w_first;
  logic                         sa_in_valid;
  vsel_e                        sa_vsel;
  accop_e                       acc_op;
  logic [$clog2(ACC_DEPTH)-1:0] acc_addr, acc_rd_addr;
  logic                         acc_rd_en, act_valid, act_sigmoid, act_out_valid;
  logic signed [DATA_W-1:0]     x_in [N];
  logic signed [ACC_W-1:0]      psum_top [N];
  logic signed [ACC_W-1:0]      psum_col [N];
  logic signed [DATA_W-1:0]     w_q [N][N];
  logic signed [ACC_W-1:0]      acc_rd_data [N];
  logic [CHK_W-1:0]             r0 [N];
  logic [CHK_W-1:0]             r1 [N];
  logic [ACC_W-1:0]             csa [N];
  logic [ACC_W-1:0]             ncsa [N];
  logic [ACC_W-1:0]             zres [N];
  logic                         chk_done, edu_valid, edu_error;
  fault_class_e                 fclass;
  logic [N-1:0]                 wgt_flt, acc_flt, sa_flt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) alive <= 1'b0;
    else        alive <= 1'b1;
  end

  host_interface #(.N(N), .WB_DEPTH(WB_DEPTH), .UB_DEPTH(UB_DEPTH)) u_host (
    .clk, .rst_n,
    .req (axil_req), .rsp (axil_rsp),
    .wb_wr_en, .wb_wr_addr, .wb_wr_word, .wb_wr_data, .wb_wr_strb,
    .ub_en (ub_a_en), .ub_we (ub_a_we), .ub_addr (ub_a_addr), .ub_word (ub_a_word),
    .ub_wdata (ub_a_wdata), .ub_strb (ub_a_strb), .ub_rdata (ub_a_rdata),
    .if_push, .if_wdata, .if_full, .if_empty,
    .start, .clear_sync, .clear_error, .clear_pc, .act_shift,
    .running, .busy, .sync_flag (sync_irq), .error_flag (error_irq), .alive,
    .fclass, .pc, .err_pc, .err_count, .wgt_flt, .acc_flt, .sa_flt,
    .ub_ecc_corr, .ub_ecc_unc
  );

  instr_fifo #(.WIDTH($bits(instr_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .flush (if_flush), .push (if_push), .wdata (if_wdata),
    .pop (if_pop), .rdata (if_rdata), .empty (if_empty), .full (if_full), .count ()
  );

  control_unit #(.N(N), .WB_DEPTH(WB_DEPTH), .UB_DEPTH(UB_DEPTH), .ACC_DEPTH(ACC_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .instr (if_rdata), .fifo_empty (if_empty), .fifo_pop (if_pop), .fifo_flush (if_flush),
    .start, .clear_sync, .clear_error, .clear_pc,
    .running, .busy, .sync_flag (sync_irq), .error_flag (error_irq),
    .pc, .err_pc, .err_count,
    .edu_valid, .edu_error,
    .wb_rd_en, .wb_rd_addr, .w_row_load, .w_clear, .chk_w_valid, .chk_w_first,
    .ub_rd_en (ub_b_rd_en), .ub_rd_addr (ub_b_rd_addr),
    .ub_wr_en (ub_b_wr_en), .ub_wr_addr (ub_b_wr_addr),
    .sa_in_valid, .sa_vsel, .acc_op, .acc_addr, .acc_rd_en, .acc_rd_addr,
    .act_valid, .act_sigmoid
  );

  weight_buffer #(.N(N), .DATA_W(DATA_W), .DEPTH(WB_DEPTH)) u_wb (
    .clk, .wr_en (wb_wr_en), .wr_addr (wb_wr_addr), .wr_word (wb_wr_word),
    .wr_data (wb_wr_data), .wr_strb (wb_wr_strb),
    .rd_en (wb_rd_en), .rd_addr (wb_rd_addr), .rd_data (wb_rd_data)
  );

  systolic_data_setup #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_setup (
    .clk, .rst_n, .in_valid (sa_in_valid), .vsel (sa_vsel), .x_vec (ub_b_rd_data),
    .x_in, .psum_top
  );

  systolic_array #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_mmu (
    .clk, .rst_n, .w_row_load, .w_clear, .w_row (wb_rd_data),
    .x_in, .psum_top, .psum_out (psum_col), .w_q
  );

  accumulator_bank #(.N(N), .DATA_W(DATA_W), .ACC_W(ACC_W), .CHK_W(CHK_W),
                     .ACC_DEPTH(ACC_DEPTH)) u_acc (
    .clk, .rst_n, .psum_col, .op (acc_op), .acc_addr,
    .w_valid (chk_w_valid), .w_first (chk_w_first), .w_row (wb_rd_data),
    .rd_en (acc_rd_en), .rd_addr (acc_rd_addr), .rd_data (acc_rd_data),
    .r0, .r1, .csa, .ncsa, .zres, .chk_done
  );

  activation_unit #(.N(N), .ACC_W(ACC_W)) u_act (
    .clk, .rst_n, .in_valid (act_valid), .sigmoid (act_sigmoid), .shift (act_shift),
    .acc (acc_rd_data), .out_valid (act_out_valid), .act (ub_b_wr_data)
  );

  error_detection_unit #(.N(N), .ACC_W(ACC_W), .CHK_W(CHK_W)) u_edu (
    .clk, .rst_n, .chk_valid (chk_done), .r0, .r1, .csa, .ncsa, .zres,
    .res_valid (edu_valid), .error (edu_error), .fclass, .wgt_flt, .acc_flt, .sa_flt
  );

  // the activation result and its write strobe leave the pipeline together
  assert property (@(posedge clk) disable iff (!rst_n) act_out_valid == ub_b_wr_en)
    else $error("activation output and unified-buffer write out of step");
endmodule
