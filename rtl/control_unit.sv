// control_unit: fetches instructions from the instruction FIFO and sequences
// the datapath, one vector per cycle.
//
// Instructions (see tpu_pkg for the encoding):
//   load_weights / t_load_weights : read `length` weight vectors (at most N)
//       from buf_addr and write them into array rows 0..length-1; rows not
//       written are cleared. The vectors also pass through the checksum lane
//       of the accumulators, leaving C_A_j in R0/R1.
//   matmul / t_matmul : read `length` operand vectors from the unified
//       buffer at buf_addr and stream them through the array; results go to
//       accumulators acc_addr.. (overwritten, or added with the accumulate
//       flag). The testing variant appends the three test vectors (+1, -1,
//       0), which costs exactly three more issue cycles.
//   activation (ReLU / sigmoid) : read `length` accumulator vectors from
//       acc_addr and write the activated int8 vectors to buf_addr.
//   synchronize : wait until the datapath is idle, then set the sync flag
//       (the host interrupt). halt : wait until idle, then stop fetching.
//   nop : nothing.
// Timing: an instruction is popped in one cycle and then issues one vector
// per cycle, so a matmul of L vectors occupies L+1 cycles of the issue stage
// (L+4 in testing mode) and back-to-back matmuls overlap their drain. The
// vector issued in cycle c enters the array in c+1; its result reaches the
// accumulators in c+2N; the detection result of a t_matmul is back in
// c+2N+2 for its zero vector. Instructions wait before they are popped for
// the hazards of this simple in-order pipe: load_weights, synchronize and
// halt wait for the array and the activation path to drain, activation waits
// for the array to drain, matmul waits for pending activation writes.
// While the next instruction runs, the detection result of the previous
// t_matmul is evaluated. On a detected fault the unit stops fetching,
// flushes the FIFO, records the program counter of the failing t_matmul and
// raises the error flag (the host interrupt). The 16-bit program counter
// counts popped instructions and is cleared by the host.
//
// Instruction semantics, the three-cycle test penalty, evaluation of the
// check during the next instruction and flush-on-error follow the described
// design. The pipeline depths, the hazard rules, the one-cycle pop and
// zero-clearing of unloaded rows are this design's choices. A t_matmul must
// follow a t_load_weights, since the check overwrites R0/R1.
module control_unit
  import tpu_pkg::*;
#(
  parameter int unsigned N         = 14,
  parameter int unsigned WB_DEPTH  = 32768,
  parameter int unsigned UB_DEPTH  = 4096,
  parameter int unsigned ACC_DEPTH = 512
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // instruction FIFO
  input  instr_t                       instr,
  input  logic                         fifo_empty,
  output logic                         fifo_pop,
  output logic                         fifo_flush,
  // host control
  input  logic                         start,
  input  logic                         clear_sync,
  input  logic                         clear_error,
  input  logic                         clear_pc,
  // status
  output logic                         running,
  output logic                         busy,
  output logic                         sync_flag,
  output logic                         error_flag,
  output logic [15:0]                  pc,
  output logic [15:0]                  err_pc,
  output logic [15:0]                  err_count,
  // detection result
  input  logic                         edu_valid,
  input  logic                         edu_error,
  // weight buffer and array weight load
  output logic                         wb_rd_en,
  output logic [$clog2(WB_DEPTH)-1:0]  wb_rd_addr,
  output logic [N-1:0]                 w_row_load,
  output logic                         w_clear,
  output logic                         chk_w_valid,
  output logic                         chk_w_first,
  // unified buffer operand read and result write
  output logic                         ub_rd_en,
  output logic [$clog2(UB_DEPTH)-1:0]  ub_rd_addr,
  output logic                         ub_wr_en,
  output logic [$clog2(UB_DEPTH)-1:0]  ub_wr_addr,
  // systolic data setup
  output logic                         sa_in_valid,
  output vsel_e                        sa_vsel,
  // accumulator bank
  output accop_e                       acc_op,
  output logic [$clog2(ACC_DEPTH)-1:0] acc_addr,
  output logic                         acc_rd_en,
  output logic [$clog2(ACC_DEPTH)-1:0] acc_rd_addr,
  // activation unit
  output logic                         act_valid,
  output logic                         act_sigmoid
);
  localparam int unsigned WBA  = $clog2(WB_DEPTH);
  localparam int unsigned UBA  = $clog2(UB_DEPTH);
  localparam int unsigned ACA  = $clog2(ACC_DEPTH);
  localparam int unsigned DLY  = 2 * N;       // issue -> accumulator
  localparam int unsigned DRN  = 2 * N + 3;   // issue -> detection result seen

  typedef enum logic [2:0] {S_FETCH, S_LOADW, S_MATMUL, S_TEST, S_ACT} state_e;

  typedef struct packed {
    logic   valid;
    vsel_e  vsel;
    accop_e op;
    logic [ACA-1:0] addr;
  } mm_meta_t;

  state_e      state;
  instr_t      cur;
  logic [31:0] k;
  logic [1:0]  tk;
  logic [31:0] len_eff;
  logic [7:0]  drain;
  logic [1:0]  act_cnt;
  logic [15:0] chk_pc;

  // head-of-FIFO decode and hazards
  op_e  head_op;
  logic head_ready;
  always_comb begin
    head_op = op_e'(instr.opcode[2:0]);
    unique case (head_op)
      OP_LOADW:         head_ready = (drain == 0) && (act_cnt == 0);
      OP_MATMUL:        head_ready = (act_cnt == 0);
      OP_ACT:           head_ready = (drain == 0);
      OP_SYNC, OP_HALT: head_ready = (drain == 0) && (act_cnt == 0);
      default:          head_ready = 1'b1;
    endcase
  end

  logic err_hit;
  assign err_hit  = edu_valid && edu_error;
  assign fifo_pop = (state == S_FETCH) && running && !err_hit && !fifo_empty && head_ready;
  assign busy     = (state != S_FETCH) || (drain != 0) || (act_cnt != 0);

  // ---------------------------------------------------------------- issue stage
  mm_meta_t issue_mm;
  logic     issue_wb, issue_act;
  logic [31:0] issue_k;

  always_comb begin
    issue_mm   = '0;
    issue_wb   = 1'b0;
    issue_act  = 1'b0;
    issue_k    = k;
    unique case (state)
      S_LOADW:  issue_wb = 1'b1;
      S_MATMUL: begin
        issue_mm.valid = 1'b1;
        issue_mm.vsel  = VSEL_DATA;
        issue_mm.op    = cur.opcode[4] ? AOP_ACCUM : AOP_WRITE;
        issue_mm.addr  = ACA'(32'(cur.acc_addr) + k);
      end
      S_TEST: begin
        issue_mm.valid = 1'b1;
        unique case (tk)
          2'd0:    begin issue_mm.vsel = VSEL_ONES;  issue_mm.op = AOP_CSA;  end
          2'd1:    begin issue_mm.vsel = VSEL_MONES; issue_mm.op = AOP_NCSA; end
          default: begin issue_mm.vsel = VSEL_ZEROS; issue_mm.op = AOP_ZERO; end
        endcase
      end
      S_ACT:    issue_act = 1'b1;
      default:  ;
    endcase
  end

  assign wb_rd_en    = issue_wb;
  assign wb_rd_addr  = WBA'(32'(cur.buf_addr) + issue_k);
  assign ub_rd_en    = issue_mm.valid && (issue_mm.vsel == VSEL_DATA);
  assign ub_rd_addr  = UBA'(32'(cur.buf_addr) + issue_k);
  assign acc_rd_en   = issue_act;
  assign acc_rd_addr = ACA'(32'(cur.acc_addr) + issue_k);

  // ---------------------------------------------------------------- delay lines
  mm_meta_t mm_pipe [DLY];
  logic     wl_v;
  logic [$clog2(N)-1:0] wl_row;
  logic     wl_first;
  logic [1:0]            av_pipe;
  logic [UBA-1:0]        aw_addr [2];
  logic                  sg_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(DLY); s++) mm_pipe[s] <= '0;
      wl_v     <= 1'b0;
      wl_row   <= '0;
      wl_first <= 1'b0;
      av_pipe  <= '0;
      aw_addr[0] <= '0;
      aw_addr[1] <= '0;
      sg_pipe  <= 1'b0;
    end else begin
      mm_pipe[0] <= issue_mm;
      for (int s = 1; s < int'(DLY); s++) mm_pipe[s] <= mm_pipe[s-1];
      wl_v     <= issue_wb;
      wl_row   <= $clog2(N)'(k);
      wl_first <= issue_wb && (k == 0);
      av_pipe  <= {av_pipe[0], issue_act};
      aw_addr[0] <= UBA'(32'(cur.buf_addr) + k);
      aw_addr[1] <= aw_addr[0];
      if (issue_act) sg_pipe <= cur.opcode[4];
    end
  end

  assign sa_in_valid = mm_pipe[0].valid;
  assign sa_vsel     = mm_pipe[0].vsel;
  assign acc_op      = mm_pipe[DLY-1].valid ? mm_pipe[DLY-1].op : AOP_NONE;
  assign acc_addr    = mm_pipe[DLY-1].addr;

  always_comb begin
    w_row_load = '0;
    if (wl_v) w_row_load[wl_row] = 1'b1;
  end
  assign w_clear     = wl_v && wl_first;
  assign chk_w_valid = wl_v;
  assign chk_w_first = wl_first;

  assign act_valid   = av_pipe[0];
  assign act_sigmoid = sg_pipe;
  assign ub_wr_en    = av_pipe[1];
  assign ub_wr_addr  = aw_addr[1];

  // ---------------------------------------------------------------- sequencer
  always_comb begin
    len_eff = cur.length;
    if (op_e'(cur.opcode[2:0]) == OP_LOADW && cur.length > 32'(N)) len_eff = 32'(N);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_FETCH;
      cur        <= '0;
      k          <= '0;
      tk         <= '0;
      drain      <= '0;
      act_cnt    <= '0;
      running    <= 1'b0;
      sync_flag  <= 1'b0;
      error_flag <= 1'b0;
      pc         <= '0;
      err_pc     <= '0;
      err_count  <= '0;
      chk_pc     <= '0;
    end else begin
      // drain bookkeeping
      if (issue_mm.valid)    drain <= 8'(DRN);
      else if (drain != 0)   drain <= drain - 1'b1;
      if (issue_act)         act_cnt <= 2'd3;
      else if (act_cnt != 0) act_cnt <= act_cnt - 1'b1;

      if (start)       running    <= 1'b1;
      if (clear_sync)  sync_flag  <= 1'b0;
      if (clear_error) error_flag <= 1'b0;
      if (clear_pc)    pc         <= '0;

      unique case (state)
        S_FETCH: begin
          if (fifo_pop) begin
            cur <= instr;
            k   <= '0;
            tk  <= '0;
            pc  <= pc + 1'b1;
            unique case (head_op)
              OP_LOADW:  if (instr.length != 0) state <= S_LOADW;
              OP_MATMUL: begin
                if (instr.opcode[3]) chk_pc <= pc;
                if (instr.length != 0)   state <= S_MATMUL;
                else if (instr.opcode[3]) state <= S_TEST;
              end
              OP_ACT:    if (instr.length != 0) state <= S_ACT;
              OP_SYNC:   sync_flag <= 1'b1;
              OP_HALT:   running   <= 1'b0;
              default:   ;
            endcase
          end
        end
        S_LOADW, S_ACT: begin
          k <= k + 1;
          if (k + 1 >= len_eff) state <= S_FETCH;
        end
        S_MATMUL: begin
          k <= k + 1;
          if (k + 1 >= cur.length) state <= cur.opcode[3] ? S_TEST : S_FETCH;
        end
        S_TEST: begin
          tk <= tk + 1'b1;
          if (tk == 2'd2) state <= S_FETCH;
        end
        default: state <= S_FETCH;
      endcase

      // a failed check stops everything: flush, record, interrupt
      if (err_hit) begin
        running    <= 1'b0;
        error_flag <= 1'b1;
        err_pc     <= chk_pc;
        err_count  <= err_count + 1'b1;
        state      <= S_FETCH;
      end
    end
  end

  assign fifo_flush = err_hit;
endmodule
