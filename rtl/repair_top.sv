// repair_top: the fault-tolerant accelerator platform - a TinyTPU-style
// systolic accelerator with runtime self-test, placed in a partially
// reconfigurable region, next to the unified buffer that survives
// reconfiguration, behind a decoupler, and driven by a triplicated processor
// through a majority voter.
//
// Outside this module (ports): the three processor replicas (their
// AXI4-Lite requests and their reconfiguration-request GPIO outputs come
// in, the voted response and the GPIO inputs go out to all three), and the
// partial-reconfiguration controller with its configuration port and
// bitstream memory (it receives the voted request as `dfx_trigger` and
// drives `dfx_decouple` and `rp_rst_n`, which restarts the freshly loaded
// accelerator).
//
// Inside: tmr_voter on the bus requests and on the GPIO outputs;
// dfx_decoupler between the static side and the accelerator; tinytpu (the
// reconfigurable region); unified_buffer (ECC protected, static).
// The 19 status bits of the accelerator reach the processors' GPIO inputs as
// {error, synchronize, alive, program counter[15:0]}.
//
// The block structure and the 19-bit status bundle follow the described
// platform; the bit order of the status bundle, the single-bit reconfiguration
// request and the region reset are this design's choices.
module repair_top
  import tpu_pkg::*;
#(
  parameter int unsigned N          = 14,
  parameter int unsigned WB_DEPTH   = 32768,
  parameter int unsigned UB_DEPTH   = 4096,
  parameter int unsigned ACC_DEPTH  = 512,
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // triplicated processor
  input  axil_req_t   core_req_a,
  input  axil_req_t   core_req_b,
  input  axil_req_t   core_req_c,
  output axil_rsp_t   core_rsp,
  input  logic        core_dpr_req_a,
  input  logic        core_dpr_req_b,
  input  logic        core_dpr_req_c,
  output logic [18:0] core_gpio_i,
  output logic        tmr_mismatch,
  // partial reconfiguration controller
  output logic        dfx_trigger,
  input  logic        dfx_decouple,
  input  logic        rp_rst_n,
  // unified buffer ECC counters
  output logic [15:0] ub_ecc_corrected,
  output logic [15:0] ub_ecc_uncorrectable
);
  localparam int unsigned UBA = $clog2(UB_DEPTH);

  axil_req_t voted_req, rp_req;
  axil_rsp_t rp_rsp;
  logic       mm_bus, mm_gpio;

  tmr_voter #(.W($bits(axil_req_t))) u_vote_bus (
    .in_a (core_req_a), .in_b (core_req_b), .in_c (core_req_c),
    .voted (voted_req), .mismatch (mm_bus)
  );
  tmr_voter #(.W(1)) u_vote_gpio (
    .in_a (core_dpr_req_a), .in_b (core_dpr_req_b), .in_c (core_dpr_req_c),
    .voted (dfx_trigger), .mismatch (mm_gpio)
  );
  assign tmr_mismatch = mm_bus || mm_gpio;

  // accelerator side of the decoupler
  logic             rp_a_en, rp_a_we;
  logic [UBA-1:0]   rp_a_addr;
  logic [1:0]       rp_a_word;
  logic [31:0]      rp_a_wdata, rp_a_rdata;
  logic [3:0]       rp_a_strb;
  logic             rp_b_rd_en, rp_b_wr_en;
  logic [UBA-1:0]   rp_b_rd_addr, rp_b_wr_addr;
  logic signed [7:0] rp_b_rd_data [N];
  logic signed [7:0] rp_b_wr_data [N];
  logic [15:0]      rp_ecc_corr, rp_ecc_unc;
  logic [15:0]      rp_pc;
  logic             rp_alive, rp_sync, rp_error;
  // static side
  logic             s_a_en, s_a_we;
  logic [UBA-1:0]   s_a_addr;
  logic [1:0]       s_a_word;
  logic [31:0]      s_a_wdata, s_a_rdata;
  logic [3:0]       s_a_strb;
  logic             s_b_rd_en, s_b_wr_en;
  logic [UBA-1:0]   s_b_rd_addr, s_b_wr_addr;
  logic signed [7:0] s_b_rd_data [N];
  logic signed [7:0] s_b_wr_data [N];
  logic             decoupled;

  logic rp_rst_combined_n;
  assign rp_rst_combined_n = rst_n && rp_rst_n;

  tinytpu #(.N(N), .WB_DEPTH(WB_DEPTH), .UB_DEPTH(UB_DEPTH), .ACC_DEPTH(ACC_DEPTH),
            .FIFO_DEPTH(FIFO_DEPTH)) u_tpu (
    .clk, .rst_n (rp_rst_combined_n),
    .axil_req (rp_req), .axil_rsp (rp_rsp),
    .ub_a_en (rp_a_en), .ub_a_we (rp_a_we), .ub_a_addr (rp_a_addr), .ub_a_word (rp_a_word),
    .ub_a_wdata (rp_a_wdata), .ub_a_strb (rp_a_strb), .ub_a_rdata (rp_a_rdata),
    .ub_b_rd_en (rp_b_rd_en), .ub_b_rd_addr (rp_b_rd_addr), .ub_b_rd_data (rp_b_rd_data),
    .ub_b_wr_en (rp_b_wr_en), .ub_b_wr_addr (rp_b_wr_addr), .ub_b_wr_data (rp_b_wr_data),
    .ub_ecc_corr (rp_ecc_corr), .ub_ecc_unc (rp_ecc_unc),
    .pc (rp_pc), .alive (rp_alive), .sync_irq (rp_sync), .error_irq (rp_error)
  );

  dfx_decoupler #(.N(N), .UB_DEPTH(UB_DEPTH)) u_dec (
    .decouple (dfx_decouple), .decoupled (decoupled),
    .s_req (voted_req), .s_rsp (core_rsp), .rp_req (rp_req), .rp_rsp (rp_rsp),
    .rp_ub_a_en (rp_a_en), .rp_ub_a_we (rp_a_we), .rp_ub_a_addr (rp_a_addr),
    .rp_ub_a_word (rp_a_word), .rp_ub_a_wdata (rp_a_wdata), .rp_ub_a_strb (rp_a_strb),
    .rp_ub_a_rdata (rp_a_rdata),
    .s_ub_a_en (s_a_en), .s_ub_a_we (s_a_we), .s_ub_a_addr (s_a_addr), .s_ub_a_word (s_a_word),
    .s_ub_a_wdata (s_a_wdata), .s_ub_a_strb (s_a_strb), .s_ub_a_rdata (s_a_rdata),
    .rp_ub_b_rd_en (rp_b_rd_en), .rp_ub_b_rd_addr (rp_b_rd_addr), .rp_ub_b_rd_data (rp_b_rd_data),
    .rp_ub_b_wr_en (rp_b_wr_en), .rp_ub_b_wr_addr (rp_b_wr_addr), .rp_ub_b_wr_data (rp_b_wr_data),
    .s_ub_b_rd_en (s_b_rd_en), .s_ub_b_rd_addr (s_b_rd_addr), .s_ub_b_rd_data (s_b_rd_data),
    .s_ub_b_wr_en (s_b_wr_en), .s_ub_b_wr_addr (s_b_wr_addr), .s_ub_b_wr_data (s_b_wr_data),
    .s_ecc_corr (ub_ecc_corrected), .s_ecc_unc (ub_ecc_uncorrectable),
    .rp_ecc_corr (rp_ecc_corr), .rp_ecc_unc (rp_ecc_unc),
    .rp_status ({rp_error, rp_sync, rp_alive, rp_pc}), .s_status (core_gpio_i)
  );

  unified_buffer #(.N(N), .DEPTH(UB_DEPTH)) u_ub (
    .clk, .rst_n,
    .a_en (s_a_en), .a_we (s_a_we), .a_addr (s_a_addr), .a_word (s_a_word),
    .a_wdata (s_a_wdata), .a_strb (s_a_strb), .a_rdata (s_a_rdata),
    .b_rd_en (s_b_rd_en), .b_rd_addr (s_b_rd_addr), .b_rd_data (s_b_rd_data),
    .b_wr_en (s_b_wr_en), .b_wr_addr (s_b_wr_addr), .b_wr_data (s_b_wr_data),
    .ecc_corrected (ub_ecc_corrected), .ecc_uncorrectable (ub_ecc_uncorrectable)
  );

  // while isolated, nothing may reach the buffer from the accelerator side
  assert property (@(posedge clk) disable iff (!rst_n) decoupled |-> !(s_a_en || s_b_wr_en))
    else $error("unified buffer accessed while the accelerator is decoupled");
endmodule
