// dfx_decoupler: isolates the accelerator while its region of the device is
// being partially reconfigured.
//
// While `decouple` is high every signal crossing the boundary is forced to
// zero: the accelerator's AXI4-Lite responses, its unified-buffer commands
// and its status lines (program counter, alive, synchronize, error) seen by
// the static side, and the bus requests and buffer read data seen by the
// accelerator. With `decouple` low all signals pass unchanged. `decoupled`
// reports the state. Purely combinational.
//
// Holding the interface at stable low values during reconfiguration follows
// the described platform; isolating both directions is this design's choice.
module dfx_decoupler
  import tpu_pkg::*;
#(
  parameter int unsigned N        = 14,
  parameter int unsigned UB_DEPTH = 4096
) (
  input  logic                        decouple,
  output logic                        decoupled,
  // bus: static side
  input  axil_req_t                   s_req,
  output axil_rsp_t                   s_rsp,
  // bus: accelerator side
  output axil_req_t                   rp_req,
  input  axil_rsp_t                   rp_rsp,
  // unified buffer host port: accelerator side (in) -> buffer side (out)
  input  logic                        rp_ub_a_en,
  input  logic                        rp_ub_a_we,
  input  logic [$clog2(UB_DEPTH)-1:0] rp_ub_a_addr,
  input  logic [1:0]                  rp_ub_a_word,
  input  logic [31:0]                 rp_ub_a_wdata,
  input  logic [3:0]                  rp_ub_a_strb,
  output logic [31:0]                 rp_ub_a_rdata,
  output logic                        s_ub_a_en,
  output logic                        s_ub_a_we,
  output logic [$clog2(UB_DEPTH)-1:0] s_ub_a_addr,
  output logic [1:0]                  s_ub_a_word,
  output logic [31:0]                 s_ub_a_wdata,
  output logic [3:0]                  s_ub_a_strb,
  input  logic [31:0]                 s_ub_a_rdata,
  // unified buffer datapath port
  input  logic                        rp_ub_b_rd_en,
  input  logic [$clog2(UB_DEPTH)-1:0] rp_ub_b_rd_addr,
  output logic signed [7:0]           rp_ub_b_rd_data [N],
  input  logic                        rp_ub_b_wr_en,
  input  logic [$clog2(UB_DEPTH)-1:0] rp_ub_b_wr_addr,
  input  logic signed [7:0]           rp_ub_b_wr_data [N],
  output logic                        s_ub_b_rd_en,
  output logic [$clog2(UB_DEPTH)-1:0] s_ub_b_rd_addr,
  input  logic signed [7:0]           s_ub_b_rd_data [N],
  output logic                        s_ub_b_wr_en,
  output logic [$clog2(UB_DEPTH)-1:0] s_ub_b_wr_addr,
  output logic signed [7:0]           s_ub_b_wr_data [N],
  input  logic [15:0]                 s_ecc_corr,
  input  logic [15:0]                 s_ecc_unc,
  output logic [15:0]                 rp_ecc_corr,
  output logic [15:0]                 rp_ecc_unc,
  // status lines
  input  logic [18:0]                 rp_status,
  output logic [18:0]                 s_status
);
  logic pass;
  assign pass      = !decouple;
  assign decoupled = decouple;

  assign s_rsp  = pass ? rp_rsp : '0;
  assign rp_req = pass ? s_req  : '0;

  assign rp_ub_a_rdata = pass ? s_ub_a_rdata : '0;
  assign s_ub_a_en     = pass && rp_ub_a_en;
  assign s_ub_a_we     = pass && rp_ub_a_we;
  assign s_ub_a_addr   = pass ? rp_ub_a_addr  : '0;
  assign s_ub_a_word   = pass ? rp_ub_a_word  : '0;
  assign s_ub_a_wdata  = pass ? rp_ub_a_wdata : '0;
  assign s_ub_a_strb   = pass ? rp_ub_a_strb  : '0;

  assign s_ub_b_rd_en   = pass && rp_ub_b_rd_en;
  assign s_ub_b_rd_addr = pass ? rp_ub_b_rd_addr : '0;
  assign s_ub_b_wr_en   = pass && rp_ub_b_wr_en;
  assign s_ub_b_wr_addr = pass ? rp_ub_b_wr_addr : '0;
  for (genvar j = 0; j < N; j++) begin : g_vec
    assign rp_ub_b_rd_data[j] = pass ? s_ub_b_rd_data[j]  : '0;
    assign s_ub_b_wr_data[j]  = pass ? rp_ub_b_wr_data[j] : '0;
  end

  assign rp_ecc_corr = pass ? s_ecc_corr : '0;
  assign rp_ecc_unc  = pass ? s_ecc_unc  : '0;
  assign s_status    = pass ? rp_status  : '0;
endmodule
