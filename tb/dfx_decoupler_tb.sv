// dfx_decoupler_tb: drives random values on every input of the decoupler and
// checks that with decouple low each output equals its source, and with
// decouple high every output that crosses the boundary reads zero.
module dfx_decoupler_tb;
  import tpu_pkg::*;
  localparam int N = 14;
  localparam int D = 4096;
  localparam int AW = $clog2(D);
  int checks = 0, failures = 0;
  logic decouple, decoupled;
  axil_req_t s_req, rp_req;
  axil_rsp_t s_rsp, rp_rsp;
  logic rp_ub_a_en, rp_ub_a_we, s_ub_a_en, s_ub_a_we;
  logic [AW-1:0] rp_ub_a_addr, s_ub_a_addr;
  logic [1:0] rp_ub_a_word, s_ub_a_word;
  logic [31:0] rp_ub_a_wdata, s_ub_a_wdata, rp_ub_a_rdata, s_ub_a_rdata;
  logic [3:0] rp_ub_a_strb, s_ub_a_strb;
  logic rp_ub_b_rd_en, rp_ub_b_wr_en, s_ub_b_rd_en, s_ub_b_wr_en;
  logic [AW-1:0] rp_ub_b_rd_addr, rp_ub_b_wr_addr, s_ub_b_rd_addr, s_ub_b_wr_addr;
  logic signed [7:0] rp_ub_b_rd_data [N];
  logic signed [7:0] rp_ub_b_wr_data [N];
  logic signed [7:0] s_ub_b_rd_data [N];
  logic signed [7:0] s_ub_b_wr_data [N];
  logic [15:0] s_ecc_corr, s_ecc_unc, rp_ecc_corr, rp_ecc_unc;
  logic [18:0] rp_status, s_status;

  dfx_decoupler #(.N(N), .UB_DEPTH(D)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [31:0] r32();
    return $urandom;
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      bit p;
      decouple = (t % 3 == 1) ? 1'b1 : 1'($urandom);
      s_req  = axil_req_t'({r32(), r32(), r32(), r32()});
      rp_rsp = axil_rsp_t'({r32(), r32()});
      rp_ub_a_en = 1'($urandom); rp_ub_a_we = 1'($urandom);
      rp_ub_a_addr = AW'($urandom); rp_ub_a_word = 2'($urandom);
      rp_ub_a_wdata = r32(); rp_ub_a_strb = 4'($urandom); s_ub_a_rdata = r32();
      rp_ub_b_rd_en = 1'($urandom); rp_ub_b_wr_en = 1'($urandom);
      rp_ub_b_rd_addr = AW'($urandom); rp_ub_b_wr_addr = AW'($urandom);
      for (int j = 0; j < N; j++) begin
        rp_ub_b_wr_data[j] = 8'($urandom);
        s_ub_b_rd_data[j]  = 8'($urandom);
      end
      s_ecc_corr = 16'($urandom); s_ecc_unc = 16'($urandom);
      rp_status = 19'($urandom);
      #1;
      p = !decouple;
      check(decoupled == decouple, "decoupled flag");
      check(s_rsp  == (p ? rp_rsp : '0), "bus response");
      check(rp_req == (p ? s_req  : '0), "bus request");
      check(s_ub_a_en == (p & rp_ub_a_en) && s_ub_a_we == (p & rp_ub_a_we), "host port enables");
      check(s_ub_a_addr == (p ? rp_ub_a_addr : '0) && s_ub_a_word == (p ? rp_ub_a_word : '0), "host port address");
      check(s_ub_a_wdata == (p ? rp_ub_a_wdata : '0) && s_ub_a_strb == (p ? rp_ub_a_strb : '0), "host port data");
      check(rp_ub_a_rdata == (p ? s_ub_a_rdata : '0), "host port read data");
      check(s_ub_b_rd_en == (p & rp_ub_b_rd_en) && s_ub_b_wr_en == (p & rp_ub_b_wr_en), "vector port enables");
      check(s_ub_b_rd_addr == (p ? rp_ub_b_rd_addr : '0) && s_ub_b_wr_addr == (p ? rp_ub_b_wr_addr : '0), "vector addresses");
      for (int j = 0; j < N; j++) begin
        check(s_ub_b_wr_data[j] == (p ? rp_ub_b_wr_data[j] : 8'sd0), "vector write data");
        check(rp_ub_b_rd_data[j] == (p ? s_ub_b_rd_data[j] : 8'sd0), "vector read data");
      end
      check(rp_ecc_corr == (p ? s_ecc_corr : '0) && rp_ecc_unc == (p ? s_ecc_unc : '0), "ECC counters");
      check(s_status == (p ? rp_status : '0), "status lines");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
