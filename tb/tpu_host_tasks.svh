// tpu_host_tasks.svh: host-processor routines shared by the end-to-end
// testbenches. Included inside a testbench module that declares `clk`,
// `checks`, `failures`, `host_req` (axil_req_t, driven here) and `host_rsp`
// (axil_rsp_t). Address map: region in bits 21:20 (0 weight buffer, 1
// unified buffer, 2 instruction FIFO, 3 registers); vector in bits 19:4 and
// 32-bit word in bits 3:2.

task automatic check(bit cond, string what);
  checks++;
  if (!cond) begin
    failures++;
    if (failures < 30) $display("FAIL %s (t=%0t)", what, $time);
  end
endtask

function automatic logic [31:0] tpu_addr(int region, int vec, int word);
  return (32'(region) << 20) | (32'(vec) << 4) | (32'(word) << 2);
endfunction

task automatic axi_write(logic [31:0] addr, logic [31:0] data, output logic [1:0] resp);
  int guard = 0;
  host_req.awaddr = addr; host_req.awvalid = 1'b1;
  host_req.wdata  = data; host_req.wstrb   = 4'hF; host_req.wvalid = 1'b1;
  host_req.bready = 1'b1;
  forever begin
    logic taken;
    #1 taken = host_rsp.awready && host_rsp.wready;
    @(posedge clk);
    guard++;
    if (taken || guard > 1000) break;
  end
  #1;
  host_req.awvalid = 1'b0; host_req.wvalid = 1'b0;
  guard = 0;
  while (!host_rsp.bvalid && guard < 1000) begin @(posedge clk); #1; guard++; end
  resp = host_rsp.bresp;
  @(posedge clk); #1;
  host_req.bready = 1'b0;
endtask

task automatic axi_wr(logic [31:0] addr, logic [31:0] data);
  logic [1:0] resp;
  axi_write(addr, data, resp);
endtask

task automatic axi_read(logic [31:0] addr, output logic [31:0] data);
  int guard = 0;
  host_req.araddr = addr; host_req.arvalid = 1'b1; host_req.rready = 1'b1;
  forever begin
    logic taken;
    #1 taken = host_rsp.arready;
    @(posedge clk);
    guard++;
    if (taken || guard > 1000) break;
  end
  #1;
  host_req.arvalid = 1'b0;
  guard = 0;
  while (!host_rsp.rvalid && guard < 1000) begin @(posedge clk); #1; guard++; end
  data = host_rsp.rdata;
  @(posedge clk); #1;
  host_req.rready = 1'b0;
endtask

// one vector of n int8 elements, element j in byte j
task automatic write_vec(int region, int vec, logic signed [7:0] v [], int n);
  for (int w = 0; w < (n + 3) / 4; w++) begin
    logic [31:0] d = '0;
    for (int b = 0; b < 4; b++) if (4 * w + b < n) d[8*b +: 8] = v[4*w + b];
    axi_wr(tpu_addr(region, vec, w), d);
  end
endtask

task automatic read_vec(int vec, int n, output logic signed [7:0] v []);
  v = new[n];
  for (int w = 0; w < (n + 3) / 4; w++) begin
    logic [31:0] d;
    axi_read(tpu_addr(1, vec, w), d);
    for (int b = 0; b < 4; b++) if (4 * w + b < n) v[4*w + b] = d[8*b +: 8];
  end
endtask

task automatic push_instr(logic [7:0] opc, int baddr, int aaddr, int len, output logic [1:0] resp);
  tpu_pkg::instr_t ins;
  ins = tpu_pkg::make_instr(opc, 24'(baddr), 16'(aaddr), 32'(len));
  axi_wr(tpu_addr(2, 0, 0), ins[31:0]);
  axi_wr(tpu_addr(2, 0, 1), ins[63:32]);
  axi_write(tpu_addr(2, 0, 2), {16'd0, ins[79:64]}, resp);
endtask

task automatic push(logic [7:0] opc, int baddr, int aaddr, int len);
  logic [1:0] resp;
  push_instr(opc, baddr, aaddr, len, resp);
  check(resp == 2'b00, "instruction accepted");
endtask

task automatic read_csr(logic [5:0] idx, output logic [31:0] d);
  axi_read(tpu_addr(3, 0, 0) | (32'(idx) << 2), d);
endtask

task automatic write_ctrl(logic [31:0] d);
  axi_wr(tpu_addr(3, 0, 0), d);
endtask

// reference: the activation of one accumulator value
function automatic logic signed [7:0] ref_act(longint acc, int shift, bit sigmoid);
  longint s;
  s = acc >>> shift;
  if (s > 32767) s = 32767;
  if (s < -32768) s = -32768;
  if (sigmoid) s = s + 64;
  if (s < 0) s = 0;
  if (s > 127) s = 127;
  return 8'(s);
endfunction
