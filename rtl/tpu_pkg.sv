// tpu_pkg: types and constants shared by the TinyTPU-style accelerator with
// checksum self-test and by the platform around it.
//
// The instruction word follows the four-field CISC format of the accelerator:
// an 8-bit opcode, a 24-bit buffer address, a 16-bit accumulator address and a
// 32-bit calculation length (number of vectors), 80 bits in all. The numeric
// opcode values and the flag bits inside the opcode are this design's own
// choice: the format names the instructions but gives no encoding.
//
// Array size (14 x 14), int8 operands and 32-bit accumulation follow the
// described implementation. Memory depths and the 16-bit checksum lane of
// the accumulators are this design's choices (see each module).
package tpu_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned TPU_N        = 14;  // systolic array is TPU_N x TPU_N
  localparam int unsigned TPU_DATA_W    = 8;   // weights and activations (int8)
  localparam int unsigned TPU_ACC_W    = 32;  // partial sums and accumulators
  localparam int unsigned TPU_CHK_W    = 16;  // SIMD checksum lane (48-bit DSP minus 32)
  localparam int unsigned TPU_INSTR_W    = 80;

  // ---------------------------------------------------------------- opcodes
  // opcode[2:0] selects the operation, opcode[3] the testing-mode variant of
  // load_weights / matmul, opcode[4] the accumulate flag of matmul or the
  // sigmoid select of activation.
  typedef enum logic [2:0] {
    OP_NOP    = 3'd0,
    OP_LOADW  = 3'd1,
    OP_MATMUL = 3'd2,
    OP_ACT    = 3'd3,
    OP_SYNC   = 3'd4,
    OP_HALT   = 3'd7
  } op_e;

  localparam logic [7:0] OPC_NOP        = 8'h00;
  localparam logic [7:0] OPC_LOADW      = 8'h01;
  localparam logic [7:0] OPC_T_LOADW    = 8'h09;
  localparam logic [7:0] OPC_MATMUL     = 8'h02;
  localparam logic [7:0] OPC_MATMUL_ACC = 8'h12;
  localparam logic [7:0] OPC_T_MATMUL   = 8'h0A;
  localparam logic [7:0] OPC_T_MATMUL_ACC = 8'h1A;
  localparam logic [7:0] OPC_RELU       = 8'h03;
  localparam logic [7:0] OPC_SIGMOID    = 8'h13;
  localparam logic [7:0] OPC_SYNC       = 8'h04;
  localparam logic [7:0] OPC_HALT       = 8'h07;

  typedef struct packed {
    logic [7:0]  opcode;
    logic [23:0] buf_addr;
    logic [15:0] acc_addr;
    logic [31:0] length;
  } instr_t;

  function automatic instr_t make_instr(logic [7:0] opc, logic [23:0] baddr,
                                        logic [15:0] aaddr, logic [31:0] len);
    instr_t i;
    i.opcode   = opc;
    i.buf_addr = baddr;
    i.acc_addr = aaddr;
    i.length   = len;
    return i;
  endfunction

  // ---------------------------------------------------------------- test vectors
  // Which vector the systolic data setup feeds into the array this cycle.
  typedef enum logic [1:0] {
    VSEL_DATA  = 2'd0,  // operand vector read from the unified buffer
    VSEL_ONES  = 2'd1,  // all +1, first-row adder operand 0  -> C_SA
    VSEL_MONES = 2'd2,  // all -1, first-row adder operand -1 -> not C_SA
    VSEL_ZEROS = 2'd3   // all 0  -> 0, exposes a stuck-at-1 LSB
  } vsel_e;

  // What the accumulator bank does with the vector leaving the array.
  typedef enum logic [2:0] {
    AOP_NONE  = 3'd0,
    AOP_WRITE = 3'd1,  // acc[addr]  = psum
    AOP_ACCUM = 3'd2,  // acc[addr] += psum
    AOP_CSA   = 3'd3,  // R0 = C_SA - R0      (Eq. 4)
    AOP_NCSA  = 3'd4,  // R1 = not C_SA + R1  (Eq. 5)
    AOP_ZERO  = 3'd5   // capture zero-vector result
  } accop_e;

  // ---------------------------------------------------------------- diagnosis
  typedef enum logic [1:0] {
    FC_NONE       = 2'd0,
    FC_WEIGHT     = 2'd1,  // a_j, a*_j wrong but complementary: weight bitflip
    FC_ACCUM      = 2'd2,  // not complementary, C_SA pair complementary
    FC_SA_COLUMN  = 2'd3   // not complementary, C_SA pair not complementary
  } fault_class_e;

  // ---------------------------------------------------------------- AXI4-Lite
  typedef struct packed {
    logic [31:0] awaddr;
    logic        awvalid;
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic        wvalid;
    logic        bready;
    logic [31:0] araddr;
    logic        arvalid;
    logic        rready;
  } axil_req_t;

  typedef struct packed {
    logic        awready;
    logic        wready;
    logic [1:0]  bresp;
    logic        bvalid;
    logic        arready;
    logic [31:0] rdata;
    logic [1:0]  rresp;
    logic        rvalid;
  } axil_rsp_t;

  // Host address map (byte addresses). Region in addr[21:20].
  localparam logic [1:0] REG_WB   = 2'd0;  // weight buffer, 16 bytes per vector
  localparam logic [1:0] REG_UB   = 2'd1;  // unified buffer, 16 bytes per vector
  localparam logic [1:0] REG_IF   = 2'd2;  // instruction FIFO: words 0,1,2; push on word 2
  localparam logic [1:0] REG_CSR  = 2'd3;  // control and status registers

  // CSR word offsets (addr[7:2])
  localparam logic [5:0] CSR_CTRL     = 6'd0;  // W: bit0 start, bit1 clear sync, bit2 clear error, bit3 clear pc, bits[12:8] act shift
  localparam logic [5:0] CSR_STATUS   = 6'd1;  // R: bit0 running, bit1 sync, bit2 error, bit3 alive, bit4 fifo empty, bit5 fifo full, bit6 busy, [9:8] fault class
  localparam logic [5:0] CSR_PC       = 6'd2;  // R: program counter
  localparam logic [5:0] CSR_ERR_PC   = 6'd3;  // R: program counter of the failing t_matmul
  localparam logic [5:0] CSR_ERR_WGT  = 6'd4;  // R: per-column weight-bitflip flags
  localparam logic [5:0] CSR_ERR_ACC  = 6'd5;  // R: per-column accumulator-fault flags
  localparam logic [5:0] CSR_ERR_SA   = 6'd6;  // R: per-column SA-column-fault flags
  localparam logic [5:0] CSR_ERR_CNT  = 6'd7;  // R: number of failed checks since reset
  localparam logic [5:0] CSR_UB_ECC   = 6'd8;  // R: [15:0] corrected, [31:16] uncorrectable reads

endpackage
