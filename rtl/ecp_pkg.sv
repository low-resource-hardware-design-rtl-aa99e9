// ecp_pkg: types and constants shared by the elliptic-curve processor.
//
// The processor executes one 72-bit control vector per clock cycle. The
// vector is stored as-is in the program memory (there is no instruction
// decoder), so its fields are the control signals of the datapath. The
// published design fixes the width (72 control signals), the 16-bit word, the
// register set and the single-port data memory; the split of the 72 bits
// into fields below, the opcodes and the data-memory address map are this
// design's own choices.
//
// Field summary (MSB first, 72 bits in total):
//   br_op(4) br_target(11) mem_op(2) addr_base(2) addr_off(8) st_src(3)
//   alu_op(4) alu_a(3) alu_b(3) imm(16) rd_we(1) rd_sel(4) movnf(1)
//   movnf_reg(2) mac_op(2) mac_a(2) mac_b(1) acc_shr(1) acc_clr(1) flags_we(1)
package ecp_pkg;

  localparam int unsigned WORD      = 16;           // data word width
  localparam int unsigned ACC_W     = 3 * WORD;     // accumulator: three 16-bit registers
  localparam int unsigned CTRL_W    = 72;           // control signals per program entry
  localparam int unsigned PM_DEPTH  = 1662;         // program memory entries
  localparam int unsigned PC_W      = 11;           // enough for PM_DEPTH
  localparam int unsigned RAM_WORDS = 111;          // data RAM words
  localparam int unsigned ROM_WORDS = 100;          // constant ROM words

  typedef logic [WORD-1:0] word_t;

  // NIST P-192 domain parameters (FIPS 186 values), 12 words each,
  // least significant word first in the constant ROM.
  localparam logic [191:0] P192_P  = 192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFFFF_FFFFFFFF;
  localparam logic [191:0] P192_N  = 192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_99DEF836_146BC9B1_B4D22831;
  localparam logic [191:0] P192_B  = 192'h64210519_E59C80E7_0FA7E9AB_72243049_FEB8DEEC_C146B9B1;
  localparam logic [191:0] P192_GX = 192'h188DA80E_B03090F6_7CBF20EB_43A18800_F4FF0AFD_82FF1012;
  localparam logic [191:0] P192_GY = 192'h07192B95_FFC8DA78_631011ED_6B24CDD5_73F977A1_1E794811;

  // Word offsets of the constants inside the constant ROM.
  localparam int unsigned ROM_P  = 0;
  localparam int unsigned ROM_N  = 12;
  localparam int unsigned ROM_B  = 24;
  localparam int unsigned ROM_GX = 36;
  localparam int unsigned ROM_GY = 48;
  localparam int unsigned ROM_USED = 60;

  // Data-memory address map (word addresses). Region = addr[9:8].
  localparam word_t RAM_BASE = 16'h0000;
  localparam word_t ROM_BASE = 16'h0100;
  localparam word_t IO_BASE  = 16'h0200;

  // I/O map used by the bundled field-multiplication program (word offsets
  // inside the I/O region; outputs start at I/O offset IO_N_IN).
  localparam int unsigned IO_N_IN     = 32;
  localparam int unsigned IO_N_OUT    = 16;
  localparam int unsigned FW_IO_A     = 0;   // inputs 0..11: operand A
  localparam int unsigned FW_IO_B     = 12;  // inputs 12..23: operand B
  localparam int unsigned FW_IO_START = 24;  // input: 2 add, 3 sub, 4 Montgomery, other non-zero multiply
  localparam int unsigned FW_OUT_R    = 0;   // outputs 0..11: A*B mod p
  localparam int unsigned FW_OUT_DONE = 12;  // output: 1 when the result is valid

  typedef enum logic [1:0] {
    REG_RAM  = 2'd0,
    REG_ROM  = 2'd1,
    REG_IO   = 2'd2,
    REG_NONE = 2'd3
  } region_e;

  // Next-PC / control-flow operation.
  typedef enum logic [3:0] {
    BR_NONE = 4'd0,
    BR_JMP  = 4'd1,
    BR_Z    = 4'd2,
    BR_NZ   = 4'd3,
    BR_C    = 4'd4,
    BR_NC   = 4'd5,
    BR_N    = 4'd6,
    BR_NN   = 4'd7,
    BR_V    = 4'd8,
    BR_NV   = 4'd9,
    BR_CALL = 4'd10,
    BR_RET  = 4'd11,
    BR_HALT = 4'd12
  } br_op_e;

  typedef enum logic [1:0] {
    MEM_NONE = 2'd0,
    MEM_LD   = 2'd1,
    MEM_ST   = 2'd2
  } mem_op_e;

  // Address = base register (or zero) + zero-extended 8-bit offset.
  typedef enum logic [1:0] {
    AB_ABS = 2'd0,
    AB_B0  = 2'd1,
    AB_B1  = 2'd2,
    AB_B2  = 2'd3
  } addr_base_e;

  // Data written to memory by a store.
  typedef enum logic [2:0] {
    ST_ALU  = 3'd0,  // result of this cycle's ALU operation
    ST_ACC0 = 3'd1,  // accumulator word 0 after this cycle's MAC
    ST_ACC1 = 3'd2,
    ST_ACC2 = 3'd3,
    ST_W0   = 3'd4,
    ST_W1   = 3'd5,
    ST_W2   = 3'd6,
    ST_W3   = 3'd7
  } st_src_e;

  typedef enum logic [3:0] {
    ALU_NOP   = 4'd0,
    ALU_ADD   = 4'd1,
    ALU_ADC   = 4'd2,
    ALU_SUB   = 4'd3,
    ALU_SBC   = 4'd4,
    ALU_AND   = 4'd5,
    ALU_OR    = 4'd6,
    ALU_XOR   = 4'd7,
    ALU_NOT   = 4'd8,
    ALU_SHL   = 4'd9,
    ALU_SHR   = 4'd10,
    ALU_PASSA = 4'd11,
    ALU_PASSB = 4'd12
  } alu_op_e;

  // ALU operand A: W0..W3, B0..B2, ACC0.
  typedef enum logic [2:0] {
    AA_W0 = 3'd0, AA_W1 = 3'd1, AA_W2 = 3'd2, AA_W3 = 3'd3,
    AA_B0 = 3'd4, AA_B1 = 3'd5, AA_B2 = 3'd6, AA_ACC0 = 3'd7
  } alu_a_e;

  // ALU operand B: freshly loaded memory word, immediate, ACC1/2, W0..W3.
  typedef enum logic [2:0] {
    AB_RDATA = 3'd0, AB_IMM = 3'd1, AB_ACC1 = 3'd2, AB_ACC2 = 3'd3,
    AB_W0 = 3'd4, AB_W1 = 3'd5, AB_W2 = 3'd6, AB_W3 = 3'd7
  } alu_b_e;

  // Destination of the ALU result.
  typedef enum logic [3:0] {
    RD_W0 = 4'd0, RD_W1 = 4'd1, RD_W2 = 4'd2, RD_W3 = 4'd3,
    RD_B0 = 4'd4, RD_B1 = 4'd5, RD_B2 = 4'd6, RD_SP = 4'd7,
    RD_ACC0 = 4'd8, RD_ACC1 = 4'd9, RD_ACC2 = 4'd10
  } rd_sel_e;

  typedef enum logic [1:0] {
    MAC_NONE = 2'd0,  // multiplier isolated, accumulator unchanged by the product
    MAC_ACC  = 2'd1,  // MULACC: acc += a * b
    MAC_LOAD = 2'd2   // MUL:    acc  = a * b
  } mac_op_e;

  typedef enum logic {
    MB_RDATA = 1'b0,  // multiplier operand b = freshly loaded memory word
    MB_IMM   = 1'b1   // multiplier operand b = immediate
  } mac_b_e;

  typedef struct packed {
    br_op_e          br_op;
    logic [PC_W-1:0] br_target;
    mem_op_e         mem_op;
    addr_base_e      addr_base;
    logic [7:0]      addr_off;
    st_src_e         st_src;
    alu_op_e         alu_op;
    alu_a_e          alu_a;
    alu_b_e          alu_b;
    word_t           imm;
    logic            rd_we;
    rd_sel_e         rd_sel;
    logic            movnf;      // MOVNF: copy the freshly loaded word into W[movnf_reg]
    logic [1:0]      movnf_reg;
    mac_op_e         mac_op;
    logic [1:0]      mac_a;      // multiplier operand a = W[mac_a]
    mac_b_e          mac_b;
    logic            acc_shr;    // RSACC: acc >>= 16 after the MAC
    logic            acc_clr;    // clear the accumulator before the MAC
    logic            flags_we;   // update C/Z/V/N from the ALU
  } ctrl_t;

  typedef struct packed {
    logic c;
    logic z;
    logic v;
    logic n;
  } flags_t;

  localparam ctrl_t CTRL_NOP = '{
    br_op: BR_NONE, br_target: '0, mem_op: MEM_NONE, addr_base: AB_ABS,
    addr_off: '0, st_src: ST_ALU, alu_op: ALU_NOP, alu_a: AA_W0,
    alu_b: AB_RDATA, imm: '0, rd_we: 1'b0, rd_sel: RD_W0, movnf: 1'b0,
    movnf_reg: '0, mac_op: MAC_NONE, mac_a: '0, mac_b: MB_RDATA,
    acc_shr: 1'b0, acc_clr: 1'b0, flags_we: 1'b0
  };

endpackage
