// pa8051_pkg: types and constants shared by the stages of the pipelined 8051.
//
// The pipeline has five stages (IF, ID, OF, EXE, WB) and a memory unit
// (RAM_READ_ARBITOR, MEM_INTERFACE, MEM). Each stage passes a record to the next
// over a valid/ready channel. The three control codes that the decoder produces
// follow the three control tables of the design: the EXE opcode (44 kinds), the
// operand read control used by OF (Read control) and the write-back control used
// by WB. Field layouts, widths and encodings below are this implementation's own
// choices; the names of the codes follow the design.
package pa8051_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ROM_AW   = 12;   // 4 KB program ROM
  localparam int unsigned RAM_SIZE = 128;  // internal data RAM bytes

  // ---------------------------------------------------------------- SFR map
  localparam logic [7:0] A_P0   = 8'h80;
  localparam logic [7:0] A_SP   = 8'h81;
  localparam logic [7:0] A_DPL  = 8'h82;
  localparam logic [7:0] A_DPH  = 8'h83;
  localparam logic [7:0] A_P1   = 8'h90;
  localparam logic [7:0] A_P2   = 8'hA0;
  localparam logic [7:0] A_P3   = 8'hB0;
  localparam logic [7:0] A_PSW  = 8'hD0;
  localparam logic [7:0] A_ACC  = 8'hE0;
  localparam logic [7:0] A_B    = 8'hF0;
  // "no address": an empty lock register holds 255
  localparam logic [7:0] NO_ADDR = 8'hFF;

  // ---------------------------------------------------------------- EXE opcode (44 kinds)
  typedef enum logic [5:0] {
    OP_MUL, OP_DIV, OP_NOP, OP_MOV, OP_ADD, OP_ADDC, OP_SUB, OP_NOT, OP_AND,
    OP_XOR, OP_OR, OP_RL, OP_RLC, OP_RR, OP_RRC, OP_SWAP, OP_XCH, OP_XCHD,
    OP_INC, OP_DEC, OP_DA, OP_DJNZ, OP_CJNE, OP_CMPZ, OP_CMPNZ, OP_INC16,
    OP_BCMPZ, OP_BCMPNZ, OP_BCMPNZC, OP_CLRA, OP_JC, OP_JNC, OP_CPLB, OP_CLRB,
    OP_SETB, OP_MOVB, OP_CPLC, OP_CLRC, OP_SETC, OP_ORC, OP_ANLC, OP_ORLNC,
    OP_ANLNC, OP_MOVC  // OP_MOVC is MOV C,bit
  } exe_op_e;

  // ---------------------------------------------------------------- Read control
  typedef enum logic [4:0] {
    RD_ACC, RD_REG, RD_REGI, RD_ACC_REG, RD_ACC_REGI, RD_ACC_MEM, RD_MEMB,
    RD_REG_MEM, RD_SP_SPI, RD_SP_MEM, RD_XCH_R, RD_XCH_RI, RD_XCH_M,
    RD_DPTR_ACC, RD_ACC_IMM, RD_MEM, RD_MEM_IMM, RD_REG_IMM, RD_REGI_IMM,
    RD_DPTRI, RD_ACC_REGB, RD_FETCH_REG, RD_IMM_REGB, RD_REG_WB, RD_MEM_WB,
    RD_IMM, RD_DPTR, RD_IMM16, RD_NO
  } read_ctrl_e;

  // where the write-back address (src3) comes from
  typedef enum logic [2:0] {
    WS_NONE,  // nothing written to memory through dest2
    WS_REG,   // register Rn of the current bank
    WS_REGI,  // the location @Ri points at
    WS_DIR,   // direct address wdir
    WS_BIT,   // byte holding bit address maddr
    WS_SP1    // SP + 1 (stack push)
  } wsel_e;

  // ---------------------------------------------------------------- Write control
  // WR_DPTR writes a byte pair: dest1 to d1dir, dest2 to the write-back address
  typedef enum logic [3:0] {
    WR_ACC, WR_MEM, WR_MEM_WB, WR_MEMWB, WR_SP_MEM, WR_ACC_MEM, WR_DPTR, WR_NO,
    WR_JMP, WR_CJMP, WR_JMP_MEM, WR_JMP_MEMWB, WR_CY
  } write_ctrl_e;

  // ---------------------------------------------------------------- records
  // ReadIn: the OF stage's control bundle
  typedef struct packed {
    read_ctrl_e ctrl;
    logic [7:0] maddr;   // direct or bit address to read
    logic [2:0] raddr;   // register number (Rn) or pointer (Ri, bit 0)
    logic [7:0] immed;   // immediate data (low byte of a 16-bit immediate)
    logic [7:0] immed2;  // high byte of a 16-bit immediate
    wsel_e      wsel;    // source of the write-back address
    logic [7:0] wdir;    // direct write-back address
    logic [7:0] d1dir;   // dest1 address of a two-byte write (WR_DPTR)
  } of_read_t;

  // WriteIn: the WB stage's control bundle
  typedef struct packed {
    write_ctrl_e ctrl;
    logic [15:0] jaddr;  // branch target for conditional jumps
  } wb_ctrl_t;

  // ID -> OF
  typedef struct packed {
    exe_op_e    opcode;
    of_read_t   rd;
    wb_ctrl_t   wr;
    logic [2:0] bitidx;
    logic       color;
  } id2of_t;

  // forward selection for one EXE source operand
  typedef enum logic [1:0] {FW_NO, FW_D1, FW_D2} fwd_sel_e;
  typedef struct packed {
    fwd_sel_e s1;
    fwd_sel_e s2;
  } fwd_t;

  // OF -> EXE
  typedef struct packed {
    exe_op_e    opcode;
    wb_ctrl_t   wr;
    logic [7:0] src1;
    logic [7:0] src2;
    logic [7:0] src3;    // write-back address (DPH value for JMP @A+DPTR)
    logic [7:0] d1addr;  // address dest1 is written to, NO_ADDR if none
    logic [2:0] bitidx;
    fwd_t       fwd;
    logic       color;
  } of2exe_t;

  // EXE -> WB
  typedef struct packed {
    write_ctrl_e ctrl;
    logic [7:0]  dest1;
    logic [7:0]  dest2;
    logic [7:0]  d1addr;
    logic [7:0]  waddr;
    logic        taken;
    logic [15:0] jaddr;
    logic [2:0]  flag_we;  // {cy, ac, ov}
    logic        cy, ac, ov;
  } exe2wb_t;

  // WB -> MEM_INTERFACE (MemWrite)
  typedef struct packed {
    logic       w1_en;
    logic [7:0] w1_addr;
    logic [7:0] w1_data;
    logic       w2_en;
    logic [7:0] w2_addr;
    logic [7:0] w2_data;
    logic [2:0] flag_we;
    logic       cy, ac, ov;
  } mem_write_t;

  // operand access kinds understood by MEM_INTERFACE
  // K_SPI reads @SP, K_SPM reads @(SP-1), K_SP1 is the address SP+1
  typedef enum logic [2:0] {K_NONE, K_DIR, K_REG, K_REGI, K_BIT, K_SPI, K_SPM, K_SP1} acc_kind_e;
  typedef struct packed {
    acc_kind_e  kind;
    logic [7:0] addr;  // direct/bit address, or register number in bits 2:0
  } mem_acc_t;

  // MemRead: an operand read request (and the lock it sets when granted)
  typedef struct packed {
    mem_acc_t   s1;
    mem_acc_t   s2;
    mem_acc_t   s3;
    mem_acc_t   w;       // write-back address to resolve and lock
    logic [7:0] d1addr;  // dest1 address to lock
    logic       wflags;  // instruction writes CY/AC/OV
    logic       lock;    // the request enters the lock queue (OF requests only)
    logic       color;
  } mem_read_t;

  // data returned for a MemRead
  typedef struct packed {
    logic [7:0] d1;
    logic [7:0] d2;
    logic [7:0] d3;
    logic [7:0] waddr;
    fwd_t       fwd;
  } mem_rdata_t;

  // byte address that holds bit address b
  function automatic logic [7:0] bit_byte(input logic [7:0] b);
    return b[7] ? {b[7:3], 3'b000} : {4'h2, b[6:3]};
  endfunction

endpackage
