// Shared types and constants of the Icicle RV32I core and its system on chip.
//
// Holds the RV32I opcode and funct3 encodings, the instruction formats used by
// the decoder, the select codes of the operand, result and write-back
// multiplexers, and the records carried between pipeline stages. The opcode,
// funct3 and format values are those of the RISC-V base ISA; the names of the
// select signals (a_sel, b_sel, result_sel, wdata_sel) follow the decoder of
// the design. The ZERO and FOUR operand choices, the CSR result and the
// memory map constants are this implementation's own choices.
package icicle_pkg;

  typedef enum logic [6:0] {
    OP_LOAD     = 7'b0000011,
    OP_MISC_MEM = 7'b0001111,
    OP_OP_IMM   = 7'b0010011,
    OP_AUIPC    = 7'b0010111,
    OP_STORE    = 7'b0100011,
    OP_OP       = 7'b0110011,
    OP_LUI      = 7'b0110111,
    OP_BRANCH   = 7'b1100011,
    OP_JALR     = 7'b1100111,
    OP_JAL      = 7'b1101111,
    OP_SYSTEM   = 7'b1110011
  } opcode_e;

  // funct3 of OP / OP_IMM
  localparam logic [2:0] F3_ADD_SUB = 3'b000;
  localparam logic [2:0] F3_SLL     = 3'b001;
  localparam logic [2:0] F3_SLT     = 3'b010;
  localparam logic [2:0] F3_SLTU    = 3'b011;
  localparam logic [2:0] F3_XOR     = 3'b100;
  localparam logic [2:0] F3_SRL_SRA = 3'b101;
  localparam logic [2:0] F3_OR      = 3'b110;
  localparam logic [2:0] F3_AND     = 3'b111;

  // funct3 of BRANCH
  localparam logic [2:0] F3_BEQ  = 3'b000;
  localparam logic [2:0] F3_BNE  = 3'b001;
  localparam logic [2:0] F3_BLT  = 3'b100;
  localparam logic [2:0] F3_BGE  = 3'b101;
  localparam logic [2:0] F3_BLTU = 3'b110;
  localparam logic [2:0] F3_BGEU = 3'b111;

  // funct3 of LOAD / STORE
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // funct3 of SYSTEM: CSRRS is the only one used (RDCYCLE and friends)
  localparam logic [2:0] F3_CSRRS = 3'b010;

  // Read-only counter CSR numbers
  localparam logic [11:0] CSR_CYCLE    = 12'hC00;
  localparam logic [11:0] CSR_TIME     = 12'hC01;
  localparam logic [11:0] CSR_INSTRET  = 12'hC02;
  localparam logic [11:0] CSR_CYCLEH   = 12'hC80;
  localparam logic [11:0] CSR_TIMEH    = 12'hC81;
  localparam logic [11:0] CSR_INSTRETH = 12'hC82;

  typedef enum logic [2:0] {
    FMT_R, FMT_I, FMT_S, FMT_B, FMT_U, FMT_J
  } fmt_e;

  typedef enum logic [1:0] { A_RS1, A_PC, A_ZERO } a_sel_e;
  typedef enum logic [1:0] { B_RS2, B_IMM, B_FOUR } b_sel_e;

  typedef enum logic [2:0] {
    RES_ADDER, RES_LOGIC, RES_SHIFT, RES_SLT, RES_CSR
  } result_sel_e;

  typedef enum logic [1:0] { LOGIC_XOR, LOGIC_OR, LOGIC_AND } logic_op_e;

  typedef enum logic { WD_ALU_RESULT, WD_MEM_RDATA } wdata_sel_e;

  // Everything the decoder works out for one instruction.
  typedef struct packed {
    fmt_e        fmt;
    logic        rd_wen;
    logic        rs1_ren;
    logic        rs2_ren;
    a_sel_e      a_sel;
    b_sel_e      b_sel;
    result_sel_e result_sel;
    logic        add_sub;     // 1: subtract
    logic        sub_cmp;     // 1: compare is signed (SLT/SLTI)
    logic_op_e   logic_op;
    logic        shift_right;
    logic        shift_arith;
    wdata_sel_e  wdata_sel;
    logic        branch;      // conditional branch
    logic        jump;        // JAL / JALR
    logic        jalr;
    logic        load;
    logic        store;
    logic        csr;
    logic        illegal;
  } ctrl_t;

  // Flags of the ALU's adder, used by the branch unit.
  typedef struct packed {
    logic zero;      // a - b == 0
    logic carry;     // borrow out of a - b: a < b unsigned
    logic sign;      // bit 31 of a - b
    logic overflow;  // signed overflow of a - b
  } flags_t;

  // Decode -> Execute
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    ctrl_t       ctrl;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [11:0] csr_addr;
    logic [31:0] rs1_rdata;
    logic [31:0] rs2_rdata;
    logic [31:0] imm;
  } dx_t;

  // Execute -> Mem access
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    ctrl_t       ctrl;
    logic [2:0]  funct3;
    logic [4:0]  rd;
    logic [31:0] result;
    flags_t      flags;
    logic [31:0] branch_target;
    logic [31:0] rs2_rdata;
  } xm_t;

  // Mem access -> Writeback
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [4:0]  rd;
    logic        rd_wen;
    wdata_sel_e  wdata_sel;
    logic [31:0] result;
    logic [31:0] mem_rdata;
  } mw_t;

  // System memory map (byte addresses)
  localparam logic [31:0] RESET_VECTOR_DEFAULT = 32'h0010_0000;  // start of program in flash
  localparam logic [31:0] FLASH_BASE  = 32'h0000_0000;  // 16 MiB window onto the SPI flash
  localparam logic [31:0] RAM_BASE    = 32'h4000_0000;  // 128 KiB block RAM
  localparam logic [31:0] PERIPH_BASE = 32'h8000_0000;  // peripheral bus behind the bridge

endpackage
