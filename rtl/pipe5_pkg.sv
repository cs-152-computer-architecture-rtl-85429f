// pipe5_pkg: types and constants shared by the five-stage pipeline.
//
// The pipeline runs a small MIPS-I style integer instruction set. The
// instructions named in the pipeline discussion (ADD, SUB, XOR, BEQZ, BNEZ,
// J, JAL, JR, JALR, loads and stores, a system call, RFE and a move of EPC
// into a GPR) are all present; the binary encoding follows MIPS-I, which is
// this design's choice. BEQZ/BNEZ use the MIPS BEQ/BNE opcodes and test only
// rs. Exception codes follow the MIPS Cause.ExcCode numbering.
package pipe5_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREG = 32;
  localparam int unsigned NIRQ = 8;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Primary opcodes (bits 31:26)
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQZ    = 6'h04;
  localparam logic [5:0] OP_BNEZ    = 6'h05;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_SLTI    = 6'h0A;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LUI     = 6'h0F;
  localparam logic [5:0] OP_COP0    = 6'h10;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_SW      = 6'h2B;

  // SPECIAL function codes (bits 5:0)
  localparam logic [5:0] FN_NOP     = 6'h00;  // only the all-zero word
  localparam logic [5:0] FN_JR      = 6'h08;
  localparam logic [5:0] FN_JALR    = 6'h09;
  localparam logic [5:0] FN_SYSCALL = 6'h0C;
  localparam logic [5:0] FN_ADD     = 6'h20;
  localparam logic [5:0] FN_SUB     = 6'h22;
  localparam logic [5:0] FN_AND     = 6'h24;
  localparam logic [5:0] FN_OR      = 6'h25;
  localparam logic [5:0] FN_XOR     = 6'h26;
  localparam logic [5:0] FN_SLT     = 6'h2A;

  // COP0 rs field and RFE function code
  localparam logic [4:0] C0_MF  = 5'h00;
  localparam logic [4:0] C0_MT  = 5'h04;
  localparam logic [4:0] C0_CO  = 5'h10;
  localparam logic [5:0] FN_RFE = 6'h10;

  // Coprocessor-0 register numbers
  localparam logic [4:0] CP0_STATUS = 5'd12;
  localparam logic [4:0] CP0_CAUSE  = 5'd13;
  localparam logic [4:0] CP0_EPC    = 5'd14;

  // Status register bits
  localparam int unsigned ST_IE  = 0;  // interrupts enabled
  localparam int unsigned ST_UM  = 1;  // user mode (0 = kernel)
  localparam int unsigned ST_IEP = 2;  // IE before the last exception
  localparam int unsigned ST_UMP = 3;  // UM before the last exception
  localparam int unsigned ST_IM  = 8;  // interrupt mask, bits 15:8

  localparam word_t NOP = '0;

  typedef enum logic [4:0] {
    EXC_INT  = 5'd0,   // asynchronous interrupt
    EXC_ADEL = 5'd4,   // address error on fetch or load
    EXC_ADES = 5'd5,   // address error on store
    EXC_SYS  = 5'd8,   // system call trap
    EXC_RI   = 5'd10,  // illegal (reserved) opcode
    EXC_CPU  = 5'd11,  // privileged instruction in user mode
    EXC_OV   = 5'd12   // arithmetic overflow
  } exc_code_t;

  // Exception flag carried down the pipe next to each instruction
  typedef struct packed {
    logic      valid;
    exc_code_t code;
  } exc_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_PASSB
  } alu_op_t;

  // PCSrc of the next-PC mux; HND and EPC are the exception paths
  typedef enum logic [2:0] {
    PC_PLUS4, PC_JABS, PC_RIND, PC_BR, PC_HND, PC_EPC
  } pc_src_t;

  // Decoded control of one instruction
  typedef struct packed {
    logic     re1;        // reads rs
    logic     re2;        // reads rt
    logic     we;         // writes a GPR
    reg_idx_t ws;         // GPR written
    alu_op_t  alu_op;
    logic     b_imm;      // ALU operand B is the immediate
    word_t    imm;        // extended immediate
    logic     trap_ovf;   // overflow raises an exception
    logic     load;
    logic     store;
    logic     beqz;
    logic     bnez;
    logic     jabs;       // J, JAL
    logic     rind;       // JR, JALR
    logic     link;       // JAL, JALR write PC+4
    logic     mfc0;
    logic     mtc0;
    logic     rfe;
    logic     priv;       // allowed in kernel mode only
    exc_t     exc;        // decode-stage exception (illegal opcode, syscall)
  } ctrl_t;

endpackage
