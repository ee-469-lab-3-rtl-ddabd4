// arm_pkg: types and constants shared by the blocks of the five-stage pipelined
// ARM-subset processor. It holds the ALU operation and immediate-source
// encodings, the NZCV flag bundle, the forwarding selects, the condition codes
// the condition unit understands, and the packed control/data words that travel
// down the pipeline registers between Decode, Execute, Memory and Writeback.
// The 2-bit encodings (ALUControl, ImmSrc, forwarding select) follow the
// processor's description; the struct grouping is this implementation's own.
package arm_pkg;

  localparam int unsigned XLEN = 32;   // data path width
  localparam int unsigned RBITS = 4;   // register address width (R0..R15)
  localparam logic [RBITS-1:0] PC_REG = 4'd15;

  // ALUControl encoding used by the decoder and the ALU.
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_AND = 2'b10,
    ALU_ORR = 2'b11
  } alu_op_t;

  // ImmSrc encoding used by the decoder and the immediate extender.
  typedef enum logic [1:0] {
    IMM_DP  = 2'b00,  // 8-bit data-processing immediate, sign-extended
    IMM_MEM = 2'b01,  // 12-bit load/store offset, zero-extended
    IMM_BR  = 2'b10   // 24-bit branch offset, sign-extended, times 4
  } imm_src_t;

  // Forwarding select for one ALU operand in Execute.
  typedef enum logic [1:0] {
    FWD_NONE = 2'b00,  // value read from the register file in Decode
    FWD_WB   = 2'b01,  // Result of the instruction in Writeback
    FWD_MEM  = 2'b10   // ALU result of the instruction in Memory
  } fwd_sel_t;

  // Condition codes (Instr[31:28]) the condition unit evaluates.
  typedef enum logic [3:0] {
    COND_EQ = 4'b0000,
    COND_NE = 4'b0001,
    COND_GE = 4'b1010,
    COND_LT = 4'b1011,
    COND_GT = 4'b1100,
    COND_LE = 4'b1101,
    COND_AL = 4'b1110
  } cond_t;

  // ALU flags; packed so that bit 3 is N, 2 is Z, 1 is C and 0 is V.
  typedef struct packed {
    logic n;
    logic z;
    logic c;
    logic v;
  } flags_t;

  // Control word produced by the decoder.
  typedef struct packed {
    logic     pc_src;     // instruction writes R15 through Writeback
    logic     branch;     // B: target computed by the ALU in Execute
    logic     mem_to_reg; // Writeback value comes from data memory
    logic     mem_write;  // store
    logic     alu_src;    // ALU operand B is the immediate
    logic     reg_write;  // instruction writes Rd
    logic     flag_write; // instruction updates the flag register
    logic [1:0] reg_src;  // [0]: RA1 = R15, [1]: RA2 = Rd
    imm_src_t imm_src;
    alu_op_t  alu_op;
  } ctrl_t;

  // Decode -> Execute pipeline word.
  typedef struct packed {
    logic      pc_src;
    logic      branch;
    logic      mem_to_reg;
    logic      mem_write;
    logic      alu_src;
    logic      reg_write;
    logic      flag_write;
    alu_op_t   alu_op;
    logic [3:0] cond;
    logic [RBITS-1:0] wa3;
    logic [RBITS-1:0] ra1;
    logic [RBITS-1:0] ra2;
    logic [XLEN-1:0]  rd1;
    logic [XLEN-1:0]  rd2;
    logic [XLEN-1:0]  ext_imm;
  } de_t;

  // Execute -> Memory pipeline word.
  typedef struct packed {
    logic      pc_src;
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_write;
    logic [RBITS-1:0] wa3;
    logic [XLEN-1:0]  alu_result;
    logic [XLEN-1:0]  write_data;
  } em_t;

  // Memory -> Writeback pipeline word.
  typedef struct packed {
    logic      pc_src;
    logic      reg_write;
    logic      mem_to_reg;
    logic [RBITS-1:0] wa3;
    logic [XLEN-1:0]  alu_out;
    logic [XLEN-1:0]  read_data;
  } mw_t;

endpackage
