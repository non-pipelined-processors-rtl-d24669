// rv_pkg: types and constants shared by the non-pipelined RISC-V processors.
//
// Holds the 32-bit word and 5-bit register-index types, the instruction
// categories produced by the decoder, the ALU and branch-comparator function
// codes, the decoded and executed instruction records, and the memory request
// record. The instruction subset is the RV32I subset ADD..AND, ADDI..SRAI,
// BEQ..BGEU, JAL, JALR, LUI, LW and SW; MUL (from RV32M) is the one
// multicycle operation, used only by the multicycle processor. The encodings
// of the enums are this design's own choice.
package rv_pkg;

  typedef logic [31:0] word_t;
  typedef logic [4:0]  rindx_t;

  // Instruction categories. MUL is recognised only when the decoder is asked
  // to (multicycle processor); otherwise it decodes as UNSUPPORTED.
  typedef enum logic [3:0] {
    IT_OP, IT_OPIMM, IT_BRANCH, IT_JAL, IT_JALR, IT_LUI, IT_LOAD, IT_STORE,
    IT_MUL, IT_UNSUPPORTED
  } itype_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA
  } alu_func_e;

  typedef enum logic [2:0] {
    BR_EQ, BR_NEQ, BR_LT, BR_LTU, BR_GE, BR_GEU
  } br_func_e;

  // A register destination that may be absent (Maybe#(RIndx)).
  typedef struct packed {
    logic   valid;
    rindx_t idx;
  } maybe_rindx_t;

  typedef struct packed {
    itype_e       itype;
    alu_func_e    alu_func;
    br_func_e     br_func;
    maybe_rindx_t dst;
    rindx_t       src1;
    rindx_t       src2;
    word_t        imm;
  } dinst_t;

  typedef struct packed {
    itype_e       itype;
    maybe_rindx_t dst;
    word_t        data;
    word_t        addr;
    word_t        next_pc;
  } einst_t;

  typedef enum logic {MEM_LD, MEM_ST} mem_op_e;

  typedef struct packed {
    mem_op_e op;
    word_t   addr;
    word_t   data;
  } mem_req_t;

  // RISC-V major opcodes used here.
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;

  // Default word value for unused fields (dwv).
  localparam word_t DWV = '0;

endpackage
