// y86_pkg: shared types and constants of the Y86-64 SEQ processor.
// Holds the instruction codes (icode), the register numbers, the ALU
// functions, the jump/move condition codes (ifun) and the status codes.
// The icode values and the register numbering are those of the Y86-64
// instruction set; the 2-bit ALU function and 3-bit status encodings are
// this design's own choice.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  reg_t;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // rrmovq and cmovXX, condition in ifun
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // Register numbers used as constants by the control logic.
  localparam reg_t R_RSP  = 4'h4;
  localparam reg_t R_NONE = 4'hF;   // "no register": reads 0, write disabled

  // ifun of OPq
  localparam logic [3:0] F_ADD = 4'h0, F_SUB = 4'h1, F_AND = 4'h2, F_XOR = 4'h3;

  // ifun of jXX / cmovXX
  localparam logic [3:0] C_ALWAYS = 4'h0, C_LE = 4'h1, C_L = 4'h2, C_E = 4'h3,
                         C_NE = 4'h4, C_GE = 4'h5, C_G = 4'h6;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,   // aluB - aluA
    ALU_AND = 2'd2,
    ALU_XOR = 2'd3
  } alufun_t;

  // Condition codes
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  typedef enum logic [2:0] {
    S_AOK = 3'd1,   // running
    S_HLT = 3'd2,   // halt executed
    S_ADR = 3'd3,   // bad instruction or data address
    S_INS = 3'd4    // invalid instruction
  } stat_t;

  // Length in bytes of an instruction, from its icode (0 for an unknown one).
  function automatic logic [3:0] instr_length(logic [3:0] icode);
    unique case (icode)
      I_HALT, I_NOP, I_RET:                 return 4'd1;
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ:     return 4'd2;
      I_JXX, I_CALL:                        return 4'd9;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:         return 4'd10;
      default:                              return 4'd0;
    endcase
  endfunction

endpackage
