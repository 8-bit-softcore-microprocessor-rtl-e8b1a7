// zasua_pkg -- shared types and constants of the ZA-SUA dual-accumulator
// 8-bit processor.
//
// Instruction word (17 bits). All instructions except the four absolute
// jumps use the "general" format:
//   [16:12] opcode  [11:4] general (constant, RAM or port address)
//   [3:2]   addressing mode  [1] source (0=A,1=B)  [0] destination (0=A,1=B)
// JIFZ, JIFC, JUMP and CALL use the "jump" format:
//   [16:13] opcode  [12:0] absolute program address
// The opcode values, field widths, addressing-mode codes and the Z/C effect
// of every ALU operation are the ones the processor's instruction tables
// define. The control states are the seven of its state diagram.
package zasua_pkg;

  localparam int unsigned PCW     = 13;  // program counter / stack width
  localparam int unsigned STACK_N = 8;   // stack depth

  // ALU operations: opcode[3:0] of the instructions whose opcode[4] is 0.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'b0000,
    ALU_ADDC = 4'b0001,
    ALU_SUB  = 4'b0010,
    ALU_SUBC = 4'b0011,
    ALU_INC  = 4'b0100,
    ALU_DEC  = 4'b0101,
    ALU_SHL  = 4'b0110,
    ALU_SHR  = 4'b0111,
    ALU_ROL  = 4'b1000,
    ALU_ROR  = 4'b1001,
    ALU_AND  = 4'b1010,
    ALU_OR   = 4'b1011,
    ALU_XOR  = 4'b1100,
    ALU_NOT  = 4'b1101,
    ALU_LOAD = 4'b1110,
    ALU_MOVE = 4'b1111
  } alu_op_e;

  // 5-bit opcodes of the non-ALU instructions. The four jumps only use the
  // upper four bits; bit 12 belongs to their address, so each of them
  // occupies two 5-bit codes.
  localparam logic [3:0] OP4_JIFZ = 4'b1000;
  localparam logic [3:0] OP4_JIFC = 4'b1001;
  localparam logic [3:0] OP4_JUMP = 4'b1010;
  localparam logic [3:0] OP4_CALL = 4'b1011;

  localparam logic [4:0] OP_STORE  = 5'b11000;
  localparam logic [4:0] OP_RETURN = 5'b11001;
  localparam logic [4:0] OP_INPUT  = 5'b11010;
  localparam logic [4:0] OP_OUTPUT = 5'b11011;
  localparam logic [4:0] OP_EINT   = 5'b11100;
  localparam logic [4:0] OP_DINT   = 5'b11101;
  localparam logic [4:0] OP_RETI   = 5'b11110;
  localparam logic [4:0] OP_JUMPR  = 5'b11111;

  // Addressing-mode field.
  typedef enum logic [1:0] {
    AM_DIRECT = 2'b00,
    AM_IMM    = 2'b01,
    AM_IND_A  = 2'b10,
    AM_IND_B  = 2'b11
  } addr_mode_e;

  // Control-unit states.
  typedef enum logic [2:0] {
    ST_RESET    = 3'd0,
    ST_SEARCH   = 3'd1,
    ST_DECODE   = 3'd2,
    ST_INSTR    = 3'd3,
    ST_WAIT     = 3'd4,
    ST_INT      = 3'd5,
    ST_JUMP_INT = 3'd6
  } state_e;

  typedef struct packed {
    logic [4:0]  opcode;
    logic [7:0]  general;
    addr_mode_e  mode;
    logic        src;
    logic        dst;
  } instr_t;

  // Program-counter next-value selection.
  typedef enum logic [2:0] {
    PC_HOLD = 3'd0,
    PC_INC  = 3'd1,
    PC_ABS  = 3'd2,   // IR[12:0]
    PC_REL  = 3'd3,   // PC + zero-extended accumulator (JUMPR)
    PC_POP  = 3'd4,   // top of stack
    PC_VEC  = 3'd5    // interrupt vector
  } pc_sel_e;

endpackage
