// nod4_pkg - shared types and constants of the nod4 processor system.
//
// nod4 is an 8-bit accumulator machine: 8-bit data path, 8-bit address bus,
// registers A, C, S, X and PC. The C register holds three flags in its upper
// bits and the identifier (IID) of the last interrupting device in its lower
// five bits. The I flag sits at bit 5, which is the bit that "orc $20" sets
// to enable interrupts; Z and C take bits 7 and 6 in the order the flags are
// listed for the architecture (that placement is this design's choice).
//
// Instruction encoding (this design's choice; the architecture fixes the
// mnemonics and addressing modes, not their binary codes): the opcode byte
// is {mode[2:0], op[4:0]}. Immediate, direct and indexed instructions, and
// all jumps, are two bytes: the opcode, then the immediate value, the direct
// address, the index offset or the jump target. Implied instructions are one
// byte; the byte the processor fetches after them is the next opcode (the
// prefetch).
//
// Fixed addresses: the program start address (PSA) is read from $00 at
// reset and the programmer interrupt address (PIA) from $01 when an
// exception is invoked.
package nod4_pkg;

  // Bit positions inside the C register.
  localparam int unsigned CC_Z = 7;
  localparam int unsigned CC_C = 6;
  localparam int unsigned CC_I = 5;
  localparam logic [7:0]  IID_MASK = 8'h1F;

  localparam logic [7:0] PSA_ADDR = 8'h00;
  localparam logic [7:0] PIA_ADDR = 8'h01;

  // Addressing modes, opcode[7:5].
  typedef enum logic [2:0] {
    M_IMP  = 3'd0,  // implied: no operand
    M_IMM  = 3'd1,  // immediate: second byte is the data (or jump target)
    M_DIR  = 3'd2,  // direct: second byte is the effective address
    M_IDXX = 3'd3,  // indexed: EA = second byte + X
    M_IDXS = 3'd4   // indexed, stack relative: EA = second byte + S
  } mode_e;

  // Operations, opcode[4:0].
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_LDA  = 5'd1,
    OP_LDX  = 5'd2,
    OP_LDS  = 5'd3,
    OP_STA  = 5'd4,
    OP_STX  = 5'd5,
    OP_ADDA = 5'd6,
    OP_SUBA = 5'd7,
    OP_ANDA = 5'd8,
    OP_ORA  = 5'd9,
    OP_CMPA = 5'd10,
    OP_ORC  = 5'd11,
    OP_ANDC = 5'd12,
    OP_JMP  = 5'd13,
    OP_JSR  = 5'd14,
    OP_JZ   = 5'd15,
    OP_JNZ  = 5'd16,
    OP_JC   = 5'd17,
    OP_JNC  = 5'd18,
    OP_RTS  = 5'd19,
    OP_RTI  = 5'd20,
    OP_SWI  = 5'd21,
    OP_PUSH = 5'd22,
    OP_POP  = 5'd23,
    OP_TCA  = 5'd24,
    OP_TAC  = 5'd25
  } op_e;

  // ALU functions.
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,  // y = b
    ALU_ADD  = 3'd1,  // y = a + b, carry out
    ALU_SUB  = 3'd2,  // y = a - b, borrow out
    ALU_AND  = 3'd3,
    ALU_OR   = 3'd4
  } alu_op_e;

  // Controller states, grouped as in the fetch-execute outline: init,
  // fetch1, fetch2, access-EA, execute, and the exception sequences.
  typedef enum logic [4:0] {
    S_INIT   = 5'd0,
    S_FETCH1 = 5'd1,
    S_FETCH2 = 5'd2,
    S_EA     = 5'd3,   // access EA: compute the effective address
    S_MEM    = 5'd4,   // access EA: read or write memory at EA
    S_EXEC   = 5'd5,
    S_EXEC2  = 5'd6,
    S_JMP    = 5'd7,   // PC <= operand; shared by jmp and both exception paths
    S_INTX1  = 5'd8,
    S_INTX2  = 5'd9,
    S_INTX3  = 5'd10,
    S_INTX4  = 5'd11,
    S_INTX5  = 5'd12,
    S_SWI1   = 5'd13,
    S_SWI2   = 5'd14,
    S_SWI3   = 5'd15,
    S_SWI4   = 5'd16,
    S_SWI5   = 5'd17
  } state_e;

  function automatic logic [7:0] opcode(mode_e m, op_e o);
    return {m, o};
  endfunction

endpackage
