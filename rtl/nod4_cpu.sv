// nod4_cpu - the nod4 8-bit accumulator processor with its exception mechanism.
//
// Registers: A (accumulator), X (index), S (stack pointer), PC (fetch
// counter) and C ({Z, C, I, IID[4:0]}). Internal registers: IR (opcode), OP
// (second instruction byte), T (data / IID temporary) and EA.
//
// The controller is a state sequencer that follows the fetch-execute
// outline of the nod4.1 implementation:
//   init    : PC <= M[$00] (program start address)
//   fetch1  : IR <= M[PC], PC++
//   fetch2  : OP <= M[PC], PC++ (always, whatever the addressing mode)
//   access EA (S_EA, then S_MEM for loads) for direct and indexed
//             instructions: S_EA forms EA, S_MEM reads M[EA] into T
//   execute (S_EXEC, S_EXEC2); a store writes M[EA] in S_EXEC
// Cycle counts: implied (prefetch type) 2 (push 3), immediate 3, direct/indexed
// store 4, direct/indexed load or ALU 5, jmp 3, jsr 4, rts 3, rti 4.
// Implied instructions other than rts, rti and swi are "prefetch type": the
// byte read in fetch2 is the next opcode, so on completion OP moves into IR
// and the sequencer continues at fetch2, saving one cycle.
//
// Exceptions. An interrupt is taken at the completion of an instruction
// when the I flag (using the value the instruction leaves) and irq are both
// high. Entry points:
//   intx2 after a prefetch-type implied instruction: un-prefetch (PC--),
//   intx1 after any other instruction: ira high for one cycle, IID <- di,
//   intx3 push PC, intx4 push C and C <= IID & $1F, intx5 read the PIA at $01,
//   jmp   PC <= PIA.
// swi runs swi1 (un-prefetch), swi2 push PC, swi3 push C, swi4 C <= 0,
// swi5 read PIA, then jmp. The worst case from the end of an instruction to
// the first fetch of the handler is six cycles (intx2..jmp or swi1..jmp).
// Clearing C also clears I, so the handler starts with interrupts masked;
// rti pops C, then PC, and may re-enable them.
//
// Stack: S points at the last byte pushed; push pre-decrements and pop
// post-increments ("lds $FC" then places the first push at $FB, below the
// I/O registers).
//
// Bus: one access per clock. addr/dout/we are combinational from the state;
// di must be valid in the same cycle (asynchronous-read memory), and is
// registered at the clock edge. During the ira cycle the acknowledged device
// drives its IID on di instead of memory.
//
// The fetch/exception state names and order, the six-cycle exception entry,
// the flag layout of C, the PSA/PIA addresses and the stack contents follow
// the nod4 description. The binary encoding, the exact instruction list
// (beyond the mnemonics the description names), the cycle split of the
// execute states and the synchronous active-high reset are this design's.
module nod4_cpu
  import nod4_pkg::*;
(
  input  logic       clk,
  input  logic       rst,      // synchronous, active high
  output logic [7:0] addr,
  output logic [7:0] dout,
  output logic       we,
  input  logic [7:0] di,
  input  logic       irq,
  output logic       ira
);

  // Architectural and internal registers.
  logic [7:0] a_q, x_q, s_q, pc_q, c_q;
  logic [7:0] ir_q, op_q, t_q, ea_q;
  state_e     state_q;

  logic [7:0] a_n, x_n, s_n, pc_n, c_n;
  logic [7:0] ir_n, op_n, t_n, ea_n;
  state_e     state_n;

  // Decode of the current opcode.
  mode_e mode;
  op_e   opc;
  assign mode = mode_e'(ir_q[7:5]);
  assign opc  = op_e'(ir_q[4:0]);

  logic is_jump, is_store, prefetch_type;
  always_comb begin
    is_jump  = opc inside {OP_JMP, OP_JSR, OP_JZ, OP_JNZ, OP_JC, OP_JNC};
    is_store = opc inside {OP_STA, OP_STX};
    prefetch_type = (mode == M_IMP) && !(opc inside {OP_RTS, OP_RTI, OP_SWI});
  end

  // ALU: A op operand, where the operand is OP (immediate) or T (memory).
  alu_op_e    alu_op;
  logic [7:0] alu_b, alu_y;
  logic       alu_z, alu_c, alu_cv;

  always_comb begin
    alu_b = (mode == M_IMM) ? op_q : t_q;
    unique case (opc)
      OP_ADDA:         alu_op = ALU_ADD;
      OP_SUBA, OP_CMPA: alu_op = ALU_SUB;
      OP_ANDA:         alu_op = ALU_AND;
      OP_ORA:          alu_op = ALU_OR;
      default:         alu_op = ALU_PASS;
    endcase
  end

  nod4_alu u_alu (
    .op     (alu_op),
    .a      (a_q),
    .b      (alu_b),
    .y      (alu_y),
    .z      (alu_z),
    .c      (alu_c),
    .c_valid(alu_cv)
  );

  // Next-state and datapath logic.
  always_comb begin
    logic done, done_pf;   // instruction completes this cycle (non-prefetch / prefetch type)
    logic take;

    a_n = a_q;  x_n = x_q;  s_n = s_q;  pc_n = pc_q;  c_n = c_q;
    ir_n = ir_q; op_n = op_q; t_n = t_q; ea_n = ea_q;
    state_n = state_q;
    addr = pc_q;
    dout = 8'h00;
    we   = 1'b0;
    ira  = 1'b0;
    done    = 1'b0;
    done_pf = 1'b0;

    unique case (state_q)
      S_INIT: begin
        addr    = PSA_ADDR;
        pc_n    = di;
        state_n = S_FETCH1;
      end

      S_FETCH1: begin
        addr    = pc_q;
        ir_n    = di;
        pc_n    = pc_q + 8'd1;
        state_n = S_FETCH2;
      end

      S_FETCH2: begin
        addr = pc_q;
        op_n = di;
        pc_n = pc_q + 8'd1;
        if (mode == M_IMP)
          state_n = (opc == OP_SWI) ? S_SWI1 : S_EXEC;
        else if (mode == M_IMM)
          state_n = (opc == OP_JMP) ? S_JMP : S_EXEC;
        else if (is_jump)
          state_n = S_EXEC;          // jumps use the second byte as target
        else
          state_n = S_EA;
      end

      S_EA: begin
        unique case (mode)
          M_IDXX:  ea_n = op_q + x_q;
          M_IDXS:  ea_n = op_q + s_q;
          default: ea_n = op_q;
        endcase
        state_n = is_store ? S_EXEC : S_MEM;
      end

      S_MEM: begin
        addr    = ea_q;
        t_n     = di;
        state_n = S_EXEC;
      end

      S_EXEC: begin
        unique case (opc)
          OP_LDA, OP_LDX: begin
            if (opc == OP_LDA) a_n = alu_y; else x_n = alu_y;
            c_n[CC_Z] = alu_z;
            done = 1'b1;
          end
          OP_LDS: begin
            s_n  = alu_y;
            done = 1'b1;
          end
          OP_ADDA, OP_SUBA, OP_ANDA, OP_ORA, OP_CMPA: begin
            if (opc != OP_CMPA) a_n = alu_y;
            c_n[CC_Z] = alu_z;
            if (alu_cv) c_n[CC_C] = alu_c;
            done = 1'b1;
          end
          OP_STA, OP_STX: begin
            addr = ea_q;
            we   = 1'b1;
            dout = (opc == OP_STX) ? x_q : a_q;
            done = 1'b1;
          end
          OP_ORC: begin
            c_n  = c_q | op_q;
            done = 1'b1;
          end
          OP_ANDC: begin
            c_n  = c_q & op_q;
            done = 1'b1;
          end
          OP_JZ, OP_JNZ, OP_JC, OP_JNC, OP_JMP: begin
            if ((opc == OP_JMP) ||
                (opc == OP_JZ  &&  c_q[CC_Z]) || (opc == OP_JNZ && !c_q[CC_Z]) ||
                (opc == OP_JC  &&  c_q[CC_C]) || (opc == OP_JNC && !c_q[CC_C]))
              pc_n = op_q;
            done = 1'b1;
          end
          OP_JSR, OP_PUSH: begin
            s_n     = s_q - 8'd1;
            state_n = S_EXEC2;
          end
          OP_RTS: begin
            addr = s_q;
            pc_n = di;
            s_n  = s_q + 8'd1;
            done = 1'b1;
          end
          OP_RTI: begin
            addr    = s_q;
            c_n     = di;
            s_n     = s_q + 8'd1;
            state_n = S_EXEC2;
          end
          OP_POP: begin
            addr      = s_q;
            a_n       = di;
            c_n[CC_Z] = (di == 8'h00);
            s_n       = s_q + 8'd1;
            done_pf   = 1'b1;
          end
          OP_TCA: begin
            a_n       = c_q;
            c_n[CC_Z] = (c_q == 8'h00);
            done_pf   = 1'b1;
          end
          OP_TAC: begin
            c_n     = a_q;
            done_pf = 1'b1;
          end
          default: begin
            // nop and unused codes: implied ones prefetch, others do not
            if (prefetch_type) done_pf = 1'b1;
            else               done    = 1'b1;
          end
        endcase
      end

      S_EXEC2: begin
        addr = s_q;
        unique case (opc)
          OP_JSR: begin
            we   = 1'b1;
            dout = pc_q;           // PC already holds the return address
            pc_n = op_q;
            done = 1'b1;
          end
          OP_RTI: begin
            pc_n = di;
            s_n  = s_q + 8'd1;
            done = 1'b1;
          end
          default: begin           // push
            we      = 1'b1;
            dout    = a_q;
            done_pf = 1'b1;
          end
        endcase
      end

      S_JMP: begin
        pc_n = op_q;
        done = 1'b1;
      end

      // Interrupt entry.
      S_INTX2: begin
        pc_n    = pc_q - 8'd1;     // un-prefetch
        state_n = S_INTX1;
      end
      S_INTX1: begin
        ira     = 1'b1;
        t_n     = di;              // IID from the acknowledged device
        s_n     = s_q - 8'd1;
        state_n = S_INTX3;
      end
      S_INTX3: begin
        addr    = s_q;
        we      = 1'b1;
        dout    = pc_q;
        s_n     = s_q - 8'd1;
        state_n = S_INTX4;
      end
      S_INTX4: begin
        addr    = s_q;
        we      = 1'b1;
        dout    = c_q;
        c_n     = t_q & IID_MASK;
        state_n = S_INTX5;
      end
      S_INTX5: begin
        addr    = PIA_ADDR;
        op_n    = di;
        state_n = S_JMP;
      end

      // Software interrupt (trap), IID zero.
      S_SWI1: begin
        pc_n    = pc_q - 8'd1;     // un-prefetch
        s_n     = s_q - 8'd1;
        state_n = S_SWI2;
      end
      S_SWI2: begin
        addr    = s_q;
        we      = 1'b1;
        dout    = pc_q;
        s_n     = s_q - 8'd1;
        state_n = S_SWI3;
      end
      S_SWI3: begin
        addr    = s_q;
        we      = 1'b1;
        dout    = c_q;
        state_n = S_SWI4;
      end
      S_SWI4: begin
        c_n     = 8'h00 & IID_MASK;
        state_n = S_SWI5;
      end
      S_SWI5: begin
        addr    = PIA_ADDR;
        op_n    = di;
        state_n = S_JMP;
      end

      default: state_n = S_INIT;
    endcase

    // Completion: take a pending, enabled interrupt or continue fetching.
    take = c_n[CC_I] && irq;
    if (done) begin
      state_n = take ? S_INTX1 : S_FETCH1;
    end else if (done_pf) begin
      if (take) begin
        state_n = S_INTX2;
      end else begin
        ir_n    = op_q;            // prefetched opcode becomes current
        state_n = S_FETCH2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_INIT;
      a_q  <= '0; x_q  <= '0; s_q  <= '0; pc_q <= '0; c_q <= '0;
      ir_q <= '0; op_q <= '0; t_q  <= '0; ea_q <= '0;
    end else begin
      state_q <= state_n;
      a_q  <= a_n;  x_q  <= x_n;  s_q  <= s_n;  pc_q <= pc_n; c_q <= c_n;
      ir_q <= ir_n; op_q <= op_n; t_q  <= t_n;  ea_q <= ea_n;
    end
  end

  // A bus cycle is either a memory write or an interrupt acknowledge.
  assert property (@(posedge clk) disable iff (rst) !(we && ira));

endmodule
