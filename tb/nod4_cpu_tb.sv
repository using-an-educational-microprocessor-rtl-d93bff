// nod4_cpu_tb - self-checking testbench of the nod4 processor.
//
// The processor runs against a 256-byte memory model with a combinational
// read. A test program exercises every addressing mode (implied, immediate,
// direct, indexed by X and by S), subroutines, the stack, conditional jumps,
// the carry flag, swi and rti, while a model interrupting device raises
// requests at random moments. The device drives IID $EB on di when
// acknowledged and drops its request when the handler writes to $FD.
// The handler keeps A on the stack, counts interrupts and records the IID
// it finds in C; for swi (IID 0) it writes a marker instead.
//
// Checks: the final memory image, which the interrupts must not disturb;
// the number of handled interrupts; the IID masked to five bits; the
// stacked return address and C value of every entry; the cycle counts of
// the three exception paths (6 cycles through intx2, 5 through intx1, 6
// through swi1, from the end of the instruction to the handler's first
// fetch); that a request raised while interrupts are enabled is
// acknowledged within 5 cycles, the longest instruction, and that this
// worst case occurs; and that every entry path was taken at least once.
module nod4_cpu_tb;
  import nod4_pkg::*;

  localparam int unsigned NLOOP   = 40;
  localparam logic [7:0]  DEV_IID = 8'hEB;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic [7:0] addr, dout, di;
  logic we, irq, ira;

  logic [7:0] mem [256];

  int checks = 0, failures = 0;

  nod4_cpu dut (
    .clk(clk), .rst(rst), .addr(addr), .dout(dout), .we(we),
    .di(di), .irq(irq), .ira(ira)
  );

  always #5 clk = ~clk;

  assign di = ira ? DEV_IID : mem[addr];

  always_ff @(posedge clk) if (we) mem[addr] <= dout;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---- tiny assembler -------------------------------------------------
  logic [7:0] pc_asm;
  task automatic imp(input op_e o);
    mem[pc_asm] = opcode(M_IMP, o);
    pc_asm++;
  endtask
  task automatic two(input mode_e m, input op_e o, input logic [7:0] v);
    mem[pc_asm] = opcode(m, o);
    mem[pc_asm + 8'd1] = v;
    pc_asm += 8'd2;
  endtask

  logic [7:0] loop_addr;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'h00;
    mem[0] = 8'h10;      // PSA
    mem[1] = 8'h80;      // PIA
    mem[8'hB2] = 8'h11;
    mem[8'hB3] = 8'hF8;

    // main program
    pc_asm = 8'h10;
    two(M_IMM, OP_LDS, 8'hF0);
    two(M_IMM, OP_LDA, 8'h00);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_DIR, OP_STA, 8'hC1);
    two(M_DIR, OP_STA, 8'hC2);
    two(M_IMM, OP_ORC, 8'h20);          // enable interrupts
    loop_addr = pc_asm;
    two(M_DIR, OP_LDA, 8'hC0);
    two(M_IMM, OP_ADDA, 8'h03);
    imp(OP_NOP);
    imp(OP_PUSH);
    two(M_IMM, OP_LDA, 8'h77);
    imp(OP_POP);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_IMM, OP_JSR, 8'h60);
    two(M_DIR, OP_LDA, 8'hC1);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC1);
    two(M_IMM, OP_CMPA, 8'(NLOOP));
    two(M_IMM, OP_JNZ, loop_addr);
    two(M_IMM, OP_ANDC, 8'hDF);         // disable interrupts
    imp(OP_SWI);
    two(M_IMM, OP_LDA, 8'h99);
    two(M_DIR, OP_STA, 8'hC5);
    two(M_IMM, OP_JMP, pc_asm);         // hang

    // subroutine at $60
    pc_asm = 8'h60;
    two(M_IMM, OP_LDX, 8'hB0);
    two(M_IDXX, OP_LDA, 8'h02);         // A = M[$B2] = $11
    two(M_IDXX, OP_ADDA, 8'h03);        // A = $11 + $F8 = $09, carry
    two(M_IDXX, OP_STA, 8'h16);         // M[$C6] = $09
    two(M_IMM, OP_JNC, 8'h74);          // not taken
    two(M_IMM, OP_LDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC7);
    two(M_IDXS, OP_LDA, 8'h00);         // A = return address on the stack
    two(M_DIR, OP_STA, 8'hC8);
    imp(OP_RTS);
    pc_asm = 8'h74;
    two(M_IMM, OP_LDA, 8'hEE);
    two(M_DIR, OP_STA, 8'hC7);
    imp(OP_RTS);

    // exception handler at $80
    pc_asm = 8'h80;
    imp(OP_PUSH);
    imp(OP_TCA);
    two(M_IMM, OP_ANDA, 8'h1F);
    two(M_IMM, OP_JZ, 8'hA0);
    two(M_DIR, OP_STA, 8'hC4);          // IID seen
    two(M_DIR, OP_STA, 8'hFD);          // acknowledge the device
    two(M_DIR, OP_LDA, 8'hC2);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC2);
    imp(OP_POP);
    imp(OP_RTI);
    pc_asm = 8'hA0;                     // swi handler
    two(M_IMM, OP_LDA, 8'h5A);
    two(M_DIR, OP_STA, 8'hC3);
    imp(OP_POP);
    imp(OP_RTI);
  end

  // ---- interrupting device model ----------------------------------------
  int raised = 0;
  always_ff @(posedge clk) begin
    if (rst) irq <= 1'b0;
    else if (we && addr == 8'hFD) irq <= 1'b0;
    else if (!irq && ($urandom_range(0, 29) == 0)) begin
      irq <= 1'b1;
      raised++;
    end
  end

  // ---- exception path monitor ------------------------------------------
  int n_intx2 = 0, n_intx1 = 0, n_swi = 0;
  int cyc = 0;
  bit counting = 0;
  int expect_cycles = 0;
  logic [7:0] ret_addr;
  logic [7:0] sp_at_entry;
  logic [7:0] c_at_entry;

  always_ff @(posedge clk) begin
    if (!rst) begin
      // entry into an exception path
      if (!counting && dut.state_q inside {S_INTX2, S_INTX1, S_SWI1}) begin
        counting <= 1'b1;
        cyc <= 1;
        sp_at_entry <= dut.s_q;
        c_at_entry  <= dut.c_q;
        if (dut.state_q == S_INTX2) begin
          n_intx2++; expect_cycles <= 6;
          ret_addr <= dut.pc_q - 8'd1;
        end else if (dut.state_q == S_INTX1) begin
          n_intx1++; expect_cycles <= 5;
          ret_addr <= dut.pc_q;
        end else begin
          n_swi++; expect_cycles <= 6;
          ret_addr <= dut.pc_q - 8'd1;
        end
      end else if (counting) begin
        if (dut.state_q == S_FETCH1) begin
          counting <= 1'b0;
          check("exception entry cycles", cyc, expect_cycles);
          check("handler address", dut.pc_q, 8'h80);
          check("stacked return address", mem[sp_at_entry - 8'd1], ret_addr);
          check("stacked C register", mem[sp_at_entry - 8'd2], c_at_entry);
          check("stack pointer after entry", dut.s_q, sp_at_entry - 8'd2);
          check("I flag cleared on entry", dut.c_q[CC_I], 0);
        end else begin
          cyc <= cyc + 1;
        end
      end
      if (ira) check("ira only in intx1", dut.state_q == S_INTX1, 1);
    end
  end

  // ---- request-to-acknowledge latency ------------------------------------
  // A request that rises while interrupts are enabled must be acknowledged
  // once the current instruction completes: at most 5 cycles later, the
  // longest instruction (direct/indexed load or ALU) being 5 cycles.
  int wait_cyc = -1, worst_wait = 0, n_waits = 0;
  logic irq_prev = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (irq && !irq_prev && dut.c_q[CC_I] &&
          !(dut.state_q inside {S_INTX1, S_INTX2, S_INTX3, S_INTX4, S_INTX5}))
        wait_cyc = 0;
      else if (wait_cyc >= 0)
        wait_cyc++;
      if (wait_cyc >= 0 && ira) begin
        n_waits++;
        if (wait_cyc > worst_wait) worst_wait = wait_cyc;
        check("request acknowledged within the longest instruction", wait_cyc <= 5, 1);
        wait_cyc = -1;
      end else if (wait_cyc >= 0 && !dut.c_q[CC_I]) begin
        wait_cyc = -1;   // masked again before completion (andc)
      end
      irq_prev = irq;
    end
  end

  // ---- run --------------------------------------------------------------
  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (mem[8'hC5] == 8'h99);
    repeat (5) @(posedge clk);
    check("sum", mem[8'hC0], 8'((3 * NLOOP) % 256));
    check("loop count", mem[8'hC1], NLOOP);
    check("interrupts handled", mem[8'hC2], (raised - (irq ? 1 : 0)) % 256);
    check("swi marker", mem[8'hC3], 8'h5A);
    check("IID masked to 5 bits", mem[8'hC4], DEV_IID & 8'h1F);
    check("indexed store", mem[8'hC6], 8'h09);
    check("carry taken", mem[8'hC7], 8'h01);
    check("stack-relative load of return address", mem[8'hC8], 8'h29);
    check("stack balanced", dut.s_q, 8'hF0);
    check("intx2 path used", n_intx2 > 0, 1);
    check("intx1 path used", n_intx1 > 0, 1);
    check("swi path used once", n_swi, 1);
    check("latency measured", n_waits > 0, 1);
    check("worst latency is the longest instruction", worst_wait, 5);
    $display("entries: intx2=%0d intx1=%0d swi=%0d raised=%0d; worst request-to-acknowledge %0d cycles over %0d requests",
             n_intx2, n_intx1, n_swi, raised, worst_wait, n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
