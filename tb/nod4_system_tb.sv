// nod4_system_tb - end-to-end test of the nod4 system at a short RTC period.
//
// Part 1 runs the LED counter example: the real-time clock interrupts, the
// handler clears the flag, increments a count in memory and shows it on the
// LEDs, while the main program spins on "jmp Done". Checks: the LEDs count
// the RTC ticks, and the acknowledge follows each request within the three
// cycles of the jmp loop.
//
// Part 2 runs a dispatching handler with two interrupt sources behind the
// priority encoder (RTC as device 0, a model peripheral as device 1 with
// IID $E5) and a main loop of prefetch-type implied instructions and swi.
// The handler reads the IID from C and dispatches to one of three routines.
// Checks: per-source counts against the requests the testbench saw, the
// IID masked to five bits, device 0 acknowledged whenever both request, and
// that each mechanism happened: RTC interrupt, device-1 interrupt, both
// pending at once, swi trap, entry through intx2 (un-prefetch) and through
// intx1, LED update.
module nod4_system_tb;
  import nod4_pkg::*;

  localparam int unsigned P = 97;            // RTC period in cycles
  localparam logic [7:0] DEV1_IID = 8'hE5;

  logic clk = 1'b0, rst = 1'b1;
  logic ld_we = 1'b0;
  logic [7:0] ld_addr = '0, ld_data = '0;
  logic [7:0] leds;
  logic dev1_irq, dev1_ira;
  logic [7:0] dev1_di;

  int checks = 0, failures = 0;

  nod4_system #(.RTC_PERIOD(P), .RTC_IID(8'h01)) dut (
    .clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .leds(leds), .dev1_irq(dev1_irq), .dev1_ira(dev1_ira), .dev1_di(dev1_di));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---- program image and loader -------------------------------------------
  logic [7:0] img [256];
  logic [7:0] pc_asm;
  task automatic imp(input op_e o);
    img[pc_asm] = opcode(M_IMP, o); pc_asm++;
  endtask
  task automatic two(input mode_e m, input op_e o, input logic [7:0] v);
    img[pc_asm] = opcode(m, o); img[pc_asm + 8'd1] = v; pc_asm += 8'd2;
  endtask

  task automatic load_and_start();
    rst = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 8'(i); ld_data = img[i];
    end
    @(negedge clk);
    ld_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
  endtask

  function automatic logic [7:0] rd(input logic [7:0] a);
    return dut.u_mem.mem[a];
  endfunction

  // ---- device 1 model -------------------------------------------------------
  bit dev1_on = 0;
  int dev1_raised = 0;
  always_ff @(posedge clk) begin
    if (rst || !dev1_on) dev1_irq <= 1'b0;
    else if (dut.cpu_we && dut.cpu_addr == 8'hFE) dev1_irq <= 1'b0;   // handler's acknowledge write
    else if (!dev1_irq && $urandom_range(0, 199) == 0) begin
      dev1_irq <= 1'b1;
      dev1_raised++;
    end
  end
  assign dev1_di = dev1_ira ? DEV1_IID : 8'h00;

  // ---- mechanism monitors ---------------------------------------------------
  int n_rtc_ack = 0, n_dev1_ack = 0, n_both = 0, n_intx2 = 0, n_intx1 = 0, n_swi = 0;
  int n_led = 0;
  logic [7:0] leds_prev;
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (dut.cpu_ira) begin
        if (dut.u_rtc.irq) n_rtc_ack++;
        if (dev1_ira) n_dev1_ack++;
        if (dut.u_rtc.irq && dev1_irq) begin
          n_both++;
          check("device 0 wins when both request", int'(dut.dev_ira), 1);
        end
        check("exactly one device acknowledged", $countones(dut.dev_ira), 1);
      end
      if (dut.u_cpu.state_q == S_INTX2) n_intx2++;
      if (dut.u_cpu.state_q == S_INTX1) n_intx1++;
      if (dut.u_cpu.state_q == S_SWI1)  n_swi++;
      leds_prev <= leds;
      if (leds != leds_prev) n_led++;
    end
  end

  // ---- part 1: LED counter --------------------------------------------------
  task automatic part1();
    int ticks, worst_ack, worst_entry, since;
    logic irq_prev;
    for (int i = 0; i < 256; i++) img[i] = 8'h00;
    img[0] = 8'h02; img[1] = 8'h10;          // start address, handler address
    pc_asm = 8'h02;
    two(M_IMM, OP_LDS, 8'hFC);
    two(M_IMM, OP_LDA, 8'h00);
    two(M_DIR, OP_STA, 8'hC0);               // Count
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);               // RTCTL: enable, clear
    two(M_IMM, OP_ORC, 8'h20);
    two(M_IMM, OP_JMP, 8'h0E);               // Done: jmp Done (at $0E)
    pc_asm = 8'h10;                          // Isr
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);
    two(M_DIR, OP_LDA, 8'hC0);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_DIR, OP_STA, 8'hFC);               // LEDS
    imp(OP_RTI);
    load_and_start();

    worst_ack = 0; worst_entry = 0; since = -1; irq_prev = 1'b0;
    for (int c = 0; c < 12 * P + 60; c++) begin
      @(posedge clk); #1;
      if (dut.u_rtc.irq && !irq_prev && dut.u_cpu.c_q[CC_I]) since = 0;
      else if (since >= 0) since++;
      if (dut.cpu_ira && since >= 0) begin
        if (since > worst_ack) worst_ack = since;
        since = -1;
      end
      irq_prev = dut.u_rtc.irq;
    end
    ticks = (12 * P) / P;
    check("LEDs count RTC ticks", int'(leds), ticks);
    check("count in memory", int'(rd(8'hC0)), ticks);
    checks++;
    if (worst_ack > 3) begin
      failures++;
      $display("FAIL acknowledge took %0d cycles after request", worst_ack);
    end
    $display("part 1: leds=%0d ticks=%0d worst request-to-acknowledge=%0d cycles", leds, ticks, worst_ack);
  endtask

  // ---- part 2: two sources, dispatch, swi -----------------------------------
  task automatic part2();
    int cycles;
    logic [7:0] loop;
    for (int i = 0; i < 256; i++) img[i] = 8'h00;
    img[0] = 8'h10; img[1] = 8'h40;
    pc_asm = 8'h10;
    two(M_IMM, OP_LDS, 8'hF0);
    two(M_IMM, OP_LDA, 8'h00);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_DIR, OP_STA, 8'hC1);
    two(M_DIR, OP_STA, 8'hC2);
    two(M_DIR, OP_STA, 8'hC3);
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);
    two(M_IMM, OP_ORC, 8'h20);
    loop = pc_asm;
    imp(OP_NOP);
    imp(OP_PUSH);
    imp(OP_POP);
    imp(OP_SWI);
    two(M_DIR, OP_LDA, 8'hC3);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC3);
    two(M_IMM, OP_JMP, loop);
    // exception handler: dispatch on the IID
    pc_asm = 8'h40;
    imp(OP_PUSH);
    imp(OP_TCA);
    two(M_IMM, OP_ANDA, 8'h1F);
    two(M_IMM, OP_JZ, 8'h80);                // IID 0: swi
    two(M_IMM, OP_CMPA, 8'h01);
    two(M_IMM, OP_JZ, 8'h60);                // IID 1: real-time clock
    two(M_DIR, OP_STA, 8'hC4);               // otherwise device 1
    two(M_DIR, OP_STA, 8'hFE);               // acknowledge device 1
    two(M_DIR, OP_LDA, 8'hC1);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC1);
    imp(OP_POP);
    imp(OP_RTI);
    pc_asm = 8'h60;
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);
    two(M_DIR, OP_LDA, 8'hC0);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_DIR, OP_STA, 8'hFC);
    imp(OP_POP);
    imp(OP_RTI);
    pc_asm = 8'h80;
    two(M_DIR, OP_LDA, 8'hC2);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC2);
    imp(OP_POP);
    imp(OP_RTI);

    dev1_raised = 0;
    load_and_start();
    dev1_on = 1;
    cycles = 100 * P;
    repeat (cycles) @(posedge clk);
    dev1_on = 0;
    #1;
    // disable further interrupts by watching the counts settle
    check("RTC interrupts handled", int'(rd(8'hC0)) >= cycles / P - 1 && int'(rd(8'hC0)) <= cycles / P, 1);
    check("LEDs show the RTC count", int'(leds), int'(rd(8'hC0)));
    check("device 1 interrupts handled",
          int'(rd(8'hC1)) >= dev1_raised - 1 && int'(rd(8'hC1)) <= dev1_raised, 1);
    check("device 1 IID masked", int'(rd(8'hC4)), int'(DEV1_IID & 8'h1F));
    check("one swi per loop pass", int'(rd(8'hC2)) - int'(rd(8'hC3)) inside {0, 1}, 1);
    $display("part 2: rtc=%0d dev1=%0d(raised %0d) swi=%0d loops=%0d",
             rd(8'hC0), rd(8'hC1), dev1_raised, rd(8'hC2), rd(8'hC3));
  endtask

  initial begin
    part1();
    part2();
    $display("mechanisms: rtc_ack=%0d dev1_ack=%0d both_pending=%0d swi=%0d intx2=%0d intx1=%0d led_updates=%0d",
             n_rtc_ack, n_dev1_ack, n_both, n_swi, n_intx2, n_intx1, n_led);
    check("RTC interrupt happened", n_rtc_ack > 0, 1);
    check("device 1 interrupt happened", n_dev1_ack > 0, 1);
    check("simultaneous requests happened", n_both > 0, 1);
    check("swi happened", n_swi > 0, 1);
    check("intx2 entry happened", n_intx2 > 0, 1);
    check("intx1 entry happened", n_intx1 > 0, 1);
    check("LED update happened", n_led > 0, 1);
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
