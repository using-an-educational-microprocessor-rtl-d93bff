// nod4_system_full_tb - the LED counter example on the system at its
// default parameters: 50 MHz clock (20 ns period) and a 100 ms real-time
// clock period (5,000,000 cycles).
//
// The program enables the RTC and spins on "jmp Done"; each tick raises an
// interrupt whose handler clears the flag and adds one to the count shown on
// the LEDs. Checks: the LEDs are 0 just before the first 100 ms tick, and
// read 1, 2, 3 shortly (100 cycles) after the first three ticks, i.e. the
// counting rate is 10 Hz.
module nod4_system_full_tb;
  import nod4_pkg::*;

  localparam int unsigned PERIOD = 5_000_000;   // 100 ms at 50 MHz

  logic clk = 1'b0, rst = 1'b1;
  logic ld_we = 1'b0;
  logic [7:0] ld_addr = '0, ld_data = '0;
  logic [7:0] leds;
  logic dev1_ira;
  int checks = 0, failures = 0;

  nod4_system dut (
    .clk(clk), .rst(rst), .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .leds(leds), .dev1_irq(1'b0), .dev1_ira(dev1_ira), .dev1_di(8'h00));

  always #10 clk = ~clk;   // 20 ns

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic [7:0] img [256];
  logic [7:0] pc_asm;
  task automatic imp(input op_e o);
    img[pc_asm] = opcode(M_IMP, o); pc_asm++;
  endtask
  task automatic two(input mode_e m, input op_e o, input logic [7:0] v);
    img[pc_asm] = opcode(m, o); img[pc_asm + 8'd1] = v; pc_asm += 8'd2;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) img[i] = 8'h00;
    img[0] = 8'h02; img[1] = 8'h10;
    pc_asm = 8'h02;
    two(M_IMM, OP_LDS, 8'hFC);
    two(M_IMM, OP_LDA, 8'h00);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);
    two(M_IMM, OP_ORC, 8'h20);
    two(M_IMM, OP_JMP, 8'h0E);
    pc_asm = 8'h10;
    two(M_IMM, OP_LDA, 8'h03);
    two(M_DIR, OP_STA, 8'hFD);
    two(M_DIR, OP_LDA, 8'hC0);
    two(M_IMM, OP_ADDA, 8'h01);
    two(M_DIR, OP_STA, 8'hC0);
    two(M_DIR, OP_STA, 8'hFC);
    imp(OP_RTI);

    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ld_we = 1'b1; ld_addr = 8'(i); ld_data = img[i];
    end
    @(negedge clk);
    ld_we = 1'b0;
    rst = 1'b0;                       // released at this negedge

    repeat (PERIOD - 2) @(posedge clk);
    check("LEDs before first tick", int'(leds), 0);
    repeat (100) @(posedge clk);
    check("LEDs after 100 ms", int'(leds), 1);
    repeat (PERIOD - 100) @(posedge clk);
    check("LEDs just before 200 ms", int'(leds), 1);
    repeat (100) @(posedge clk);
    check("LEDs after 200 ms", int'(leds), 2);
    repeat (PERIOD) @(posedge clk);
    check("LEDs after 300 ms", int'(leds), 3);
    check("no acknowledge to device 1", int'(dev1_ira), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * PERIOD) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
