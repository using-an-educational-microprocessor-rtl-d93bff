// nod4_rtc_tb - real-time clock with a short period (PERIOD = 10).
// Checks: RTF rises exactly every PERIOD cycles after reset, whether or not
// it was cleared; irq only while both RTIE and RTF are set; the RTCTL read
// value {0, RTIE, RTF}; writing RTFC = 1 clears RTF and RTFC = 0 does not;
// a clear in the same cycle as a tick leaves RTF set; the IID appears on
// di_o only while ira is high.
module nod4_rtc_tb;
  localparam int unsigned P = 10;
  localparam logic [7:0] ID = 8'h07;

  logic clk = 1'b0, rst = 1'b1;
  logic we, irq, ira;
  logic [7:0] wdata, rdata, di_o;
  int checks = 0, failures = 0;
  int cyc = 0;

  nod4_rtc #(.PERIOD(P), .IID(ID)) dut (
    .clk(clk), .rst(rst), .we(we), .wdata(wdata), .rdata(rdata),
    .irq(irq), .ira(ira), .di_o(di_o));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %0h expected %0h", what, cyc, got, exp);
    end
  endtask

  task automatic write(input logic [7:0] d);
    we = 1'b1; wdata = d;
    @(posedge clk); #1; cyc++;
    we = 1'b0;
  endtask

  task automatic step();
    @(posedge clk); #1; cyc++;
  endtask

  initial begin
    we = 1'b0; wdata = '0; ira = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    cyc = 0;
    // first period, RTIE off
    for (int i = 1; i < P; i++) begin
      step();
      check("RTF low before first tick", int'(rdata[0]), 0);
    end
    step();
    check("RTF set after PERIOD cycles", int'(rdata), 8'h01);
    check("no irq while RTIE low", int'(irq), 0);
    // enable and clear (as the example program does with $03)
    write(8'h03);
    check("RTIE set, RTF cleared", int'(rdata), 8'h02);
    check("no irq after clear", int'(irq), 0);
    // wait for the next tick: P cycles after the previous one
    for (int i = 2; i < P; i++) begin
      step();
      check("RTF low within period", int'(rdata[0]), 0);
    end
    step();
    check("RTF set at second tick", int'(rdata), 8'h03);
    check("irq with RTIE and RTF", int'(irq), 1);
    // acknowledge drives the IID
    check("di_o idle", int'(di_o), 0);
    ira = 1'b1; #1;
    check("di_o carries IID", int'(di_o), int'(ID));
    ira = 1'b0;
    // write with RTFC = 0 keeps the flag, RTIE = 0 masks the request
    write(8'h00);
    check("RTFC=0 keeps RTF", int'(rdata), 8'h01);
    check("RTIE=0 masks irq", int'(irq), 0);
    write(8'h02);
    check("irq again with RTIE", int'(irq), 1);
    // flag is not cleared by the device itself: stays up over the next tick
    while (cyc % P != P - 1) step();
    // clear in the same cycle as the tick: tick wins
    write(8'h03);
    check("tick wins over simultaneous clear", int'(rdata), 8'h03);
    write(8'h03);
    check("clear afterwards", int'(rdata), 8'h02);
    write(8'hFC);   // upper bits ignored, RTIE = 0, no clear
    check("upper write bits ignored", int'(rdata), 8'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
