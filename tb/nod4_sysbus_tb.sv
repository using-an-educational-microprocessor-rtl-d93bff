// nod4_sysbus_tb - memory map and di multiplexer.
// Drives processor bus cycles and checks: writes to $FC latch the LED port
// and do not reach memory; writes to $FD strobe only the RTC register;
// other writes reach only memory; reads return LEDs, RTCTL or memory data
// by address; during ira the OR of the device drives appears on di
// whatever the address; reset clears the LEDs.
module nod4_sysbus_tb;
  logic clk = 1'b0, rst = 1'b1;
  logic [7:0] addr, wdata, di, mem_rdata, rtc_rdata, leds;
  logic we, ira, mem_we, rtc_we;
  logic [7:0] dev_di [2];
  int checks = 0, failures = 0;

  nod4_sysbus #(.NDEV(2)) dut (
    .clk(clk), .rst(rst), .addr(addr), .wdata(wdata), .we(we), .ira(ira), .di(di),
    .mem_we(mem_we), .mem_rdata(mem_rdata), .rtc_we(rtc_we), .rtc_rdata(rtc_rdata),
    .dev_di(dev_di), .leds(leds));

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s (addr %0h): got %0h expected %0h", what, addr, got, exp);
    end
  endtask

  initial begin
    logic [7:0] led_model;
    we = 0; ira = 0; addr = 0; wdata = 0; mem_rdata = 8'h3C; rtc_rdata = 8'h02;
    dev_di[0] = 0; dev_di[1] = 0;
    @(posedge clk); #1;
    check("LEDs reset", int'(leds), 0);
    rst = 0;
    led_model = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      addr      = (i % 4 == 0) ? 8'hFC : (i % 4 == 1) ? 8'hFD : 8'($urandom);
      wdata     = 8'($urandom);
      we        = 1'($urandom);
      mem_rdata = 8'($urandom);
      rtc_rdata = 8'($urandom_range(0, 3));
      ira = 1'b0;
      #1;
      check("mem_we", int'(mem_we), int'(we && addr != 8'hFC && addr != 8'hFD));
      check("rtc_we", int'(rtc_we), int'(we && addr == 8'hFD));
      if (addr == 8'hFC)      check("read LEDs", int'(di), int'(led_model));
      else if (addr == 8'hFD) check("read RTCTL", int'(di), int'(rtc_rdata));
      else                    check("read memory", int'(di), int'(mem_rdata));
      @(posedge clk); #1;
      if (we && addr == 8'hFC) led_model = wdata;
      check("LED register", int'(leds), int'(led_model));
      // acknowledge cycle: only the granted device drives
      @(negedge clk);
      we = 1'b0; ira = 1'b1;
      dev_di[0] = (i % 2) ? 8'($urandom) : 8'h00;
      dev_di[1] = (i % 2) ? 8'h00 : 8'($urandom);
      #1;
      check("IID on di during ira", int'(di), int'(dev_di[0] | dev_di[1]));
      ira = 1'b0; dev_di[0] = 0; dev_di[1] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
