// nod4_system - a complete nod4 system: processor, memory, LED port,
// real-time clock and a second, external interrupting device.
//
// Structure:
//   nod4_cpu    processor, one bus cycle per clock
//   nod4_mem    256 bytes of program and data memory
//   nod4_sysbus address decoder ($FC LEDs, $FD RTCTL), LED register and
//               the di multiplexer that also carries the IID on acknowledge
//   nod4_rtc    real-time clock, interrupt device 0 (highest priority)
//   nod4_ipe    interrupt priority encoder for two devices
// Device 1 is outside: its request dev1_irq comes in, its acknowledge
// dev1_ira goes out, and it drives dev1_di (its IID, zero when not
// acknowledged) onto the data bus.
//
// Program loading: while rst is high the processor is held, and the
// ld_we/ld_addr/ld_data port writes memory (the program start address at
// $00, the interrupt address at $01, then the program). After rst falls the
// processor reads $00 and starts.
//
// The block structure and interrupt wiring follow the two-device system of
// the description; the loader port and the choice of the real-time clock as
// device 0 are this design's. RTC_PERIOD defaults to 100 ms at 50 MHz.
module nod4_system #(
  parameter int unsigned RTC_PERIOD = 5_000_000,
  parameter logic [7:0]  RTC_IID    = 8'h01
) (
  input  logic       clk,
  input  logic       rst,
  // program loader, used while rst is high
  input  logic       ld_we,
  input  logic [7:0] ld_addr,
  input  logic [7:0] ld_data,
  // LED port
  output logic [7:0] leds,
  // external interrupting device 1
  input  logic       dev1_irq,
  output logic       dev1_ira,
  input  logic [7:0] dev1_di
);

  logic [7:0] cpu_addr, cpu_dout, cpu_di;
  logic       cpu_we, cpu_irq, cpu_ira;

  logic       mem_we_bus, mem_we;
  logic [7:0] mem_addr, mem_wdata, mem_rdata;

  logic       rtc_we, rtc_irq;
  logic [7:0] rtc_rdata, rtc_di;

  logic [1:0] dev_irq, dev_ira;
  logic [7:0] dev_di [2];

  nod4_cpu u_cpu (
    .clk (clk),
    .rst (rst),
    .addr(cpu_addr),
    .dout(cpu_dout),
    .we  (cpu_we),
    .di  (cpu_di),
    .irq (cpu_irq),
    .ira (cpu_ira)
  );

  // The loader owns the memory port while the processor is in reset.
  assign mem_we    = rst ? ld_we   : mem_we_bus;
  assign mem_addr  = rst ? ld_addr : cpu_addr;
  assign mem_wdata = rst ? ld_data : cpu_dout;

  nod4_mem #(.DEPTH(256)) u_mem (
    .clk  (clk),
    .we   (mem_we),
    .addr (mem_addr),
    .wdata(mem_wdata),
    .rdata(mem_rdata)
  );

  nod4_sysbus #(.NDEV(2)) u_bus (
    .clk      (clk),
    .rst      (rst),
    .addr     (cpu_addr),
    .wdata    (cpu_dout),
    .we       (cpu_we),
    .ira      (cpu_ira),
    .di       (cpu_di),
    .mem_we   (mem_we_bus),
    .mem_rdata(mem_rdata),
    .rtc_we   (rtc_we),
    .rtc_rdata(rtc_rdata),
    .dev_di   (dev_di),
    .leds     (leds)
  );

  nod4_rtc #(.PERIOD(RTC_PERIOD), .IID(RTC_IID)) u_rtc (
    .clk  (clk),
    .rst  (rst),
    .we   (rtc_we),
    .wdata(cpu_dout),
    .rdata(rtc_rdata),
    .irq  (rtc_irq),
    .ira  (dev_ira[0]),
    .di_o (rtc_di)
  );

  assign dev_irq   = {dev1_irq, rtc_irq};
  assign dev_di[0] = rtc_di;
  assign dev_di[1] = dev1_di;
  assign dev1_ira  = dev_ira[1];

  nod4_ipe #(.N(2)) u_ipe (
    .irq_i(dev_irq),
    .irq_o(cpu_irq),
    .ira_i(cpu_ira),
    .ira_o(dev_ira)
  );

endmodule
