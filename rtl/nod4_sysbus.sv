// nod4_sysbus - memory map, LED output port and di multiplexer of a nod4 system.
//
// Decodes the processor's 8-bit address:
//   LEDS_ADDR  ($FC) LED output register: writes latch the byte, reads
//                    return it
//   RTCTL_ADDR ($FD) real-time clock control/status register
//   anything else    the 256-byte memory
// and builds the processor's data input di. During an interrupt
// acknowledge cycle (ira high) di carries the OR of the device drives
// dev_di (each device drives zero unless it is the acknowledged one), so
// the acknowledged device's IID reaches the processor; otherwise di is the
// selected read data. Writes are steered to the memory, the LED register or
// the RTC register; memory is not written at the I/O addresses.
//
// The two I/O addresses and the IID-on-di scheme follow the description.
// Making the LED port readable and the OR-combination of device drives are
// this design's choices. The LED register resets to zero (synchronous,
// active high); combinational otherwise.
module nod4_sysbus #(
  parameter logic [7:0]  LEDS_ADDR  = 8'hFC,
  parameter logic [7:0]  RTCTL_ADDR = 8'hFD,
  parameter int unsigned NDEV       = 2
) (
  input  logic       clk,
  input  logic       rst,
  // processor side
  input  logic [7:0] addr,
  input  logic [7:0] wdata,
  input  logic       we,
  input  logic       ira,
  output logic [7:0] di,
  // memory
  output logic       mem_we,
  input  logic [7:0] mem_rdata,
  // real-time clock register
  output logic       rtc_we,
  input  logic [7:0] rtc_rdata,
  // interrupting devices' data bus drives
  input  logic [7:0] dev_di [NDEV],
  // LED port
  output logic [7:0] leds
);

  logic sel_leds, sel_rtc;
  logic [7:0] iid_bus;

  assign sel_leds = (addr == LEDS_ADDR);
  assign sel_rtc  = (addr == RTCTL_ADDR);

  assign mem_we = we && !sel_leds && !sel_rtc;
  assign rtc_we = we && sel_rtc;

  always_ff @(posedge clk) begin
    if (rst)                 leds <= 8'h00;
    else if (we && sel_leds) leds <= wdata;
  end

  always_comb begin
    iid_bus = 8'h00;
    for (int unsigned k = 0; k < NDEV; k++) iid_bus |= dev_di[k];
  end

  always_comb begin
    if (ira)           di = iid_bus;
    else if (sel_leds) di = leds;
    else if (sel_rtc)  di = rtc_rdata;
    else               di = mem_rdata;
  end

endmodule
