// nod4_rtc - periodic real-time clock interrupt source (RTCTL register).
//
// A free-running counter sets the real-time flag RTF once every PERIOD clock
// cycles, whether or not the previous request was cleared. The device
// requests an interrupt (irq) while both RTF and the enable bit RTIE are
// high. Control/status register, one address:
//   read : {6'b0, RTIE, RTF}
//   write: bit 1 -> RTIE, bit 0 = 1 clears RTF (RTFC), bits 7..2 ignored.
// When the processor acknowledges (ira high) the device drives its
// identifier IID on di_o for that cycle; otherwise di_o is zero, so the
// drives of several devices can be ORed onto the processor's di bus.
// Acknowledge alone does not clear the request: the handler must write
// RTFC. If a period ends in the same cycle as an RTFC write, the new flag
// wins so that no tick is lost.
//
// The register layout and behaviour follow the description. The default
// period is 100 ms at the 50 MHz clock (5,000,000 cycles); the counter,
// the IID value and the set-wins rule are this design's choices.
module nod4_rtc #(
  parameter int unsigned PERIOD = 5_000_000,
  parameter logic [7:0]  IID    = 8'h01
) (
  input  logic       clk,
  input  logic       rst,       // synchronous, active high
  input  logic       we,        // write strobe for RTCTL (address decoded)
  input  logic [7:0] wdata,
  output logic [7:0] rdata,     // RTCTL read value
  output logic       irq,
  input  logic       ira,
  output logic [7:0] di_o       // IID onto the data bus during acknowledge
);

  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt_q;
  logic          rtf_q, rtie_q;
  logic          tick;

  assign tick = (cnt_q == CW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      rtf_q  <= 1'b0;
      rtie_q <= 1'b0;
    end else begin
      cnt_q <= tick ? '0 : cnt_q + CW'(1);
      if (we) rtie_q <= wdata[1];
      if (tick)
        rtf_q <= 1'b1;
      else if (we && wdata[0])
        rtf_q <= 1'b0;
    end
  end

  assign rdata = {6'b0, rtie_q, rtf_q};
  assign irq   = rtie_q && rtf_q;
  assign di_o  = ira ? IID : 8'h00;

endmodule
