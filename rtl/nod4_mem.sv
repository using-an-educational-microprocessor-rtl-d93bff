// nod4_mem - the 256-byte memory of the nod4 system bus.
//
// One port: asynchronous (combinational) read, synchronous write on the
// rising clock edge when we is high. With an 8-bit address bus the whole
// address space is one array; the system bus decoder takes the I/O
// addresses out of it. The processor performs one access per clock and
// samples the read data at the end of that same cycle, which is why the
// read is combinational (on an FPGA this maps to distributed RAM). The
// contents are not cleared by reset: the program, including the program
// start address at $00 and the interrupt address at $01, is written through
// this port before the processor is released from reset. The description
// keeps those two vectors in ROM; here they are ordinary memory bytes that
// the loader writes.
module nod4_mem #(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
