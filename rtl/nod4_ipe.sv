// nod4_ipe - interrupt priority encoder for several interrupting devices.
//
// The processor has one request input (IRQ) and one acknowledge output
// (IRA). The encoder ORs the device requests irq_i[N-1:0] into irq_o, and
// routes the processor's acknowledge to exactly one device: the requesting
// device with the lowest index, so device 0 has the highest priority.
// Purely combinational; the acknowledged device puts its IID on the shared
// data bus in the same cycle.
//
// The OR of the requests and the fixed priority of device 0 over device 1
// follow the two-device description; N > 2 extends the same fixed order
// (five IID bits with IID 0 reserved allow up to 31 sources).
module nod4_ipe #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] irq_i,   // requests from the devices
  output logic         irq_o,   // to the processor
  input  logic         ira_i,   // acknowledge from the processor
  output logic [N-1:0] ira_o    // acknowledge to the selected device
);

  always_comb begin
    logic higher;   // some device of higher priority is requesting
    higher = 1'b0;
    ira_o  = '0;
    for (int unsigned k = 0; k < N; k++) begin
      ira_o[k] = ira_i && irq_i[k] && !higher;
      higher   = higher || irq_i[k];
    end
  end

  assign irq_o = |irq_i;

  // At most one device is acknowledged, and only a requesting one.
  always_comb begin
    assert ($onehot0(ira_o));
    assert ((ira_o & ~irq_i) == '0);
  end

endmodule
