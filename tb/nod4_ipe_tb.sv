// nod4_ipe_tb - exhaustive check of the interrupt priority encoder for the
// two-device case and for five devices, and a random check with 31 devices: irq_o is the OR of the requests and
// the acknowledge goes to the lowest-numbered requesting device only.
module nod4_ipe_tb;
  logic [1:0] irq2, ira2;
  logic       irqo2, ira_i2;
  logic [4:0] irq5, ira5;
  logic       irqo5, ira_i5;
  logic [30:0] irq31, ira31;
  logic        irqo31, ira_i31;
  int checks = 0, failures = 0;

  nod4_ipe #(.N(2)) dut2 (.irq_i(irq2), .irq_o(irqo2), .ira_i(ira_i2), .ira_o(ira2));
  nod4_ipe #(.N(5)) dut5 (.irq_i(irq5), .irq_o(irqo5), .ira_i(ira_i5), .ira_o(ira5));
  nod4_ipe #(.N(31)) dut31 (.irq_i(irq31), .irq_o(irqo31), .ira_i(ira_i31), .ira_o(ira31));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic int grant(input int req, input int n);
    for (int k = 0; k < n; k++) if (req & (1 << k)) return 1 << k;
    return 0;
  endfunction

  initial begin
    for (int ack = 0; ack < 2; ack++) begin
      for (int r = 0; r < 4; r++) begin
        irq2 = 2'(r); ira_i2 = 1'(ack);
        #1;
        check("irq2 OR", int'(irqo2), int'(r != 0));
        check("ira2 grant", int'(ira2), ack ? grant(r, 2) : 0);
      end
      for (int r = 0; r < 32; r++) begin
        irq5 = 5'(r); ira_i5 = 1'(ack);
        #1;
        check("irq5 OR", int'(irqo5), int'(r != 0));
        check("ira5 grant", int'(ira5), ack ? grant(r, 5) : 0);
      end
    end
    // the largest configuration: 31 sources (five-bit IID, IID 0 for swi)
    for (int i = 0; i < 500; i++) begin
      int sh;
      sh = $urandom_range(0, 30);
      irq31 = 31'($urandom) << sh;      // vary where the lowest request sits
      if (i % 50 == 0) irq31 = '0;
      ira_i31 = 1'b1;
      #1;
      check("irq31 OR", int'(irqo31), int'(irq31 != 0));
      check("ira31 grant", int'(ira31), int'(irq31 & (~irq31 + 31'd1)));
    end
    // the two-device case as drawn: device 0 wins over device 1
    irq2 = 2'b11; ira_i2 = 1'b1; #1;
    check("device0 has priority", int'(ira2), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
