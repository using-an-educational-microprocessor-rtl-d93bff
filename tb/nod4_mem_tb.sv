// nod4_mem_tb - writes every address of the 256-byte memory with random data
// and reads it back through the combinational read port, then overwrites a
// random subset and checks the whole array against a model array.
module nod4_mem_tb;
  logic clk = 1'b0;
  logic we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [256];
  int checks = 0, failures = 0;

  nod4_mem #(.DEPTH(256)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic wr(input logic [7:0] ad, input logic [7:0] d);
    @(negedge clk);
    we = 1'b1; addr = ad; wdata = d;
    @(negedge clk);
    we = 1'b0;
    model[ad] = d;
  endtask

  task automatic rd_check(input logic [7:0] ad);
    @(negedge clk);
    we = 1'b0; addr = ad;
    #1;
    checks++;
    if (rdata !== model[ad]) begin
      failures++;
      $display("FAIL addr %0h: got %0h expected %0h", ad, rdata, model[ad]);
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int i = 0; i < 256; i++) wr(8'(i), 8'($urandom));
    for (int i = 0; i < 256; i++) rd_check(8'(i));
    repeat (300) wr(8'($urandom), 8'($urandom));
    for (int i = 0; i < 256; i++) rd_check(8'(i));
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
