// nod4_alu_tb - checks every ALU function against arithmetic done in the
// testbench on 9-bit integers: result, zero flag, and carry/borrow where
// defined, for all corner operands and a set of random ones.
module nod4_alu_tb;
  import nod4_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, y;
  logic       z, c, cv;
  int checks = 0, failures = 0;

  nod4_alu dut (.op(op), .a(a), .b(b), .y(y), .z(z), .c(c), .c_valid(cv));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%0d a=%0h b=%0h: got %0h expected %0h", what, op, a, b, got, exp);
    end
  endtask

  task automatic try_one(input alu_op_e o, input logic [7:0] av, input logic [7:0] bv);
    int ai, bi, r, cexp, cvexp;
    op = o; a = av; b = bv;
    #1;
    ai = int'(av); bi = int'(bv);
    cvexp = 0; cexp = 0;
    case (o)
      ALU_ADD: begin r = ai + bi; cexp = (r > 255); cvexp = 1; end
      ALU_SUB: begin r = ai - bi; cexp = (bi > ai); cvexp = 1; end
      ALU_AND: r = ai & bi;
      ALU_OR:  r = ai | bi;
      default: r = bi;
    endcase
    r = r & 255;
    check("result", int'(y), r);
    check("zero", int'(z), int'(r == 0));
    check("carry valid", int'(cv), cvexp);
    if (cvexp != 0) check("carry/borrow", int'(c), cexp);
  endtask

  initial begin
    alu_op_e ops [5] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_AND, ALU_OR};
    logic [7:0] corners [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    foreach (ops[i]) begin
      foreach (corners[j]) foreach (corners[k]) try_one(ops[i], corners[j], corners[k]);
      repeat (200) try_one(ops[i], 8'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
