// nod4_alu - unsigned 8-bit arithmetic/logic unit of the nod4 accumulator.
//
// Purely combinational. For ALU_ADD the carry flag output is the carry out of
// bit 7; for ALU_SUB it is the borrow (set when b > a, unsigned). The zero
// flag output is set when the 8-bit result is zero. c_valid tells the
// controller whether the operation defines the carry flag (add and subtract
// do; pass, and, or leave the C flag as it was). The architecture says only
// that arithmetic is unsigned and that the C flag means carry or borrow; the
// operation set and the flag rules for the logic operations are this
// design's choice.
module nod4_alu
  import nod4_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] y,
  output logic       z,
  output logic       c,
  output logic       c_valid
);

  logic [8:0] wide;

  always_comb begin
    wide    = '0;
    c_valid = 1'b0;
    unique case (op)
      ALU_ADD: begin
        wide    = {1'b0, a} + {1'b0, b};
        c_valid = 1'b1;
      end
      ALU_SUB: begin
        wide    = {1'b0, a} - {1'b0, b};
        c_valid = 1'b1;
      end
      ALU_AND: wide = {1'b0, a & b};
      ALU_OR:  wide = {1'b0, a | b};
      default: wide = {1'b0, b};
    endcase
    y = wide[7:0];
    c = wide[8];
    z = (wide[7:0] == 8'h00);
  end

endmodule
