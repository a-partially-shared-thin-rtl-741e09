// pe: one processing element of a reconfigurable column.
//
// A PE performs one word-level (32-bit) integer operation per cycle. It is
// purely combinational: the scheduler selects its operation and operands at the
// start of the cycle and the result is written into the owning core's array
// register file at the clock edge that ends the cycle.
// The document gives the PE's role (word-level operations, three PEs per
// column); the operation set, the MIPS integer ALU operations, is this design's
// choice. Shift amounts are taken from operand b[4:0]; LUI places b[15:0] in
// the upper half.
module pe
  import rca_pkg::*;
(
  input  alu_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_NOR:  y = ~(a | b);
      OP_SLT:  y = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      OP_SLTU: y = {{(XLEN-1){1'b0}}, a < b};
      OP_SLL:  y = a << b[4:0];
      OP_SRL:  y = a >> b[4:0];
      OP_SRA:  y = $unsigned($signed(a) >>> b[4:0]);
      OP_LUI:  y = {b[15:0], 16'd0};
      default: y = '0;
    endcase
  end

endmodule
