// alu: the integer arithmetic/logic unit of the Honeycomb core.
//
// Purely combinational, as in the original Plasma core: one 32-bit result per
// cycle for add, subtract, the four logic operations and the two
// set-on-less-than compares; ALU_PASSB forwards operand b (used for LUI).
// Add and subtract wrap silently (no overflow trap), which is this design's
// choice; the operation set is that of the MIPS I integer instructions.
module alu
  import beefarm_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic [32:0] diff;

  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    unique case (op)
      ALU_ADD:   y = a + b;
      ALU_SUB:   y = diff[31:0];
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_NOR:   y = ~(a | b);
      ALU_SLT:   y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU:  y = {31'b0, diff[32]};
      ALU_PASSB: y = b;
      default:   y = a + b;
    endcase
  end
endmodule
