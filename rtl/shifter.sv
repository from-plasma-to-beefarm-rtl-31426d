// shifter: the 32-bit barrel shifter of the Honeycomb core.
//
// Combinational logical left, logical right and arithmetic right shift of
// `value` by `shamt` (0..31) places, covering SLL/SRL/SRA and their variable
// forms. The document only names the unit; a plain barrel shifter is the
// simplest thing that does its job.
module shifter
  import beefarm_pkg::*;
(
  input  shift_op_e   op,
  input  logic [31:0] value,
  input  logic [4:0]  shamt,
  output logic [31:0] y
);
  always_comb begin
    unique case (op)
      SH_SLL:  y = value << shamt;
      SH_SRL:  y = value >> shamt;
      SH_SRA:  y = $unsigned($signed(value) >>> shamt);
      default: y = value << shamt;
    endcase
  end
endmodule
