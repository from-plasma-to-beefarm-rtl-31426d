// bus_mux: the central multiplexer of the Honeycomb core.
//
// Combinational. From the control word it selects operand b of the ALU
// (register rt or the sign-extended, zero-extended or upper immediate), the
// shift amount (shamt field or rs), the value written back to the register
// file (ALU, shifter, HI, LO, return address pc+8, loaded data, a CP0
// register or the SC success flag) and its destination register. It also
// evaluates the branch condition and forms the branch or jump target, as the
// Plasma bus multiplexer does.
module bus_mux
  import beefarm_pkg::*;
(
  input  ctrl_t       ctrl,
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  input  logic [31:0] rs_val,
  input  logic [31:0] rt_val,
  input  logic [31:0] alu_y,
  input  logic [31:0] shift_y,
  input  logic [31:0] hi,
  input  logic [31:0] lo,
  input  logic [31:0] mem_data,
  input  logic [31:0] cp0_data,
  input  logic        sc_ok,
  output logic [31:0] alu_b,
  output logic [4:0]  shamt,
  output logic [31:0] wb_data,
  output logic [4:0]  wb_addr,
  output logic        wb_en,
  output logic        is_branch,
  output logic        taken,
  output logic [31:0] target
);
  logic [15:0] imm;
  logic [31:0] pc4;

  assign imm = instr[15:0];
  assign pc4 = pc + 32'd4;

  always_comb begin
    unique case (ctrl.b_sel)
      B_RT:      alu_b = rt_val;
      B_IMM_SE:  alu_b = {{16{imm[15]}}, imm};
      B_IMM_ZE:  alu_b = {16'b0, imm};
      B_IMM_LUI: alu_b = {imm, 16'b0};
      default:   alu_b = rt_val;
    endcase

    shamt = ctrl.shift_var ? rs_val[4:0] : instr[10:6];

    unique case (ctrl.res_sel)
      RES_ALU:   wb_data = alu_y;
      RES_SHIFT: wb_data = shift_y;
      RES_HI:    wb_data = hi;
      RES_LO:    wb_data = lo;
      RES_LINK:  wb_data = pc + 32'd8;
      RES_MEM:   wb_data = mem_data;
      RES_CP0:   wb_data = cp0_data;
      RES_SC:    wb_data = {31'b0, sc_ok};
      default:   wb_data = alu_y;
    endcase

    unique case (ctrl.dst_sel)
      DST_RD:  wb_addr = instr[15:11];
      DST_RT:  wb_addr = instr[20:16];
      DST_R31: wb_addr = 5'd31;
      default: wb_addr = 5'd0;
    endcase
    wb_en = (ctrl.dst_sel != DST_NONE);

    is_branch = (ctrl.branch != BR_NONE);
    unique case (ctrl.branch)
      BR_EQ:   taken = (rs_val == rt_val);
      BR_NE:   taken = (rs_val != rt_val);
      BR_LEZ:  taken = rs_val[31] || (rs_val == '0);
      BR_GTZ:  taken = !rs_val[31] && (rs_val != '0);
      BR_LTZ:  taken = rs_val[31];
      BR_GEZ:  taken = !rs_val[31];
      BR_J:    taken = 1'b1;
      BR_JR:   taken = 1'b1;
      default: taken = 1'b0;
    endcase

    unique case (ctrl.branch)
      BR_J:    target = {pc4[31:28], instr[25:0], 2'b00};
      BR_JR:   target = rs_val;
      default: target = pc4 + {{14{imm[15]}}, imm, 2'b00};
    endcase
  end
endmodule
