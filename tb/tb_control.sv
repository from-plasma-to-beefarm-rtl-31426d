// tb_control: decodes one instruction of each class and checks the fields of
// the control word that matter for it.
module tb_control;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] instr;
  ctrl_t ctrl;
  control dut (.instr, .ctrl);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (instr %h)", what, instr); end
  endtask

  initial begin
    instr = ADDU(3, 1, 2); #1;
    chk("addu", ctrl.alu_op == ALU_ADD && ctrl.dst_sel == DST_RD && ctrl.res_sel == RES_ALU && ctrl.b_sel == B_RT);
    instr = SUBU(3, 1, 2); #1; chk("subu", ctrl.alu_op == ALU_SUB);
    instr = SLT(3, 1, 2); #1;  chk("slt", ctrl.alu_op == ALU_SLT);
    instr = ORI(4, 1, 16'hFF00); #1;
    chk("ori", ctrl.alu_op == ALU_OR && ctrl.b_sel == B_IMM_ZE && ctrl.dst_sel == DST_RT);
    instr = ADDIU(4, 1, -3); #1; chk("addiu", ctrl.b_sel == B_IMM_SE && ctrl.dst_sel == DST_RT);
    instr = LUI(4, 16'h1234); #1; chk("lui", ctrl.b_sel == B_IMM_LUI && ctrl.alu_op == ALU_PASSB);
    instr = SRA(5, 6, 3); #1; chk("sra", ctrl.res_sel == RES_SHIFT && ctrl.shift_op == SH_SRA && !ctrl.shift_var);
    instr = r_type(1, 2, 3, 0, 'h04); #1; chk("sllv", ctrl.shift_var && ctrl.shift_op == SH_SLL);
    instr = LB(7, 1, 4); #1;
    chk("lb", ctrl.mem_op == MEM_LOAD && ctrl.mem_size == SZ_B && ctrl.mem_signed && ctrl.res_sel == RES_MEM);
    instr = LHU(7, 1, 4); #1; chk("lhu", ctrl.mem_size == SZ_H && !ctrl.mem_signed);
    instr = SW(7, 1, 4); #1; chk("sw", ctrl.mem_op == MEM_STORE && ctrl.dst_sel == DST_NONE);
    instr = LL(7, 1, 0); #1; chk("ll", ctrl.ll && ctrl.mem_op == MEM_LOAD);
    instr = SC(7, 1, 0); #1; chk("sc", ctrl.sc && ctrl.mem_op == MEM_STORE && ctrl.res_sel == RES_SC && ctrl.dst_sel == DST_RT);
    instr = BEQ(1, 2, 4); #1; chk("beq", ctrl.branch == BR_EQ && ctrl.dst_sel == DST_NONE);
    instr = JAL(32'h0040_0000); #1; chk("jal", ctrl.branch == BR_J && ctrl.dst_sel == DST_R31 && ctrl.res_sel == RES_LINK);
    instr = JR(31); #1; chk("jr", ctrl.branch == BR_JR && ctrl.dst_sel == DST_NONE);
    instr = i_type(1, 3, 'h11, 16'h8); #1; chk("bgezal", ctrl.branch == BR_GEZ && ctrl.dst_sel == DST_R31);
    instr = MULT(1, 2); #1; chk("mult", ctrl.md_op == MD_MULT && ctrl.dst_sel == DST_NONE);
    instr = MFLO(9); #1; chk("mflo", ctrl.res_sel == RES_LO && ctrl.dst_sel == DST_RD);
    instr = MFC0(2, 12); #1; chk("mfc0", ctrl.cp0_op == C0_MFC0 && ctrl.res_sel == RES_CP0);
    instr = MTC0(2, 12); #1; chk("mtc0", ctrl.cp0_op == C0_MTC0 && ctrl.dst_sel == DST_NONE);
    instr = TLBWI(); #1; chk("tlbwi", ctrl.cp0_op == C0_TLBWI);
    instr = TLBP(); #1; chk("tlbp", ctrl.cp0_op == C0_TLBP);
    instr = ERET(); #1; chk("eret", ctrl.cp0_op == C0_ERET);
    instr = SYSCALL(); #1; chk("syscall", ctrl.exc == X_SYSCALL);
    instr = 32'h4600_0000; #1; chk("cop1 reserved", ctrl.exc == X_RESERVED);
    instr = 32'hFC00_0000; #1; chk("reserved", ctrl.exc == X_RESERVED);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
