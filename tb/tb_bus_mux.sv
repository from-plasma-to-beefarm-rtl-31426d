// tb_bus_mux: operand selection, write-back selection and destination, and
// branch conditions and targets.
module tb_bus_mux;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  ctrl_t ctrl;
  logic [31:0] instr, pc, rs_val, rt_val, alu_y, shift_y, hi, lo, mem_data, cp0_data;
  logic sc_ok, wb_en, is_branch, taken;
  logic [31:0] alu_b, wb_data, target;
  logic [4:0] shamt, wb_addr;
  control u_ctl (.instr, .ctrl);
  bus_mux dut (.ctrl, .instr, .pc, .rs_val, .rt_val, .alu_y, .shift_y, .hi, .lo, .mem_data,
               .cp0_data, .sc_ok, .alu_b, .shamt, .wb_data, .wb_addr, .wb_en, .is_branch,
               .taken, .target);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    pc = 32'h8000_0100; rs_val = 32'h10; rt_val = 32'h20; alu_y = 32'hA1; shift_y = 32'h51;
    hi = 32'h4; lo = 32'h5; mem_data = 32'hEE; cp0_data = 32'hC0; sc_ok = 1;
    instr = ADDIU(4, 1, -3); #1;
    chk("simm", alu_b == 32'hFFFF_FFFD && wb_addr == 4 && wb_en && wb_data == 32'hA1);
    instr = ORI(4, 1, 16'h8001); #1; chk("zimm", alu_b == 32'h0000_8001);
    instr = LUI(4, 16'h1234); #1; chk("lui", alu_b == 32'h1234_0000);
    instr = ADDU(9, 1, 2); #1; chk("rt", alu_b == 32'h20 && wb_addr == 9);
    instr = SLL(3, 2, 7); #1; chk("shamt", shamt == 7 && wb_data == 32'h51);
    instr = r_type(1, 2, 3, 0, 'h04); #1; chk("sllv amount", shamt == 5'h10);
    instr = MFHI(3); #1; chk("mfhi", wb_data == 4);
    instr = MFLO(3); #1; chk("mflo", wb_data == 5);
    instr = LW(6, 1, 0); #1; chk("load wb", wb_data == 32'hEE && wb_addr == 6);
    instr = SC(6, 1, 0); #1; chk("sc wb", wb_data == 1);
    instr = MFC0(6, 12); #1; chk("mfc0 wb", wb_data == 32'hC0);
    instr = JAL(32'h0000_4000); #1;
    chk("jal", taken && wb_addr == 31 && wb_data == 32'h8000_0108 && target == 32'h8000_4000);
    instr = BEQ(1, 2, 4); #1; chk("beq not taken", is_branch && !taken);
    rt_val = 32'h10; #1; chk("beq taken", taken && target == 32'h8000_0114);
    instr = BNE(1, 2, -2); rt_val = 32'h11; #1; chk("bne back", taken && target == 32'h8000_00FC);
    instr = JR(1); #1; chk("jr", taken && target == 32'h10 && !wb_en);
    rs_val = 32'h8000_0000;
    instr = i_type(6, 1, 0, 16'h1); #1; chk("blez neg", taken);
    instr = i_type(7, 1, 0, 16'h1); #1; chk("bgtz neg", !taken);
    instr = i_type(1, 1, 1, 16'h1); #1; chk("bgez neg", !taken);
    instr = i_type(1, 1, 0, 16'h1); #1; chk("bltz neg", taken);
    rs_val = 32'h0;
    instr = i_type(7, 1, 0, 16'h1); #1; chk("bgtz zero", !taken);
    instr = i_type(6, 1, 0, 16'h1); #1; chk("blez zero", taken);
    rs_val = 32'h5;
    instr = i_type(7, 1, 0, 16'h1); #1; chk("bgtz pos", taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
