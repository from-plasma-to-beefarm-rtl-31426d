// tb_cp0: segment translation, TLB refill/invalid/modify faults, TLBWI/TLBP/
// TLBR through the CP0 registers, exception entry and ERET on the Status
// stack, user-mode address errors, the interrupt mask and PRId.
module tb_cp0;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] vaddr, paddr, wdata, rdata, exc_epc, exc_addr, exc_vector, epc_out;
  logic vstore, uncached, fault, fault_refill, op_en, exc_take, exc_bd, exc_addr_valid, exc_refill;
  logic irq, irq_pending;
  exc_code_e fault_code, exc_code;
  cp0_op_e op;
  logic [4:0] reg_sel;
  cp0 #(.CORE_ID(8'd5)) dut (.clk, .rst, .vaddr, .vstore, .paddr, .uncached, .fault, .fault_code,
      .fault_refill, .op, .op_en, .reg_sel, .wdata, .rdata, .exc_take, .exc_code, .exc_bd,
      .exc_epc, .exc_addr_valid, .exc_addr, .exc_refill, .exc_vector, .epc_out, .irq, .irq_pending);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_op(cp0_op_e o, logic [4:0] r, logic [31:0] d);
    @(negedge clk); op = o; op_en = 1; reg_sel = r; wdata = d;
    @(negedge clk); op_en = 0; op = C0_NONE;
  endtask

  logic [31:0] rdv [32];
  task automatic snap();   // read every CP0 register through the read port
    for (int r = 0; r < 32; r++) begin reg_sel = 5'(r); #1; rdv[r] = rdata; end
  endtask

  initial begin
    vaddr = 0; vstore = 0; op = C0_NONE; op_en = 0; reg_sel = 0; wdata = 0; irq = 0;
    exc_take = 0; exc_code = EXC_INT; exc_bd = 0; exc_epc = 0; exc_addr_valid = 0; exc_addr = 0; exc_refill = 0;
    repeat (2) @(posedge clk); rst = 0;
    @(negedge clk);
    vaddr = 32'h8000_1234; #1; chk("kseg0", paddr == 32'h1234 && !uncached && !fault);
    vaddr = 32'hA000_1234; #1; chk("kseg1", paddr == 32'h1234 && uncached && !fault);
    vaddr = 32'h0040_0ABC; #1; chk("kuseg refill", fault && fault_refill && fault_code == EXC_TLBL);
    vstore = 1; #1; chk("kuseg refill store", fault && fault_code == EXC_TLBS); vstore = 0;
    do_op(C0_MTC0, 10, 32'h0040_0000);
    do_op(C0_MTC0, 2, 32'h1234_5200);          // V=1, D=0
    do_op(C0_MTC0, 0, 32'h0000_0500);
    do_op(C0_TLBWI, 0, 0);
    vaddr = 32'h0040_0ABC; #1; chk("mapped load", !fault && paddr == 32'h1234_5ABC && !uncached);
    vstore = 1; #1; chk("modify fault", fault && fault_code == EXC_MOD && !fault_refill); vstore = 0;
    do_op(C0_MTC0, 10, 32'hC000_0000);
    do_op(C0_MTC0, 2, 32'h0000_0E00);          // N, D, V
    do_op(C0_MTC0, 0, 32'h0000_0700);
    do_op(C0_TLBWI, 0, 0);
    vaddr = 32'hC000_0010; vstore = 1; #1; chk("kseg2 uncached page", !fault && uncached && paddr == 32'h0000_0010);
    vstore = 0;
    do_op(C0_MTC0, 10, 32'h0040_0000);
    do_op(C0_TLBP, 0, 0);
    snap(); chk("tlbp hit", rdv[0] == 32'h0000_0500);
    do_op(C0_MTC0, 10, 32'h0050_0000);
    do_op(C0_TLBP, 0, 0);
    snap(); chk("tlbp miss", rdv[0][31] == 1'b1);
    do_op(C0_MTC0, 0, 32'h0000_0700);
    do_op(C0_TLBR, 0, 0);
    snap(); chk("tlbr", rdv[10] == 32'hC000_0000 && rdv[2] == 32'h0000_0E00);
    snap(); chk("prid", rdv[15][7:0] == 8'd5);
    // exception entry and return
    do_op(C0_MTC0, 12, 32'h0000_0403);         // IM2, KUc=1, IEc=1
    irq = 1; #1; chk("irq pending", irq_pending);
    @(negedge clk); exc_take = 1; exc_code = EXC_TLBL; exc_bd = 1; exc_epc = 32'h0040_0100;
    exc_addr_valid = 1; exc_addr = 32'h0077_7004; exc_refill = 1; #1;
    chk("utlb vector", exc_vector == UTLB_VECTOR);
    @(negedge clk); exc_take = 0; exc_addr_valid = 0; exc_refill = 0; irq = 0;
    snap(); chk("epc", rdv[14] == 32'h0040_0100 && epc_out == 32'h0040_0100);
    snap(); chk("cause", rdv[13][31] == 1'b1 && rdv[13][6:2] == 5'(EXC_TLBL));
    snap(); chk("badvaddr", rdv[8] == 32'h0077_7004 && rdv[10][31:12] == 20'h00777);
    snap(); chk("status push", rdv[12][5:0] == 6'b001100 && !irq_pending);
    do_op(C0_ERET, 0, 0);
    snap(); chk("status pop", rdv[12][5:0] == 6'b000011);
    vaddr = 32'h8000_0000; #1; chk("user kseg0 adel", fault && fault_code == EXC_ADEL);
    vstore = 1; #1; chk("user kseg0 ades", fault && fault_code == EXC_ADES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
