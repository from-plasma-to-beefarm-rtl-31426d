// tb_honeycomb: runs a small MIPS program on one Honeycomb core attached to a
// flat memory model (one-cycle answer, no cache). The program exercises ALU,
// shifts, multiply and divide with MFLO, byte store and sign-extending load,
// a counted loop whose delay-slot instruction runs every iteration, SYSCALL
// with a handler that returns through ERET, a TLB mapping written with
// MTC0/TLBWI and used by a store, LL/SC, JAL/JR, and an interrupt taken in
// the middle of a loop (the loop result must come out unchanged). The results it stores
// are compared with values worked out by hand. The test also checks the
// fetch/execute overlap: consecutive ALU instructions retire two cycles
// apart with this memory.
module tb_honeycomb;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic c_req, c_we, c_uncached, c_ll, c_sc, c_clr_link, c_done, c_sc_ok, retire, exception;
  logic [3:0] c_be;
  logic [31:0] c_addr, c_wdata, c_rdata, pc;

  logic irq = 1'b0;
  honeycomb #(.CORE_ID(8'd0)) dut (.clk, .rst, .irq, .c_req, .c_we, .c_be, .c_addr, .c_wdata,
      .c_uncached, .c_ll, .c_sc, .c_clr_link, .c_done, .c_rdata, .c_sc_ok, .pc_out(pc), .retire,
      .exception);

  logic [31:0] mem [logic [29:0]];
  function automatic logic [31:0] rdw(logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : 32'h0;
  endfunction

  // memory model: answers every request in the following cycle
  always @(posedge clk) begin
    c_done <= 0;
    if (!rst && c_req && !c_done) begin
      if (c_we) begin
        logic [31:0] w;
        w = rdw(c_addr);
        for (int b = 0; b < 4; b++) if (c_be[b]) w[8*b +: 8] = c_wdata[8*b +: 8];
        mem[c_addr[31:2]] = w;
      end
      c_rdata <= rdw(c_addr);
      c_sc_ok <= 1'b1;
      c_done  <= 1;
    end
  end

  int retired = 0, exceptions = 0, cycles = 0;
  int last_retire = -100, n_gap1 = 0, n_gap2 = 0;
  always @(posedge clk) if (!rst) begin
    cycles++;
    if (retire) begin
      retired++;
      if (cycles - last_retire == 1) n_gap1++;
      if (cycles - last_retire == 2) n_gap2++;
      last_retire = cycles;
    end
    if (exception) exceptions++;
  end

  // raise the interrupt line once the JAL/JR part has stored its result;
  // drop it when the core takes the interrupt (the only exception while it
  // is raised), standing in for the handler's acknowledge
  int n_int = 0;
  logic [31:0] int_pc = '0;
  initial begin
    wait (!rst);
    while (rdw(32'h102C) != 32'h99) @(posedge clk);
    repeat (25) @(posedge clk);
    irq <= 1'b1;
    forever begin
      @(posedge clk);
      if (exception && irq) begin irq <= 1'b0; n_int++; int_pc = pc; end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [31:0] prog [$];
  task automatic put(logic [31:0] w); prog.push_back(w); endtask

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    int loop_i, jal_i, sub_i, end_i, irq_i;
    c_done = 0; c_rdata = 0; c_sc_ok = 0;
    // ---------------- program at the reset vector (physical 0x1FC0_0000)
    put(LUI(1, 'h8000)); put(ORI(1, 1, 'h1000));          // r1 = 0x8000_1000
    put(ADDIU(2, 0, 7)); put(ADDIU(3, 0, -3));
    put(ADDU(4, 2, 3)); put(SW(4, 1, 0));                 // 4
    put(MULT(2, 3)); put(MFLO(5)); put(SW(5, 1, 4));      // -21
    put(DIV(5, 2)); put(MFLO(6)); put(SW(6, 1, 8));       // -3
    put(SLL(7, 2, 4)); put(SRA(8, 3, 1)); put(ADDU(7, 7, 8)); put(SW(7, 1, 12)); // 110
    put(ADDIU(9, 0, 'h1A5)); put(SB(9, 1, 16)); put(LB(10, 1, 16)); put(SW(10, 1, 20));
    put(ADDIU(11, 0, 0)); put(ADDIU(12, 0, 5));
    loop_i = prog.size();
    put(ADDU(11, 11, 12)); put(ADDIU(12, 12, -1));
    put(BNE(12, 0, loop_i - (prog.size() + 1)));
    put(ADDIU(13, 13, 1));                                  // delay slot
    put(SW(11, 1, 24)); put(SW(13, 1, 28));
    put(SYSCALL());
    put(ADDIU(14, 0, 'h77)); put(SW(14, 1, 32)); put(SW(15, 1, 36));
    put(LUI(16, 'h0040)); put(MTC0(16, 10));
    put(ORI(17, 0, 'h2600)); put(MTC0(17, 2)); put(MTC0(0, 0)); put(TLBWI());
    put(ADDIU(18, 0, 'h5A)); put(SW(18, 16, 'h10));       // 0x0040_0010 -> 0x2010
    put(LL(19, 1, 0)); put(ADDIU(19, 19, 1)); put(SC(19, 1, 0)); put(SW(19, 1, 40));
    jal_i = prog.size();
    put(0); put(NOP()); put(SW(20, 1, 44));
    // interrupt test: enable IP2, run a loop while the line is raised
    put(ORI(22, 0, 'h0401)); put(MTC0(22, 12));         // Status: IM2, IEc
    put(ADDIU(23, 0, 0)); put(ADDIU(24, 0, 40));
    irq_i = prog.size();
    put(ADDIU(23, 23, 3)); put(ADDIU(24, 24, -1));
    put(BNE(24, 0, irq_i - (prog.size() + 1)));
    put(ADDIU(23, 23, 1));                                  // delay slot
    put(SW(23, 1, 52)); put(MTC0(0, 12));                 // 160; interrupts off
    put(ORI(21, 0, 'h600D)); put(SW(21, 1, 48));
    end_i = prog.size();
    put(BEQ(0, 0, -1)); put(NOP());
    sub_i = prog.size();
    put(JR(31)); put(ADDIU(20, 0, 'h99));
    prog[jal_i] = JAL(32'hBFC0_0000 + 32'(sub_i * 4));
    foreach (prog[i]) mem[(32'h1FC0_0000 >> 2) + 30'(i)] = prog[i];
    // ---------------- exception handler at 0x8000_0080 (physical 0x80)
    // returns past a SYSCALL, to the interrupted instruction otherwise
    mem[('h80 >> 2) + 0] = MFC0(26, 14);
    mem[('h80 >> 2) + 1] = MFC0(15, 13);
    mem[('h80 >> 2) + 2] = i_type('h0C, 15, 27, 16'h007C);  // andi k1, cause, ExcCode
    mem[('h80 >> 2) + 3] = BEQ(27, 0, 2);
    mem[('h80 >> 2) + 4] = NOP();
    mem[('h80 >> 2) + 5] = ADDIU(26, 26, 4);
    mem[('h80 >> 2) + 6] = MTC0(26, 14);
    mem[('h80 >> 2) + 7] = ERET();
    mem[('h80 >> 2) + 8] = NOP();

    repeat (3) @(posedge clk); rst = 0;
    while (rdw(32'h1030) != 32'h600D && cycles < 5000) @(posedge clk);
    repeat (5) @(posedge clk);
    chk("add", rdw(32'h1000), 32'd5);                    // 4, then LL/SC added one
    chk("mult", rdw(32'h1004), 32'hFFFF_FFEB);
    chk("div", rdw(32'h1008), 32'hFFFF_FFFD);
    chk("shifts", rdw(32'h100C), 32'd110);
    chk("sb", rdw(32'h1010), 32'hA500_0000);
    chk("lb", rdw(32'h1014), 32'hFFFF_FFA5);
    chk("loop sum", rdw(32'h1018), 32'd15);
    chk("delay slots", rdw(32'h101C), 32'd5);
    chk("after eret", rdw(32'h1020), 32'h77);
    chk("cause", rdw(32'h1024), 32'h20);
    chk("tlb store", rdw(32'h2010), 32'h5A);
    chk("sc flag", rdw(32'h1028), 32'd1);
    chk("jal/jr", rdw(32'h102C), 32'h99);
    chk("exceptions", 32'(exceptions), 32'd2);
    chk("interrupts", 32'(n_int), 32'd1);
    chk("loop across interrupt", rdw(32'h1034), 32'd160);
    chk("interrupt inside the loop", 32'(int_pc >= 32'hBFC0_0000 + 32'(irq_i * 4)
                                        && int_pc < 32'hBFC0_0010 + 32'(irq_i * 4)), 32'd1);
    // fetch overlaps execute: with one-cycle memory, back-to-back ALU
    // instructions (the loop body) retire two cycles apart, never closer
    chk("2-cycle ALU instructions", 32'(n_gap2 >= 15), 32'd1);
    chk("no 1-cycle retire", 32'(n_gap1), 32'd0);
    chk("pc parked", 32'(pc == 32'hBFC0_0000 + 32'(end_i * 4) || pc == 32'hBFC0_0004 + 32'(end_i * 4)), 32'd1);
    $display("retired %0d instructions in %0d cycles", retired, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
