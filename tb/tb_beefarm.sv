// tb_beefarm: end-to-end test of the full BeeFarm system at its default size
// (eight cores, 8 KB caches, 217 clocks per UART bit) with a behavioural
// DDR2 model. All cores boot from the boot ROM stub, which sets their stack
// in their own cache window and jumps to a program placed in DDR. Each core
// then: stores and reloads its core number on the stack (direct cache
// window), adds 1 four times to a shared counter with an LL/SC retry loop,
// writes id*id+id (MULT) to its own slot, and spins on the counter until
// all 32 increments are seen (the spinning read hits in its cache until the
// line is invalidated by another core's write). Core 0 also installs a
// small exception handler in its cache window, takes a SYSCALL and returns
// with ERET, prints "OK" on the UART and stores the cycle and retired
// instruction counts it reads from the performance counters; core 1 maps a
// page through its TLB and stores through it. The testbench checks the results in DDR, decodes
// the UART line, and counts how often each mechanism occurred: cache hits,
// misses, snoop invalidations, failed SCs, bus contention, DDR back-pressure,
// boot ROM reads, direct-window accesses, TLB-mapped accesses and exceptions.
module tb_beefarm;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  localparam int N = 8;
  localparam int CPB = 217;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [N-1:0] irq = '0, retire, exception, l1_hit, l1_miss, l1_inval;
  logic uart_tx;
  logic ddr_cmd_valid, ddr_cmd_ready, ddr_cmd_we, ddr_rd_valid;
  logic [31:0] ddr_cmd_addr;
  logic [127:0] ddr_cmd_wdata, ddr_rd_data;
  logic [15:0] ddr_cmd_wmask;

  beefarm dut (.clk, .rst, .irq, .uart_tx, .uart_rx(1'b1),
    .ddr_cmd_valid, .ddr_cmd_ready, .ddr_cmd_we, .ddr_cmd_addr, .ddr_cmd_wdata, .ddr_cmd_wmask,
    .ddr_rd_valid, .ddr_rd_data, .retire, .exception, .l1_hit, .l1_miss, .l1_inval);

  ddr2_model #(.LATENCY(8)) u_ddr (.clk, .rst, .cmd_valid(ddr_cmd_valid), .cmd_ready(ddr_cmd_ready),
    .cmd_we(ddr_cmd_we), .cmd_addr(ddr_cmd_addr), .cmd_wdata(ddr_cmd_wdata), .cmd_wmask(ddr_cmd_wmask),
    .rd_valid(ddr_rd_valid), .rd_data(ddr_rd_data));

  // ------------------------------------------------------- event counting
  int n_hit = 0, n_miss = 0, n_inval = 0, n_exc = 0, n_retire = 0, n_contend = 0;
  int n_sc_fail = 0, n_sc_ok = 0, n_boot = 0, n_direct = 0, n_mapped = 0, cycles = 0;
  always @(posedge clk) if (!rst) begin
    int v;
    cycles++;
    n_hit    += $countones(l1_hit);
    n_miss   += $countones(l1_miss);
    n_inval  += $countones(l1_inval);
    n_exc    += $countones(exception);
    n_retire += $countones(retire);
    v = 0;
    for (int i = 0; i < N; i++) v += int'(dut.req[i].valid);
    if (v > 1) n_contend++;
    if (dut.boot_en) n_boot++;
  end

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge clk) if (!rst) begin
      if (dut.g_core[g].u_l1.c_done && dut.g_core[g].u_l1.r_sc)
        if (dut.g_core[g].u_l1.c_sc_ok) n_sc_ok++; else n_sc_fail++;
      if (dut.g_core[g].u_l1.c_done && dut.g_core[g].u_l1.r_addr < 32'h2000) n_direct++;
      if (dut.g_core[g].c_req && !dut.g_core[g].c_addr[31] && dut.g_core[g].u_cpu.m_vaddr[31:22] == 10'h001)
        n_mapped++;
    end
  end

  // ------------------------------------------------------- UART receiver
  string uart_text = "";
  initial begin
    forever begin
      logic [7:0] ch;
      @(negedge uart_tx);
      #(10 * CPB / 2);
      for (int b = 0; b < 8; b++) begin #(10 * CPB); ch[b] = uart_tx; end
      #(10 * CPB);
      uart_text = {uart_text, string'(ch)};
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [31:0] ddr_word(logic [31:0] pa);
    logic [127:0] l;
    l = u_ddr.read_line(pa[31:4]);
    return l[32*pa[3:2] +: 32];
  endfunction

  logic [31:0] prog [$];
  task automatic put(logic [31:0] w); prog.push_back(w); endtask
  function automatic int here(); return prog.size(); endfunction
  // branch offset from the instruction about to be placed to label l
  function automatic int to(int l); return l - (prog.size() + 1); endfunction
  // store a 32-bit constant with lui/ori/sw
  task automatic store_const(int base, int off, logic [31:0] v);
    put(LUI(8, v[31:16])); put(ORI(8, 8, v[15:0])); put(SW(8, base, off));
  endtask

  initial begin
    int inc_l, spin_l, done_l, wait_l, skip_tlb_l;
    int b_done, b_skip;
    // ---------------------------------------------- program at 0x8000_4000
    put(MFC0(2, 15)); put(i_type('h0C, 2, 2, 16'h00FF));   // r2 = core id
    put(LUI(1, 'h8001));                                     // r1 = 0x8001_0000
    put(SW(2, 29, 0)); put(LW(3, 29, 0));                    // stack in cache window
    put(ADDIU(5, 0, 4));
    inc_l = here();
    put(LL(6, 1, 0)); put(ADDIU(6, 6, 1)); put(SC(6, 1, 0));
    put(BEQ(6, 0, to(inc_l))); put(NOP());
    put(ADDIU(5, 5, -1)); put(BNE(5, 0, to(inc_l))); put(NOP());
    put(SLL(7, 2, 4)); put(ADDU(7, 7, 1));
    put(MULT(2, 2)); put(MFLO(9)); put(ADDU(9, 9, 3)); put(SW(9, 7, 'h100));
    // core 1: TLB page 0x0040_0000 -> physical 0x0002_0000
    put(ADDIU(10, 0, 1));
    b_skip = here(); put(0); put(NOP());
    put(LUI(11, 'h0040)); put(MTC0(11, 10));
    put(ORI(11, 0, 'h0600)); put(LUI(12, 'h0002)); put(OR_(11, 11, 12)); put(MTC0(11, 2));
    put(MTC0(0, 0)); put(TLBWI());
    put(LUI(11, 'h0040)); put(ORI(12, 0, 'hBEEF)); put(SW(12, 11, 'h20));
    skip_tlb_l = here();
    prog[b_skip] = BNE(2, 10, skip_tlb_l - (b_skip + 1));
    // barrier on the shared counter
    put(ADDIU(9, 0, 4 * N));
    spin_l = here();
    put(LW(10, 1, 0)); put(BNE(10, 9, to(spin_l))); put(NOP());
    // core 0 only from here
    b_done = here(); put(0); put(NOP());
    // install handler at 0x8000_0080 = physical 0x80, in core 0's cache window
    put(LUI(13, 'hA000));
    store_const(13, 'h80, MFC0(26, 14));
    store_const(13, 'h84, ADDIU(26, 26, 4));
    store_const(13, 'h88, MTC0(26, 14));
    store_const(13, 'h8C, ERET());
    put(SYSCALL());
    put(LUI(11, 'hBF00));                                     // UART at 0x1F00_0000
    put(ORI(12, 0, 'h4F)); put(SW(12, 11, 0));              // 'O'
    wait_l = here();
    put(LW(14, 11, 4)); put(i_type('h0C, 14, 14, 16'h0001)); put(BNE(14, 0, to(wait_l))); put(NOP());
    put(ORI(12, 0, 'h4B)); put(SW(12, 11, 0));              // 'K'
    put(LW(16, 11, 'h1000)); put(LW(17, 11, 'h1100));        // cycles, core 0 retired
    put(SW(16, 1, 'h200)); put(SW(17, 1, 'h204));
    done_l = here();
    put(BEQ(0, 0, -1)); put(NOP());
    prog[b_done] = BNE(2, 0, done_l - (b_done + 1));

    for (int i = 0; i < prog.size(); i += 4) begin
      logic [127:0] l;
      l = '0;
      for (int w = 0; w < 4; w++) if (i + w < prog.size()) l[32*w +: 32] = prog[i + w];
      u_ddr.mem[28'((32'h4000 + 32'(i * 4)) >> 4)] = l;
    end
    u_ddr.mem[28'h1000] = '0;                                // counter line at 0x1_0000

    repeat (3) @(posedge clk); rst = 0;
    while (uart_text.len() < 2 && cycles < 390000) @(posedge clk);
    repeat (20) @(posedge clk);

    chk("shared counter", ddr_word(32'h0001_0000) == 4 * N);
    for (int i = 0; i < N; i++)
      chk($sformatf("slot %0d", i), ddr_word(32'h0001_0100 + 32'(i * 16)) == 32'(i * i + i));
    chk("tlb-mapped store", ddr_word(32'h0002_0020) == 32'hBEEF);
    chk("uart text", uart_text == "OK");
    chk("perf cycles read", ddr_word(32'h0001_0200) > 32'd1000 && ddr_word(32'h0001_0200) < 32'(cycles));
    chk("perf retired read", ddr_word(32'h0001_0204) > 32'd50 && ddr_word(32'h0001_0204) < 32'(n_retire));
    chk("one exception", n_exc == 1);
    chk("cache hits happened", n_hit > 0);
    chk("cache misses happened", n_miss > 0);
    chk("invalidations happened", n_inval > 0);
    chk("sc failures happened", n_sc_fail > 0);
    chk("sc successes", n_sc_ok == 4 * N);
    chk("bus contention happened", n_contend > 0);
    chk("ddr back-pressure happened", u_ddr.stalls > 0);
    chk("boot rom read", n_boot > 0);
    chk("direct cache window used", n_direct > 0);
    chk("tlb-mapped access", n_mapped > 0);
    $display("cycles=%0d retired=%0d hits=%0d misses=%0d invals=%0d sc_ok=%0d sc_fail=%0d contention=%0d ddr_stalls=%0d boot=%0d direct=%0d mapped=%0d exc=%0d",
             cycles, n_retire, n_hit, n_miss, n_inval, n_sc_ok, n_sc_fail, n_contend, u_ddr.stalls,
             n_boot, n_direct, n_mapped, n_exc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
