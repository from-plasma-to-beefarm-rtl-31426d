// tb_intruder: an Intruder-style network intrusion detection kernel on the
// full eight-core BeeFarm at its default size, with the behavioural DDR2
// model. It shows the system running the kind of integer-only, high-conflict
// transactional workload it was built for.
//
// The testbench cuts NFLOWS flows into four fragments each and places the
// fragments in DDR in shuffled order as 16-byte packets {flow, fragment,
// data}. Every core runs the same loop:
//   1. claim the next packet with an LL/SC fetch-and-add on a shared head;
//   2. store the fragment into the flow's reassembly line;
//   3. count the fragment into the flow's record with an LL/SC increment
//      (a failed SC is an aborted, retried update: the conflict case);
//   4. the core that delivers the fourth fragment reassembles the flow,
//      writes the sum of its fragments as the flow's result, and bumps a
//      shared attack counter when the sum's low nibble is zero (the
//      "signature"), then the shared completed-flow counter.
// When the queue is empty each core bumps a finished counter and parks.
// The reference result for every flow, the number of attacks and all
// counter values are computed here from the generated data. The testbench
// also counts aborted SCs, bus contention, invalidations and cycles.
// NFLOWS defaults to 1024, the flow count of the published Intruder runs;
// the packet data are this testbench's own.
module tb_intruder;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  localparam int N = 8;
  localparam int NFLOWS = 1024;
  localparam int NP = 4 * NFLOWS;
  localparam logic [31:0] PKT = 32'h0010_0000, FLOW = 32'h0020_0000,
                          REASM = 32'h0030_0000, RES = 32'h0040_0000, CTR = 32'h0001_0000;
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

  int n_inval = 0, n_exc = 0, n_contend = 0, n_sc_fail = 0, n_sc_ok = 0, cycles = 0;
  always @(posedge clk) if (!rst) begin
    int v;
    cycles++;
    n_inval += $countones(l1_inval);
    n_exc   += $countones(exception);
    v = 0;
    for (int i = 0; i < N; i++) v += int'(dut.req[i].valid);
    if (v > 1) n_contend++;
  end

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge clk) if (!rst)
      if (dut.g_core[g].u_l1.c_done && dut.g_core[g].u_l1.r_sc)
        if (dut.g_core[g].u_l1.c_sc_ok) n_sc_ok++; else n_sc_fail++;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
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
  function automatic int to(int l); return l - (prog.size() + 1); endfunction
  // LL/SC increment of the word at off(base), using r25
  task automatic atomic_inc(int base, int off);
    int l;
    l = here();
    put(LL(25, base, off)); put(ADDIU(25, 25, 1)); put(SC(25, base, off));
    put(BEQ(25, 0, to(l))); put(NOP());
  endtask

  logic [31:0] frag [NFLOWS][4];
  logic [31:0] sum_ref [NFLOWS];
  int order [NP];

  initial begin
    int loop_l, b_fin, b_notlast, b_notatk, attacks, ok_res;
    // ------------------------------------------------ program at 0x8000_4000
    put(LUI(1, 'h8000 | (CTR >> 16)));
    put(LUI(20, 'h8000 | (PKT >> 16)));
    put(LUI(21, 'h8000 | (FLOW >> 16)));
    put(LUI(22, 'h8000 | (REASM >> 16)));
    put(LUI(23, 'h8000 | (RES >> 16)));
    put(ORI(24, 0, NP));
    loop_l = here();
    put(LL(3, 1, 0)); put(ADDIU(4, 3, 1)); put(SC(4, 1, 0));     // claim a packet
    put(BEQ(4, 0, to(loop_l))); put(NOP());
    put(SLT(5, 3, 24));
    b_fin = here(); put(0); put(NOP());
    put(SLL(6, 3, 4)); put(ADDU(6, 6, 20));
    put(LW(7, 6, 0)); put(LW(8, 6, 4)); put(LW(9, 6, 8));      // flow, fragment, data
    put(SLL(10, 7, 4));
    put(ADDU(11, 10, 22)); put(SLL(12, 8, 2)); put(ADDU(11, 11, 12));
    put(SW(9, 11, 0));                                          // reassembly store
    put(ADDU(13, 10, 21));
    begin
      int l;
      l = here();
      put(LL(14, 13, 0)); put(ADDIU(15, 14, 1)); put(SC(15, 13, 0));
      put(BEQ(15, 0, to(l))); put(NOP());
    end
    put(ADDIU(16, 0, 3));
    b_notlast = here(); put(0); put(NOP());
    // last fragment: reassemble and inspect the flow
    put(ADDU(17, 10, 22));
    put(LW(18, 17, 0)); put(LW(19, 17, 4)); put(ADDU(18, 18, 19));
    put(LW(19, 17, 8)); put(ADDU(18, 18, 19));
    put(LW(19, 17, 12)); put(ADDU(18, 18, 19));
    put(ADDU(17, 10, 23)); put(SW(18, 17, 0));
    put(i_type('h0C, 18, 19, 16'h000F));                        // andi r19, r18, 0xF
    b_notatk = here(); put(0); put(NOP());
    atomic_inc(1, 'h10);                                        // attacks
    prog[b_notatk] = BNE(19, 0, here() - (b_notatk + 1));
    atomic_inc(1, 'h20);                                        // completed flows
    put(BEQ(0, 0, to(loop_l))); put(NOP());
    prog[b_notlast] = BNE(14, 16, loop_l - (b_notlast + 1));
    prog[b_fin] = BEQ(5, 0, here() - (b_fin + 1));
    atomic_inc(1, 'h30);                                        // finished cores
    put(BEQ(0, 0, -1)); put(NOP());

    for (int i = 0; i < prog.size(); i += 4) begin
      logic [127:0] l;
      l = '0;
      for (int w = 0; w < 4; w++) if (i + w < prog.size()) l[32*w +: 32] = prog[i + w];
      u_ddr.mem[28'((32'h4000 + 32'(i * 4)) >> 4)] = l;
    end

    // ------------------------------------------------ flows and packets
    attacks = 0;
    for (int f = 0; f < NFLOWS; f++) begin
      sum_ref[f] = '0;
      for (int k = 0; k < 4; k++) begin
        frag[f][k] = $urandom;
        if (k == 3 && f % 5 == 0) frag[f][k] = (frag[f][k] & 32'hFFFF_FFF0) - (sum_ref[f] & 32'hF);
        sum_ref[f] += frag[f][k];
      end
      if (sum_ref[f][3:0] == 4'h0) attacks++;
      u_ddr.mem[28'((FLOW + 32'(f * 16)) >> 4)] = '0;
    end
    for (int p = 0; p < NP; p++) order[p] = p;
    for (int p = NP - 1; p > 0; p--) begin
      int j, t;
      j = int'($urandom_range(32'(p)));
      t = order[p]; order[p] = order[j]; order[j] = t;
    end
    for (int p = 0; p < NP; p++) begin
      int f, k;
      f = order[p] / 4; k = order[p] % 4;
      u_ddr.mem[28'((PKT + 32'(p * 16)) >> 4)] = {32'h0, frag[f][k], 32'(k), 32'(f)};
    end
    for (int c = 0; c < 4; c++) u_ddr.mem[28'((CTR + 32'(c * 16)) >> 4)] = '0;

    repeat (3) @(posedge clk); rst = 0;
    while (ddr_word(CTR + 32'h30) != N && cycles < 3_990_000) @(posedge clk);
    repeat (20) @(posedge clk);

    chk("all cores finished", ddr_word(CTR + 32'h30) == N);
    chk("queue head", ddr_word(CTR) == NP + N);
    chk("completed flows", ddr_word(CTR + 32'h20) == NFLOWS);
    chk("attacks found", ddr_word(CTR + 32'h10) == 32'(attacks));
    ok_res = 0;
    for (int f = 0; f < NFLOWS; f++) begin
      if (ddr_word(RES + 32'(f * 16)) == sum_ref[f] && ddr_word(FLOW + 32'(f * 16)) == 4) ok_res++;
      else if (ok_res + 4 > f) $display("flow %0d: got %h want %h", f, ddr_word(RES + 32'(f * 16)), sum_ref[f]);
    end
    chk("every flow reassembled and checked", ok_res == NFLOWS);
    chk("no exceptions", n_exc == 0);
    chk("successful SCs", n_sc_ok == (NP + N) + NP + attacks + NFLOWS + N);
    chk("aborted updates happened", n_sc_fail > 0);
    chk("bus contention happened", n_contend > 0);
    chk("invalidations happened", n_inval > 0);
    $display("flows=%0d packets=%0d attacks=%0d cycles=%0d sc_ok=%0d aborts=%0d contention=%0d invals=%0d",
             NFLOWS, NP, attacks, cycles, n_sc_ok, n_sc_fail, n_contend, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
