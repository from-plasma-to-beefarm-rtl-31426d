// tb_ssca2: the graph-construction kernel of SSCA2 on the full eight-core
// BeeFarm at its default size, with the behavioural DDR2 model. This is the
// integer part of that benchmark: building a compressed adjacency structure
// from an unordered edge list, with fine-grained atomic updates on shared
// per-vertex counters.
//
// The testbench generates NE random directed edges over NV = 2**SCALE
// vertices and places them in DDR as 8-byte {u, v} records. Every core runs:
//   1. degree count: claim edges with an LL/SC fetch-and-add on a shared
//      index and add 1 to degree[u] with an LL/SC loop;
//   2. barrier on a shared counter (spinning reads hit in the cache until
//      the last core's increment invalidates the line);
//   3. core 0 computes the exclusive prefix sum of the degrees into
//      offset[] and raises a ready flag; the others spin on it;
//   4. fill: claim edges again, take a slot with an LL/SC fetch-and-add on
//      fill[u] and store v at adj[offset[u] + slot];
//   5. bump a finished counter and park.
// The testbench checks every degree, every offset, every fill count and,
// for every vertex, that its neighbour list holds exactly the expected
// vertices (in any order). It also counts failed SCs, bus contention and
// invalidations. SCALE = 13 is the problem scale of the published SSCA2
// runs; the edge count (4 per vertex) and the edge data are this
// testbench's own.
module tb_ssca2;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  localparam int N = 8;
  localparam int SCALE = 13;
  localparam int NV = 1 << SCALE;
  localparam int NE = 4 * NV;
  localparam logic [31:0] EDGE = 32'h0100_0000, DEG = 32'h0200_0000, OFS = 32'h0210_0000,
                          FILL = 32'h0220_0000, ADJ = 32'h0300_0000, CTR = 32'h0001_0000;
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
    repeat (20_000_000) @(posedge clk);
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

  task automatic zero_words(logic [31:0] base, int n);
    for (int i = 0; i < n; i += 4) u_ddr.mem[28'((base + 32'(i * 4)) >> 4)] = '0;
  endtask

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
  task automatic li(int r, logic [31:0] v);
    put(LUI(r, v[31:16])); put(ORI(r, r, v[15:0]));
  endtask

  int eu [NE], ev [NE];
  int deg [NV], ofs [NV];
  int nbr [NV][$];

  initial begin
    int p1_l, p2_l, d1_l, f2_l, b1_l, pf_l, rd_l;
    int b_p1done, b_p2done, b_notzero;
    int ok_deg, ok_ofs, ok_fill, ok_adj;
    // ------------------------------------------------ program at 0x8000_4000
    put(MFC0(2, 15)); put(i_type('h0C, 2, 2, 16'h00FF));   // r2 = core id
    li(1, 32'h8000_0000 | CTR);
    li(20, 32'h8000_0000 | EDGE);
    li(21, 32'h8000_0000 | DEG);
    li(22, 32'h8000_0000 | OFS);
    li(23, 32'h8000_0000 | FILL);
    li(28, 32'h8000_0000 | ADJ);
    li(24, 32'(NE));
    // phase 1: degree count
    p1_l = here();
    put(LL(3, 1, 0)); put(ADDIU(4, 3, 1)); put(SC(4, 1, 0));
    put(BEQ(4, 0, to(p1_l))); put(NOP());
    put(SLT(5, 3, 24));
    b_p1done = here(); put(0); put(NOP());
    put(SLL(6, 3, 3)); put(ADDU(6, 6, 20)); put(LW(7, 6, 0));   // u
    put(SLL(8, 7, 2)); put(ADDU(8, 8, 21));
    d1_l = here();
    put(LL(9, 8, 0)); put(ADDIU(9, 9, 1)); put(SC(9, 8, 0));
    put(BEQ(9, 0, to(d1_l))); put(NOP());
    put(BEQ(0, 0, to(p1_l))); put(NOP());
    prog[b_p1done] = BEQ(5, 0, here() - (b_p1done + 1));
    // barrier
    atomic_inc(1, 'h10);
    put(ADDIU(10, 0, N));
    b1_l = here();
    put(LW(11, 1, 'h10)); put(BNE(11, 10, to(b1_l))); put(NOP());
    b_notzero = here(); put(0); put(NOP());
    // core 0: exclusive prefix sum of the degrees
    put(ADDU(12, 0, 0)); put(ADDU(13, 0, 0)); li(14, 32'(NV));
    pf_l = here();
    put(SLL(15, 13, 2)); put(ADDU(16, 15, 21)); put(LW(17, 16, 0));
    put(ADDU(16, 15, 22)); put(SW(12, 16, 0)); put(ADDU(12, 12, 17));
    put(ADDIU(13, 13, 1)); put(BNE(13, 14, to(pf_l))); put(NOP());
    put(ADDIU(11, 0, 1)); put(SW(11, 1, 'h20));
    prog[b_notzero] = BNE(2, 0, here() - (b_notzero + 1));
    rd_l = here();
    put(LW(11, 1, 'h20)); put(BEQ(11, 0, to(rd_l))); put(NOP());
    // phase 2: fill the adjacency array
    p2_l = here();
    put(LL(3, 1, 'h30)); put(ADDIU(4, 3, 1)); put(SC(4, 1, 'h30));
    put(BEQ(4, 0, to(p2_l))); put(NOP());
    put(SLT(5, 3, 24));
    b_p2done = here(); put(0); put(NOP());
    put(SLL(6, 3, 3)); put(ADDU(6, 6, 20)); put(LW(7, 6, 0)); put(LW(18, 6, 4));  // u, v
    put(SLL(8, 7, 2)); put(ADDU(9, 8, 23));
    f2_l = here();
    put(LL(10, 9, 0)); put(ADDIU(11, 10, 1)); put(SC(11, 9, 0));
    put(BEQ(11, 0, to(f2_l))); put(NOP());
    put(ADDU(12, 8, 22)); put(LW(12, 12, 0));
    put(ADDU(12, 12, 10)); put(SLL(12, 12, 2)); put(ADDU(12, 12, 28)); put(SW(18, 12, 0));
    put(BEQ(0, 0, to(p2_l))); put(NOP());
    prog[b_p2done] = BEQ(5, 0, here() - (b_p2done + 1));
    atomic_inc(1, 'h40);
    put(BEQ(0, 0, -1)); put(NOP());

    for (int i = 0; i < prog.size(); i += 4) begin
      logic [127:0] l;
      l = '0;
      for (int w = 0; w < 4; w++) if (i + w < prog.size()) l[32*w +: 32] = prog[i + w];
      u_ddr.mem[28'((32'h4000 + 32'(i * 4)) >> 4)] = l;
    end

    // ------------------------------------------------ graph
    for (int v = 0; v < NV; v++) deg[v] = 0;
    for (int e = 0; e < NE; e += 2) begin
      logic [127:0] l;
      for (int k = 0; k < 2; k++) begin
        eu[e + k] = int'($urandom_range(NV - 1));
        ev[e + k] = int'($urandom_range(NV - 1));
        deg[eu[e + k]]++;
        nbr[eu[e + k]].push_back(ev[e + k]);
      end
      l = {32'(ev[e + 1]), 32'(eu[e + 1]), 32'(ev[e]), 32'(eu[e])};
      u_ddr.mem[28'((EDGE + 32'(e * 8)) >> 4)] = l;
    end
    ofs[0] = 0;
    for (int v = 1; v < NV; v++) ofs[v] = ofs[v - 1] + deg[v - 1];
    zero_words(DEG, NV);
    zero_words(FILL, NV);
    for (int c = 0; c < 5; c++) u_ddr.mem[28'((CTR + 32'(c * 16)) >> 4)] = '0;

    repeat (3) @(posedge clk); rst = 0;
    while (ddr_word(CTR + 32'h40) != N && cycles < 19_990_000) @(posedge clk);
    repeat (20) @(posedge clk);

    chk("all cores finished", ddr_word(CTR + 32'h40) == N);
    chk("phase 1 index", ddr_word(CTR) == NE + N);
    chk("phase 2 index", ddr_word(CTR + 32'h30) == NE + N);
    chk("barrier count", ddr_word(CTR + 32'h10) == N);
    ok_deg = 0; ok_ofs = 0; ok_fill = 0; ok_adj = 0;
    for (int v = 0; v < NV; v++) begin
      int got [$];
      got.delete();
      if (ddr_word(DEG + 32'(v * 4)) == 32'(deg[v])) ok_deg++;
      if (ddr_word(OFS + 32'(v * 4)) == 32'(ofs[v])) ok_ofs++;
      if (ddr_word(FILL + 32'(v * 4)) == 32'(deg[v])) ok_fill++;
      for (int k = 0; k < deg[v]; k++) got.push_back(int'(ddr_word(ADJ + 32'((ofs[v] + k) * 4))));
      got.sort();
      nbr[v].sort();
      if (got == nbr[v]) ok_adj++;
      else if (ok_adj + 4 > v) $display("vertex %0d: neighbour list differs", v);
    end
    chk("degrees", ok_deg == NV);
    chk("offsets", ok_ofs == NV);
    chk("fill counts", ok_fill == NV);
    chk("neighbour lists", ok_adj == NV);
    chk("no exceptions", n_exc == 0);
    chk("successful SCs", n_sc_ok == 2 * (NE + N) + 2 * NE + 2 * N);
    chk("failed SCs happened", n_sc_fail > 0);
    chk("bus contention happened", n_contend > 0);
    chk("invalidations happened", n_inval > 0);
    $display("vertices=%0d edges=%0d cycles=%0d sc_ok=%0d sc_fail=%0d contention=%0d invals=%0d",
             NV, NE, cycles, n_sc_ok, n_sc_fail, n_contend, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
