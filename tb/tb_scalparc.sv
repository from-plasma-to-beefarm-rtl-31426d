// tb_scalparc: the integer part of a ScalParC decision-tree step on the full
// eight-core BeeFarm at its default size, with the behavioural DDR2 model.
// ScalParC grows a decision tree over a table of records. For each tree node
// it builds class histograms of every attribute, chooses the split from them
// and partitions the records. Choosing the split takes floating-point gini
// arithmetic, so here the split attribute and threshold are fixed. The
// histogram and partition steps, which are the shared-memory update traffic
// of the benchmark, run as follows.
//
// NR records with NA = 32 byte attributes (each a bin 0..NB-1) and a class
// (0 or 1) are placed in DDR. Every core:
//   1. claims the next record with an LL/SC fetch-and-add on a shared index;
//   2. for each attribute adds 1 to count[attribute][bin][class] with an
//      LL/SC loop (count is one shared word array);
//   3. sends the record to the left partition if attribute 0 is below
//      NB/2, otherwise to the right, by taking a slot with an LL/SC
//      fetch-and-add on that partition's size and storing the record number;
//   4. when the records run out, bumps a finished counter and parks.
// The testbench checks every histogram word, both partition sizes and that
// each partition holds exactly the expected records. NR = 125,000 records,
// NA = 32 attributes and 2 classes are the dataset shape of the published
// runs; the bin count NB and the data are this testbench's own. The run
// takes about 75 million cycles.
module tb_scalparc;
  import beefarm_pkg::*;
  import mips_asm_pkg::*;
  localparam int N = 8;
  localparam int NR = 125000;
  localparam int NA = 32;
  localparam int NB = 8;
  localparam logic [31:0] REC = 32'h0100_0000, CLS = 32'h0180_0000, CNT = 32'h0200_0000,
                          LEFT = 32'h0300_0000, RIGHT = 32'h0380_0000, CTR = 32'h0001_0000;
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
    repeat (100_000_000) @(posedge clk);
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

  logic [7:0] attr [NR][NA];
  int cls [NR];
  int cnt_ref [NA * NB * 2];

  initial begin
    int loop_l, att_l, inc_l, l_l, r_l, b_done, b_right, j_left;
    int nleft, nright, ok_cnt;
    int lref [$], rref [$], lgot [$], rgot [$];
    // ------------------------------------------------ program at 0x8000_4000
    li(1, 32'h8000_0000 | CTR);
    li(20, 32'h8000_0000 | REC);
    li(22, 32'h8000_0000 | CLS);
    li(21, 32'h8000_0000 | CNT);
    li(23, 32'h8000_0000 | LEFT);
    li(28, 32'h8000_0000 | RIGHT);
    li(24, 32'(NR));
    put(ADDIU(26, 0, NA)); put(ADDIU(27, 0, NB / 2));
    loop_l = here();
    put(LL(3, 1, 0)); put(ADDIU(4, 3, 1)); put(SC(4, 1, 0));    // claim a record
    put(BEQ(4, 0, to(loop_l))); put(NOP());
    put(SLT(5, 3, 24));
    b_done = here(); put(0); put(NOP());
    put(SLL(6, 3, 5)); put(ADDU(6, 6, 20));                      // record base
    put(SLL(7, 3, 2)); put(ADDU(7, 7, 22)); put(LW(7, 7, 0));   // class
    put(ADDU(13, 0, 0));
    att_l = here();
    put(ADDU(14, 6, 13)); put(LB(15, 14, 0));                    // bin
    put(SLL(16, 13, 3)); put(ADDU(16, 16, 15));
    put(SLL(16, 16, 1)); put(ADDU(16, 16, 7));
    put(SLL(16, 16, 2)); put(ADDU(16, 16, 21));
    inc_l = here();
    put(LL(17, 16, 0)); put(ADDIU(17, 17, 1)); put(SC(17, 16, 0));
    put(BEQ(17, 0, to(inc_l))); put(NOP());
    put(ADDIU(13, 13, 1)); put(BNE(13, 26, to(att_l))); put(NOP());
    // split on attribute 0 < NB/2
    put(LB(15, 6, 0)); put(SLT(18, 15, 27));
    b_right = here(); put(0); put(NOP());
    l_l = here();
    put(LL(10, 1, 'h10)); put(ADDIU(11, 10, 1)); put(SC(11, 1, 'h10));
    put(BEQ(11, 0, to(l_l))); put(NOP());
    put(SLL(12, 10, 2)); put(ADDU(12, 12, 23)); put(SW(3, 12, 0));
    j_left = here(); put(BEQ(0, 0, to(loop_l))); put(NOP());
    prog[b_right] = BEQ(18, 0, here() - (b_right + 1));
    r_l = here();
    put(LL(10, 1, 'h20)); put(ADDIU(11, 10, 1)); put(SC(11, 1, 'h20));
    put(BEQ(11, 0, to(r_l))); put(NOP());
    put(SLL(12, 10, 2)); put(ADDU(12, 12, 28)); put(SW(3, 12, 0));
    put(BEQ(0, 0, to(loop_l))); put(NOP());
    prog[b_done] = BEQ(5, 0, here() - (b_done + 1));
    atomic_inc(1, 'h30);
    put(BEQ(0, 0, -1)); put(NOP());

    for (int i = 0; i < prog.size(); i += 4) begin
      logic [127:0] l;
      l = '0;
      for (int w = 0; w < 4; w++) if (i + w < prog.size()) l[32*w +: 32] = prog[i + w];
      u_ddr.mem[28'((32'h4000 + 32'(i * 4)) >> 4)] = l;
    end

    // ------------------------------------------------ records
    foreach (cnt_ref[i]) cnt_ref[i] = 0;
    for (int r = 0; r < NR; r++) begin
      cls[r] = int'($urandom_range(1));
      for (int a = 0; a < NA; a++) begin
        attr[r][a] = 8'($urandom_range(NB - 1));
        cnt_ref[(a * NB + int'(attr[r][a])) * 2 + cls[r]]++;
      end
      if (attr[r][0] < NB / 2) lref.push_back(r); else rref.push_back(r);
      // record: 32 bytes = 2 lines; byte offset b sits in word b/4 of its
      // line at bits [31-8*(b%4) -: 8] (big-endian)
      for (int h = 0; h < 2; h++) begin
        logic [127:0] l;
        for (int b = 0; b < 16; b++) l[32 * (b / 4) + 31 - 8 * (b % 4) -: 8] = attr[r][16 * h + b];
        u_ddr.mem[28'((REC + 32'(r * 32 + h * 16)) >> 4)] = l;
      end
    end
    for (int r = 0; r < NR; r += 4) begin
      logic [127:0] l;
      for (int w = 0; w < 4; w++) l[32 * w +: 32] = 32'(cls[r + w]);
      u_ddr.mem[28'((CLS + 32'(r * 4)) >> 4)] = l;
    end
    zero_words(CNT, NA * NB * 2);
    for (int c = 0; c < 4; c++) u_ddr.mem[28'((CTR + 32'(c * 16)) >> 4)] = '0;

    repeat (3) @(posedge clk); rst = 0;
    while (ddr_word(CTR + 32'h30) != N && cycles < 99_990_000) @(posedge clk);
    repeat (20) @(posedge clk);

    chk("all cores finished", ddr_word(CTR + 32'h30) == N);
    chk("record index", ddr_word(CTR) == NR + N);
    ok_cnt = 0;
    foreach (cnt_ref[i]) if (ddr_word(CNT + 32'(i * 4)) == 32'(cnt_ref[i])) ok_cnt++;
    chk("class histograms", ok_cnt == NA * NB * 2);
    nleft = int'(ddr_word(CTR + 32'h10));
    nright = int'(ddr_word(CTR + 32'h20));
    chk("left size", nleft == lref.size());
    chk("right size", nright == rref.size());
    for (int k = 0; k < nleft && k < NR; k++) lgot.push_back(int'(ddr_word(LEFT + 32'(k * 4))));
    for (int k = 0; k < nright && k < NR; k++) rgot.push_back(int'(ddr_word(RIGHT + 32'(k * 4))));
    lgot.sort(); rgot.sort();
    chk("left partition", lgot == lref);
    chk("right partition", rgot == rref);
    chk("no exceptions", n_exc == 0);
    chk("successful SCs", n_sc_ok == (NR + N) + NR * NA + NR + N);
    chk("failed SCs happened", n_sc_fail > 0);
    chk("bus contention happened", n_contend > 0);
    chk("invalidations happened", n_inval > 0);
    $display("records=%0d attributes=%0d left=%0d right=%0d cycles=%0d sc_ok=%0d sc_fail=%0d contention=%0d invals=%0d",
             NR, NA, nleft, nright, cycles, n_sc_ok, n_sc_fail, n_contend, n_inval);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
