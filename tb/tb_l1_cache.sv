// tb_l1_cache: drives one L1 cache with CPU requests against a memory model
// on the bus side. Checks read miss and fill, hit latency, write-through with
// byte enables, invalidation by a snooped write (and not by the cache's own
// write), uncached accesses, the 8 KB direct window, and LL/SC success and
// failure.
module tb_l1_cache;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic c_req, c_we, c_uncached, c_ll, c_sc, c_clr_link, c_done, c_sc_ok;
  logic [3:0] c_be;
  logic [31:0] c_addr, c_wdata, c_rdata;
  bus_req_t bus_req;
  logic bus_ack;
  logic [127:0] bus_rdata;
  snoop_t snoop;
  logic ev_hit, ev_miss, ev_inval;
  int bus_reads = 0, bus_writes = 0, invals = 0;

  l1_cache #(.CORE_ID(8'd2)) dut (.clk, .rst, .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_uncached,
      .c_ll, .c_sc, .c_clr_link, .c_done, .c_rdata, .c_sc_ok, .bus_req, .bus_ack, .bus_rdata, .snoop,
      .ev_hit, .ev_miss, .ev_inval);

  // memory model: word address -> word
  logic [31:0] mem [logic [29:0]];
  function automatic logic [31:0] mword(logic [31:0] a);
    return mem.exists(a[31:2]) ? mem[a[31:2]] : {a[31:2], 2'b00} ^ 32'h5A5A_0000;
  endfunction

  always @(posedge clk) if (!rst && ev_inval) invals++;

  // bus slave: answers after three cycles
  initial begin
    bus_ack = 0; bus_rdata = '0;
    forever begin
      @(posedge clk);
      if (bus_req.valid && !rst) begin
        repeat (2) @(posedge clk);
        #1;
        if (bus_req.we) begin
          logic [31:0] w;
          w = mword(bus_req.addr);
          for (int b = 0; b < 4; b++) if (bus_req.be[b]) w[8*b +: 8] = bus_req.wdata[8*b +: 8];
          mem[bus_req.addr[31:2]] = w;
          bus_writes++;
        end else begin
          for (int k = 0; k < 4; k++) bus_rdata[32*k +: 32] = mword({bus_req.addr[31:4], 2'(k), 2'b00});
          bus_reads++;
        end
        bus_ack = 1;
        @(posedge clk); #1 bus_ack = 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic access(input logic we, input logic [31:0] addr, input logic [31:0] wd,
                        input logic [3:0] be, input logic unc, input logic ll, input logic sc,
                        output logic [31:0] rd, output logic ok, output int cycles);
    @(negedge clk);
    c_req = 1; c_we = we; c_addr = addr; c_wdata = wd; c_be = be; c_uncached = unc; c_ll = ll; c_sc = sc;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!c_done);
    rd = c_rdata; ok = c_sc_ok;
    @(negedge clk); c_req = 0;
  endtask

  task automatic send_snoop(logic [31:0] addr, logic [7:0] src);
    @(negedge clk); snoop.valid = 1; snoop.addr = addr; snoop.src = src;
    @(negedge clk); snoop.valid = 0;
  endtask

  initial begin
    logic [31:0] rd; logic ok; int cyc, r0, w0;
    c_req = 0; c_we = 0; c_addr = 0; c_wdata = 0; c_be = 0; c_uncached = 0; c_ll = 0; c_sc = 0;
    c_clr_link = 0; snoop = '0;
    repeat (3) @(posedge clk); rst = 0;

    r0 = bus_reads;
    access(0, 32'h0001_0024, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("miss data", rd == mword(32'h0001_0024) && bus_reads == r0 + 1);
    access(0, 32'h0001_0028, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("hit data", rd == mword(32'h0001_0028) && bus_reads == r0 + 1);
    chk("hit latency 2 cycles", cyc == 2);

    w0 = bus_writes;
    access(1, 32'h0001_0028, 32'h0000_00AB, 4'b0001, 0, 0, 0, rd, ok, cyc);
    chk("write through", bus_writes == w0 + 1 && mem[32'h0001_0028 >> 2][7:0] == 8'hAB);
    access(0, 32'h0001_0028, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("write updates copy", rd == mem[32'h0001_0028 >> 2] && bus_reads == r0 + 1);

    send_snoop(32'h0001_0020, 8'd2);            // own write: keep the line
    access(0, 32'h0001_0024, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("own snoop ignored", bus_reads == r0 + 1);
    mem[32'h0001_0024 >> 2] = 32'hCAFE_F00D;
    send_snoop(32'h0001_002C, 8'd5);            // another core wrote the line
    access(0, 32'h0001_0024, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("invalidate event", invals == 1);
    chk("refetch after invalidate", rd == 32'hCAFE_F00D && bus_reads == r0 + 2);

    r0 = bus_reads;
    access(0, 32'h0002_0000, 0, 4'hF, 1, 0, 0, rd, ok, cyc);
    access(0, 32'h0002_0000, 0, 4'hF, 1, 0, 0, rd, ok, cyc);
    chk("uncached not filled", bus_reads == r0 + 2 && rd == mword(32'h0002_0000));

    r0 = bus_reads; w0 = bus_writes;
    access(1, 32'h0000_0100, 32'h1234_5678, 4'hF, 1, 0, 0, rd, ok, cyc);
    access(1, 32'h0000_0104, 32'h0000_0099, 4'b0001, 1, 0, 0, rd, ok, cyc);
    access(0, 32'h0000_0100, 0, 4'hF, 1, 0, 0, rd, ok, cyc);
    chk("direct window word", rd == 32'h1234_5678);
    access(0, 32'h0000_0104, 0, 4'hF, 0, 0, 0, rd, ok, cyc);
    chk("direct window byte", rd[7:0] == 8'h99 && bus_reads == r0 && bus_writes == w0);

    // LL/SC
    access(0, 32'h0003_0000, 0, 4'hF, 0, 1, 0, rd, ok, cyc);
    w0 = bus_writes;
    access(1, 32'h0003_0000, 32'd77, 4'hF, 0, 0, 1, rd, ok, cyc);
    chk("sc succeeds", ok && bus_writes == w0 + 1 && mem[32'h0003_0000 >> 2] == 77);
    access(1, 32'h0003_0000, 32'd78, 4'hF, 0, 0, 1, rd, ok, cyc);
    chk("sc without link fails", !ok && bus_writes == w0 + 1);
    access(0, 32'h0003_0000, 0, 4'hF, 0, 1, 0, rd, ok, cyc);
    send_snoop(32'h0003_0004, 8'd1);
    access(1, 32'h0003_0000, 32'd79, 4'hF, 0, 0, 1, rd, ok, cyc);
    chk("sc after snoop fails", !ok && bus_writes == w0 + 1 && mem[32'h0003_0000 >> 2] == 77);
    access(0, 32'h0003_0000, 0, 4'hF, 0, 1, 0, rd, ok, cyc);
    @(negedge clk); c_clr_link = 1; @(negedge clk); c_clr_link = 0;
    access(1, 32'h0003_0000, 32'd80, 4'hF, 0, 0, 1, rd, ok, cyc);
    chk("sc after clr_link fails", !ok && mem[32'h0003_0000 >> 2] == 77);
    // another core's write snooped in the very cycle an LL hit completes:
    // the LL returns the old value, so its link must not hold. The link is
    // first placed on another line so only the new link can catch the write.
    begin
      int inv0;
      access(0, 32'h0003_0100, 0, 4'hF, 0, 1, 0, rd, ok, cyc);
      inv0 = invals;
      fork
        access(0, 32'h0003_0000, 0, 4'hF, 0, 1, 0, rd, ok, cyc);
        begin
          @(negedge clk); @(negedge clk);
          snoop.valid = 1; snoop.addr = 32'h0003_0008; snoop.src = 8'd3;
          @(negedge clk); snoop.valid = 0;
        end
      join
      chk("ll hit races a snoop", cyc == 2 && rd == 77);
      access(1, 32'h0003_0000, 32'd81, 4'hF, 0, 0, 1, rd, ok, cyc);
      chk("sc after racing snoop fails", !ok && mem[32'h0003_0000 >> 2] == 77);
      chk("racing snoop invalidated the line", invals == inv0 + 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
