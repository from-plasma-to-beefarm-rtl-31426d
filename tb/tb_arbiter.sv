// tb_arbiter: eight requesters on the arbiter with a DDR2 FIFO model, a
// boot ROM model and an I/O model. Checks round-robin order, one-at-a-time
// service, the snoop broadcast of writes, write masks, read data routing,
// boot ROM and I/O decoding, and DDR back-pressure.
module tb_arbiter;
  import beefarm_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  bus_req_t req [N];
  logic [N-1:0] ack;
  logic [127:0] rdata, boot_rdata;
  snoop_t snoop;
  logic boot_en, io_en, io_we;
  logic [31:0] boot_addr, io_wdata, io_rdata;
  logic [15:0] io_addr;
  logic [3:0] io_be;
  logic ddr_cmd_valid, ddr_cmd_ready, ddr_cmd_we, ddr_rd_valid;
  logic [31:0] ddr_cmd_addr;
  logic [127:0] ddr_cmd_wdata, ddr_rd_data;
  logic [15:0] ddr_cmd_wmask;

  arbiter #(.NCORES(N)) dut (.clk, .rst, .req, .ack, .rdata, .snoop, .boot_en, .boot_addr, .boot_rdata,
      .io_en, .io_we, .io_addr, .io_wdata, .io_be, .io_rdata, .ddr_cmd_valid, .ddr_cmd_ready,
      .ddr_cmd_we, .ddr_cmd_addr, .ddr_cmd_wdata, .ddr_cmd_wmask, .ddr_rd_valid, .ddr_rd_data);

  ddr2_model #(.LATENCY(5)) u_ddr (.clk, .rst, .cmd_valid(ddr_cmd_valid), .cmd_ready(ddr_cmd_ready),
      .cmd_we(ddr_cmd_we), .cmd_addr(ddr_cmd_addr), .cmd_wdata(ddr_cmd_wdata), .cmd_wmask(ddr_cmd_wmask),
      .rd_valid(ddr_rd_valid), .rd_data(ddr_rd_data));

  always @(posedge clk) boot_rdata <= boot_en ? {4{boot_addr ^ 32'hB007_0000}} : 128'hDEAD;
  assign io_rdata = {16'h10AA, io_addr};

  int order [$];
  logic [127:0] got [N];
  int snoops = 0;
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if ($countones(ack) > 1) begin failures++; $display("FAIL two acks"); end
      for (int i = 0; i < N; i++) if (ack[i]) begin
        order.push_back(i); got[i] = rdata; req[i].valid <= 1'b0;
      end
      if (snoop.valid) snoops++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_idle();
    int busy;
    do begin
      @(posedge clk); busy = 0;
      for (int i = 0; i < N; i++) if (req[i].valid) busy = 1;
    end while (busy);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) req[i] = '0;
    repeat (3) @(posedge clk); rst = 0;
    // all eight read DDR at once: served 0..7
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      req[i].valid = 1; req[i].we = 0; req[i].addr = 32'h0010_0000 + 32'(i * 16 + 4);
    end
    wait_idle();
    chk("round robin 0..7", order.size() == 8 && order[0] == 0 && order[7] == 7 &&
        order[3] == 3);
    for (int i = 0; i < N; i++)
      chk($sformatf("read data core %0d", i), got[i] == u_ddr.pattern(28'((32'h0010_0000 + 32'(i * 16)) >> 4)));
    order.delete();
    // after core 7: 5 and 2 request; the pointer continues from 7, so 2 then 5
    @(negedge clk);
    req[5].valid = 1; req[5].addr = 32'h0020_0000;
    req[2].valid = 1; req[2].addr = 32'h0020_0010;
    wait_idle();
    chk("round robin wrap", order.size() == 2 && order[0] == 2 && order[1] == 5);
    order.delete();
    // next: 1 and 3 and 6 -> 6 (after 5), then 1, then 3
    @(negedge clk);
    foreach (req[i]) if (i == 1 || i == 3 || i == 6) begin req[i].valid = 1; req[i].addr = 32'h0030_0000; end
    wait_idle();
    chk("round robin after 5", order.size() == 3 && order[0] == 6 && order[1] == 1 && order[2] == 3);
    // write: snooped, masked
    @(negedge clk);
    req[4].valid = 1; req[4].we = 1; req[4].addr = 32'h0040_0008; req[4].wdata = 32'hAABB_CCDD; req[4].be = 4'b0011;
    wait_idle();
    chk("write snooped", snoops == 1);
    begin
      logic [127:0] pat;
      pat = u_ddr.pattern(28'h0040000);
      chk("write merged", u_ddr.mem[28'h0040000] == {pat[127:80], 16'hCCDD, pat[63:0]});
    end
    // boot ROM and I/O
    @(negedge clk);
    req[0].valid = 1; req[0].we = 0; req[0].addr = 32'h1FC0_0040;
    wait_idle();
    chk("boot read", got[0][31:0] == (32'h1FC0_0040 ^ 32'hB007_0000));
    @(negedge clk);
    req[3].valid = 1; req[3].we = 0; req[3].addr = 32'h1F00_0004;
    wait_idle();
    chk("io read", got[3][31:0] == 32'h10AA_0004);
    chk("ddr back-pressure seen", u_ddr.stalls > 0);
    chk("no snoop for reads", snoops == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
