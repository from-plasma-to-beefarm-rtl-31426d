// tb_mem_ctrl: byte-lane placement of stores, extraction and extension of
// loads, misalignment detection and fetch/data address selection.
module tb_mem_ctrl;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic req, is_fetch, sign_ext, ll, sc, misaligned, done, sc_ok, vstore;
  logic [31:0] pc, daddr, store_data, vaddr, rdata;
  mem_op_e mem_op; mem_size_e size;
  logic c_req, c_we, c_uncached, c_ll, c_sc, c_done, c_sc_ok;
  logic [3:0] c_be;
  logic [31:0] c_addr, c_wdata, c_rdata;
  mem_ctrl dut (.req, .is_fetch, .pc, .daddr, .mem_op, .size, .sign_ext, .ll, .sc, .store_data,
                .vaddr, .vstore, .misaligned, .done, .rdata, .sc_ok,
                .paddr(vaddr & 32'h1FFF_FFFF), .uncached(1'b0), .xlate_fault(1'b0),
                .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_uncached, .c_ll, .c_sc,
                .c_done, .c_rdata, .c_sc_ok);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    req = 1; ll = 0; sc = 0; sign_ext = 0; c_done = 0; c_sc_ok = 0;
    pc = 32'h8000_0010; daddr = 32'h8000_0203; store_data = 32'h1122_33A4;
    c_rdata = 32'h80F1_7F82;
    is_fetch = 1; mem_op = MEM_LOAD; size = SZ_B; #1;
    chk("fetch addr", vaddr == pc && c_addr == 32'h0000_0010 && c_be == 4'hF && !c_we && rdata == c_rdata);
    is_fetch = 0; mem_op = MEM_STORE; size = SZ_B; #1;
    chk("sb lane 3", c_be == 4'b0001 && c_wdata[7:0] == 8'hA4 && c_we && vstore && !misaligned);
    daddr = 32'h8000_0200; #1; chk("sb lane 0", c_be == 4'b1000 && c_wdata[31:24] == 8'hA4);
    size = SZ_H; daddr = 32'h8000_0202; #1; chk("sh low", c_be == 4'b0011 && c_wdata[15:0] == 16'h33A4);
    daddr = 32'h8000_0201; #1; chk("sh misaligned", misaligned && !c_req);
    size = SZ_W; daddr = 32'h8000_0202; #1; chk("sw misaligned", misaligned);
    mem_op = MEM_LOAD; size = SZ_B; sign_ext = 1;
    daddr = 32'h8000_0200; #1; chk("lb 0 sext", rdata == 32'hFFFF_FF80);
    daddr = 32'h8000_0202; #1; chk("lb 2 sext", rdata == 32'h0000_007F);
    sign_ext = 0; daddr = 32'h8000_0201; #1; chk("lbu 1", rdata == 32'h0000_00F1);
    size = SZ_H; sign_ext = 1; daddr = 32'h8000_0200; #1; chk("lh 0", rdata == 32'hFFFF_80F1);
    sign_ext = 0; daddr = 32'h8000_0202; #1; chk("lhu 2", rdata == 32'h0000_7F82);
    size = SZ_W; ll = 1; daddr = 32'h8000_0204; #1; chk("ll", c_ll && rdata == c_rdata && !c_we);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
