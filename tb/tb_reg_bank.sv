// tb_reg_bank: random writes with two simultaneous reads of distinct
// registers, compared with a shadow copy; register 0 must stay zero.
module tb_reg_bank;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0] ra, rb, wa;
  logic [31:0] rda, rdb, wd;
  logic we;
  logic [31:0] shadow [32];
  reg_bank dut (.clk, .rst, .ra_addr(ra), .ra_data(rda), .rb_addr(rb), .rb_data(rdb),
                .we, .w_addr(wa), .w_data(wd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    we = 0; ra = 0; rb = 0; wa = 0; wd = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ra = 5'($urandom); rb = 5'($urandom); wa = 5'($urandom); wd = $urandom; we = $urandom_range(0, 1) == 1;
      #1;
      checks += 2;
      if (rda !== shadow[ra]) begin failures++; $display("FAIL A r%0d=%h exp %h", ra, rda, shadow[ra]); end
      if (rdb !== shadow[rb]) begin failures++; $display("FAIL B r%0d=%h exp %h", rb, rdb, shadow[rb]); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
