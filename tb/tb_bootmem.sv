// tb_bootmem: checks the built-in start-up stub word by word against its
// MIPS encoding, and the one-cycle read latency.
module tb_bootmem;
  import mips_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  logic [31:0] addr;
  logic [127:0] rdata;
  bootmem #(.ENTRY(32'h8000_4000)) dut (.clk, .en, .addr, .rdata);

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] exp [8];
    exp = '{LUI(29, 'hA000), ORI(29, 29, 'h1FF0), LUI(26, 'h8000), ORI(26, 26, 'h4000),
            JR(26), NOP(), 0, 0};
    en = 0; addr = 0;
    for (int l = 0; l < 2; l++) begin
      @(negedge clk); en = 1; addr = 32'h1FC0_0000 + 32'(l * 16);
      @(posedge clk); #1; en = 0;
      for (int w = 0; w < 4; w++) begin
        checks++;
        if (rdata[32*w +: 32] !== exp[l*4+w]) begin
          failures++; $display("FAIL word %0d: %h exp %h", l*4+w, rdata[32*w +: 32], exp[l*4+w]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
