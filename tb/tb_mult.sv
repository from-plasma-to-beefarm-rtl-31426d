// tb_mult: signed/unsigned multiply and divide against 64-bit reference
// arithmetic, MTHI/MTLO, and the 32-cycle iteration time.
module tb_mult;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start, busy;
  md_op_e op;
  logic [31:0] a, b, hi, lo;
  mult dut (.clk, .rst, .start, .op, .a, .b, .busy, .hi, .lo);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(md_op_e o, logic [31:0] x, logic [31:0] y);
    logic [63:0] p;
    logic [31:0] eh, el;
    int cycles;
    @(negedge clk); op = o; a = x; b = y; start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (busy) begin @(negedge clk); cycles++; end
    case (o)
      MD_MULT:  begin p = 64'($signed(x)) * 64'($signed(y)); eh = p[63:32]; el = p[31:0]; end
      MD_MULTU: begin p = {32'b0, x} * {32'b0, y};          eh = p[63:32]; el = p[31:0]; end
      MD_DIV:   begin el = 32'($signed(x) / $signed(y)); eh = 32'($signed(x) % $signed(y)); end
      default:  begin el = x / y; eh = x % y; end
    endcase
    checks += 3;
    if (hi !== eh || lo !== el) begin
      failures++; $display("FAIL op=%0d %h,%h -> hi=%h lo=%h exp %h %h", o, x, y, hi, lo, eh, el);
    end
    if (cycles != 33) begin failures++; $display("FAIL cycles %0d", cycles); end
  endtask

  initial begin
    start = 0; op = MD_NONE; a = 0; b = 0;
    repeat (2) @(posedge clk); rst = 0;
    run(MD_MULT, 32'hFFFF_FFFD, 32'd7);
    run(MD_DIV, 32'hFFFF_FFF9, 32'd2);
    run(MD_DIVU, 32'hFFFF_FFFF, 32'h8000_0001);
    for (int n = 0; n < 100; n++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (n % 3 == 0) y = y >> $urandom_range(0, 31);
      if (y == 0) y = 1;
      run(md_op_e'(MD_MULT + (n % 4)), x, y);
    end
    @(negedge clk); op = MD_MTHI; a = 32'h1234_5678; start = 1;
    @(negedge clk); op = MD_MTLO; a = 32'h9ABC_DEF0;
    @(negedge clk); start = 0;
    checks++;
    if (hi !== 32'h1234_5678 || lo !== 32'h9ABC_DEF0) begin failures++; $display("FAIL mthi/mtlo"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
