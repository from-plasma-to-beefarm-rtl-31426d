// tb_shifter: checks SLL/SRL/SRA for every shift amount on random values.
module tb_shifter;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  shift_op_e op;
  logic [31:0] v, y, exp;
  logic [4:0] sh;
  shifter dut (.op, .value(v), .shamt(sh), .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) for (int s = 0; s < 32; s++) for (int o = 0; o < 3; o++) begin
      v = (n == 0) ? 32'h8000_0001 : $urandom; sh = 5'(s); op = shift_op_e'(o); #1;
      // reference: build the result bit by bit
      for (int k = 0; k < 32; k++) begin
        if (o == 0)      exp[k] = (k >= s) ? v[k-s] : 1'b0;
        else if (o == 1) exp[k] = (k + s <= 31) ? v[k+s] : 1'b0;
        else             exp[k] = (k + s <= 31) ? v[k+s] : v[31];
      end
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op=%0d v=%h s=%0d y=%h exp=%h", o, v, s, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
