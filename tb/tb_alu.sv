// tb_alu: random and corner-case check of every ALU operation against a
// reference computed in the testbench.
module tb_alu;
  import beefarm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  alu_op_e op;
  logic [31:0] a, b, y, exp;
  alu dut (.op, .a, .b, .y);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLT:  return (int'(x) < int'(z)) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(z)) ? 1 : 0;
      default:  return z;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] corner [5] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF};
    for (int o = 0; o <= int'(ALU_PASSB); o++) begin
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
        op = alu_op_e'(o); a = corner[i]; b = corner[j]; #1;
        exp = ref_alu(op, a, b); checks++;
        if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp); end
      end
      for (int n = 0; n < 200; n++) begin
        op = alu_op_e'(o); a = $urandom; b = $urandom; #1;
        exp = ref_alu(op, a, b); checks++;
        if (y !== exp) begin failures++; $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, a, b, y, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
