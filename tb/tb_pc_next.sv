// tb_pc_next: sequential stepping, a taken and a not-taken branch with their
// delay slots, and redirection by an exception and by ERET.
module tb_pc_next;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic step, is_branch, taken, redirect, in_ds;
  logic [31:0] target, redirect_pc, pc;
  pc_next dut (.clk, .rst, .step, .is_branch, .taken, .target, .redirect, .redirect_pc,
               .pc, .in_delay_slot(in_ds));

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pc(logic [31:0] e, logic ds);
    checks++;
    if (pc !== e || in_ds !== ds) begin failures++; $display("FAIL pc=%h ds=%b exp %h %b", pc, in_ds, e, ds); end
  endtask

  task automatic do_step(logic br, logic tk, logic [31:0] tg, logic rd, logic [31:0] rpc);
    @(negedge clk); step = 1; is_branch = br; taken = tk; target = tg; redirect = rd; redirect_pc = rpc;
    @(negedge clk); step = 0; is_branch = 0; taken = 0; redirect = 0;
  endtask

  initial begin
    step = 0; is_branch = 0; taken = 0; redirect = 0; target = 0; redirect_pc = 0;
    repeat (2) @(posedge clk); rst = 0;
    #1 expect_pc(32'hBFC0_0000, 0);
    do_step(0, 0, 0, 0, 0);                     expect_pc(32'hBFC0_0004, 0);
    do_step(1, 1, 32'h8000_1000, 0, 0);         expect_pc(32'hBFC0_0008, 1);  // delay slot
    do_step(0, 0, 0, 0, 0);                     expect_pc(32'h8000_1000, 0);  // target
    do_step(1, 0, 32'h8000_2000, 0, 0);         expect_pc(32'h8000_1004, 1);  // not taken
    do_step(0, 0, 0, 0, 0);                     expect_pc(32'h8000_1008, 0);
    do_step(1, 1, 32'h8000_3000, 0, 0);         expect_pc(32'h8000_100C, 1);
    do_step(0, 0, 0, 1, 32'h8000_0080);         expect_pc(32'h8000_0080, 0);  // exception drops target
    do_step(0, 0, 0, 1, 32'h8000_1004);         expect_pc(32'h8000_1004, 0);  // eret
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
