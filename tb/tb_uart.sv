// tb_uart: sends bytes through the register interface with the transmitter
// looped back to the receiver, checks the serial frame timing (start bit,
// eight data bits LSB first, stop bit at CLKS_PER_BIT cycles each), the busy
// flag and the received data.
module tb_uart;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic en, we, tx;
  logic [15:0] addr;
  logic [31:0] wdata, rdata;
  uart #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .en, .we, .addr, .wdata, .rdata, .tx, .rx(tx));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    @(negedge clk); en = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] d);
    @(negedge clk); en = 1; we = 0; addr = a; #1; d = rdata;
    @(negedge clk); en = 0;
  endtask

  initial begin
    logic [31:0] d;
    byte unsigned bytes [4] = '{8'h55, 8'hA3, 8'h00, 8'hFF};
    en = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(posedge clk); rst = 0;
    foreach (bytes[k]) begin
      logic [9:0] frame;
      wr(16'h0, {24'h0, bytes[k]});
      rd(16'h4, d); checks++;
      if (!d[0]) begin failures++; $display("FAIL busy not set"); end
      // sample the line in the middle of each bit; the first bit started
      // at the write edge, 1.5 cycles ago
      #(10 * CPB / 2 - 15);
      for (int b = 0; b < 10; b++) begin frame[b] = tx; #(10 * CPB); end
      checks++;
      if (frame != {1'b1, bytes[k], 1'b0}) begin failures++; $display("FAIL frame %b for %h", frame, bytes[k]); end
      repeat (CPB) @(posedge clk);
      rd(16'h4, d); checks++;
      if (d[0] || !d[1]) begin failures++; $display("FAIL status %b", d[1:0]); end
      rd(16'h8, d); checks++;
      if (d[7:0] != bytes[k]) begin failures++; $display("FAIL rx %h exp %h", d[7:0], bytes[k]); end
      rd(16'h4, d); checks++;
      if (d[1]) begin failures++; $display("FAIL rx valid not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
