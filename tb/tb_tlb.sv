// tb_tlb: fills all 64 entries with distinct pages, looks every one up,
// checks misses, read-back and the lowest-index rule for double matches.
module tb_tlb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [19:0] l_vpn;
  logic l_hit, w_en;
  logic [5:0] l_index, w_index, r_index;
  logic [31:0] l_lo, w_hi, w_lo, r_hi, r_lo;
  logic [19:0] vpns [64];
  tlb dut (.clk, .rst, .l_vpn, .l_hit, .l_index, .l_lo, .w_en, .w_index, .w_hi, .w_lo,
           .r_index, .r_hi, .r_lo);

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    w_en = 0; w_index = 0; w_hi = 0; w_lo = 0; r_index = 0; l_vpn = 20'hFFFFF;
    repeat (2) @(posedge clk); rst = 0;
    for (int i = 0; i < 64; i++) begin
      vpns[i] = 20'h40000 + 20'(i * 7);
      @(negedge clk); w_en = 1; w_index = 6'(i);
      w_hi = {vpns[i], 6'(i), 6'b0}; w_lo = {20'(32'h100 + i), 4'b0110, 8'b0};
    end
    @(negedge clk); w_en = 0;
    for (int i = 0; i < 64; i++) begin
      l_vpn = vpns[i]; r_index = 6'(i); #1;
      checks += 2;
      if (!l_hit || l_index != 6'(i) || l_lo[31:12] != 20'(32'h100 + i) || l_lo[11:8] != 4'b0110) begin
        failures++; $display("FAIL lookup %0d hit=%b idx=%0d lo=%h", i, l_hit, l_index, l_lo);
      end
      if (r_hi != {vpns[i], 6'(i), 6'b0} || r_lo != l_lo) begin failures++; $display("FAIL read %0d", i); end
    end
    l_vpn = 20'h40001; #1; checks++;
    if (l_hit) begin failures++; $display("FAIL miss expected"); end
    // duplicate page in entry 50 and 10: lowest index wins
    @(negedge clk); w_en = 1; w_index = 50; w_hi = {vpns[10], 12'b0}; w_lo = 32'hABCDE_200;
    @(negedge clk); w_en = 0; l_vpn = vpns[10]; #1; checks++;
    if (!l_hit || l_index != 10) begin failures++; $display("FAIL priority idx=%0d", l_index); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
