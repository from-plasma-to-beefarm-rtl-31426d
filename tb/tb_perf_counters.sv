// tb_perf_counters: self-checking test of the performance counters with four
// cores. Random event strobes are driven for a few thousand cycles while a
// reference model in the testbench counts the same events. Every register
// is read back and compared, including the 64-bit cycle counter and an
// unmapped offset. Then a clear is written, and the test checks that all
// counters restart from zero and count again.
module tb_perf_counters;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic en = 0, we = 0;
  logic [11:0] addr = '0;
  logic [31:0] rdata;
  logic [N-1:0] ev_retire = '0, ev_hit = '0, ev_miss = '0, ev_inval = '0;

  perf_counters #(.NCORES(N)) dut (.clk, .rst, .en, .we, .addr, .rdata,
    .ev_retire, .ev_hit, .ev_miss, .ev_inval);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  longint m_cyc;
  int m_ret [N], m_hit [N], m_miss [N], m_inv [N];
  bit counting = 0;

  always @(posedge clk) if (counting) begin
    m_cyc++;
    for (int i = 0; i < N; i++) begin
      m_ret[i]  += int'(ev_retire[i]);
      m_hit[i]  += int'(ev_hit[i]);
      m_miss[i] += int'(ev_miss[i]);
      m_inv[i]  += int'(ev_inval[i]);
    end
  end

  task automatic read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; en = 1; we = 0;
    #1 d = rdata;
    @(negedge clk); en = 0;
  endtask

  task automatic check_all(string tag);
    logic [31:0] d;
    // freeze the events so the model and the counters agree while reading
    @(negedge clk); ev_retire = '0; ev_hit = '0; ev_miss = '0; ev_inval = '0;
    @(negedge clk); counting = 0;
    for (int i = 0; i < N; i++) begin
      read(12'h100 + 12'(4 * i), d); chk($sformatf("%s retire %0d", tag, i), d, m_ret[i]);
      read(12'h200 + 12'(4 * i), d); chk($sformatf("%s hit %0d", tag, i), d, m_hit[i]);
      read(12'h300 + 12'(4 * i), d); chk($sformatf("%s miss %0d", tag, i), d, m_miss[i]);
      read(12'h400 + 12'(4 * i), d); chk($sformatf("%s inval %0d", tag, i), d, m_inv[i]);
    end
    read(12'h500, d); chk({tag, " unmapped"}, d, 0);
    read(12'h008, d); chk({tag, " clear reads 0"}, d, 0);
  endtask

  task automatic run_events(int n);
    @(negedge clk); counting = 1;
    repeat (n) begin
      ev_retire = N'($urandom); ev_hit = N'($urandom); ev_miss = N'($urandom & $urandom);
      ev_inval = N'($urandom & $urandom & $urandom);
      @(negedge clk);
    end
  endtask

  initial begin
    logic [31:0] lo, hi, lo2;
    m_cyc = 0;
    for (int i = 0; i < N; i++) begin m_ret[i] = 0; m_hit[i] = 0; m_miss[i] = 0; m_inv[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    run_events(3000);
    check_all("run1");
    // cycle counter: two reads four cycles apart differ by 4
    read(12'h000, lo); read(12'h004, hi); read(12'h000, lo2);
    chk("cycles high", hi, 0);
    chk("cycles advance", lo2 - lo, 4);
    chk("cycles plausible", 32'(lo > 3000 && lo < 3100), 1);
    // clear, then count again
    @(negedge clk); addr = 12'h008; en = 1; we = 1;
    @(negedge clk); en = 0; we = 0;
    read(12'h000, lo);
    chk("cycles after clear", lo, 1);
    for (int i = 0; i < N; i++) begin m_ret[i] = 0; m_hit[i] = 0; m_miss[i] = 0; m_inv[i] = 0; end
    run_events(500);
    check_all("run2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
