// perf_counters: memory-mapped performance counters of the BeeFarm I/O
// region.
//
// Software measures a run by reading these counters, without a debugger.
// One 64-bit cycle counter and four 32-bit counters per core: retired
// instructions, L1 hits, L1 misses and L1 lines invalidated by snooped writes.
// Each counter adds the matching event input in every cycle and wraps
// around. Registers, at byte offsets within the block:
//   0x000 cycles [31:0]    0x004 cycles [63:32]
//   0x008 write any value to clear every counter (reads 0)
//   0x100 + 4*i retired instructions of core i
//   0x200 + 4*i L1 hits of core i
//   0x300 + 4*i L1 misses of core i
//   0x400 + 4*i L1 invalidations of core i
// Reads are combinational and complete in the cycle of the access, like the
// UART. Writes to other offsets are ignored. A clear takes effect in the
// next cycle; events in the clearing cycle are dropped.
// A segment for performance counters in the memory map is part of the
// original system; which events are counted and the register layout are
// this design's own.
module perf_counters #(
  parameter int unsigned NCORES = 8
) (
  input  logic              clk,
  input  logic              rst,
  // I/O access from the arbiter
  input  logic              en,
  input  logic              we,
  input  logic [11:0]       addr,
  output logic [31:0]       rdata,
  // one-cycle event strobes, one bit per core
  input  logic [NCORES-1:0] ev_retire,
  input  logic [NCORES-1:0] ev_hit,
  input  logic [NCORES-1:0] ev_miss,
  input  logic [NCORES-1:0] ev_inval
);
  logic [63:0] cycles;
  logic [31:0] n_retire [NCORES];
  logic [31:0] n_hit    [NCORES];
  logic [31:0] n_miss   [NCORES];
  logic [31:0] n_inval  [NCORES];
  logic        clear;

  assign clear = en && we && (addr == 12'h008);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cycles <= '0;
      for (int i = 0; i < NCORES; i++) begin
        n_retire[i] <= '0;
        n_hit[i]    <= '0;
        n_miss[i]   <= '0;
        n_inval[i]  <= '0;
      end
    end else begin
      cycles <= cycles + 64'd1;
      for (int i = 0; i < NCORES; i++) begin
        n_retire[i] <= n_retire[i] + 32'(ev_retire[i]);
        n_hit[i]    <= n_hit[i]    + 32'(ev_hit[i]);
        n_miss[i]   <= n_miss[i]   + 32'(ev_miss[i]);
        n_inval[i]  <= n_inval[i]  + 32'(ev_inval[i]);
      end
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr[11:8])
      4'h0: begin
        if (addr[7:0] == 8'h00) rdata = cycles[31:0];
        if (addr[7:0] == 8'h04) rdata = cycles[63:32];
      end
      4'h1, 4'h2, 4'h3, 4'h4: begin
        for (int i = 0; i < NCORES; i++) begin
          if (32'(addr[7:2]) == i) begin
            unique case (addr[11:8])
              4'h1:    rdata = n_retire[i];
              4'h2:    rdata = n_hit[i];
              4'h3:    rdata = n_miss[i];
              default: rdata = n_inval[i];
            endcase
          end
        end
      end
      default: rdata = '0;
    endcase
  end
endmodule
