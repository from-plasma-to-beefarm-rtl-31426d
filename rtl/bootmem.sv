// bootmem: read-only boot memory next to the bus arbiter.
//
// A block RAM of 16-byte lines, read one line per access with one cycle of
// latency; it is mapped at physical 0x1FC0_0000, so the cores reach it
// through kseg1 at the MIPS reset vector 0xBFC0_0000. Its contents are either
// loaded from INIT_FILE ($readmemh, one 128-bit line per row) or, by default,
// a built-in start-up stub: it points the stack pointer ($sp) at the top of
// the core's own cache window (0xA000_1FF0, i.e. the uncached view of the
// lowest 8 KB of physical memory, which the L1 cache answers itself) and
// jumps to ENTRY, the kernel image in DDR. Size (4 KB, one Virtex-5 block
// RAM) and stub are this design's choices.
module bootmem #(
  parameter int unsigned LINES      = 256,
  parameter logic [31:0] ENTRY      = 32'h8000_4000,
  parameter string       INIT_FILE  = ""
) (
  input  logic          clk,
  input  logic          en,
  input  logic [31:0]   addr,      // byte address, low bits select the line
  output logic [127:0]  rdata
);
  logic [127:0] rom [LINES];

  // word w of a line sits at bits [32*w +: 32]
  initial begin
    for (int i = 0; i < LINES; i++) rom[i] = '0;
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, rom);
    end else begin
      rom[0][31:0]   = 32'h3C1D_A000;                   // lui  $sp, 0xA000
      rom[0][63:32]  = 32'h37BD_1FF0;                   // ori  $sp, $sp, 0x1FF0
      rom[0][95:64]  = {16'h3C1A, ENTRY[31:16]};        // lui  $k0, ENTRY.hi
      rom[0][127:96] = {16'h375A, ENTRY[15:0]};         // ori  $k0, $k0, ENTRY.lo
      rom[1][31:0]   = 32'h0340_0008;                   // jr   $k0
      rom[1][63:32]  = 32'h0000_0000;                   // nop  (delay slot)
    end
  end

  always_ff @(posedge clk) begin
    if (en) rdata <= rom[addr[$clog2(LINES)+3:4]];
  end
endmodule
