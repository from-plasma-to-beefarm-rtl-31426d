// tlb: the 64-entry translation lookaside buffer of the Honeycomb MMU.
//
// A content-addressable memory of 64 entries, 20 bits wide, holds the virtual
// page numbers (4 KB pages); a match yields a 6-bit index into a small RAM
// that holds the physical side of the entry in R3000 EntryLo layout
// (PFN[31:12], N[11] non-cacheable, D[10] dirty/writable, V[9] valid,
// G[8] global). The lookup is combinational so a translation completes in
// the same cycle as the access, standing in for the half-cycle shifted clock
// of the FPGA implementation. Only the VPN is compared, following the 20-bit
// CAM width; the ASID field of EntryHi is stored and read back but not
// matched. When several entries match, the lowest index wins. All entries are
// cleared (V = 0) at reset. `lookup` also serves the TLBP probe; the
// write/read ports serve TLBWI/TLBWR and TLBR.
module tlb #(
  parameter int unsigned ENTRIES = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  // lookup
  input  logic [19:0]                l_vpn,
  output logic                       l_hit,
  output logic [$clog2(ENTRIES)-1:0] l_index,
  output logic [31:0]                l_lo,      // EntryLo of the matching entry
  // write
  input  logic                       w_en,
  input  logic [$clog2(ENTRIES)-1:0] w_index,
  input  logic [31:0]                w_hi,      // EntryHi: VPN[31:12], ASID[11:6]
  input  logic [31:0]                w_lo,
  // read
  input  logic [$clog2(ENTRIES)-1:0] r_index,
  output logic [31:0]                r_hi,
  output logic [31:0]                r_lo
);
  logic [19:0] cam  [ENTRIES];
  logic [5:0]  asid [ENTRIES];
  logic [23:0] ram  [ENTRIES];   // {PFN, N, D, V, G}

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) begin
        cam[i]  <= '0;
        asid[i] <= '0;
        ram[i]  <= '0;
      end
    end else if (w_en) begin
      cam[w_index]  <= w_hi[31:12];
      asid[w_index] <= w_hi[11:6];
      ram[w_index]  <= w_lo[31:8];
    end
  end

  always_comb begin
    l_hit   = 1'b0;
    l_index = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (cam[i] == l_vpn) begin
        l_hit   = 1'b1;
        l_index = i[$clog2(ENTRIES)-1:0];
      end
    end
  end

  assign l_lo = {ram[l_index], 8'b0};
  assign r_hi = {cam[r_index], asid[r_index], 6'b0};
  assign r_lo = {ram[r_index], 8'b0};
endmodule
