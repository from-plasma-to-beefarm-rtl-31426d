// cp0: coprocessor 0 of the Honeycomb core (MMU and exception control).
//
// Holds the R3000 system registers Index(0), Random(1), EntryLo(2),
// BadVAddr(8), EntryHi(10), Status(12), Cause(13), EPC(14) and PRId(15), and
// the 64-entry TLB. It translates every virtual address the core issues in
// the same cycle: kseg0 (0x8000_0000..) and kseg1 (0xA000_0000..) map
// directly onto the low 512 MB, kseg1 uncached; kuseg and kseg2 go through
// the TLB, giving 4 GB of physical address space. It reports TLB miss,
// invalid-entry and modify faults and user-mode address errors. On an
// exception it records EPC, the branch-delay flag, the cause and the faulting
// address, pushes the Status KU/IE stack and supplies the vector (0x8000_0000
// for a kuseg TLB refill, 0x8000_0080 otherwise). ERET pops the stack and
// returns EPC. PRId carries the core number so boot code can tell the cores
// apart. Register layout follows the R3000; the choice of vectors, the
// PRId contents and the single interrupt line (IP2, masked by IM2 and IEc)
// are this design's.
module cp0
  import beefarm_pkg::*;
#(
  parameter logic [7:0] CORE_ID = 8'd0
) (
  input  logic        clk,
  input  logic        rst,
  // address translation
  input  logic [31:0] vaddr,
  input  logic        vstore,
  output logic [31:0] paddr,
  output logic        uncached,
  output logic        fault,
  output exc_code_e   fault_code,
  output logic        fault_refill,
  // register access and TLB instructions
  input  cp0_op_e     op,          // valid when op_en
  input  logic        op_en,
  input  logic [4:0]  reg_sel,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // exceptions
  input  logic        exc_take,
  input  exc_code_e   exc_code,
  input  logic        exc_bd,
  input  logic [31:0] exc_epc,
  input  logic        exc_addr_valid,
  input  logic [31:0] exc_addr,
  input  logic        exc_refill,
  output logic [31:0] exc_vector,
  output logic [31:0] epc_out,
  // interrupts
  input  logic        irq,
  output logic        irq_pending
);
  logic [31:0] index_r, entrylo, entryhi, badvaddr, status, epc;
  logic [5:0]  random_r;
  logic        cause_bd;
  exc_code_e   cause_code;

  // --------------------------------------------------------------- the TLB
  logic [19:0] l_vpn;
  logic        l_hit;
  logic [5:0]  l_index;
  logic [31:0] l_lo, r_hi, r_lo;
  logic        w_en;
  logic [5:0]  w_index;

  assign l_vpn   = (op_en && op == C0_TLBP) ? entryhi[31:12] : vaddr[31:12];
  assign w_en    = op_en && (op == C0_TLBWI || op == C0_TLBWR);
  assign w_index = (op == C0_TLBWR) ? random_r : index_r[13:8];

  tlb #(.ENTRIES(64)) u_tlb (
    .clk, .rst,
    .l_vpn, .l_hit, .l_index, .l_lo,
    .w_en, .w_index, .w_hi(entryhi), .w_lo(entrylo),
    .r_index(index_r[13:8]), .r_hi, .r_lo
  );

  // ----------------------------------------------------------- translation
  logic user_mode, mapped;
  assign user_mode = status[1];
  assign mapped    = !vaddr[31] || (vaddr[31:30] == 2'b11);

  always_comb begin
    paddr        = {3'b000, vaddr[28:0]};
    uncached     = (vaddr[31:29] == 3'b101);
    fault        = 1'b0;
    fault_code   = vstore ? EXC_TLBS : EXC_TLBL;
    fault_refill = 1'b0;
    if (user_mode && vaddr[31]) begin
      fault      = 1'b1;
      fault_code = vstore ? EXC_ADES : EXC_ADEL;
    end else if (mapped) begin
      paddr    = {l_lo[31:12], vaddr[11:0]};
      uncached = l_lo[11];
      if (!l_hit) begin
        fault        = 1'b1;
        fault_refill = !vaddr[31];
      end else if (!l_lo[9]) begin
        fault = 1'b1;
      end else if (vstore && !l_lo[10]) begin
        fault      = 1'b1;
        fault_code = EXC_MOD;
      end
    end
  end

  // ------------------------------------------------------------- registers
  always_comb begin
    unique case (reg_sel)
      5'd0:    rdata = index_r;
      5'd1:    rdata = {18'b0, random_r, 8'b0};
      5'd2:    rdata = entrylo;
      5'd8:    rdata = badvaddr;
      5'd10:   rdata = entryhi;
      5'd12:   rdata = status;
      5'd13:   rdata = {cause_bd, 15'b0, irq, 7'b0, 1'b0, cause_code, 2'b0};
      5'd14:   rdata = epc;
      5'd15:   rdata = {16'b0, 8'h03, CORE_ID};
      default: rdata = '0;
    endcase
  end

  assign irq_pending = irq && status[0] && status[10];
  assign exc_vector  = (exc_refill) ? UTLB_VECTOR : GEN_VECTOR;
  assign epc_out     = epc;

  always_ff @(posedge clk) begin
    if (rst) begin
      index_r    <= '0;
      entrylo    <= '0;
      entryhi    <= '0;
      badvaddr   <= '0;
      status     <= '0;
      epc        <= '0;
      random_r   <= 6'd63;
      cause_bd   <= 1'b0;
      cause_code <= EXC_INT;
    end else begin
      random_r <= (random_r == 6'd8) ? 6'd63 : random_r - 6'd1;
      if (exc_take) begin
        epc        <= exc_epc;
        cause_bd   <= exc_bd;
        cause_code <= exc_code;
        status[5:0] <= {status[3:0], 2'b00};
        if (exc_addr_valid) begin
          badvaddr <= exc_addr;
          if (exc_code inside {EXC_TLBL, EXC_TLBS, EXC_MOD})
            entryhi[31:12] <= exc_addr[31:12];
        end
      end else if (op_en) begin
        unique case (op)
          C0_MTC0: begin
            unique case (reg_sel)
              5'd0:  index_r[13:8] <= wdata[13:8];
              5'd2:  entrylo <= {wdata[31:8], 8'b0};
              5'd10: entryhi <= {wdata[31:6], 6'b0};
              5'd12: status  <= wdata;
              5'd14: epc     <= wdata;
              default: ;
            endcase
          end
          C0_TLBR: begin
            entryhi <= r_hi;
            entrylo <= r_lo;
          end
          C0_TLBP: index_r <= l_hit ? {18'b0, l_index, 8'b0} : 32'h8000_0000;
          C0_ERET: status[5:0] <= {status[5:4], status[5:2]};
          default: ;
        endcase
      end
    end
  end
endmodule
