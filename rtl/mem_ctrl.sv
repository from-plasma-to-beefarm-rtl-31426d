// mem_ctrl: memory control unit of the Honeycomb core.
//
// Owns the core's single memory port. It chooses the virtual address
// (program counter for an instruction fetch, computed address for a load or
// store), hands it to the MMU for translation, and drives the L1 cache with
// the physical address, byte enables and the store data moved to the right
// byte lanes. On the way back it extracts and sign- or zero-extends bytes and
// half words (big-endian, as the MIPS ports of the original core). It flags
// misaligned accesses so the core can raise an address error instead of
// issuing them. Combinational; the request is held by the core until the
// cache answers with `c_done` (any access pauses the CPU until then).
module mem_ctrl
  import beefarm_pkg::*;
(
  // from the core
  input  logic        req,          // access wanted this cycle
  input  logic        is_fetch,
  input  logic [31:0] pc,
  input  logic [31:0] daddr,
  input  mem_op_e     mem_op,
  input  mem_size_e   size,
  input  logic        sign_ext,
  input  logic        ll,
  input  logic        sc,
  input  logic [31:0] store_data,
  output logic [31:0] vaddr,        // to the MMU
  output logic        vstore,
  output logic        misaligned,
  output logic        done,
  output logic [31:0] rdata,        // instruction or extended load value
  output logic        sc_ok,
  // from the MMU
  input  logic [31:0] paddr,
  input  logic        uncached,
  input  logic        xlate_fault,
  // to the L1 cache
  output logic        c_req,
  output logic        c_we,
  output logic [3:0]  c_be,
  output logic [31:0] c_addr,
  output logic [31:0] c_wdata,
  output logic        c_uncached,
  output logic        c_ll,
  output logic        c_sc,
  input  logic        c_done,
  input  logic [31:0] c_rdata,
  input  logic        c_sc_ok
);
  logic [1:0] off;

  assign vaddr  = is_fetch ? pc : daddr;
  assign vstore = !is_fetch && (mem_op == MEM_STORE);
  assign off    = vaddr[1:0];

  always_comb begin
    if (is_fetch)          misaligned = (off != 2'b00);
    else if (size == SZ_H) misaligned = off[0];
    else if (size == SZ_W) misaligned = (off != 2'b00);
    else                   misaligned = 1'b0;
  end

  // byte lanes: address offset 0 is the most significant byte
  always_comb begin
    c_be    = 4'b1111;
    c_wdata = store_data;
    if (!is_fetch) begin
      unique case (size)
        SZ_B: begin
          c_be    = 4'b1000 >> off;
          c_wdata = {4{store_data[7:0]}};
        end
        SZ_H: begin
          c_be    = off[1] ? 4'b0011 : 4'b1100;
          c_wdata = {2{store_data[15:0]}};
        end
        default: ;
      endcase
    end
  end

  assign c_req      = req && !misaligned && !xlate_fault;
  assign c_we       = vstore;
  assign c_addr     = paddr;
  assign c_uncached = uncached;
  assign c_ll       = !is_fetch && ll;
  assign c_sc       = !is_fetch && sc;
  assign done       = c_done;
  assign sc_ok      = c_sc_ok;

  always_comb begin
    logic [7:0]  b;
    logic [15:0] h;
    b = c_rdata[8*(3-int'(off)) +: 8];
    h = off[1] ? c_rdata[15:0] : c_rdata[31:16];
    rdata = c_rdata;
    if (!is_fetch) begin
      unique case (size)
        SZ_B:    rdata = sign_ext ? {{24{b[7]}}, b} : {24'b0, b};
        SZ_H:    rdata = sign_ext ? {{16{h[15]}}, h} : {16'b0, h};
        default: rdata = c_rdata;
      endcase
    end
  end
endmodule
