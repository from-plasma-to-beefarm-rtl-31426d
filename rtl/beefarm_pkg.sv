// beefarm_pkg: types and constants shared by the BeeFarm multiprocessor.
//
// Holds the decoded control word of the Honeycomb core (a MIPS R3000-class
// CPU), the request/response bundles of the shared system bus, the snoop
// broadcast that keeps the write-through L1 caches coherent, the physical
// address map and the exception vectors. Field encodings are this design's
// own; the address map follows the description of the system (the lowest
// 8 KB of physical memory window onto the local cache, a boot ROM and memory
// mapped I/O next to the arbiter, everything else in DDR2), with the exact
// base addresses chosen here.
package beefarm_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned XLEN       = 32;
  localparam int unsigned LINE_BYTES = 16;          // 16-byte cache blocks
  localparam int unsigned LINE_BITS  = LINE_BYTES * 8;
  localparam int unsigned LINE_WORDS = LINE_BYTES / 4;

  // ---------------------------------------------------------- address map
  // Physical addresses below this bound access the core's own cache array.
  localparam logic [31:0] CACHE_WIN_BYTES = 32'h0000_2000;
  localparam logic [31:0] IO_BASE         = 32'h1F00_0000;
  localparam logic [31:0] IO_MASK         = 32'hFFFF_0000;
  localparam logic [31:0] BOOT_BASE       = 32'h1FC0_0000;
  localparam logic [31:0] BOOT_MASK       = 32'hFFFF_0000;

  // ----------------------------------------------------- exception vectors
  localparam logic [31:0] RESET_VECTOR = 32'hBFC0_0000;
  localparam logic [31:0] UTLB_VECTOR  = 32'h8000_0000;
  localparam logic [31:0] GEN_VECTOR   = 32'h8000_0080;

  // MIPS exception codes (Cause.ExcCode)
  typedef enum logic [4:0] {
    EXC_INT  = 5'd0,
    EXC_MOD  = 5'd1,
    EXC_TLBL = 5'd2,
    EXC_TLBS = 5'd3,
    EXC_ADEL = 5'd4,
    EXC_ADES = 5'd5,
    EXC_SYS  = 5'd8,
    EXC_BP   = 5'd9,
    EXC_RI   = 5'd10,
    EXC_CPU  = 5'd11
  } exc_code_e;

  // --------------------------------------------------------- control word
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_PASSB
  } alu_op_e;

  typedef enum logic [1:0] { SH_SLL, SH_SRL, SH_SRA } shift_op_e;

  typedef enum logic [1:0] { B_RT, B_IMM_SE, B_IMM_ZE, B_IMM_LUI } b_sel_e;

  typedef enum logic [2:0] {
    RES_ALU, RES_SHIFT, RES_HI, RES_LO, RES_LINK, RES_MEM, RES_CP0, RES_SC
  } res_sel_e;

  typedef enum logic [1:0] { DST_NONE, DST_RD, DST_RT, DST_R31 } dst_sel_e;

  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } branch_e;

  typedef enum logic [1:0] { MEM_NONE, MEM_LOAD, MEM_STORE } mem_op_e;
  typedef enum logic [1:0] { SZ_B, SZ_H, SZ_W } mem_size_e;

  typedef enum logic [2:0] {
    MD_NONE, MD_MULT, MD_MULTU, MD_DIV, MD_DIVU, MD_MTHI, MD_MTLO
  } md_op_e;

  typedef enum logic [2:0] {
    C0_NONE, C0_MFC0, C0_MTC0, C0_TLBR, C0_TLBWI, C0_TLBWR, C0_TLBP, C0_ERET
  } cp0_op_e;

  typedef enum logic [1:0] { X_NONE, X_SYSCALL, X_BREAK, X_RESERVED } dec_exc_e;

  typedef struct packed {
    alu_op_e   alu_op;
    b_sel_e    b_sel;
    shift_op_e shift_op;
    logic      shift_var;   // shift amount from rs instead of shamt
    res_sel_e  res_sel;
    dst_sel_e  dst_sel;
    branch_e   branch;
    mem_op_e   mem_op;
    mem_size_e mem_size;
    logic      mem_signed;
    logic      ll;
    logic      sc;
    md_op_e    md_op;
    cp0_op_e   cp0_op;
    dec_exc_e  exc;
  } ctrl_t;

  // ------------------------------------------------------------ system bus
  // One transaction per request: a write carries one word with byte enables,
  // a read returns the whole 16-byte line that holds the address.
  typedef struct packed {
    logic        valid;
    logic        we;
    logic [31:0] addr;
    logic [31:0] wdata;
    logic [3:0]  be;
  } bus_req_t;

  // Write broadcast seen by every cache (invalidation snoop).
  typedef struct packed {
    logic        valid;
    logic [31:0] addr;
    logic [7:0]  src;
  } snoop_t;

endpackage
