// l1_cache: coherent write-through L1 cache of one Honeycomb core.
//
// 8 KB, direct-mapped, 16-byte blocks, shared by instruction fetches and data
// accesses. Tags and data sit in arrays that map onto dual-port block RAM:
// one port serves the core, the other the snoop from the system bus, so both
// can be served in the same cycle. Coherence is kept by invalidation: every
// write that any core puts on the bus is broadcast, and each other cache
// drops a valid line whose tag matches. Because the cache is write-through
// and never holds dirty data, a line is either valid (shared) or invalid.
//
// CPU side: a request (c_req with its fields) is taken when the cache is
// idle and answered with c_done one cycle later on a hit, or after the bus
// transaction on a miss, an uncached access or a store. Stores always go to
// the bus (write-through, no write-allocate) and update the local copy when
// it is present. Physical addresses below 8 KB do not go to the bus at all:
// they read and write the data array directly, word by word, so the cache
// can serve as boot-time memory, as a stack, or be inspected by software.
// LL records a link on the line it reads; a snooped write to that line, an
// exception or ERET (c_clr_link) breaks it; SC is only put on the bus while
// the link holds and reports success in c_sc_ok. The request is withdrawn
// if the link breaks while waiting for the bus.
// An LL that completes in the cycle another core's write to its line is
// snooped leaves no link, since it read the value from before that write.
//
// Bus side: one request at a time (bus_req held until bus_ack), reads return
// the whole line on bus_rdata, writes carry one word with byte enables.
module l1_cache
  import beefarm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter logic [7:0]  CORE_ID    = 8'd0
) (
  input  logic          clk,
  input  logic          rst,
  // CPU side
  input  logic          c_req,
  input  logic          c_we,
  input  logic [3:0]    c_be,
  input  logic [31:0]   c_addr,
  input  logic [31:0]   c_wdata,
  input  logic          c_uncached,
  input  logic          c_ll,
  input  logic          c_sc,
  input  logic          c_clr_link,
  output logic          c_done,
  output logic [31:0]   c_rdata,
  output logic          c_sc_ok,
  // system bus
  output bus_req_t      bus_req,
  input  logic          bus_ack,
  input  logic [127:0]  bus_rdata,
  input  snoop_t        snoop,
  // event pulses (performance counting)
  output logic          ev_hit,
  output logic          ev_miss,
  output logic          ev_inval
);
  localparam int unsigned LINES    = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned IDX_BITS = $clog2(LINES);
  localparam int unsigned OFF_BITS = $clog2(LINE_BYTES);
  localparam int unsigned TAG_BITS = 32 - IDX_BITS - OFF_BITS;

  logic [127:0]        data_ram [LINES];
  logic [TAG_BITS-1:0] tag_ram  [LINES];
  logic [LINES-1:0]    valid;

  typedef enum logic [1:0] { IDLE, LOOKUP, BUS } state_e;
  state_e state;

  // registered request
  logic        r_we, r_unc, r_ll, r_sc;
  logic [3:0]  r_be;
  logic [31:0] r_addr, r_wdata;

  logic        link_valid;
  logic        snoop_same;
  logic [27:0] link_line;

  logic [IDX_BITS-1:0] idx, s_idx;
  logic [TAG_BITS-1:0] tag, s_tag;
  logic [1:0]          word;
  logic                direct, hit, sc_blocked, s_hit;
  logic [127:0]        line, wline;
  logic [15:0]         wmask;

  assign idx    = r_addr[OFF_BITS +: IDX_BITS];
  assign tag    = r_addr[31 -: TAG_BITS];
  assign word   = r_addr[3:2];
  assign direct = (r_addr < CACHE_WIN_BYTES);
  assign line   = data_ram[idx];
  assign hit    = valid[idx] && (tag_ram[idx] == tag) && !r_unc;
  assign sc_blocked = r_sc && !link_valid;

  // the store word placed in its line position, with a byte mask
  assign wline = {4{r_wdata}};
  assign wmask = 16'(r_be) << (4 * word);

  function automatic logic [127:0] merge(input logic [127:0] old,
                                         input logic [127:0] nw,
                                         input logic [15:0]  m);
    for (int b = 0; b < 16; b++)
      if (m[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  // snoop port
  assign s_idx = snoop.addr[OFF_BITS +: IDX_BITS];
  assign s_tag = snoop.addr[31 -: TAG_BITS];
  assign s_hit = snoop.valid && (snoop.src != CORE_ID) &&
                 valid[s_idx] && (tag_ram[s_idx] == s_tag);

  // another core's write to the line being accessed, in this very cycle: an
  // LL completing now has read the line before that write, so its link must
  // not be set (the snoop below only compares the old link address)
  assign snoop_same = snoop.valid && (snoop.src != CORE_ID) && (snoop.addr[31:4] == r_addr[31:4]);

  // bus request
  always_comb begin
    bus_req       = '0;
    bus_req.valid = (state == BUS) && !sc_blocked;
    bus_req.we    = r_we;
    bus_req.addr  = r_addr;
    bus_req.wdata = r_wdata;
    bus_req.be    = r_be;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      valid      <= '0;
      link_valid <= 1'b0;
      link_line  <= '0;
      c_done     <= 1'b0;
      c_rdata    <= '0;
      c_sc_ok    <= 1'b0;
      r_we <= 1'b0; r_unc <= 1'b0; r_ll <= 1'b0; r_sc <= 1'b0;
      r_be <= '0; r_addr <= '0; r_wdata <= '0;
      ev_hit <= 1'b0; ev_miss <= 1'b0; ev_inval <= 1'b0;
    end else begin
      c_done  <= 1'b0;
      ev_hit  <= 1'b0;
      ev_miss <= 1'b0;
      unique case (state)
        IDLE: begin
          if (c_req && !c_done) begin
            r_we    <= c_we;
            r_be    <= c_be;
            r_addr  <= c_addr;
            r_wdata <= c_wdata;
            r_unc   <= c_uncached;
            r_ll    <= c_ll;
            r_sc    <= c_sc;
            state   <= LOOKUP;
          end
        end
        LOOKUP: begin
          c_sc_ok <= 1'b0;
          if (direct) begin
            if (r_we) data_ram[idx] <= merge(line, wline, wmask);
            c_rdata <= line[32*word +: 32];
            c_sc_ok <= 1'b1;
            c_done  <= 1'b1;
            state   <= IDLE;
          end else if (!r_we && hit) begin
            c_rdata <= line[32*word +: 32];
            c_done  <= 1'b1;
            ev_hit  <= 1'b1;
            state   <= IDLE;
            if (r_ll) begin
              link_valid <= !snoop_same;
              link_line  <= r_addr[31:4];
            end
          end else if (sc_blocked) begin
            c_done <= 1'b1;
            state  <= IDLE;
          end else begin
            ev_miss <= !r_we && !r_unc;
            state   <= BUS;
          end
        end
        BUS: begin
          if (sc_blocked) begin
            c_done <= 1'b1;
            state  <= IDLE;
          end else if (bus_ack) begin
            if (!r_we) begin
              c_rdata <= bus_rdata[32*word +: 32];
              if (!r_unc) begin
                data_ram[idx] <= bus_rdata;
                tag_ram[idx]  <= tag;
                valid[idx]    <= 1'b1;
              end
              if (r_ll) begin
                link_valid <= !snoop_same;
                link_line  <= r_addr[31:4];
              end
            end else begin
              if (hit) data_ram[idx] <= merge(line, wline, wmask);
              c_sc_ok <= 1'b1;
              if (r_sc) link_valid <= 1'b0;
            end
            c_done <= 1'b1;
            state  <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase

      // invalidation snoop (second port); wins over a same-cycle fill
      ev_inval <= s_hit;
      if (s_hit) valid[s_idx] <= 1'b0;
      if ((snoop.valid && snoop.src != CORE_ID && snoop.addr[31:4] == link_line) || c_clr_link)
        link_valid <= 1'b0;
    end
  end
endmodule
