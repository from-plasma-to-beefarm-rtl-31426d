// arbiter: system bus arbiter of the BeeFarm multiprocessor.
//
// Serves the bus requests of all cores in round-robin order, one transaction
// at a time, and routes each one by physical address to the boot ROM, the
// memory-mapped I/O or the FIFOs of the DDR2 memory controller. A write to
// DDR completes as soon as the controller's command FIFO accepts it, and in
// that same cycle it is broadcast on the snoop lines so that every other
// cache invalidates its copy: writes are therefore seen by all cores in the
// single order in which the arbiter issues them. A read waits for the line
// to come back from the read-data FIFO (reads are blocking). Boot ROM reads
// take one cycle, I/O accesses complete in the cycle they are issued.
//
// Timing: a request is picked in the cycle after it appears; bus_ack is a
// one-cycle pulse to the served core, with bus_rdata valid in that cycle.
// DDR interface: a command (ddr_cmd_*) carries a 16-byte-aligned address and,
// for writes, the data and byte mask of the whole line; read data returns in
// order on ddr_rd_valid/ddr_rd_data. The round-robin policy and the FIFO
// boundary follow the description of the system; the rest is this design's.
module arbiter
  import beefarm_pkg::*;
#(
  parameter int unsigned NCORES = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  // cores
  input  bus_req_t              req   [NCORES],
  output logic [NCORES-1:0]     ack,
  output logic [127:0]          rdata,
  output snoop_t                snoop,
  // boot ROM (one-cycle read)
  output logic                  boot_en,
  output logic [31:0]           boot_addr,
  input  logic [127:0]          boot_rdata,
  // memory-mapped I/O (combinational read)
  output logic                  io_en,
  output logic                  io_we,
  output logic [15:0]           io_addr,
  output logic [31:0]           io_wdata,
  output logic [3:0]            io_be,
  input  logic [31:0]           io_rdata,
  // DDR2 controller FIFOs
  output logic                  ddr_cmd_valid,
  input  logic                  ddr_cmd_ready,
  output logic                  ddr_cmd_we,
  output logic [31:0]           ddr_cmd_addr,
  output logic [127:0]          ddr_cmd_wdata,
  output logic [15:0]           ddr_cmd_wmask,
  input  logic                  ddr_rd_valid,
  input  logic [127:0]          ddr_rd_data
);
  localparam int unsigned SELW = (NCORES > 1) ? $clog2(NCORES) : 1;

  typedef enum logic [1:0] { A_IDLE, A_SERVE, A_BOOT, A_DDR_RD } state_e;
  state_e state;

  bus_req_t         cur;
  logic [SELW-1:0]  sel, last;
  logic             found;
  logic [SELW-1:0]  pick;
  logic             is_boot, is_io;

  // round-robin choice: first valid request after the last one served
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 1; k <= NCORES; k++) begin
      int unsigned c;
      c = (int'(last) + k) % NCORES;
      if (!found && req[c].valid) begin
        found = 1'b1;
        pick  = SELW'(c);
      end
    end
  end

  assign is_boot = ((cur.addr & BOOT_MASK) == BOOT_BASE);
  assign is_io   = ((cur.addr & IO_MASK) == IO_BASE);

  assign boot_addr     = cur.addr;
  assign io_addr       = cur.addr[15:0];
  assign io_we         = cur.we;
  assign io_wdata      = cur.wdata;
  assign io_be         = cur.be;
  assign ddr_cmd_we    = cur.we;
  assign ddr_cmd_addr  = {cur.addr[31:4], 4'b0};
  assign ddr_cmd_wdata = {4{cur.wdata}};
  assign ddr_cmd_wmask = 16'(cur.be) << (4 * cur.addr[3:2]);

  always_comb begin
    ack           = '0;
    rdata         = {4{io_rdata}};
    snoop         = '0;
    snoop.addr    = cur.addr;
    snoop.src     = 8'(sel);
    boot_en       = 1'b0;
    io_en         = 1'b0;
    ddr_cmd_valid = 1'b0;
    unique case (state)
      A_SERVE: begin
        if (!req[sel].valid) begin
          // request withdrawn (an SC whose link broke): nothing is issued
        end else if (is_boot) begin
          boot_en  = !cur.we;
          ack[sel] = cur.we;         // the boot ROM ignores writes
        end else if (is_io) begin
          io_en    = 1'b1;
          ack[sel] = 1'b1;
        end else begin
          ddr_cmd_valid = 1'b1;
          if (ddr_cmd_ready && cur.we) begin
            ack[sel]    = 1'b1;
            snoop.valid = 1'b1;
          end
        end
      end
      A_BOOT: begin
        ack[sel] = 1'b1;
        rdata    = boot_rdata;
      end
      A_DDR_RD: begin
        ack[sel] = ddr_rd_valid;
        rdata    = ddr_rd_data;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE;
      cur   <= '0;
      sel   <= '0;
      last  <= SELW'(NCORES - 1);
    end else begin
      unique case (state)
        A_IDLE: begin
          if (found) begin
            cur   <= req[pick];
            sel   <= pick;
            last  <= pick;
            state <= A_SERVE;
          end
        end
        A_SERVE: begin
          if (!req[sel].valid) state <= A_IDLE;
          else if (is_boot)  state <= cur.we ? A_IDLE : A_BOOT;
          else if (is_io)    state <= A_IDLE;
          else if (ddr_cmd_ready) state <= cur.we ? A_IDLE : A_DDR_RD;
        end
        A_BOOT:   state <= A_IDLE;
        A_DDR_RD: if (ddr_rd_valid) state <= A_IDLE;
        default:  state <= A_IDLE;
      endcase
    end
  end

  // bus rule: an acknowledge only goes to a core whose request is up
  always_ff @(posedge clk) begin
    if (!rst)
      for (int i = 0; i < NCORES; i++)
        assert (!ack[i] || req[i].valid) else $error("bus ack to idle core %0d", i);
  end
endmodule
