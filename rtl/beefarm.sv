// beefarm: the BeeFarm shared-memory multiprocessor.
//
// NCORES Honeycomb cores (8 by default), each with its own coherent
// write-through L1 cache, share one system bus. A round-robin arbiter serves
// the caches one transaction at a time and connects them to the boot ROM, to
// the memory-mapped UART and performance counters, and to the FIFOs of an
// external DDR2 memory controller, whose ports are brought out here. Every
// write the arbiter issues to DDR is broadcast back to all caches, which
// invalidate their copy, so the caches stay coherent and memory is
// sequentially consistent (one address bus, blocking reads). Everything runs
// in a single clock domain; the controller side of the FIFOs (125 MHz on the
// original board, four times the 25-31.25 MHz of the cores and bus) is
// outside this module.
//
// Address map (physical): 0x0000_0000-0x0000_1FFF each core's own cache
// array; 0x1F00_0000 UART; 0x1F00_1000 performance counters; 0x1FC0_0000
// boot ROM; the rest DDR2.
module beefarm
  import beefarm_pkg::*;
#(
  parameter int unsigned NCORES       = 8,
  parameter int unsigned CACHE_BYTES  = 8192,
  parameter int unsigned BOOT_LINES   = 256,
  parameter logic [31:0] ENTRY        = 32'h8000_4000,
  parameter string       BOOT_FILE    = "",
  parameter int unsigned CLKS_PER_BIT = 217
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [NCORES-1:0]     irq,
  // UART
  output logic                  uart_tx,
  input  logic                  uart_rx,
  // DDR2 controller FIFOs
  output logic                  ddr_cmd_valid,
  input  logic                  ddr_cmd_ready,
  output logic                  ddr_cmd_we,
  output logic [31:0]           ddr_cmd_addr,
  output logic [127:0]          ddr_cmd_wdata,
  output logic [15:0]           ddr_cmd_wmask,
  input  logic                  ddr_rd_valid,
  input  logic [127:0]          ddr_rd_data,
  // status
  output logic [NCORES-1:0]     retire,
  output logic [NCORES-1:0]     exception,
  output logic [NCORES-1:0]     l1_hit,      // per-cache event pulses
  output logic [NCORES-1:0]     l1_miss,
  output logic [NCORES-1:0]     l1_inval
);
  bus_req_t            req [NCORES];
  logic [NCORES-1:0]   ack;
  logic [127:0]        bus_rdata;
  snoop_t              snoop;

  for (genvar i = 0; i < NCORES; i++) begin : g_core
    logic        c_req, c_we, c_uncached, c_ll, c_sc, c_clr_link;
    logic        c_done, c_sc_ok;
    logic [3:0]  c_be;
    logic [31:0] c_addr, c_wdata, c_rdata, pc;

    honeycomb #(.CORE_ID(8'(i))) u_cpu (
      .clk, .rst, .irq(irq[i]),
      .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_uncached, .c_ll, .c_sc,
      .c_clr_link, .c_done, .c_rdata, .c_sc_ok,
      .pc_out(pc), .retire(retire[i]), .exception(exception[i])
    );

    l1_cache #(.SIZE_BYTES(CACHE_BYTES), .CORE_ID(8'(i))) u_l1 (
      .clk, .rst,
      .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_uncached, .c_ll, .c_sc,
      .c_clr_link, .c_done, .c_rdata, .c_sc_ok,
      .bus_req(req[i]), .bus_ack(ack[i]), .bus_rdata, .snoop,
      .ev_hit(l1_hit[i]), .ev_miss(l1_miss[i]), .ev_inval(l1_inval[i])
    );
  end

  logic          boot_en, io_en, io_we;
  logic [31:0]   boot_addr, io_wdata, io_rdata;
  logic [127:0]  boot_rdata;
  logic [15:0]   io_addr;
  logic [3:0]    io_be;

  arbiter #(.NCORES(NCORES)) u_arbiter (
    .clk, .rst,
    .req, .ack, .rdata(bus_rdata), .snoop,
    .boot_en, .boot_addr, .boot_rdata,
    .io_en, .io_we, .io_addr, .io_wdata, .io_be, .io_rdata,
    .ddr_cmd_valid, .ddr_cmd_ready, .ddr_cmd_we, .ddr_cmd_addr,
    .ddr_cmd_wdata, .ddr_cmd_wmask, .ddr_rd_valid, .ddr_rd_data
  );

  bootmem #(.LINES(BOOT_LINES), .ENTRY(ENTRY), .INIT_FILE(BOOT_FILE)) u_bootmem (
    .clk, .en(boot_en), .addr(boot_addr), .rdata(boot_rdata)
  );

  // I/O region: UART at offset 0x0000, performance counters at 0x1000.
  logic        uart_en, perf_en;
  logic [31:0] uart_rdata, perf_rdata;
  assign uart_en  = io_en && (io_addr[15:12] == 4'h0);
  assign perf_en  = io_en && (io_addr[15:12] == 4'h1);
  assign io_rdata = (io_addr[15:12] == 4'h1) ? perf_rdata : uart_rdata;

  uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk, .rst, .en(uart_en), .we(io_we), .addr(io_addr), .wdata(io_wdata),
    .rdata(uart_rdata), .tx(uart_tx), .rx(uart_rx)
  );

  perf_counters #(.NCORES(NCORES)) u_perf (
    .clk, .rst, .en(perf_en), .we(io_we), .addr(io_addr[11:0]), .rdata(perf_rdata),
    .ev_retire(retire), .ev_hit(l1_hit), .ev_miss(l1_miss), .ev_inval(l1_inval)
  );
endmodule
