// reg_bank: the 32 x 32-bit integer register file of the Honeycomb core.
//
// A distributed (LUT) RAM gives one write port and one independent read port,
// so two reads and one write to distinct registers per cycle are obtained by
// duplicating the file: both copies take every write, copy A serves read
// port A (rs) and copy B serves read port B (rt). This is the third of the
// three options the design discussion lists, the one the core uses.
// Reads are asynchronous; a write lands at the rising clock edge. Register 0
// always reads as zero. Contents are cleared at reset so that simulation
// starts from known values (an FPGA LUTRAM would start from its bitstream).
module reg_bank #(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] ra_addr,
  output logic [31:0]              ra_data,
  input  logic [$clog2(NREGS)-1:0] rb_addr,
  output logic [31:0]              rb_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] w_addr,
  input  logic [31:0]              w_data
);
  logic [31:0] copy_a [NREGS];
  logic [31:0] copy_b [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) begin
        copy_a[i] <= '0;
        copy_b[i] <= '0;
      end
    end else if (we && w_addr != '0) begin
      copy_a[w_addr] <= w_data;
      copy_b[w_addr] <= w_data;
    end
  end

  assign ra_data = (ra_addr == '0) ? '0 : copy_a[ra_addr];
  assign rb_data = (rb_addr == '0) ? '0 : copy_b[rb_addr];
endmodule
