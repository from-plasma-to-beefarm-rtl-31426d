// ddr2_model: behavioural stand-in for the DDR2 memory controller and its
// DIMMs, seen through the controller's FIFOs. Commands are accepted except
// on every fourth cycle (to exercise back-pressure); reads return their
// 16-byte line in order LATENCY cycles after acceptance; writes merge the
// masked bytes into a sparse memory. Lines never written read as a pattern
// derived from their address (see pattern()).
module ddr2_model #(
  parameter int unsigned LATENCY = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  logic          cmd_we,
  input  logic [31:0]   cmd_addr,
  input  logic [127:0]  cmd_wdata,
  input  logic [15:0]   cmd_wmask,
  output logic          rd_valid,
  output logic [127:0]  rd_data
);
  logic [127:0] mem [logic [27:0]];
  int unsigned  cyc;
  int unsigned  due   [$];
  logic [27:0]  raddr [$];
  int           writes = 0, reads = 0, stalls = 0;

  function automatic logic [127:0] pattern(logic [27:0] line);
    for (int w = 0; w < 4; w++) pattern[32*w +: 32] = {line, 2'(w), 2'b00} ^ 32'h5A5A_0000;
  endfunction

  function automatic logic [127:0] read_line(logic [27:0] line);
    return mem.exists(line) ? mem[line] : pattern(line);
  endfunction

  assign cmd_ready = !rst && (cyc % 4 != 3);

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0; rd_valid <= 0; rd_data <= '0;
    end else begin
      cyc <= cyc + 1;
      rd_valid <= 0;
      if (cmd_valid && !cmd_ready) stalls++;
      if (cmd_valid && cmd_ready) begin
        if (cmd_we) begin
          logic [127:0] l;
          l = read_line(cmd_addr[31:4]);
          for (int b = 0; b < 16; b++) if (cmd_wmask[b]) l[8*b +: 8] = cmd_wdata[8*b +: 8];
          mem[cmd_addr[31:4]] = l;
          writes++;
        end else begin
          due.push_back(cyc + LATENCY);
          raddr.push_back(cmd_addr[31:4]);
          reads++;
        end
      end
      if (due.size() > 0 && due[0] <= cyc) begin
        void'(due.pop_front());
        rd_valid <= 1;
        rd_data  <= read_line(raddr.pop_front());
      end
    end
  end
endmodule
