// pc_next: program counter of the Honeycomb core.
//
// Holds the address of the instruction being executed and computes the next
// one when the core retires an instruction (`step`). MIPS branches and jumps
// have a delay slot: when a branch retires the next instruction is always
// pc+4 and the branch target (if taken) is kept pending until the delay-slot
// instruction retires. `in_delay_slot` tells the exception logic that the
// current instruction sits in a delay slot, so EPC must point at the branch.
// An exception or an ERET redirects at once and discards a pending target
// (ERET has no delay slot). The PC starts at the reset vector. `npc` is the
// address that follows the current instruction when it retires without a
// redirect; the core prefetches from it during execute. The pending target
// register is this design's way of realising delay slots.
module pc_next
  import beefarm_pkg::*;
#(
  parameter logic [31:0] RESET_PC = RESET_VECTOR
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        step,          // current instruction retires
  input  logic        is_branch,     // ... and it is a branch or jump
  input  logic        taken,         // ... that is taken
  input  logic [31:0] target,
  input  logic        redirect,      // exception or ERET
  input  logic [31:0] redirect_pc,
  output logic [31:0] pc,
  output logic        in_delay_slot,
  output logic [31:0] npc            // next pc if this instruction retires
);
  logic        pend_valid;
  logic [31:0] pend_target;

  assign npc = (pend_valid && !is_branch) ? pend_target : pc + 32'd4;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc            <= RESET_PC;
      pend_valid    <= 1'b0;
      pend_target   <= '0;
      in_delay_slot <= 1'b0;
    end else if (redirect) begin
      pc            <= redirect_pc;
      pend_valid    <= 1'b0;
      in_delay_slot <= 1'b0;
    end else if (step) begin
      if (is_branch) begin
        pc            <= pc + 32'd4;
        pend_valid    <= taken;
        pend_target   <= target;
        in_delay_slot <= 1'b1;
      end else begin
        pc            <= pend_valid ? pend_target : pc + 32'd4;
        pend_valid    <= 1'b0;
        in_delay_slot <= 1'b0;
      end
    end
  end
endmodule
