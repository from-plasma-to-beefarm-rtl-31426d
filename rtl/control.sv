// control: instruction decoder of the Honeycomb core.
//
// Turns a 32-bit MIPS instruction into the control word (beefarm_pkg::ctrl_t)
// that steers the bus multiplexer, ALU, shifter, multiply/divide unit, memory
// control and coprocessor 0. Combinational. It covers the MIPS I integer
// instruction set except the unaligned LWL/LWR/SWL/SWR, plus the three
// instructions added from the R4000: ERET, LL and SC; the TLB instructions
// TLBR/TLBWI/TLBWR/TLBP. Anything (RFE included, which ERET replaces)
// else, including coprocessor 1 operations, decodes as a reserved
// instruction. The field layout of the control word is this design's own.
module control
  import beefarm_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [5:0] opcode, funct;
  logic [4:0] rs, rt;

  assign opcode = instr[31:26];
  assign funct  = instr[5:0];
  assign rs     = instr[25:21];
  assign rt     = instr[20:16];

  always_comb begin
    ctrl            = '0;
    ctrl.alu_op     = ALU_ADD;
    ctrl.b_sel      = B_RT;
    ctrl.shift_op   = SH_SLL;
    ctrl.res_sel    = RES_ALU;
    ctrl.dst_sel    = DST_NONE;
    ctrl.branch     = BR_NONE;
    ctrl.mem_op     = MEM_NONE;
    ctrl.mem_size   = SZ_W;
    ctrl.md_op      = MD_NONE;
    ctrl.cp0_op     = C0_NONE;
    ctrl.exc        = X_NONE;

    unique case (opcode)
      6'h00: begin // SPECIAL
        ctrl.dst_sel = DST_RD;
        unique case (funct)
          6'h00: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SLL; end
          6'h02: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SRL; end
          6'h03: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SRA; end
          6'h04: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SLL; ctrl.shift_var = 1'b1; end
          6'h06: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SRL; ctrl.shift_var = 1'b1; end
          6'h07: begin ctrl.res_sel = RES_SHIFT; ctrl.shift_op = SH_SRA; ctrl.shift_var = 1'b1; end
          6'h08: begin ctrl.branch = BR_JR; ctrl.dst_sel = DST_NONE; end
          6'h09: begin ctrl.branch = BR_JR; ctrl.res_sel = RES_LINK; end
          6'h0C: begin ctrl.exc = X_SYSCALL; ctrl.dst_sel = DST_NONE; end
          6'h0D: begin ctrl.exc = X_BREAK;   ctrl.dst_sel = DST_NONE; end
          6'h10: ctrl.res_sel = RES_HI;
          6'h11: begin ctrl.md_op = MD_MTHI; ctrl.dst_sel = DST_NONE; end
          6'h12: ctrl.res_sel = RES_LO;
          6'h13: begin ctrl.md_op = MD_MTLO; ctrl.dst_sel = DST_NONE; end
          6'h18: begin ctrl.md_op = MD_MULT;  ctrl.dst_sel = DST_NONE; end
          6'h19: begin ctrl.md_op = MD_MULTU; ctrl.dst_sel = DST_NONE; end
          6'h1A: begin ctrl.md_op = MD_DIV;   ctrl.dst_sel = DST_NONE; end
          6'h1B: begin ctrl.md_op = MD_DIVU;  ctrl.dst_sel = DST_NONE; end
          6'h20, 6'h21: ctrl.alu_op = ALU_ADD;
          6'h22, 6'h23: ctrl.alu_op = ALU_SUB;
          6'h24: ctrl.alu_op = ALU_AND;
          6'h25: ctrl.alu_op = ALU_OR;
          6'h26: ctrl.alu_op = ALU_XOR;
          6'h27: ctrl.alu_op = ALU_NOR;
          6'h2A: ctrl.alu_op = ALU_SLT;
          6'h2B: ctrl.alu_op = ALU_SLTU;
          default: begin ctrl.exc = X_RESERVED; ctrl.dst_sel = DST_NONE; end
        endcase
      end
      6'h01: begin // REGIMM
        ctrl.branch = rt[0] ? BR_GEZ : BR_LTZ;
        if (rt[4]) begin ctrl.dst_sel = DST_R31; ctrl.res_sel = RES_LINK; end
        if (rt[3:1] != 3'b000) begin ctrl.exc = X_RESERVED; ctrl.branch = BR_NONE; ctrl.dst_sel = DST_NONE; end
      end
      6'h02: ctrl.branch = BR_J;
      6'h03: begin ctrl.branch = BR_J; ctrl.dst_sel = DST_R31; ctrl.res_sel = RES_LINK; end
      6'h04: ctrl.branch = BR_EQ;
      6'h05: ctrl.branch = BR_NE;
      6'h06: ctrl.branch = BR_LEZ;
      6'h07: ctrl.branch = BR_GTZ;
      6'h08, 6'h09: begin ctrl.alu_op = ALU_ADD;  ctrl.b_sel = B_IMM_SE; ctrl.dst_sel = DST_RT; end
      6'h0A: begin ctrl.alu_op = ALU_SLT;  ctrl.b_sel = B_IMM_SE; ctrl.dst_sel = DST_RT; end
      6'h0B: begin ctrl.alu_op = ALU_SLTU; ctrl.b_sel = B_IMM_SE; ctrl.dst_sel = DST_RT; end
      6'h0C: begin ctrl.alu_op = ALU_AND;  ctrl.b_sel = B_IMM_ZE; ctrl.dst_sel = DST_RT; end
      6'h0D: begin ctrl.alu_op = ALU_OR;   ctrl.b_sel = B_IMM_ZE; ctrl.dst_sel = DST_RT; end
      6'h0E: begin ctrl.alu_op = ALU_XOR;  ctrl.b_sel = B_IMM_ZE; ctrl.dst_sel = DST_RT; end
      6'h0F: begin ctrl.alu_op = ALU_PASSB; ctrl.b_sel = B_IMM_LUI; ctrl.dst_sel = DST_RT; end
      6'h10: begin // COP0
        if (rs == 5'h00) begin ctrl.cp0_op = C0_MFC0; ctrl.res_sel = RES_CP0; ctrl.dst_sel = DST_RT; end
        else if (rs == 5'h04) ctrl.cp0_op = C0_MTC0;
        else if (rs[4]) begin
          unique case (funct)
            6'h01: ctrl.cp0_op = C0_TLBR;
            6'h02: ctrl.cp0_op = C0_TLBWI;
            6'h06: ctrl.cp0_op = C0_TLBWR;
            6'h08: ctrl.cp0_op = C0_TLBP;
            6'h18: ctrl.cp0_op = C0_ERET;
            default: ctrl.exc = X_RESERVED;
          endcase
        end else ctrl.exc = X_RESERVED;
      end
      6'h20: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_B; ctrl.mem_signed = 1'b1; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h21: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_H; ctrl.mem_signed = 1'b1; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h23: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_W; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h24: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_B; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h25: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_H; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h28: begin ctrl.mem_op = MEM_STORE; ctrl.mem_size = SZ_B; end
      6'h29: begin ctrl.mem_op = MEM_STORE; ctrl.mem_size = SZ_H; end
      6'h2B: begin ctrl.mem_op = MEM_STORE; ctrl.mem_size = SZ_W; end
      6'h30: begin ctrl.mem_op = MEM_LOAD; ctrl.mem_size = SZ_W; ctrl.ll = 1'b1; ctrl.res_sel = RES_MEM; ctrl.dst_sel = DST_RT; end
      6'h38: begin ctrl.mem_op = MEM_STORE; ctrl.mem_size = SZ_W; ctrl.sc = 1'b1; ctrl.res_sel = RES_SC; ctrl.dst_sel = DST_RT; end
      default: ctrl.exc = X_RESERVED;
    endcase
  end
endmodule
