// honeycomb: the Honeycomb CPU core, a MIPS R3000-compatible processor.
//
// The core is built from the units of the Plasma design: pc_next, mem_ctrl,
// control, reg_bank, bus_mux, alu, shifter and mult, plus coprocessor 0
// (cp0, holding the TLB) for virtual memory, precise exceptions and the
// user/kernel modes. An instruction passes through a fetch stage (the PC goes
// to the memory control unit, the opcode comes back), an execute stage
// (decode into the control word, register read, ALU/shift/branch, register
// write) and, for loads and stores only, a data-access stage. Every memory
// access pauses the core until the L1 cache answers, which takes longer on a
// miss. The fetch of the next instruction overlaps the execute cycle of the
// current one when that instruction needs no data access, no CP0 operation
// and no exception or interrupt can intervene; otherwise the stages run one
// after the other. The register write and the next register read never
// overlap, so there are no data hazards. With 2-cycle cache hits an ALU
// instruction takes 2 cycles, a load or store 5. Branches keep MIPS
// delay-slot semantics: the delay-slot instruction is the one prefetched.
// MULT/DIV run for 32 cycles in the background; MFHI/MFLO wait for them.
// ERET, LL and SC are supported; LL/SC atomicity is kept by the link
// register in the L1 cache, which an exception or ERET clears.
//
// Cache port: c_req and the request fields are held until c_done is high for
// one cycle; c_rdata and c_sc_ok are valid in that cycle.
module honeycomb
  import beefarm_pkg::*;
#(
  parameter logic [7:0]  CORE_ID  = 8'd0,
  parameter logic [31:0] RESET_PC = RESET_VECTOR
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        irq,
  // L1 cache port
  output logic        c_req,
  output logic        c_we,
  output logic [3:0]  c_be,
  output logic [31:0] c_addr,
  output logic [31:0] c_wdata,
  output logic        c_uncached,
  output logic        c_ll,
  output logic        c_sc,
  output logic        c_clr_link,
  input  logic        c_done,
  input  logic [31:0] c_rdata,
  input  logic        c_sc_ok,
  // status
  output logic [31:0] pc_out,
  output logic        retire,
  output logic        exception
);
  typedef enum logic [1:0] { S_FETCH, S_EXEC, S_MEM } state_e;
  state_e state;

  logic [31:0] ir;
  ctrl_t       ctrl;

  // datapath nets
  logic [31:0] pc, rs_val, rt_val, alu_b, alu_y, shift_y, hi, lo;
  logic [31:0] wb_data, target, daddr, cp0_rdata;
  logic [4:0]  shamt, wb_addr;
  logic        wb_en, is_branch, taken, in_ds;
  logic        md_busy, md_start;

  // memory control nets
  logic        m_req, m_fetch, m_done, m_misaligned, m_vstore, m_sc_ok;
  logic [31:0] m_vaddr, m_rdata, paddr;
  logic        uncached, x_fault, x_refill;
  exc_code_e   x_code;

  // exception / redirect
  logic        step, redirect, exc_take, exc_addr_valid, exc_refill;
  exc_code_e   exc_code;
  logic [31:0] redirect_pc, exc_vector, epc;
  logic        irq_pending, reg_we, cp0_en, eret;
  logic        take_int;     // interrupt sampled when the previous instruction ended
  logic        prefetch;     // fetch of the next instruction starts during execute
  logic        exec_retire;  // the instruction in execute retires this cycle
  logic        md_wait;
  logic [31:0] npc, fetch_pc;

  control u_control (.instr(ir), .ctrl);

  reg_bank #(.NREGS(32)) u_reg_bank (
    .clk, .rst,
    .ra_addr(ir[25:21]), .ra_data(rs_val),
    .rb_addr(ir[20:16]), .rb_data(rt_val),
    .we(reg_we), .w_addr(wb_addr), .w_data(wb_data)
  );

  bus_mux u_bus_mux (
    .ctrl, .instr(ir), .pc, .rs_val, .rt_val, .alu_y, .shift_y, .hi, .lo,
    .mem_data(m_rdata), .cp0_data(cp0_rdata), .sc_ok(m_sc_ok),
    .alu_b, .shamt, .wb_data, .wb_addr, .wb_en, .is_branch, .taken, .target
  );

  alu u_alu (.op(ctrl.alu_op), .a(rs_val), .b(alu_b), .y(alu_y));

  shifter u_shifter (.op(ctrl.shift_op), .value(rt_val), .shamt, .y(shift_y));

  mult u_mult (
    .clk, .rst, .start(md_start), .op(ctrl.md_op), .a(rs_val), .b(rt_val),
    .busy(md_busy), .hi, .lo
  );

  pc_next #(.RESET_PC(RESET_PC)) u_pc_next (
    .clk, .rst, .step, .is_branch, .taken, .target,
    .redirect, .redirect_pc, .pc, .in_delay_slot(in_ds), .npc
  );

  assign daddr   = rs_val + {{16{ir[15]}}, ir[15:0]};
  // The next fetch overlaps the execute cycle of an instruction that retires
  // there, cannot redirect and cannot change translation (no CP0 operation),
  // with no interrupt about to be taken. Its address is npc, which becomes
  // pc in the next cycle, so the fetch stage then holds the same request.
  // exec_retire repeats the execute-stage retire condition of the
  // sequencing logic below from decode and multiplier state only.
  assign exec_retire = (state == S_EXEC) && (ctrl.exc == X_NONE) && !md_wait
                       && (ctrl.mem_op == MEM_NONE);
  assign prefetch    = exec_retire && (ctrl.cp0_op == C0_NONE) && !irq_pending;
  assign fetch_pc = prefetch ? npc : pc;
  assign m_fetch  = (state == S_FETCH) || prefetch;
  assign m_req    = (state == S_MEM) || (state == S_FETCH && !take_int) || prefetch;

  mem_ctrl u_mem_ctrl (
    .req(m_req), .is_fetch(m_fetch), .pc(fetch_pc), .daddr,
    .mem_op(ctrl.mem_op), .size(ctrl.mem_size), .sign_ext(ctrl.mem_signed),
    .ll(ctrl.ll), .sc(ctrl.sc), .store_data(rt_val),
    .vaddr(m_vaddr), .vstore(m_vstore), .misaligned(m_misaligned),
    .done(m_done), .rdata(m_rdata), .sc_ok(m_sc_ok),
    .paddr, .uncached, .xlate_fault(x_fault),
    .c_req, .c_we, .c_be, .c_addr, .c_wdata, .c_uncached, .c_ll, .c_sc,
    .c_done, .c_rdata, .c_sc_ok
  );

  cp0 #(.CORE_ID(CORE_ID)) u_cp0 (
    .clk, .rst,
    .vaddr(m_vaddr), .vstore(m_vstore), .paddr, .uncached,
    .fault(x_fault), .fault_code(x_code), .fault_refill(x_refill),
    .op(ctrl.cp0_op), .op_en(cp0_en), .reg_sel(ir[15:11]), .wdata(rt_val),
    .rdata(cp0_rdata),
    .exc_take, .exc_code, .exc_bd(in_ds), .exc_epc(in_ds ? pc - 32'd4 : pc),
    .exc_addr_valid, .exc_addr(m_vaddr), .exc_refill,
    .exc_vector, .epc_out(epc),
    .irq, .irq_pending
  );

  // ------------------------------------------------------ sequencing logic
  logic mem_fault;
  assign md_wait   = ((ctrl.md_op != MD_NONE) || ctrl.res_sel inside {RES_HI, RES_LO}) && md_busy;
  assign mem_fault = m_misaligned || x_fault;

  always_comb begin
    step           = 1'b0;
    reg_we         = 1'b0;
    exc_take       = 1'b0;
    exc_code       = EXC_INT;
    exc_addr_valid = 1'b0;
    exc_refill     = 1'b0;
    eret           = 1'b0;
    cp0_en         = 1'b0;
    md_start       = 1'b0;
    unique case (state)
      S_FETCH: begin
        if (take_int) begin
          exc_take = 1'b1;
          exc_code = EXC_INT;
        end else if (mem_fault) begin
          exc_take       = 1'b1;
          exc_code       = m_misaligned ? EXC_ADEL : x_code;
          exc_refill     = !m_misaligned && x_refill;
          exc_addr_valid = 1'b1;
        end
      end
      S_EXEC: begin
        if (ctrl.exc != X_NONE) begin
          exc_take = 1'b1;
          unique case (ctrl.exc)
            X_SYSCALL: exc_code = EXC_SYS;
            X_BREAK:   exc_code = EXC_BP;
            default:   exc_code = EXC_RI;
          endcase
        end else if (exec_retire) begin
          cp0_en   = (ctrl.cp0_op != C0_NONE);
          md_start = (ctrl.md_op != MD_NONE);
          eret     = (ctrl.cp0_op == C0_ERET);
          reg_we   = wb_en;
          step     = 1'b1;
        end
      end
      S_MEM: begin
        if (mem_fault) begin
          exc_take       = 1'b1;
          exc_code       = m_misaligned ? (m_vstore ? EXC_ADES : EXC_ADEL) : x_code;
          exc_refill     = !m_misaligned && x_refill;
          exc_addr_valid = 1'b1;
        end else if (m_done) begin
          reg_we = wb_en;
          step   = 1'b1;
        end
      end
      default: ;
    endcase
  end

  assign redirect    = exc_take || eret;
  assign redirect_pc = exc_take ? exc_vector : epc;
  assign c_clr_link  = redirect;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_FETCH;
      ir       <= '0;
      take_int <= 1'b0;
    end else begin
      if (state != S_FETCH) take_int <= irq_pending;
      else if (exc_take)    take_int <= 1'b0;
      unique case (state)
        S_FETCH: begin
          if (!exc_take && m_done) begin
            ir    <= m_rdata;
            state <= S_EXEC;
          end
        end
        S_EXEC: begin
          if (exc_take || step) state <= S_FETCH;
          else if (!md_wait && ctrl.mem_op != MEM_NONE) state <= S_MEM;
        end
        S_MEM: begin
          if (exc_take || step) state <= S_FETCH;
        end
        default: state <= S_FETCH;
      endcase
    end
  end

  assign pc_out    = pc;
  assign retire    = step;
  assign exception = exc_take;
endmodule
