// mult: iterative multiply/divide unit with the HI and LO registers.
//
// Like the original Plasma unit it iterates one bit per cycle: a MULT/MULTU
// or DIV/DIVU takes 32 cycles after `start`, during which `busy` is high and
// the core stalls any MFHI/MFLO. Multiplication is shift-and-add on the
// magnitudes, division is restoring division on the magnitudes; signs are
// applied at the end (quotient negative when the operand signs differ,
// remainder takes the sign of the dividend, as MIPS defines). A division by
// zero leaves a quotient magnitude of all ones and the dividend as remainder, a choice of this
// design (MIPS leaves it undefined). MTHI/MTLO write the registers directly.
module mult
  import beefarm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  md_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [5:0]  count;
  logic        is_div, neg_q, neg_r;
  logic [31:0] mcand;          // multiplicand or divisor magnitude
  logic [63:0] acc;            // product, or {remainder, quotient}
  logic [33:0] trial;

  function automatic logic [31:0] mag(input logic [31:0] v, input logic sgn);
    return (sgn && v[31]) ? 32'(-v) : v;
  endfunction

  assign busy  = (count != 0);
  assign trial = {1'b0, acc[63:31]} - {2'b0, mcand};

  always_ff @(posedge clk) begin
    if (rst) begin
      count  <= '0;
      hi     <= '0;
      lo     <= '0;
      acc    <= '0;
      mcand  <= '0;
      is_div <= 1'b0;
      neg_q  <= 1'b0;
      neg_r  <= 1'b0;
    end else if (start && !busy) begin
      unique case (op)
        MD_MTHI: hi <= a;
        MD_MTLO: lo <= a;
        MD_MULT, MD_MULTU, MD_DIV, MD_DIVU: begin
          logic sgn;
          sgn    = (op == MD_MULT) || (op == MD_DIV);
          is_div <= (op == MD_DIV) || (op == MD_DIVU);
          neg_q  <= sgn && (a[31] ^ b[31]);
          neg_r  <= sgn && a[31];
          mcand  <= mag(b, sgn);
          acc    <= {32'b0, mag(a, sgn)};
          count  <= 6'd32;
        end
        default: ;
      endcase
    end else if (busy) begin
      if (is_div) begin
        // restoring division: shift {rem,quot} left, try to subtract
        if (!trial[33]) acc <= {trial[31:0], acc[30:0], 1'b1};
        else            acc <= {acc[62:0], 1'b0};
      end else begin
        // shift-and-add on the low bit of the multiplier
        logic [32:0] sum;
        sum = {1'b0, acc[63:32]} + (acc[0] ? {1'b0, mcand} : 33'b0);
        acc <= {sum, acc[31:1]};
      end
      count <= count - 6'd1;
      if (count == 6'd1) begin
        // result is written on the last step from the value being produced
        if (is_div) begin
          logic [31:0] q, r;
          if (!trial[33]) begin q = {acc[30:0], 1'b1}; r = trial[31:0]; end
          else            begin q = {acc[30:0], 1'b0}; r = acc[62:31]; end
          lo <= neg_q ? 32'(-q) : q;
          hi <= neg_r ? 32'(-r) : r;
        end else begin
          logic [32:0] sum2;
          logic [63:0] p;
          sum2 = {1'b0, acc[63:32]} + (acc[0] ? {1'b0, mcand} : 33'b0);
          p    = {sum2, acc[31:1]};
          if (neg_q) p = 64'(-p);
          hi <= p[63:32];
          lo <= p[31:0];
        end
      end
    end
  end
endmodule
