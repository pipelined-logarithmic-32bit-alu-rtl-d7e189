// lns_fast_ops -- fast regular LNS multiply, divide and square root.
//
// In the log domain these are plain integer operations on the 31-bit log
// field: multiply adds the logs, divide subtracts them and square root
// halves the log with rounding, (L + 1) >>> 1. The product and quotient
// take the exclusive-or of the operand signs; the square root keeps the
// sign of its operand, as the published operation table states. There is no
// range or special-code handling: results wrap, which is what makes these
// macros small enough to replicate freely next to the add/subtract unit.
//
// Purely combinational; the caller's register closes the single cycle.
// b is ignored for OP_SQRT; OP_ADD and OP_SUB are not handled and give a.
module lns_fast_ops
  import lns_pkg::*;
(
  input  alu_op_t op,
  input  lns_t    a,
  input  lns_t    b,
  output lns_t    z
);

  logic signed [30:0] sq;

  always_comb begin
    sq = (a.lg + 31'sd1) >>> 1;
    unique case (op)
      OP_MUL:  z = '{sign: a.sign ^ b.sign, lg: a.lg + b.lg};
      OP_DIV:  z = '{sign: a.sign ^ b.sign, lg: a.lg - b.lg};
      OP_SQRT: z = '{sign: a.sign,          lg: sq};
      default: z = a;
    endcase
  end

endmodule
