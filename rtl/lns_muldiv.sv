// lns_muldiv -- saturating LNS multiply, divide and square root with status.
//
// Same log-domain arithmetic as the fast macros (add, subtract or halve the
// 31-bit log, sign by exclusive-or, square root keeps the operand sign) but
// with full status handling: a NaN operand gives NaN; division by zero gives
// NaN (0xC0000000); a zero operand gives zero (0 / y = 0, x * 0 = 0,
// sqrt(0) = 0); a log above the range saturates to the largest magnitude
// with the overflow flag and one below it is flushed to zero with the
// underflow flag.
//
// Timing: fully pipelined, one operation may start every cycle (in_valid)
// and its result appears LATENCY cycles later with out_valid for one cycle.
// LATENCY defaults to the 3 cycles shown for the MUL/DIV/SQRT unit of the
// pipelined ALU. Reset clears the valid bits only.
module lns_muldiv
  import lns_pkg::*;
#(
  parameter int unsigned LATENCY = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  alu_op_t     in_op,
  input  lns_t        in_a,
  input  lns_t        in_b,
  output logic        out_valid,
  output lns_t        out_z,
  output lns_status_t out_st
);

  lns_t               z_c;
  lns_status_t        st_c;
  logic signed [31:0] sum;

  always_comb begin
    unique case (in_op)
      OP_DIV:  sum = 32'(in_a.lg) - 32'(in_b.lg);
      OP_SQRT: sum = (32'(in_a.lg) + 32'sd1) >>> 1;
      default: sum = 32'(in_a.lg) + 32'(in_b.lg);
    endcase
    z_c      = LNS_ZERO;
    st_c     = ST_OK;
    z_c.sign = (in_op == OP_SQRT) ? in_a.sign : (in_a.sign ^ in_b.sign);
    if (is_nan(in_a) || (in_op != OP_SQRT && is_nan(in_b)) ||
        (in_op == OP_DIV && is_zero(in_b))) begin
      z_c      = LNS_NAN;
      st_c.nan = 1'b1;
    end else if (is_zero(in_a) || (in_op == OP_MUL && is_zero(in_b))) begin
      z_c = LNS_ZERO;
    end else if (sum > 32'(LOG_MAX)) begin
      z_c.lg        = LOG_MAX;
      st_c.overflow = 1'b1;
    end else if (sum < 32'(LOG_MIN)) begin
      z_c            = LNS_ZERO;
      st_c.underflow = 1'b1;
    end else begin
      z_c.lg = sum[30:0];
    end
  end

  logic        v_q  [LATENCY];
  lns_t        z_q  [LATENCY];
  lns_status_t st_q [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LATENCY; k++) v_q[k] <= 1'b0;
    end else begin
      v_q[0] <= in_valid;
      for (int k = 1; k < LATENCY; k++) v_q[k] <= v_q[k-1];
    end
  end

  always_ff @(posedge clk) begin
    z_q[0]  <= z_c;
    st_q[0] <= st_c;
    for (int k = 1; k < LATENCY; k++) begin
      z_q[k]  <= z_q[k-1];
      st_q[k] <= st_q[k-1];
    end
  end

  assign out_valid = v_q[LATENCY-1];
  assign out_z     = z_q[LATENCY-1];
  assign out_st    = st_q[LATENCY-1];

endmodule
