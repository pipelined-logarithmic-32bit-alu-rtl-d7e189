// lns_addsub_front -- operand select and subtract step of LNS add/subtract.
//
// Computes the first box of the add/subtract datapath: of the two operands
// it selects the one with the larger log, i, and forms the difference
// r = j - i <= 0 of the logs. The result will be i + f(r), with
// f(r) = log2(1 + 2^r) when the signs agree (effective addition) and
// f(r) = log2(1 - 2^r) when they differ (effective subtraction); the result
// takes the sign of the larger operand. |r| is split into a high part that
// addresses the F, D and E tables and a low part used for interpolation and,
// through its top bits, to address the P table.
//
// Cases that need no table are decided here and flagged as bypass: a NaN
// operand (NaN), a zero operand (the other operand), equal magnitudes under
// effective subtraction (exact zero) and |r| >= 32, where f(r) is below half
// a unit in the last place (the larger operand). The 32 range, the table split
// and the address layout are this design's choice.
//
// Purely combinational. The sign rule, zero and NaN codes follow the format.
module lns_addsub_front
  import lns_pkg::*;
(
  input  lns_t                a,
  input  lns_t                b,
  input  logic                sub,      // 1: a - b, 0: a + b
  output addsub_front_t       f,
  output logic [TAB_AW-1:0]   fde_addr, // F, D and E table address {eff_sub, hi}
  output logic [P_BITS-1:0]   p_addr    // P table address
);

  localparam int unsigned RANGE_BITS = HI_BITS + LO_BITS;  // d below 2^28 uses the tables

  lns_t              b_eff;
  logic              a_ge_b;
  logic signed [31:0] diff;
  logic [31:0]       d;

  always_comb begin
    b_eff      = b;
    b_eff.sign = b.sign ^ sub;

    a_ge_b = a.lg >= b.lg;
    diff   = a_ge_b ? (32'(a.lg) - 32'(b.lg)) : (32'(b.lg) - 32'(a.lg));
    d      = unsigned'(diff);

    f           = '0;
    f.eff_sub   = a.sign ^ b_eff.sign;
    f.sign      = a_ge_b ? a.sign : b_eff.sign;
    f.i         = a_ge_b ? a.lg : b.lg;
    f.hi        = d[RANGE_BITS-1:LO_BITS];
    f.lo        = d[LO_BITS-1:0];
    f.bypass_st = ST_OK;

    if (is_nan(a) || is_nan(b)) begin
      f.bypass        = 1'b1;
      f.bypass_z      = LNS_NAN;
      f.bypass_st.nan = 1'b1;
    end else if (is_zero(a)) begin
      f.bypass   = 1'b1;
      f.bypass_z = is_zero(b) ? LNS_ZERO : b_eff;
    end else if (is_zero(b)) begin
      f.bypass   = 1'b1;
      f.bypass_z = a;
    end else if (f.eff_sub && d == 32'd0) begin
      f.bypass   = 1'b1;
      f.bypass_z = LNS_ZERO;
    end else if (d[31:RANGE_BITS] != '0) begin
      f.bypass   = 1'b1;
      f.bypass_z = {f.sign, f.i};
    end
  end

  assign fde_addr = {f.eff_sub, f.hi};
  assign p_addr   = f.lo[LO_BITS-1 -: P_BITS];

endmodule
