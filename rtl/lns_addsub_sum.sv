// lns_addsub_sum -- final summation, rounding and saturation of LNS add/subtract.
//
// Adds the larger log i (extended to the 35-bit internal word, 3 extra
// fraction bits), the table value F and the two products with two
// carry-save adders and one carry-propagate adder, as in the published
// datapath, then rounds the 3 extra bits away (round half up) and checks
// the range: above the largest log the result saturates with the overflow
// flag, below the smallest it is flushed to the zero code with the
// underflow flag. A bypass result from the select step is passed through.
//
// Purely combinational (one multi-cycle stage in the ALUs).
module lns_addsub_sum
  import lns_pkg::*;
(
  input  addsub_front_t       f,
  input  logic [31:0]         f_tab,   // F table word, 2^-26 units
  input  logic signed [39:0]  d_term,
  input  logic signed [39:0]  e_term,
  output lns_t                z,
  output lns_status_t         st
);

  localparam int unsigned W = 40;

  logic [W-1:0] i_ext, f_ext;
  logic [W-1:0] s1, c1, s2, c2;
  logic signed [W-1:0] total;
  logic signed [W-1:0] rounded;

  assign i_ext = W'(signed'(f.i)) << EXT_BITS;
  assign f_ext = W'(signed'(f_tab));

  lns_csa #(.W(W)) u_csa_tab (.x(f_ext), .y(d_term), .z(e_term), .s(s1), .c(c1));
  lns_csa #(.W(W)) u_csa_i   (.x(s1),    .y(c1),     .z(i_ext),  .s(s2), .c(c2));

  always_comb begin
    total   = signed'(s2 + c2);
    rounded = (total + W'(1 << (EXT_BITS - 1))) >>> EXT_BITS;
    st      = ST_OK;
    z.sign  = f.sign;
    z.lg    = rounded[30:0];
    if (f.bypass) begin
      z  = f.bypass_z;
      st = f.bypass_st;
    end else if (rounded > W'(LOG_MAX)) begin
      z.lg        = LOG_MAX;
      st.overflow = 1'b1;
    end else if (rounded < W'(LOG_MIN)) begin
      z            = LNS_ZERO;
      st.underflow = 1'b1;
    end
  end

endmodule
