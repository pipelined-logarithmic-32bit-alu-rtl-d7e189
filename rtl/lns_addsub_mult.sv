// lns_addsub_mult -- the two table multipliers of LNS add/subtract.
//
// The linear term multiplies the slope D of the current interval (signed,
// scaled by 2^24) by the offset lo inside the interval (in units of 2^-23)
// and returns it in the internal 2^-26 units. The correction term multiplies
// the error amplitude E of the interval (signed, 2^-26 units) by the error
// shape P at the offset (unsigned, scaled by 2^32). Both products are
// truncated towards minus infinity. The scalings are this design's choice;
// the two products themselves are the two multipliers of the datapath.
//
// Purely combinational (one multi-cycle stage in the ALUs).
module lns_addsub_mult
  import lns_pkg::*;
(
  input  logic [31:0]         d_tab,   // D table word
  input  logic [31:0]         e_tab,   // E table word
  input  logic [31:0]         p_tab,   // P table word
  input  logic [LO_BITS-1:0]  lo,
  output logic signed [39:0]  d_term,  // D * lo, 2^-26 units
  output logic signed [39:0]  e_term   // E * P,  2^-26 units
);

  localparam int unsigned D_SHIFT = D_SCALE + FRAC_BITS - F_SCALE;  // 21

  logic signed [49:0] d_prod;
  logic signed [64:0] e_prod;

  always_comb begin
    d_prod = signed'(d_tab) * signed'({1'b0, lo});
    e_prod = signed'(e_tab) * signed'({1'b0, p_tab});
    d_term = 40'(d_prod >>> D_SHIFT);
    e_term = 40'(e_prod >>> P_SCALE);
  end

endmodule
