// lns_pkg -- shared types and constants of the 32-bit logarithmic (LNS) ALU.
//
// Number format: bit 31 is the sign of the real value (0 positive, 1
// negative); bits 30:0 hold log2(|x|) as a two's complement fixed-point
// number with 23 fraction bits, so x = (-1)^s * 2^(L / 2^23). The range is
// about 2^-128 .. 2^128 (1/3.4e38 .. 3.4e38). The most negative log code is
// reserved: 0x40000000 is zero and 0xC0000000 is NaN (result of a division
// by zero). These codes and the 23-bit fraction (scale 8388608) follow the
// published format; the 3-bit status encoding is this design's choice.
//
// Add/subtract tables: the magnitude d = i - j of the log difference is cut
// into a high part (HI_BITS) that addresses the F, D and E tables and a low
// part (LO_BITS) whose top P_BITS address the P table. F/D/E hold 2 x 2K words
// (addition in the lower half, subtraction in the upper half) and P holds 4K
// words, so each table fills 4K words of its own 32-bit SRAM bank.
package lns_pkg;

  localparam int unsigned FRAC_BITS = 23;          // fraction bits of the log
  localparam int unsigned EXT_BITS  = 3;           // extra internal bits (35-bit internal word)
  localparam int unsigned HI_BITS   = 11;          // F/D/E index bits per function
  localparam int unsigned LO_BITS   = 17;          // low part of d used for interpolation
  localparam int unsigned P_BITS    = 12;          // P table index bits (top of low part)
  localparam int unsigned TAB_AW    = HI_BITS + 1; // F/D/E address: {subtract, hi}
  localparam int unsigned D_SCALE   = 24;          // D table: slope * 2^24
  localparam int unsigned F_SCALE   = FRAC_BITS + EXT_BITS; // F, E tables: value * 2^26
  localparam int unsigned P_SCALE   = 32;          // P table: u*(1-u) * 2^32
  localparam int unsigned SRAM_AW   = 19;          // 512 Kword SRAM banks

  typedef struct packed {
    logic               sign;
    logic signed [30:0] lg;
  } lns_t;

  localparam lns_t LNS_ZERO = 32'h4000_0000;
  localparam lns_t LNS_NAN  = 32'hC000_0000;
  localparam logic signed [30:0] LOG_MAX = 31'sh3FFF_FFFF;  // largest log
  localparam logic signed [30:0] LOG_MIN = 31'sh4000_0001;  // smallest log that is not zero/NaN

  // Status word returned with every saturating operation ("zsl", 3 bits).
  typedef struct packed {
    logic nan;        // NaN result: NaN operand, divide by zero, sqrt of a negative
    logic underflow;  // magnitude below range, flushed to zero
    logic overflow;   // magnitude above range, saturated to the largest value
  } lns_status_t;

  localparam lns_status_t ST_OK = '0;

  // Operation code on the ALU input channel.
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_MUL  = 3'd2,
    OP_DIV  = 3'd3,
    OP_SQRT = 3'd4
  } alu_op_t;

  // Everything the add/subtract datapath carries from the select/subtract
  // step (stage 1) towards the final adder (stage 3).
  typedef struct packed {
    logic               bypass;     // result known without the tables
    lns_t               bypass_z;   // that result
    lns_status_t        bypass_st;  // and its status
    logic               sign;       // sign of the result
    logic signed [30:0] i;          // larger log
    logic               eff_sub;    // effective operation is a subtraction
    logic [HI_BITS-1:0] hi;         // F/D/E index
    logic [LO_BITS-1:0] lo;         // interpolation offset inside the interval
  } addsub_front_t;

  function automatic logic is_zero(lns_t x);
    return x == LNS_ZERO;
  endfunction

  function automatic logic is_nan(lns_t x);
    return x == LNS_NAN;
  endfunction

endpackage
