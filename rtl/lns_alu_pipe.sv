// lns_alu_pipe -- 3-stage pipelined 32-bit LNS ALU with external look-up tables.
//
// Operations arrive on one input channel (in_valid/in_ready, opcode and two
// operands). ADD and SUB enter the add/subtract pipe; MUL, DIV and SQRT go
// to the saturating MUL/DIV/SQRT unit that sits beside pipe block 1.
//
// Add/subtract pipe, following the published 5 + 5 + 3 cycle split:
//   block 1 (S1_CYCLES = 5): select the larger log i, form r = j - i, decide
//       sign and special cases, and at the hand-over to block 2 issue one
//       read to each of the four table banks (F, D, E, P).
//   block 2 (S2_CYCLES = 5): capture the four table words and form the
//       products D * lo and E * P.
//   block 3 (S3_CYCLES = 3): carry-save add F, both products and i, carry-
//       propagate add, round the 35-bit internal word and saturate. The
//       result then waits in block 3 ("ADD out") until it is read through
//       add_valid/add_ready (the result() call).
// Each block holds one operation, so a new add/sub can start every 5 cycles
// and its result is available 5 + 5 + 3 = 13 cycles after it was accepted.
// The pipe holds at most three operations: with block 3 holding an unread
// result and blocks 1 and 2 full, in_ready stays low for add/sub, which is
// the deadlock a caller meets when it issues four additions without
// reading a result.
//
// Table banks: bank 0 = F, 1 = D, 2 = E, 3 = P, each a 32-bit SRAM with one
// cycle of read latency (address and enable sampled on a clock edge, data
// valid in the next cycle). The tables start at word TABLE_BASE of every
// bank. The timing of the SRAMs, the bank assignment and the table layout
// are this design's choices.
//
// MUL/DIV/SQRT: accepted whenever offered, result on mul_valid MD_LATENCY
// (3) cycles later, alongside any add/sub in flight.
module lns_alu_pipe
  import lns_pkg::*;
#(
  parameter int unsigned S1_CYCLES  = 5,
  parameter int unsigned S2_CYCLES  = 5,
  parameter int unsigned S3_CYCLES  = 3,
  parameter int unsigned MD_LATENCY = 3,
  parameter logic [SRAM_AW-1:0] TABLE_BASE = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  // input channel (ladd / lsub / lmul / ldiv / lsqrt)
  input  logic               in_valid,
  output logic               in_ready,
  input  alu_op_t            in_op,
  input  lns_t               in_a,
  input  lns_t               in_b,
  // add/sub result (result())
  output logic               add_valid,
  input  logic               add_ready,
  output lns_t               add_z,
  output lns_status_t        add_st,
  // mul/div/sqrt result
  output logic               mul_valid,
  output lns_t               mul_z,
  output lns_status_t        mul_st,
  output logic               empty,     // no add/sub in the pipe
  // table SRAM banks
  output logic [3:0]         sram_en,
  output logic [SRAM_AW-1:0] sram_addr [4],
  input  logic [31:0]        sram_rdata [4]
);

  localparam int unsigned CW = 3;

  logic is_as;
  assign is_as = (in_op == OP_ADD) || (in_op == OP_SUB);

  // ---------------- block 1 ----------------
  logic          v1;
  logic [CW-1:0] c1;
  lns_t          a1, b1;
  logic          sub1;
  addsub_front_t f1;
  logic [TAB_AW-1:0] fde_addr1;
  logic [P_BITS-1:0] p_addr1;

  // ---------------- block 2 ----------------
  logic          v2;
  logic [CW-1:0] c2;
  addsub_front_t f2;
  logic [31:0]   tf2, td2, te2, tp2;
  logic signed [39:0] dterm2, eterm2;

  // ---------------- block 3 ----------------
  logic          v3;
  logic [CW-1:0] c3;
  addsub_front_t f3;
  logic [31:0]   tf3;
  logic signed [39:0] dterm3, eterm3;

  logic done1, done2, done3, move1, move2, move3, accept;

  assign done1 = v1 && (c1 == CW'(S1_CYCLES - 1));
  assign done2 = v2 && (c2 == CW'(S2_CYCLES - 1));
  assign done3 = v3 && (c3 == CW'(S3_CYCLES - 1));
  assign move3 = done3 && add_ready;
  assign move2 = done2 && (!v3 || move3);
  assign move1 = done1 && (!v2 || move2);
  assign in_ready = is_as ? (!v1 || move1) : 1'b1;
  assign accept   = in_valid && is_as && in_ready;
  assign empty    = !v1 && !v2 && !v3;

  lns_addsub_front u_front (
    .a(a1), .b(b1), .sub(sub1), .f(f1), .fde_addr(fde_addr1), .p_addr(p_addr1)
  );

  // one read per bank as the operation leaves block 1
  always_comb begin
    sram_en      = {4{move1}};
    sram_addr[0] = TABLE_BASE + SRAM_AW'(fde_addr1);
    sram_addr[1] = TABLE_BASE + SRAM_AW'(fde_addr1);
    sram_addr[2] = TABLE_BASE + SRAM_AW'(fde_addr1);
    sram_addr[3] = TABLE_BASE + SRAM_AW'(p_addr1);
  end

  lns_addsub_mult u_mult (
    .d_tab(td2), .e_tab(te2), .p_tab(tp2), .lo(f2.lo),
    .d_term(dterm2), .e_term(eterm2)
  );

  lns_addsub_sum u_sum (
    .f(f3), .f_tab(tf3), .d_term(dterm3), .e_term(eterm3), .z(add_z), .st(add_st)
  );

  assign add_valid = done3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      c1 <= '0;   c2 <= '0;   c3 <= '0;
    end else begin
      // block 1
      if (accept) begin
        v1 <= 1'b1; c1 <= '0;
      end else if (move1) begin
        v1 <= 1'b0;
      end else if (v1 && !done1) begin
        c1 <= c1 + 1'b1;
      end
      // block 2
      if (move1) begin
        v2 <= 1'b1; c2 <= '0;
      end else if (move2) begin
        v2 <= 1'b0;
      end else if (v2 && !done2) begin
        c2 <= c2 + 1'b1;
      end
      // block 3
      if (move2) begin
        v3 <= 1'b1; c3 <= '0;
      end else if (move3) begin
        v3 <= 1'b0;
      end else if (v3 && !done3) begin
        c3 <= c3 + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      a1   <= in_a;
      b1   <= in_b;
      sub1 <= (in_op == OP_SUB);
    end
    if (move1) f2 <= f1;
    // SRAM data is valid in the first cycle of block 2
    if (v2 && c2 == '0) begin
      tf2 <= sram_rdata[0];
      td2 <= sram_rdata[1];
      te2 <= sram_rdata[2];
      tp2 <= sram_rdata[3];
    end
    if (move2) begin
      f3     <= f2;
      tf3    <= tf2;
      dterm3 <= dterm2;
      eterm3 <= eterm2;
    end
  end

  lns_muldiv #(.LATENCY(MD_LATENCY)) u_muldiv (
    .clk, .rst_n,
    .in_valid(in_valid && !is_as), .in_op, .in_a, .in_b,
    .out_valid(mul_valid), .out_z(mul_z), .out_st(mul_st)
  );

  // channel rules: an offer is held until taken, a result until read
  a_in_hold : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_op) && $stable(in_a) && $stable(in_b));
  a_out_hold : assert property (@(posedge clk) disable iff (!rst_n)
    add_valid && !add_ready |=> add_valid && $stable(add_z));

  initial begin
    assert (S1_CYCLES >= 2 && S1_CYCLES <= 2**CW) else $error("S1_CYCLES out of range");
    assert (S2_CYCLES >= 2 && S2_CYCLES <= 2**CW) else $error("S2_CYCLES out of range");
    assert (S3_CYCLES >= 1 && S3_CYCLES <= 2**CW) else $error("S3_CYCLES out of range");
  end

endmodule
