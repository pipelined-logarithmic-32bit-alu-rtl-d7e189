// lns_alu_seq -- non-pipelined 32-bit LNS ALU with external look-up tables.
//
// One add/subtract at a time runs through the same select/subtract, table
// multiply and carry-save/carry-propagate datapath as the pipelined ALU,
// sequenced by a cycle counter:
//   cycle 1-2   select the larger log, form r = j - i, decide special cases
//   cycle 2     read the F, D, E and P tables (one word from each bank)
//   cycle 3     capture the table words
//   cycle 4-7   the two multipliers (multi-cycle path), products captured
//   cycle 8-11  carry-save adders, carry-propagate adder, round, saturate
// The result appears with a one-cycle add_valid pulse ADD_CYCLES (12) cycles
// after the operation was accepted, or BYPASS_CYCLES (9) cycles after it
// when no table is needed (a zero or NaN operand, exact cancellation or a
// log difference of 32 or more). The published 9-12 cycle figure is read
// here as these two cases; the exact split is this design's choice.
// add_z/add_st hold their value until the next result.
//
// MUL/DIV/SQRT go to a saturating unit that is independent of the add/sub
// sequencer: they are accepted every cycle and answer on mul_valid
// MD_LATENCY cycles later. Table banks as in lns_alu_pipe: bank 0 = F,
// 1 = D, 2 = E, 3 = P, one cycle of read latency, tables at TABLE_BASE.
module lns_alu_seq
  import lns_pkg::*;
#(
  parameter int unsigned ADD_CYCLES    = 12,
  parameter int unsigned BYPASS_CYCLES = 9,
  parameter int unsigned MD_LATENCY    = 3,
  parameter logic [SRAM_AW-1:0] TABLE_BASE = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  alu_op_t            in_op,
  input  lns_t               in_a,
  input  lns_t               in_b,
  output logic               add_valid,
  output lns_t               add_z,
  output lns_status_t        add_st,
  output logic               mul_valid,
  output lns_t               mul_z,
  output lns_status_t        mul_st,
  output logic [3:0]         sram_en,
  output logic [SRAM_AW-1:0] sram_addr [4],
  input  logic [31:0]        sram_rdata [4]
);

  localparam int unsigned RD_CYCLE  = 2;  // table read issued
  localparam int unsigned CAP_CYCLE = 3;  // table words captured
  localparam int unsigned MUL_CYCLE = 7;  // products captured

  logic          busy;
  logic [3:0]    cnt;
  lns_t          a_q, b_q;
  logic          sub_q;
  addsub_front_t f;
  logic [TAB_AW-1:0] fde_addr;
  logic [P_BITS-1:0] p_addr;
  logic [31:0]   tf, td, te, tp;
  logic signed [39:0] dterm, eterm, dterm_q, eterm_q;
  lns_t          z_c;
  lns_status_t   st_c;
  logic          is_as, accept, last;

  assign is_as    = (in_op == OP_ADD) || (in_op == OP_SUB);
  assign in_ready = is_as ? !busy : 1'b1;
  assign accept   = in_valid && is_as && !busy;
  assign last     = busy && (cnt == 4'((f.bypass ? BYPASS_CYCLES : ADD_CYCLES) - 1));

  lns_addsub_front u_front (
    .a(a_q), .b(b_q), .sub(sub_q), .f(f), .fde_addr(fde_addr), .p_addr(p_addr)
  );

  always_comb begin
    sram_en      = {4{busy && cnt == 4'(RD_CYCLE) && !f.bypass}};
    sram_addr[0] = TABLE_BASE + SRAM_AW'(fde_addr);
    sram_addr[1] = TABLE_BASE + SRAM_AW'(fde_addr);
    sram_addr[2] = TABLE_BASE + SRAM_AW'(fde_addr);
    sram_addr[3] = TABLE_BASE + SRAM_AW'(p_addr);
  end

  lns_addsub_mult u_mult (
    .d_tab(td), .e_tab(te), .p_tab(tp), .lo(f.lo), .d_term(dterm), .e_term(eterm)
  );

  lns_addsub_sum u_sum (
    .f(f), .f_tab(tf), .d_term(dterm_q), .e_term(eterm_q), .z(z_c), .st(st_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      cnt       <= '0;
      add_valid <= 1'b0;
      add_z     <= LNS_ZERO;
      add_st    <= ST_OK;
    end else begin
      add_valid <= 1'b0;
      if (accept) begin
        busy <= 1'b1;
        cnt  <= 4'd1;
      end else if (last) begin
        busy      <= 1'b0;
        add_valid <= 1'b1;
        add_z     <= z_c;
        add_st    <= st_c;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      a_q   <= in_a;
      b_q   <= in_b;
      sub_q <= (in_op == OP_SUB);
    end
    if (busy && cnt == 4'(CAP_CYCLE)) begin
      tf <= sram_rdata[0];
      td <= sram_rdata[1];
      te <= sram_rdata[2];
      tp <= sram_rdata[3];
    end
    if (busy && cnt == 4'(MUL_CYCLE)) begin
      dterm_q <= dterm;
      eterm_q <= eterm;
    end
  end

  lns_muldiv #(.LATENCY(MD_LATENCY)) u_muldiv (
    .clk, .rst_n,
    .in_valid(in_valid && !is_as), .in_op, .in_a, .in_b,
    .out_valid(mul_valid), .out_z(mul_z), .out_st(mul_st)
  );

  a_in_hold : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_op) && $stable(in_a) && $stable(in_b));

  initial begin
    assert (BYPASS_CYCLES >= 2 && ADD_CYCLES > MUL_CYCLE + 1 && ADD_CYCLES < 16)
      else $error("cycle counts out of range");
  end

endmodule
