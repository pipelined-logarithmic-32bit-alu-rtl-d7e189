// tb_lns_alu_seq -- self-checking test of the non-pipelined LNS ALU with four
// behavioural table SRAM banks.
//
// Random add/sub operations (special codes, saturation, operands beyond the
// table range included) are issued one after another, mixed with
// mul/div/sqrt. Each add/sub result is checked against the real-number
// reference, and its latency must be 12 cycles when the tables are used and
// 9 when they are not (zero/NaN operand, exact cancellation, log difference
// of 32 or more). While an add/sub runs, a second one must not be accepted.
// mul/div/sqrt results are checked exactly, 3 cycles after issue.
module tb_lns_alu_seq;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  int checks = 0, failures = 0, cycle = 0;
  logic clk = 0, rst_n = 0;

  logic in_valid, in_ready, add_valid, mul_valid;
  alu_op_t in_op;
  lns_t in_a, in_b, add_z, mul_z;
  lns_status_t add_st, mul_st;
  logic [3:0] sram_en;
  logic [SRAM_AW-1:0] sram_addr [4];
  logic [31:0] sram_rdata [4];

  lns_alu_seq dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_bank
    lut_sram_model #(.BANK(g)) u_bank (.clk, .en(sram_en[g]), .addr(sram_addr[g]), .rdata(sram_rdata[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { lns_t a; lns_t b; bit sub; int c; } op_rec_t;
  op_rec_t add_q [$];
  op_rec_t mul_q [$];
  alu_op_t mul_op_q [$];
  int n_busy = 0, n_short = 0, n_long = 0, n_ovf = 0, n_nan = 0;

  // does this operation bypass the tables?
  function automatic bit bypass(lns_t a, lns_t b, bit sub);
    longint dd;
    dd = longint'(a.lg) - longint'(b.lg);
    if (dd < 0) dd = -dd;
    return a == LNS_ZERO || b == LNS_ZERO || a == LNS_NAN || b == LNS_NAN ||
           ((a.sign ^ b.sign ^ sub) && dd == 0) || dd >= (64'sd1 << 28);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (in_op == OP_ADD || in_op == OP_SUB) add_q.push_back('{in_a, in_b, in_op == OP_SUB, cycle});
      else begin mul_q.push_back('{in_a, in_b, 0, cycle}); mul_op_q.push_back(in_op); end
    end
    if (in_valid && !in_ready) n_busy++;
    if (add_valid) begin
      op_rec_t r; int want;
      checks++;
      if (add_q.size() == 0) begin failures++; $display("FAIL unexpected add result"); end
      else begin
        r = add_q.pop_front();
        want = bypass(r.a, r.b, r.sub) ? 9 : 12;
        if (want == 9) n_short++; else n_long++;
        n_ovf += int'(add_st.overflow); n_nan += int'(add_st.nan);
        if (!addsub_ok(r.a, r.b, r.sub, add_z, add_st) || cycle - r.c != want) begin
          failures++;
          if (failures < 10) $display("FAIL add a=%h b=%h sub=%0d z=%h st=%b latency %0d (want %0d)",
                                      r.a, r.b, r.sub, add_z, add_st, cycle - r.c, want);
        end
      end
    end
    if (mul_valid) begin
      op_rec_t r; alu_op_t o; lns_t z; lns_status_t st;
      checks++;
      r = mul_q.pop_front(); o = mul_op_q.pop_front();
      ref_muldiv(o, r.a, r.b, z, st);
      if (mul_z != z || mul_st != st || cycle - r.c != 3) begin
        failures++;
        if (failures < 10) $display("FAIL mul z=%h exp=%h", mul_z, z);
      end
    end
  end

  function automatic lns_t pick();
    case ($urandom_range(0, 11))
      0: return LNS_ZERO;
      1: return LNS_NAN;
      2: return lns_from_log(1073741823 - longint'($urandom_range(0, 3000000)), 1'($urandom()));
      3: return lns_from_log(-1073741823 + longint'($urandom_range(0, 3000000)), 1'($urandom()));
      default: return rand_lns(($urandom_range(0, 1) != 0) ? 28 : 31);
    endcase
  endfunction

  initial begin
    in_valid = 0; in_op = OP_ADD; in_a = '0; in_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      alu_op_t o;
      o = alu_op_t'(3'($urandom_range(0, 4)));
      if ($urandom_range(0, 2) != 0) o = alu_op_t'(3'($urandom_range(0, 1)));
      @(negedge clk);
      in_valid = 1; in_op = o; in_a = pick(); in_b = pick();
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk) in_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (add_q.size() != 0 || mul_q.size() != 0) begin failures++; $display("FAIL operations left"); end
    checks++;
    if (n_busy == 0 || n_short == 0 || n_long == 0 || n_ovf == 0 || n_nan == 0) begin
      failures++;
      $display("FAIL mechanism not seen: busy=%0d short=%0d long=%0d ovf=%0d nan=%0d", n_busy, n_short, n_long, n_ovf, n_nan);
    end
    $display("busy cycles %0d, 9-cycle ops %0d, 12-cycle ops %0d, overflow %0d, NaN %0d",
             n_busy, n_short, n_long, n_ovf, n_nan);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
