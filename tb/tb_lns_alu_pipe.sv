// tb_lns_alu_pipe -- self-checking test of the 3-stage pipelined LNS ALU with
// four behavioural table SRAM banks.
//
// Phases: (1) one addition alone, which must produce its result exactly
// 5 + 5 + 3 = 13 cycles after it was accepted; (2) a stream of additions
// with the result side always ready, which must be accepted every 5 cycles;
// (3) four additions without reading a result: the fourth must stall until
// a result is read (the pipe holds three); (4) a long random mix of
// add/sub/mul/div/sqrt with random result back-pressure. Every add/sub
// result is checked against the real-number reference (lns_tb_pkg::addsub_ok)
// in issue order, every mul/div/sqrt result exactly and 3 cycles after issue.
// The number of stalls, saturations, underflows and NaNs seen is counted and
// each must occur.
module tb_lns_alu_pipe;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  int checks = 0, failures = 0, cycle = 0;
  logic clk = 0, rst_n = 0;

  logic in_valid, in_ready, add_valid, add_ready, mul_valid, empty;
  alu_op_t in_op;
  lns_t in_a, in_b, add_z, mul_z;
  lns_status_t add_st, mul_st;
  logic [3:0] sram_en;
  logic [SRAM_AW-1:0] sram_addr [4];
  logic [31:0] sram_rdata [4];

  lns_alu_pipe dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_bank
    lut_sram_model #(.BANK(g)) u_bank (.clk, .en(sram_en[g]), .addr(sram_addr[g]), .rdata(sram_rdata[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  typedef struct { lns_t a; lns_t b; bit sub; int c; } op_rec_t;
  op_rec_t add_q [$];
  op_rec_t mul_q [$];
  alu_op_t mul_op_q [$];
  int last_accept = -1, n_stall = 0, n_ovf = 0, n_unf = 0, n_nan = 0;
  int lat_first = -1, min_gap = 1000, max_gap = 0;
  bit measure_gap = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (in_op == OP_ADD || in_op == OP_SUB) begin
        if (measure_gap && last_accept >= 0) begin
          if (cycle - last_accept < min_gap) min_gap = cycle - last_accept;
          if (cycle - last_accept > max_gap) max_gap = cycle - last_accept;
        end
        last_accept = cycle;
        add_q.push_back('{in_a, in_b, in_op == OP_SUB, cycle});
      end else begin
        mul_q.push_back('{in_a, in_b, 0, cycle});
        mul_op_q.push_back(in_op);
      end
    end
    if (in_valid && !in_ready) n_stall++;
    if (add_valid && add_ready) begin
      op_rec_t r;
      checks++;
      if (add_q.size() == 0) begin failures++; $display("FAIL unexpected add result"); end
      else begin
        r = add_q.pop_front();
        if (lat_first < 0) lat_first = cycle - r.c;
        n_ovf += int'(add_st.overflow); n_unf += int'(add_st.underflow); n_nan += int'(add_st.nan);
        if (!addsub_ok(r.a, r.b, r.sub, add_z, add_st)) begin
          failures++;
          if (failures < 10) $display("FAIL add a=%h b=%h sub=%0d z=%h st=%b", r.a, r.b, r.sub, add_z, add_st);
        end
      end
    end
    if (mul_valid) begin
      op_rec_t r; alu_op_t o; lns_t z; lns_status_t st;
      checks++;
      if (mul_q.size() == 0) begin failures++; $display("FAIL unexpected mul result"); end
      else begin
        r = mul_q.pop_front(); o = mul_op_q.pop_front();
        ref_muldiv(o, r.a, r.b, z, st);
        if (mul_z != z || mul_st != st || cycle - r.c != 3) begin
          failures++;
          if (failures < 10) $display("FAIL mul z=%h exp=%h lat=%0d", mul_z, z, cycle - r.c);
        end
      end
    end
  end

  function automatic lns_t pick();
    case ($urandom_range(0, 11))
      0: return LNS_ZERO;
      1: return LNS_NAN;
      2: return lns_from_log(1073741823 - longint'($urandom_range(0, 3000000)), 1'($urandom()));
      3: return lns_from_log(-1073741823 + longint'($urandom_range(0, 3000000)), 1'($urandom()));
      default: return rand_lns(28);
    endcase
  endfunction

  task automatic issue(alu_op_t op, lns_t a, lns_t b);
    @(negedge clk);
    in_valid = 1; in_op = op; in_a = a; in_b = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_op = OP_ADD; in_a = '0; in_b = '0; add_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // (1) single operation latency
    add_ready = 1;
    issue(OP_ADD, lns_from_log(0, 0), lns_from_log(0, 0));
    repeat (20) @(posedge clk);
    checks++;
    if (lat_first != 13) begin failures++; $display("FAIL latency %0d, expected 13", lat_first); end

    // (2) issue interval with the result side always ready
    measure_gap = 1; last_accept = -1;
    for (int n = 0; n < 8; n++) issue(OP_ADD, rand_lns(28), rand_lns(28));
    measure_gap = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (min_gap != 5 || max_gap != 5) begin failures++; $display("FAIL issue interval %0d..%0d, expected 5", min_gap, max_gap); end

    // (3) four additions with no result read: the fourth stalls
    add_ready = 0;
    for (int n = 0; n < 3; n++) issue(OP_SUB, rand_lns(28), rand_lns(28));
    @(negedge clk);
    in_valid = 1; in_op = OP_ADD; in_a = rand_lns(28); in_b = rand_lns(28);
    repeat (40) @(posedge clk);
    checks++;
    if (in_ready) begin failures++; $display("FAIL fourth addition accepted with a full pipe"); end
    @(negedge clk) add_ready = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);

    // (4) random mix with back-pressure
    fork
      begin
        for (int n = 0; n < 3000; n++) begin
          alu_op_t o;
          o = alu_op_t'(3'($urandom_range(0, 4)));
          if ($urandom_range(0, 2) != 0) o = alu_op_t'(3'($urandom_range(0, 1)));
          issue(o, pick(), pick());
        end
      end
      begin
        while (1) begin
          @(negedge clk) add_ready = ($urandom_range(0, 3) != 0);
        end
      end
    join_any
    disable fork;
    @(negedge clk) add_ready = 1;
    repeat (40) @(posedge clk);

    checks++;
    if (add_q.size() != 0 || mul_q.size() != 0 || !empty) begin
      failures++; $display("FAIL operations left in flight: %0d add, %0d mul", add_q.size(), mul_q.size());
    end
    checks++;
    if (n_stall == 0 || n_ovf == 0 || n_unf == 0 || n_nan == 0) begin
      failures++; $display("FAIL mechanism not seen: stall=%0d ovf=%0d unf=%0d nan=%0d", n_stall, n_ovf, n_unf, n_nan);
    end
    $display("stall cycles %0d, overflow %0d, underflow %0d, NaN %0d", n_stall, n_ovf, n_unf, n_nan);
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
