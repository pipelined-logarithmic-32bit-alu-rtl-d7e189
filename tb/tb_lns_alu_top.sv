// tb_lns_alu_top -- end-to-end test of lns_alu_top at its default (and only)
// configuration, with eight behavioural table SRAM banks (four per core).
//
// Phase 1 drives the non-pipelined core and the pipelined core at the same
// time with random add/sub/mul/div/sqrt streams (special codes, saturation
// and underflow included; random result back-pressure on the pipe). Phase 2
// fills the pipe with three additions and shows that a fourth stalls until
// a result is read. Phase 3 runs the polynomial macro on the pipelined core
// while the external channel is kept waiting. Every result is checked
// against the reference models; the latency of each non-pipelined add/sub
// (9 or 12 cycles) and of each pipelined one (13 cycles from acceptance when
// the result side is ready) is checked. Each mechanism -- pipe stall, busy
// non-pipelined core, table and bypass paths, overflow, underflow, NaN,
// channel hand-over to the macro -- is counted and must have happened.
module tb_lns_alu_top;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  int checks = 0, failures = 0, cycle = 0;
  logic clk = 0, rst_n = 0;

  logic               seq_in_valid, seq_in_ready, seq_add_valid, seq_mul_valid;
  alu_op_t            seq_in_op;
  lns_t               seq_in_a, seq_in_b, seq_add_z, seq_mul_z;
  lns_status_t        seq_add_st, seq_mul_st;
  logic [3:0]         seq_sram_en;
  logic [SRAM_AW-1:0] seq_sram_addr [4];
  logic [31:0]        seq_sram_rdata [4];
  logic               pipe_in_valid, pipe_in_ready, pipe_add_valid, pipe_add_ready, pipe_mul_valid;
  alu_op_t            pipe_in_op;
  lns_t               pipe_in_a, pipe_in_b, pipe_add_z, pipe_mul_z;
  lns_status_t        pipe_add_st, pipe_mul_st;
  logic [3:0]         pipe_sram_en;
  logic [SRAM_AW-1:0] pipe_sram_addr [4];
  logic [31:0]        pipe_sram_rdata [4];
  logic               l2i_start, l2i_busy, l2i_done;
  lns_t               l2i_x [3];
  lns_t               l2i_k [6];
  lns_t               l2i_y [3];
  lns_status_t        l2i_st [3];

  lns_alu_top dut (.*);

  for (genvar g = 0; g < 4; g++) begin : g_bank
    lut_sram_model #(.BANK(g)) u_seq_bank (.clk, .en(seq_sram_en[g]), .addr(seq_sram_addr[g]), .rdata(seq_sram_rdata[g]));
    lut_sram_model #(.BANK(g)) u_pipe_bank (.clk, .en(pipe_sram_en[g]), .addr(pipe_sram_addr[g]), .rdata(pipe_sram_rdata[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { alu_op_t op; lns_t a; lns_t b; int c; } op_rec_t;
  op_rec_t sq_add [$], sq_mul [$], pq_add [$], pq_mul [$];
  int n_seq_busy = 0, n_seq_short = 0, n_seq_long = 0, n_pipe_stall = 0;
  int n_ovf = 0, n_unf = 0, n_nan = 0, n_handover = 0, n_blocks = 0, n_lat13 = 0;

  function automatic bit bypass(lns_t a, lns_t b, bit sub);
    longint dd;
    dd = longint'(a.lg) - longint'(b.lg);
    if (dd < 0) dd = -dd;
    return a == LNS_ZERO || b == LNS_ZERO || a == LNS_NAN || b == LNS_NAN ||
           ((a.sign ^ b.sign ^ sub) && dd == 0) || dd >= (64'sd1 << 28);
  endfunction

  task automatic check_mul(ref op_rec_t q [$], input lns_t z, input lns_status_t st, input string who);
    op_rec_t r; lns_t ez; lns_status_t es;
    checks++;
    if (q.size() == 0) begin failures++; $display("FAIL %s: unexpected mul result", who); return; end
    r = q.pop_front();
    ref_muldiv(r.op, r.a, r.b, ez, es);
    if (z != ez || st != es || cycle - r.c != 3) begin
      failures++;
      if (failures < 10) $display("FAIL %s mul z=%h exp=%h", who, z, ez);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    // non-pipelined core
    if (seq_in_valid && seq_in_ready) begin
      if (seq_in_op inside {OP_ADD, OP_SUB}) sq_add.push_back('{seq_in_op, seq_in_a, seq_in_b, cycle});
      else sq_mul.push_back('{seq_in_op, seq_in_a, seq_in_b, cycle});
    end
    if (seq_in_valid && !seq_in_ready) n_seq_busy++;
    if (seq_add_valid) begin
      op_rec_t r; int want;
      checks++;
      r = sq_add.pop_front();
      want = bypass(r.a, r.b, r.op == OP_SUB) ? 9 : 12;
      if (want == 9) n_seq_short++; else n_seq_long++;
      n_ovf += int'(seq_add_st.overflow); n_unf += int'(seq_add_st.underflow); n_nan += int'(seq_add_st.nan);
      if (!addsub_ok(r.a, r.b, r.op == OP_SUB, seq_add_z, seq_add_st) || cycle - r.c != want) begin
        failures++;
        if (failures < 10) $display("FAIL seq add a=%h b=%h z=%h lat=%0d", r.a, r.b, seq_add_z, cycle - r.c);
      end
    end
    if (seq_mul_valid) check_mul(sq_mul, seq_mul_z, seq_mul_st, "seq");
    // pipelined core (external channel)
    if (pipe_in_valid && pipe_in_ready) begin
      if (pipe_in_op inside {OP_ADD, OP_SUB}) pq_add.push_back('{pipe_in_op, pipe_in_a, pipe_in_b, cycle});
      else pq_mul.push_back('{pipe_in_op, pipe_in_a, pipe_in_b, cycle});
    end
    if (pipe_in_valid && !pipe_in_ready && !l2i_busy) n_pipe_stall++;
    if (pipe_in_valid && l2i_busy) n_handover++;
    if (pipe_add_valid && pipe_add_ready) begin
      op_rec_t r;
      checks++;
      r = pq_add.pop_front();
      if (cycle - r.c == 13) n_lat13++;
      if (cycle - r.c < 13) begin failures++; $display("FAIL pipe result after %0d cycles", cycle - r.c); end
      n_ovf += int'(pipe_add_st.overflow); n_unf += int'(pipe_add_st.underflow); n_nan += int'(pipe_add_st.nan);
      if (!addsub_ok(r.a, r.b, r.op == OP_SUB, pipe_add_z, pipe_add_st)) begin
        failures++;
        if (failures < 10) $display("FAIL pipe add a=%h b=%h z=%h", r.a, r.b, pipe_add_z);
      end
    end
    if (pipe_add_valid && l2i_busy) begin failures++; $display("FAIL macro result leaked to the external channel"); end
    if (pipe_mul_valid) check_mul(pq_mul, pipe_mul_z, pipe_mul_st, "pipe");
  end

  function automatic lns_t pick();
    case ($urandom_range(0, 11))
      0: return LNS_ZERO;
      1: return LNS_NAN;
      2: return lns_from_log(1073741823 - longint'($urandom_range(0, 3000000)), 1'($urandom()));
      3: return lns_from_log(-1073741823 + longint'($urandom_range(0, 3000000)), 1'($urandom()));
      default: return rand_lns(($urandom_range(0, 3) != 0) ? 28 : 31);
    endcase
  endfunction

  function automatic alu_op_t pick_op();
    return ($urandom_range(0, 2) != 0) ? alu_op_t'(3'($urandom_range(0, 1)))
                                       : alu_op_t'(3'($urandom_range(0, 4)));
  endfunction

  task automatic seq_issue(alu_op_t op, lns_t a, lns_t b);
    @(negedge clk);
    seq_in_valid = 1; seq_in_op = op; seq_in_a = a; seq_in_b = b;
    @(posedge clk);
    while (!seq_in_ready) @(posedge clk);
    @(negedge clk) seq_in_valid = 0;
  endtask

  task automatic pipe_issue(alu_op_t op, lns_t a, lns_t b);
    @(negedge clk);
    pipe_in_valid = 1; pipe_in_op = op; pipe_in_a = a; pipe_in_b = b;
    @(posedge clk);
    while (!pipe_in_ready) @(posedge clk);
    @(negedge clk) pipe_in_valid = 0;
  endtask

  initial begin
    real kr [6], xs [3];
    seq_in_valid = 0; seq_in_op = OP_ADD; seq_in_a = '0; seq_in_b = '0;
    pipe_in_valid = 0; pipe_in_op = OP_ADD; pipe_in_a = '0; pipe_in_b = '0; pipe_add_ready = 1;
    l2i_start = 0;
    for (int n = 0; n < 3; n++) l2i_x[n] = LNS_ZERO;
    for (int n = 0; n < 6; n++) l2i_k[n] = LNS_ZERO;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // phase 1: both cores at once
    fork
      for (int n = 0; n < 1500; n++) seq_issue(pick_op(), pick(), pick());
      for (int n = 0; n < 1500; n++) pipe_issue(pick_op(), pick(), pick());
      repeat (9000) @(negedge clk) pipe_add_ready = ($urandom_range(0, 4) != 0);
    join
    @(negedge clk) pipe_add_ready = 1;
    repeat (30) @(posedge clk);

    // phase 2: full pipe
    @(negedge clk) pipe_add_ready = 0;
    for (int n = 0; n < 3; n++) pipe_issue(OP_ADD, rand_lns(28), rand_lns(28));
    @(negedge clk);
    pipe_in_valid = 1; pipe_in_op = OP_SUB; pipe_in_a = rand_lns(28); pipe_in_b = rand_lns(28);
    repeat (30) @(posedge clk);
    checks++;
    if (pipe_in_ready) begin failures++; $display("FAIL fourth operation accepted by a full pipe"); end
    @(negedge clk) pipe_add_ready = 1;
    @(posedge clk);
    while (!pipe_in_ready) @(posedge clk);
    @(negedge clk) pipe_in_valid = 0;
    repeat (30) @(posedge clk);

    // phase 3: polynomial macro on the pipelined core, external channel waiting
    kr = '{0.001, 1.0, 0.5, 0.16666, 0.041666, 0.0083333};
    for (int j = 0; j < 6; j++) l2i_k[j] = real_to_lns(kr[j]);
    for (int t = 0; t < 2; t++) begin
      for (int n = 0; n < 3; n++) begin
        xs[n] = (1.0 + $urandom_range(0, 9998)) / 10000.0;
        l2i_x[n] = real_to_lns(xs[n]);
      end
      @(negedge clk) l2i_start = 1;
      @(posedge clk);
      while (!l2i_busy) @(posedge clk);
      @(negedge clk) begin
        l2i_start = 0;
        pipe_in_valid = 1; pipe_in_op = OP_ADD; pipe_in_a = rand_lns(28); pipe_in_b = rand_lns(28);
      end
      while (!l2i_done) @(posedge clk);
      n_blocks++;
      for (int n = 0; n < 3; n++) begin
        real xv, p;
        xv = lns_to_real(l2i_x[n]);
        p = 0.0;
        for (int j = 5; j >= 0; j--) p = p * xv + kr[j];
        checks++;
        if ((lns_to_real(l2i_y[n]) > p ? lns_to_real(l2i_y[n]) - p : p - lns_to_real(l2i_y[n])) > 4.0 / 1048576.0) begin
          failures++; $display("FAIL poly x=%f y=%f exp=%f", xv, lns_to_real(l2i_y[n]), p);
        end
      end
      @(posedge clk);
      while (!pipe_in_ready) @(posedge clk);
      @(negedge clk) pipe_in_valid = 0;
      repeat (20) @(posedge clk);
    end

    checks++;
    if (sq_add.size() + sq_mul.size() + pq_add.size() + pq_mul.size() != 0) begin
      failures++; $display("FAIL operations left in flight");
    end
    checks++;
    if (n_seq_busy == 0 || n_seq_short == 0 || n_seq_long == 0 || n_pipe_stall == 0 || n_ovf == 0 ||
        n_unf == 0 || n_nan == 0 || n_handover == 0 || n_blocks == 0 || n_lat13 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("seq busy %0d, seq 9-cycle %0d, seq 12-cycle %0d, pipe stall %0d, pipe 13-cycle results %0d",
             n_seq_busy, n_seq_short, n_seq_long, n_pipe_stall, n_lat13);
    $display("overflow %0d, underflow %0d, NaN %0d, channel held for macro %0d cycles, macro blocks %0d",
             n_ovf, n_unf, n_nan, n_handover, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
