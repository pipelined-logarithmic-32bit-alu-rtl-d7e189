// tb_example_loop_seq -- the 8-iteration loop of parallel LNS work on the
// non-pipelined core:
//     z[k] = a + b;  y[j+1] = sqrt(x[j]);  r[k] = a * b;  j++;  x[i] = r[k] * y[j];
// Per iteration the addition runs on lns_alu_seq while the square root and
// the two multiplies run on fast macros (lns_fast_ops) beside it, so the
// iteration time is that of the addition. Index registers are 3 bits wide
// (arrays of 8). All array contents are checked against a software model
// of the loop (reference add, integer log arithmetic for the fast macros),
// and each iteration must take exactly the add latency (9 or 12 cycles),
// counted from the cycle the addition is offered.
module tb_example_loop_seq;
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

  // three fast macros working beside the ALU
  lns_t sq_a, sq_z, m1_a, m1_b, m1_z, m2_a, m2_b, m2_z;
  lns_fast_ops u_lsq (.op(OP_SQRT), .a(sq_a), .b(LNS_ZERO), .z(sq_z));
  lns_fast_ops u_lm1 (.op(OP_MUL),  .a(m1_a), .b(m1_b),     .z(m1_z));
  lns_fast_ops u_lm2 (.op(OP_MUL),  .a(m2_a), .b(m2_b),     .z(m2_z));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic lns_t fmul(lns_t p, lns_t q);
    return '{sign: p.sign ^ q.sign, lg: p.lg + q.lg};
  endfunction
  function automatic lns_t fsqrt(lns_t p);
    return '{sign: p.sign, lg: (p.lg + 31'sd1) >>> 1};
  endfunction

  initial begin
    lns_t a, b;
    lns_t x [8], y [8], z [8], r [8];
    lns_t ex [8], ey [8], ez [8], er [8];
    logic [2:0] i, j, ej;
    in_valid = 0; in_op = OP_ADD; in_a = '0; in_b = '0;
    sq_a = '0; m1_a = '0; m1_b = '0; m2_a = '0; m2_b = '0;
    a = real_to_lns(1.75); b = real_to_lns(-0.3);
    for (int n = 0; n < 8; n++) begin
      x[n] = real_to_lns(0.1 + n); y[n] = LNS_ZERO; z[n] = LNS_ZERO; r[n] = LNS_ZERO;
    end
    ex = x; ey = y; ez = z; er = r;
    i = 3'd0; j = 3'd0; ej = 3'd0;
    // software model of the loop
    for (int k = 0; k < 8; k++) begin
      lns_status_t st;
      ref_addsub(a, b, 1'b0, ez[k], st);
      ey[3'(ej + 1)] = fsqrt(ex[ej]);
      er[k] = fmul(a, b);
      ej = ej + 1;
      ex[i] = fmul(er[k], ey[ej]);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      int c0;
      @(negedge clk);
      c0 = cycle;
      in_valid = 1; in_op = OP_ADD; in_a = a; in_b = b;     // thread 1: ladd
      sq_a = x[j];                                           // thread 2: lsq
      m1_a = a; m1_b = b;                                    // thread 3: lm, j++, lm
      @(posedge clk);
      y[3'(j + 1)] = sq_z;
      r[k] = m1_z;
      @(negedge clk) in_valid = 0;
      j = j + 1;
      m2_a = r[k]; m2_b = y[j];
      @(posedge clk);
      x[i] = m2_z;
      while (!add_valid) @(posedge clk);
      z[k] = add_z;
      checks++;
      if (cycle - c0 != 12 && cycle - c0 != 9) begin
        failures++; $display("FAIL iteration %0d took %0d cycles", k, cycle - c0);
      end
      if (k == 0) $display("one iteration: %0d cycles", cycle - c0);
    end
    for (int n = 0; n < 8; n++) begin
      checks++;
      if (x[n] != ex[n] || y[n] != ey[n] || r[n] != er[n] || !addsub_ok(a, b, 1'b0, z[n], ST_OK)) begin
        failures++;
        $display("FAIL element %0d: x %h/%h y %h/%h r %h/%h z %h/%h", n, x[n], ex[n], y[n], ey[n], r[n], er[n], z[n], ez[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
