// tb_log2int_pipe -- self-checking test of the polynomial (Horner) macro on
// the pipelined LNS ALU with behavioural table SRAM banks.
//
// Several blocks of three inputs in (0, 1) are converted with two
// coefficient sets (one all positive, one with mixed signs so that the ALU
// also subtracts). Each output is compared with the polynomial evaluated in
// real arithmetic; the allowed error is 2^-20 of the sum of the absolute
// terms for the positive set and 2^-14 for the mixed set, whose steps
// include near-cancelling subtractions (|r| < 1), where the ALU's uniform
// tables are coarser. A block must finish within 5 * 14 + 13 + 3 cycles, which is only
// possible if the three elements share the pipe.
module tb_log2int_pipe;
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

  logic start, busy, done;
  lns_t x [3];
  lns_t k [6];
  lns_t y [3];
  lns_status_t y_st [3];

  lns_alu_pipe u_alu (.*);

  log2int_pipe dut (
    .clk, .rst_n, .start, .busy, .done, .x, .k, .y, .y_st,
    .alu_in_valid(in_valid), .alu_in_ready(in_ready), .alu_in_op(in_op),
    .alu_in_a(in_a), .alu_in_b(in_b),
    .alu_add_valid(add_valid), .alu_add_ready(add_ready),
    .alu_add_z(add_z), .alu_add_st(add_st)
  );

  for (genvar g = 0; g < 4; g++) begin : g_bank
    lut_sram_model #(.BANK(g)) u_bank (.clk, .en(sram_en[g]), .addr(sram_addr[g]), .rdata(sram_rdata[g]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  real kr [6];
  real tol;

  task automatic run_block(real xs [3]);
    int c0;
    for (int n = 0; n < 3; n++) x[n] = real_to_lns(xs[n]);
    @(negedge clk) start = 1;
    @(posedge clk);
    c0 = cycle;
    @(negedge clk) start = 0;
    @(posedge clk);
    while (!done) @(posedge clk);
    checks++;
    if (cycle - c0 > 5 * 14 + 13 + 3) begin
      failures++; $display("FAIL block took %0d cycles", cycle - c0);
    end
    for (int n = 0; n < 3; n++) begin
      real xv, p, s, yv;
      xv = lns_to_real(x[n]);
      p = 0.0; s = 0.0;
      for (int j = 5; j >= 0; j--) p = p * xv + kr[j];
      for (int j = 0; j < 6; j++) s += (kr[j] < 0 ? -kr[j] : kr[j]) * $pow(xv, j);
      yv = lns_to_real(y[n]);
      checks++;
      if ((yv > p ? yv - p : p - yv) > s * tol || y_st[n] != ST_OK) begin
        failures++;
        $display("FAIL x=%f y=%f expected %f", xv, yv, p);
      end
    end
    $display("block of 3 converted in %0d cycles", cycle - c0);
  endtask

  initial begin
    real xs [3];
    start = 0;
    for (int n = 0; n < 3; n++) x[n] = LNS_ZERO;
    tol = 1.0 / 1048576.0;
    kr = '{0.001, 1.0, 0.5, 0.16666, 0.041666, 0.0083333};
    for (int j = 0; j < 6; j++) k[j] = real_to_lns(kr[j]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 4; t++) begin
      for (int n = 0; n < 3; n++) xs[n] = (1.0 + $urandom_range(0, 9998)) / 10000.0;
      run_block(xs);
    end
    tol = 1.0 / 16384.0;
    kr = '{0.25, -1.5, 2.0, -0.75, 0.3, -0.05};
    for (int j = 0; j < 6; j++) k[j] = real_to_lns(kr[j]);
    for (int t = 0; t < 4; t++) begin
      for (int n = 0; n < 3; n++) xs[n] = (1.0 + $urandom_range(0, 9998)) / 10000.0;
      run_block(xs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
