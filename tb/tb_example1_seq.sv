// tb_example1_seq -- the non-pipelined log-to-int polynomial example on
// lns_alu_seq: three inputs, each taken through the five Horner steps
// z = k[j] + x * z one after another (fast multiply from lns_fast_ops, then
// a saturating add on the ALU), exactly as a sequential program would issue
// them. Checks each polynomial value against real arithmetic and the total
// cycle count against 15 adds of 9 to 12 cycles each, plus one issue cycle
// per add.
module tb_example1_seq;
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

  lns_t lm_a, lm_b, lm_z;
  lns_fast_ops u_lm (.op(OP_MUL), .a(lm_a), .b(lm_b), .z(lm_z));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  real  kr [6];
  lns_t k  [6];

  task automatic ladd(lns_t a, lns_t b, output lns_t z);
    @(negedge clk);
    in_valid = 1; in_op = OP_ADD; in_a = a; in_b = b;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk) in_valid = 0;
    while (!add_valid) @(posedge clk);
    z = add_z;
  endtask

  initial begin
    int c0;
    in_valid = 0; in_op = OP_ADD; in_a = '0; in_b = '0; lm_a = '0; lm_b = '0;
    kr = '{0.001, 1.0, 0.5, 0.16666, 0.041666, 0.0083333};
    for (int j = 0; j < 6; j++) k[j] = real_to_lns(kr[j]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      lns_t x [3], z;
      for (int n = 0; n < 3; n++) x[n] = real_to_lns((1.0 + $urandom_range(0, 9998)) / 10000.0);
      c0 = cycle;
      for (int n = 0; n < 3; n++) begin
        real xv, p;
        lm_a = k[5]; lm_b = x[n]; #1;
        ladd(k[4], lm_z, z);
        for (int j = 3; j >= 0; j--) begin
          lm_a = x[n]; lm_b = z; #1;
          ladd(k[j], lm_z, z);
        end
        xv = lns_to_real(x[n]);
        p = 0.0;
        for (int j = 5; j >= 0; j--) p = p * xv + kr[j];
        checks++;
        if ((lns_to_real(z) > p ? lns_to_real(z) - p : p - lns_to_real(z)) > 2.0 / 1048576.0) begin
          failures++; $display("FAIL x=%f y=%f expected %f", xv, lns_to_real(z), p);
        end
      end
      $display("block of 3 converted in %0d cycles (15 adds of 9-12 cycles: 135-180)", cycle - c0);
      checks++;
      if (cycle - c0 < 135 || cycle - c0 > 180 + 2 * 15) begin
        failures++; $display("FAIL cycle count %0d", cycle - c0);
      end
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
