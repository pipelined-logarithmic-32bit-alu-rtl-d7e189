// tb_lns_muldiv -- self-checking test of the saturating LNS multiply, divide
// and square root. One random operation is offered in most cycles (special
// codes, saturation and underflow included); each expected result is
// computed by the reference model when the operation enters and is compared
// exactly, value and status, when out_valid appears. The latency must be
// exactly LATENCY (3) cycles.
module tb_lns_muldiv;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  localparam int LATENCY = 3;  // the unit's default latency

  int checks = 0, failures = 0, cycle = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  alu_op_t in_op;
  lns_t in_a, in_b, out_z;
  lns_status_t out_st;

  lns_muldiv dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  lns_t        exp_z  [$];
  lns_status_t exp_st [$];
  int          exp_c  [$];
  int          n_ovf = 0, n_unf = 0, n_nan = 0;

  function automatic lns_t pick();
    case ($urandom_range(0, 9))
      0: return LNS_ZERO;
      1: return LNS_NAN;
      2: return lns_from_log(longint'($urandom_range(0, 1000)) + 1073741823 - 1000, 1'($urandom()));
      3: return lns_from_log(-longint'($urandom_range(0, 1000)) - 1073741823 + 1000, 1'($urandom()));
      default: return rand_lns(31);
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      lns_t z; lns_status_t st;
      ref_muldiv(in_op, in_a, in_b, z, st);
      exp_z.push_back(z); exp_st.push_back(st); exp_c.push_back(cycle);
      n_ovf += int'(st.overflow); n_unf += int'(st.underflow); n_nan += int'(st.nan);
    end
    if (rst_n && out_valid) begin
      checks++;
      if (exp_z.size() == 0) begin
        failures++; $display("FAIL unexpected result");
      end else begin
        lns_t z; lns_status_t st; int c;
        z = exp_z.pop_front(); st = exp_st.pop_front(); c = exp_c.pop_front();
        if (out_z != z || out_st != st || cycle - c != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL z=%h exp=%h st=%b exp=%b latency=%0d", out_z, z, out_st, st, cycle - c);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_op = OP_MUL; in_a = '0; in_b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_op    = alu_op_t'(3'd2 + 3'($urandom_range(0, 2)));
      in_a     = pick();
      in_b     = pick();
    end
    @(negedge clk) in_valid = 0;
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (exp_z.size() != 0 || n_ovf == 0 || n_unf == 0 || n_nan == 0) begin
      failures++;
      $display("FAIL leftover=%0d ovf=%0d unf=%0d nan=%0d", exp_z.size(), n_ovf, n_unf, n_nan);
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
