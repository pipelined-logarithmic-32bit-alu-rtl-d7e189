// tb_lns_addsub -- self-checking test of the add/subtract datapath
// (lns_addsub_front -> lns_addsub_mult -> lns_addsub_sum) on its own.
//
// The table words come straight from the table formulas, so this test
// measures the arithmetic: random and directed operand pairs, both
// operations, every sign combination, the special codes, saturation and
// underflow. The result must be within TOL_ADD / TOL_SUB units in the last
// place of the correctly rounded value for addition and for subtraction
// with |r| >= 1. For subtraction with |r| < 1 (near cancellation, where the
// uniform tables are coarse) the magnitude error, measured in units of 2^-23
// of the larger operand, must stay below SUB_MID_TOL for |r| >= 1/64 and
// below SUB_NEAR_TOL for |r| < 1/64. The datapath is
// combinational, so each vector is applied and checked after a small delay.
module tb_lns_addsub;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  localparam int TOL_ADD = 1;
  localparam int TOL_SUB = 1;
  localparam int SUB_MID_TOL  = 1024;
  localparam int SUB_NEAR_TOL = 131072;
  localparam int NRAND = 20000;

  int checks = 0, failures = 0;

  lns_t a, b, z;
  logic sub;
  addsub_front_t f;
  logic [TAB_AW-1:0] fde_addr;
  logic [P_BITS-1:0] p_addr;
  logic [31:0] tf, td, te, tp;
  logic signed [39:0] dterm, eterm;
  lns_status_t st;

  logic [31:0] tab [4][4096];

  lns_addsub_front dut_front (.a, .b, .sub, .f, .fde_addr, .p_addr);
  lns_addsub_mult  dut_mult  (.d_tab(td), .e_tab(te), .p_tab(tp), .lo(f.lo),
                              .d_term(dterm), .e_term(eterm));
  lns_addsub_sum   dut_sum   (.f, .f_tab(tf), .d_term(dterm), .e_term(eterm), .z, .st);

  always_comb begin
    tf = tab[0][fde_addr];
    td = tab[1][fde_addr];
    te = tab[2][fde_addr];
    tp = tab[3][p_addr];
  end

  int max_add = 0, max_sub = 0, max_near = 0;

  task automatic check(lns_t ia, lns_t ib, bit isub);
    lns_t zr; lns_status_t sr;
    longint e, dd;
    a = ia; b = ib; sub = isub;
    #1;
    ref_addsub(ia, ib, isub, zr, sr);
    checks++;
    dd = longint'(ia.lg) - longint'(ib.lg);
    if (dd < 0) dd = -dd;
    if (zr == LNS_ZERO || zr == LNS_NAN || z == LNS_ZERO || z == LNS_NAN || sr != '0) begin
      if (z !== zr || st !== sr) begin
        failures++;
        if (failures < 10) $display("FAIL special a=%h b=%h sub=%0d z=%h st=%b ref=%h st=%b", ia, ib, isub, z, st, zr, sr);
      end
      return;
    end
    e = longint'(z.lg) - longint'(zr.lg);
    if (e < 0) e = -e;
    if (z.sign != zr.sign || st != sr) begin
      failures++;
      if (failures < 10) $display("FAIL sign/status a=%h b=%h sub=%0d z=%h ref=%h", ia, ib, isub, z, zr);
    end else if ((ia.sign ^ ib.sign ^ isub) == 0) begin
      if (e > max_add) max_add = int'(e);
      if (e > TOL_ADD) begin
        failures++;
        if (failures < 10) $display("FAIL add a=%h b=%h z=%h ref=%h err=%0d", ia, ib, z, zr, e);
      end
    end else if (dd >= (1 << FRAC_BITS)) begin
      if (e > max_sub) max_sub = int'(e);
      if (e > TOL_SUB) begin
        failures++;
        if (failures < 10) $display("FAIL sub a=%h b=%h z=%h ref=%h err=%0d d=%0d", ia, ib, z, zr, e, dd);
      end
    end else begin
      // near-cancellation: compare absolute magnitude against the larger operand
      real mz, mr, big;
      mz = $pow(2.0, $itor(z.lg) / 8388608.0);
      mr = $pow(2.0, $itor(zr.lg) / 8388608.0);
      big = $pow(2.0, $itor(ia.lg > ib.lg ? ia.lg : ib.lg) / 8388608.0);
      if (int'((mz > mr ? mz - mr : mr - mz) / big * 8388608.0) > max_near)
        max_near = int'((mz > mr ? mz - mr : mr - mz) / big * 8388608.0);
      if ((mz > mr ? mz - mr : mr - mz) / big * 8388608.0 >
          ((dd >= (1 << LO_BITS)) ? SUB_MID_TOL : SUB_NEAR_TOL)) begin
        failures++;
        if (failures < 10) $display("FAIL near-sub a=%h b=%h z=%h ref=%h", ia, ib, z, zr);
      end
    end
  endtask

  initial begin
    for (int bk = 0; bk < 4; bk++)
      for (int k = 0; k < 4096; k++) tab[bk][k] = tab_word(bk, k);

    // directed: special codes
    check(LNS_ZERO, lns_from_log(100, 1), 1'b0);
    check(LNS_ZERO, lns_from_log(100, 1), 1'b1);
    check(lns_from_log(-5000, 0), LNS_ZERO, 1'b1);
    check(LNS_ZERO, LNS_ZERO, 1'b0);
    check(LNS_NAN, lns_from_log(7, 0), 1'b0);
    check(lns_from_log(7, 0), LNS_NAN, 1'b1);
    check(lns_from_log(12345, 0), lns_from_log(12345, 0), 1'b1);   // exact zero
    check(lns_from_log(12345, 1), lns_from_log(12345, 0), 1'b0);   // exact zero
    check(lns_from_log(1073741823, 0), lns_from_log(1073741823, 0), 1'b0); // overflow
    check(lns_from_log(-1073741823, 0), lns_from_log(-1073741823+100000, 0), 1'b1); // underflow
    check(lns_from_log(0, 0), lns_from_log(0, 0), 1'b0);           // 1 + 1 = 2
    if (z != lns_from_log(8388608, 0)) begin failures++; $display("FAIL 1+1 gave %h", z); end
    checks++;
    check(lns_from_log(8388608, 0), lns_from_log(0, 0), 1'b1);     // 2 - 1 = 1
    if (z != lns_from_log(0, 0)) begin failures++; $display("FAIL 2-1 gave %h", z); end
    checks++;
    check(lns_from_log(0, 0), lns_from_log(-(32 << 23), 0), 1'b0); // beyond table range
    check(lns_from_log(0, 0), lns_from_log(-(32 << 23) + 1, 0), 1'b1);

    // sweep the log difference over the whole table range
    for (int k = 0; k < 4096; k++) begin
      longint dd;
      dd = longint'(k) * 65536 + longint'($urandom_range(0, 65535));
      check(lns_from_log(1000, 0), lns_from_log(1000 - dd, 0), 1'b0);
      check(lns_from_log(1000, 0), lns_from_log(1000 - dd, 0), 1'b1);
      check(lns_from_log(-dd, 1), lns_from_log(0, 0), 1'b0);
    end

    // random operands
    for (int n = 0; n < NRAND; n++) begin
      lns_t ra, rb;
      ra = rand_lns(31);
      rb = ($urandom_range(0, 3) == 0) ? rand_lns(31) : lns_from_log(longint'(ra.lg) + longint'($signed($urandom())) / 64, 1'($urandom()));
      if (rb == LNS_ZERO || rb == LNS_NAN) rb = lns_from_log(0, 0);
      check(ra, rb, 1'($urandom()));
    end

    $display("max error: add %0d ulp, sub(|r|>=1) %0d ulp, near-sub %0d (2^-23 of larger operand)",
             max_add, max_sub, max_near);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
