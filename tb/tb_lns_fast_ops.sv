// tb_lns_fast_ops -- self-checking test of the fast LNS multiply, divide and
// square root. Random operands; expected logs are computed with 64-bit
// integer arithmetic and wrapped to 31 bits, the expected sign by the
// operation rules. Combinational: each vector is checked after a delay.
module tb_lns_fast_ops;
  import lns_pkg::*;

  int checks = 0, failures = 0;
  alu_op_t op;
  lns_t a, b, z;

  lns_fast_ops dut (.op, .a, .b, .z);

  initial begin
    for (int n = 0; n < 6000; n++) begin
      longint e;
      logic es;
      op = alu_op_t'(3'd2 + 3'($urandom_range(0, 2)));
      a  = $urandom();
      b  = $urandom();
      #1;
      case (op)
        OP_MUL:  begin e = longint'(a.lg) + longint'(b.lg); es = a.sign ^ b.sign; end
        OP_DIV:  begin e = longint'(a.lg) - longint'(b.lg); es = a.sign ^ b.sign; end
        default: begin e = (longint'(a.lg) + 1) >>> 1;      es = a.sign;          end
      endcase
      checks++;
      if (z.lg != 31'(e) || z.sign != es) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h z=%h exp=%h", op.name(), a, b, z, {es, 31'(e)});
      end
    end
    // 4 * 0.25 = 1 and sqrt(4) = 2
    op = OP_MUL; a = {1'b0, 31'sd16777216}; b = {1'b1, -31'sd16777216}; #1;
    checks++; if (z != {1'b1, 31'sd0}) begin failures++; $display("FAIL 4*-0.25 = %h", z); end
    op = OP_SQRT; a = {1'b0, 31'sd16777216}; #1;
    checks++; if (z != {1'b0, 31'sd8388608}) begin failures++; $display("FAIL sqrt(4) = %h", z); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
