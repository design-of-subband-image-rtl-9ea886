// tb_fp_add: checks the 18-bit float adder against real arithmetic, for
// random operands of nearby and distant exponents, cancellation and zero
// operands. The allowed error is 2.5 units in the last place of the larger
// operand (guard-bit alignment plus truncation of the result).
module tb_fp_add;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  fp18_t a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .y);

  task automatic check(fp18_t x, fp18_t z);
    real ex, got, ulp, mx;
    a = x; b = z;
    #1;
    ex  = fp2r(x) + fp2r(z);
    got = fp2r(y);
    mx  = (rabs(fp2r(x)) > rabs(fp2r(z))) ? rabs(fp2r(x)) : rabs(fp2r(z));
    ulp = mx * pow2(-11);
    checks++;
    if (rabs(got - ex) > 2.5 * ulp) begin
      failures++;
      $display("FAIL %h + %h: exact %g got %g (%h)", x, z, ex, got, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp18_t t;
    check('{1'b0, 6'd31, 11'd0}, '{1'b0, 6'd31, 11'd0});
    check('{1'b0, 6'd31, 11'd0}, '{1'b1, 6'd30, 11'd0});
    check('{1'b0, 6'd40, 11'h7FF}, '{1'b0, 6'd40, 11'h001});
    check('{1'b0, 6'd31, 11'h001}, '{1'b1, 6'd31, 11'h000});
    check('{1'b0, 6'd31, 11'h400}, '{1'b1, 6'd20, 11'h000});
    for (int i = 0; i < 3000; i++) check(rand_fp(25, 36), rand_fp(25, 36));
    for (int i = 0; i < 2000; i++) begin
      t = rand_fp(25, 36);
      check(t, '{~t.sign, t.exp, 11'($urandom)});
    end
    for (int i = 0; i < 500; i++) check(rand_fp(25, 36), FP_ZERO);
    // exact cancellation gives zero
    t = '{1'b0, 6'd33, 11'h155};
    a = t; b = '{1'b1, 6'd33, 11'h155}; #1; checks++;
    if (y != FP_ZERO) begin failures++; $display("FAIL cancellation %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
