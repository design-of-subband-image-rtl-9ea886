// tb_fp_mul: checks the 18-bit float multiplier against real arithmetic.
// With truncation the result must not exceed the exact product in magnitude
// and must be within one unit in the last place of it; zero, underflow and
// overflow cases are checked too.
module tb_fp_mul;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  fp18_t a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(fp18_t x, fp18_t z);
    real ex, got;
    a = x; b = z;
    #1;
    ex  = fp2r(x) * fp2r(z);
    got = fp2r(y);
    checks++;
    if (rabs(got) > rabs(ex) || rabs(ex) - rabs(got) > rabs(ex) * pow2(-11) ||
        (ex != 0.0 && ((got < 0.0) != (ex < 0.0)))) begin
      failures++;
      $display("FAIL %h * %h: exact %g got %g (%h)", x, z, ex, got, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp18_t one, two;
    one = '{1'b0, 6'd31, 11'd0};
    two = '{1'b0, 6'd32, 11'd0};
    check(one, two);
    check('{1'b0, 6'd31, 11'h7FF}, '{1'b0, 6'd31, 11'h7FF});
    check('{1'b1, 6'd33, 11'h400}, '{1'b0, 6'd30, 11'h123});
    for (int i = 0; i < 5000; i++) check(rand_fp(16, 46), rand_fp(16, 46));
    // zero operand
    a = FP_ZERO; b = two; #1; checks++;
    if (y.exp != 0) begin failures++; $display("FAIL zero operand"); end
    // underflow to zero
    a = '{1'b0, 6'd2, 11'd5}; b = '{1'b0, 6'd3, 11'd7}; #1; checks++;
    if (y.exp != 0) begin failures++; $display("FAIL underflow"); end
    // overflow saturates
    a = '{1'b0, 6'd60, 11'd5}; b = '{1'b1, 6'd60, 11'd7}; #1; checks++;
    if (y != '{1'b1, 6'h3F, 11'h7FF}) begin failures++; $display("FAIL overflow %h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
