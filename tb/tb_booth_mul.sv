// tb_booth_mul: checks the radix-4 Booth multiplier against the
// simulator's own multiplication, for corner values and random operands.
module tb_booth_mul;
  localparam int W = 12;
  logic [W-1:0] a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  booth_mul #(.W(W)) dut (.a, .b, .p);

  task automatic check(logic [W-1:0] x, logic [W-1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== (2*W)'(x) * (2*W)'(y)) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, got %0d", x, y, (2*W)'(x) * (2*W)'(y), p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check('1, '1); check('1, 1); check(1, '1);
    check(12'h800, 12'hFFF); check(12'hAAA, 12'h555); check(12'h555, 12'hAAA);
    for (int i = 0; i < 5000; i++) check(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
