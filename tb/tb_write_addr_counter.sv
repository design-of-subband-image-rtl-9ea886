// tb_write_addr_counter: with random gaps between valid samples the address
// must count 0,1,2,... and done must rise exactly when the expected number
// has been counted, then stay while further valids are ignored.
module tb_write_addr_counter;
  localparam int ADDR_W = 18;
  logic clk = 0, rst_n = 0, load = 0, wr_valid = 0;
  logic [ADDR_W-1:0] expected, addr;
  logic done;
  int checks = 0, failures = 0;

  write_addr_counter #(.ADDR_W(ADDR_W)) dut (.clk, .rst_n, .load, .expected, .wr_valid, .addr, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n);
    @(negedge clk);
    expected = ADDR_W'(n); load = 1;
    @(negedge clk);
    load = 0;
    for (int k = 0; k < n; k++) begin
      wr_valid = 0;
      while ($urandom % 3 == 0) @(negedge clk);
      checks++;
      if (addr != ADDR_W'(k) || done) begin
        failures++; $display("FAIL n %0d k %0d addr %0d done %0d", n, k, addr, done);
      end
      wr_valid = 1;
      @(negedge clk);
    end
    wr_valid = 1; @(negedge clk); wr_valid = 0;
    checks++;
    if (!done || addr != ADDR_W'(n)) begin failures++; $display("FAIL end n %0d addr %0d", n, addr); end
  endtask

  initial begin
    #22 rst_n = 1;
    run(1); run(5); run(64); run(300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
