// tb_read_addr_counter: for several pass sizes the counter must visit the
// stored seq_len x n_seq matrix column by column (address = i*n_seq + j for
// sequence j, sample i), flag the first sample of each sequence, ignore
// steps while inactive and go inactive after the last sample.
module tb_read_addr_counter;
  localparam int ADDR_W = 18, CNT_W = 10;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [CNT_W-1:0] seq_len, n_seq;
  logic [ADDR_W-1:0] addr;
  logic active, first;
  int checks = 0, failures = 0;

  read_addr_counter #(.ADDR_W(ADDR_W), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .load, .seq_len, .n_seq, .step, .addr, .active, .first);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int len, int ns);
    @(negedge clk);
    seq_len = CNT_W'(len); n_seq = CNT_W'(ns); load = 1;
    @(negedge clk);
    load = 0;
    for (int j = 0; j < ns; j++) begin
      for (int i = 0; i < len; i++) begin
        step = 0;
        while ($urandom % 3 == 0) @(negedge clk);
        checks++;
        if (!active || addr != ADDR_W'(i * ns + j) || first != (i == 0)) begin
          failures++;
          $display("FAIL len %0d ns %0d i %0d j %0d: addr %0d first %0d active %0d",
                   len, ns, i, j, addr, first, active);
        end
        step = 1;
        @(negedge clk);
      end
    end
    step = 0;
    checks++;
    if (active) begin failures++; $display("FAIL still active after %0dx%0d", len, ns); end
    step = 1; @(negedge clk); step = 0;
    checks++;
    if (active || addr != ADDR_W'((len - 1) * ns + ns - 1)) begin failures++; $display("FAIL step while inactive"); end
  endtask

  initial begin
    #22 rst_n = 1;
    run(4, 3); run(8, 8); run(8, 4); run(1, 5); run(6, 1); run(32, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
