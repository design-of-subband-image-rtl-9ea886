// tb_downsampler: a random stream of samples with random sequence starts
// and idle cycles; only samples of even index within their sequence may
// come out, in order, one cycle after they went in, both branches together.
module tb_downsampler;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  fp18_t lo_in, hi_in;
  coef_stream_t avg, det;
  int checks = 0, failures = 0, cycle = 0;
  typedef struct { fp18_t lo; fp18_t hi; int cyc; } exp_t;
  exp_t q [$];

  downsampler dut (.clk, .rst_n, .in_valid, .in_first, .lo_in, .hi_in, .avg, .det);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (avg.valid != det.valid) begin
      checks++; failures++; $display("FAIL avg/det valid differ");
    end
    if (avg.valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (avg.data != e.lo || det.data != e.hi || cycle != e.cyc + 1) begin
          failures++; $display("FAIL data or timing at cycle %0d", cycle);
        end
      end
    end
  end

  initial begin
    int idx;
    exp_t e;
    lo_in = FP_ZERO; hi_in = FP_ZERO;
    idx = 0;
    #22 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5 != 0);
      in_first = in_valid && ($urandom % 7 == 0);
      lo_in = rand_fp(1, 62);
      hi_in = rand_fp(1, 62);
      if (in_valid) begin
        if (in_first) idx = 0;
        if (idx % 2 == 0) begin
          e.lo = lo_in; e.hi = hi_in; e.cyc = cycle;
          q.push_back(e);
        end
        idx++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
