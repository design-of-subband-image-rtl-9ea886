// tb_dwt_filter_bank: random sequences (random lengths, random idle cycles)
// go through the filter bank. Every output is compared with the real-valued
// Daubechies-4 convolution of the same inputs (lowpass H, highpass G, zero
// before the first sample of each sequence), with a tolerance of 2^-8 of
// the sum of the absolute terms. Each output must appear exactly two cycles
// after its input and carry that input's first flag. The hardwired
// coefficients of dwt_pkg are checked against the published values too.
module tb_dwt_filter_bank;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, out_valid, out_first;
  fp18_t x, lo, hi;
  fp18_t h [4];
  int checks = 0, failures = 0;
  int cycle = 0;

  typedef struct { real lo; real hi; real bnd; bit first; int cyc; } exp_t;
  exp_t q [$];
  real hist [4];

  dwt_filter_bank dut (.clk, .rst_n, .in_valid, .in_first, .x, .h,
                       .out_valid, .out_first, .lo, .hi);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output");
    end else begin
      e = q.pop_front();
      if (rabs(fp2r(lo) - e.lo) > e.bnd * pow2(-8) + 1e-30 ||
          rabs(fp2r(hi) - e.hi) > e.bnd * pow2(-8) + 1e-30 ||
          out_first != e.first || cycle != e.cyc + 2) begin
        failures++;
        $display("FAIL lo %g/%g hi %g/%g first %0d/%0d cycle %0d/%0d",
                 fp2r(lo), e.lo, fp2r(hi), e.hi, out_first, e.first, cycle, e.cyc + 2);
      end
    end
  end

  task automatic send(fp18_t v, bit f);
    exp_t e;
    real xr;
    @(negedge clk);
    x = v; in_first = f; in_valid = 1'b1;
    xr = fp2r(v);
    if (f) for (int t = 0; t < 4; t++) hist[t] = 0.0;
    for (int t = 3; t > 0; t--) hist[t] = hist[t-1];
    hist[0] = xr;
    e.lo = 0.0; e.hi = 0.0; e.bnd = 0.0;
    for (int t = 0; t < 4; t++) begin
      e.lo  += H[t] * hist[t];
      e.hi  += G[t] * hist[t];
      e.bnd += rabs(H[t] * hist[t]);
    end
    e.first = f;
    e.cyc = cycle;
    q.push_back(e);
    @(negedge clk);
    in_valid = 1'b0;
    // back-to-back most of the time, idle cycles sometimes
    while ($urandom % 4 == 0) @(negedge clk);
  endtask

  initial begin
    int len;
    fp18_t v;
    h = DB4_H;
    // the hardwired coefficients must be the nearest floats to Daubechies-4
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (rabs(fp2r(h[k]) - H[k]) > rabs(H[k]) * pow2(-12)) begin
        failures++;
        $display("FAIL coefficient h%0d = %g, expected %g", k, fp2r(h[k]), H[k]);
      end
    end
    x = FP_ZERO;
    for (int t = 0; t < 4; t++) hist[t] = 0.0;
    #22 rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      len = 1 + int'($urandom % 20);
      for (int n = 0; n < len; n++) begin
        v = rand_fp(28, 38);
        if ($urandom % 10 == 0) v = FP_ZERO;
        send(v, n == 0);
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
