// tb_dwt_encoder_workloads: end-to-end test of the subband image encoder on the 512x512 workload with every pass count.
//
// A pseudo-random 512x512 image (a smooth gradient plus noise, 8-bit) is
// encoded with the pass counts 1 to 10. Pixels are offered in raster order
// with random idle cycles. Every detail and average coefficient is compared,
// in order and with its pass number, with a real-valued reference of the
// same decomposition (dwt_tb_pkg::dwt_ref); the tolerance is 2^-8 of the
// sum of absolute terms per pass. Passes 2 and later must take no more than
// one cycle per sample plus 8 cycles. The test also counts how often each
// mechanism happened (row and column passes, writes and reads of both RAMs,
// input idle cycles and back-pressure, sequence starts with zero history,
// average output through the demultiplexer) and fails if one
// never did.
module tb_dwt_encoder_workloads;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  localparam int W = 512, HGT = 512;
  localparam int NRUN = 10;
  localparam int PLIST [NRUN] = '{1, 2, 3, 4, 5, 6, 7, 8, 9, 10};

  logic clk = 0, rst_n = 0, start = 0, pix_valid = 0, pix_ready, busy, done;
  logic [PASS_W-1:0] parameter_in, cur_pass;
  logic [7:0] pix;
  coef_stream_t avg_out, det_out;
  int checks = 0, failures = 0, cycle = 0;

  dwt_encoder  dut (.clk, .rst_n, .start, .parameter_in, .pix_valid, .pix_ready, .pix,
                   .avg_out, .det_out, .cur_pass, .busy, .done);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_t det_q [$], avg_q [$];
  int n_det_bad = 0, n_avg_bad = 0;

  // mechanism counters
  int m_row_pass = 0, m_col_pass = 0, m_a_wr = 0, m_b_wr = 0, m_a_rd = 0, m_b_rd = 0;
  int m_in_idle = 0, m_backpressure = 0, m_seq_start = 0, m_avg_out = 0, m_clamp = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.a_en && dut.a_we) m_a_wr++;
    if (dut.b_en && dut.b_we) m_b_wr++;
    if (dut.a_en && !dut.a_we) m_a_rd++;
    if (dut.b_en && !dut.b_we) m_b_rd++;
    if (pix_ready && !pix_valid) m_in_idle++;
    if (pix_valid && !pix_ready) m_backpressure++;
    if (dut.f_valid && dut.f_first) m_seq_start++;
    if (dut.load) begin
      if (cur_pass[0]) m_row_pass++; else m_col_pass++;
    end
  end

  task automatic cmp(coef_stream_t o, bit is_avg);
    ref_t e;
    string kind;
    kind = is_avg ? "average" : "detail";
    checks++;
    if ((is_avg ? avg_q.size() : det_q.size()) == 0) begin
      failures++;
      $display("FAIL unexpected %s output", kind);
      return;
    end
    e = is_avg ? avg_q.pop_front() : det_q.pop_front();
    if (cur_pass != PASS_W'(e.pass) ||
        rabs(fp2r(o.data) - e.v) > e.bnd * real'(e.pass) * pow2(-8) + 1e-9) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s pass %0d/%0d got %g expected %g (bound %g)",
                 kind, cur_pass, e.pass, fp2r(o.data), e.v, e.bnd);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (det_out.valid) cmp(det_out, 1'b0);
    if (avg_out.valid) begin m_avg_out++; cmp(avg_out, 1'b1); end
  end

  // pass durations
  int pass_start = 0, pass_len = 0, pass_nseq = 0, pass_no = 0;
  bit pass_live = 0;
  always @(posedge clk) if (rst_n) begin
    if ((dut.load || done) && pass_live && pass_no != 1) begin
      checks++;
      if (cycle - pass_start > pass_len * pass_nseq + 8) begin
        failures++;
        $display("FAIL pass took %0d cycles for %0d samples", cycle - pass_start, pass_len * pass_nseq);
      end
    end
    if (dut.load) begin
      pass_start <= cycle; pass_no <= int'(dut.cur_pass); pass_len <= int'(dut.seq_len); pass_nseq <= int'(dut.n_seq);
      pass_live <= 1;
    end
    if (done) pass_live <= 0;
  end

  task automatic encode(int p, bit gaps);
    real img[];
    int np, w;
    np = (p == 0) ? 1 : (p > MAX_PASS ? MAX_PASS : p);
    if (np != p) m_clamp++;
    img = new[W * HGT];
    for (int r = 0; r < HGT; r++)
      for (int c = 0; c < W; c++)
        img[r * W + c] = real'((((r * 255) / HGT + (c * 97) / W) / 2 + int'($urandom % 64)) % 256);
    det_q.delete(); avg_q.delete();
    dwt_ref(img, W, HGT, np, det_q, avg_q);
    @(negedge clk);
    parameter_in = PASS_W'(p); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < W * HGT; i++) begin
      if (gaps) while ($urandom % 8 == 0) begin pix_valid = 0; @(negedge clk); end
      pix_valid = 1; pix = 8'(int'(img[i]));
      @(posedge clk);
      while (!pix_ready) @(posedge clk);
      @(negedge clk);
    end
    pix_valid = 0;
    w = 0;
    while (!done) begin @(negedge clk); w++; end
    @(negedge clk);
    checks++;
    if (det_q.size() != 0 || avg_q.size() != 0 || busy) begin
      failures++;
      $display("FAIL run with parameter %0d: %0d details and %0d averages missing",
               p, det_q.size(), avg_q.size());
    end
    $display("parameter %0d: done at cycle %0d", p, cycle);
  endtask

  task automatic mech(int n, string what);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    parameter_in = '0; pix = '0;
    #22 rst_n = 1;
    for (int i = 0; i < NRUN; i++) encode(PLIST[i], 1'b1);
    mech(m_row_pass, "row pass");
    mech(m_col_pass, "column pass");
    mech(m_a_wr, "RAM A write");
    mech(m_b_wr, "RAM B write");
    mech(m_a_rd, "RAM A read");
    mech(m_b_rd, "RAM B read");
    mech(m_in_idle, "input idle cycle");
    mech(m_backpressure, "input back-pressure");
    mech(m_seq_start, "sequence start (zero history)");
    mech(m_avg_out, "average output via demux");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
