// tb_controller: for parameters 1..10 and the out-of-range values 0 and 15
// the controller must run the right number of passes, announce each with
// one load pulse carrying the pass number, the sizes (512x512 image: sizes
// alternate between halving the length and the count) and the expected
// coefficient count, flag the first, last and odd passes, wait for the
// write side to finish each pass and end with one done pulse.
module tb_controller;
  import dwt_pkg::*;
  localparam int IMG_W = 512, IMG_H = 512, ADDR_W = 18, CNT_W = 10;
  logic clk = 0, rst_n = 0, start = 0, wr_done = 0;
  logic [PASS_W-1:0] parameter_in, pass;
  logic busy, done, load, first_pass, last_pass, pass_odd, running;
  logic [CNT_W-1:0] seq_len, n_seq;
  logic [ADDR_W-1:0] expected;
  int checks = 0, failures = 0;

  controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W), .CNT_W(CNT_W)) dut (
    .clk, .rst_n, .start, .parameter_in, .wr_done, .busy, .done, .load, .pass,
    .first_pass, .last_pass, .pass_odd, .running, .seq_len, .n_seq, .expected);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int p);
    int np, len, ns, w;
    np = (p == 0) ? 1 : (p > 10 ? 10 : p);
    len = IMG_W; ns = IMG_H;
    @(negedge clk); parameter_in = PASS_W'(p); start = 1;
    @(negedge clk); start = 0;
    for (int k = 1; k <= np; k++) begin
      w = 0;
      while (!load && w < 20) begin @(negedge clk); w++; end
      chk(load, $sformatf("no load for pass %0d", k));
      chk(pass == PASS_W'(k) && seq_len == CNT_W'(len) && n_seq == CNT_W'(ns) &&
          expected == ADDR_W'((len / 2) * ns),
          $sformatf("pass %0d sizes %0d %0d %0d", pass, seq_len, n_seq, expected));
      chk(first_pass == (k == 1) && last_pass == (k == np) && pass_odd == (k % 2 == 1),
          $sformatf("pass %0d flags", k));
      @(negedge clk);
      chk(running && !load, "not running after load");
      repeat (1 + $urandom % 10) begin
        @(negedge clk);
        chk(running && !done && pass == PASS_W'(k), "pass ended without wr_done");
      end
      wr_done = 1; @(negedge clk); wr_done = 0;
      w = len; len = ns; ns = w / 2;
    end
    chk(done, $sformatf("no done after %0d passes", np));
    @(negedge clk);
    chk(!done && !busy, "done not a pulse or still busy");
  endtask

  initial begin
    #22 rst_n = 1;
    for (int p = 1; p <= 10; p++) run(p);
    run(0); run(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
