// tb_data_addr_ctrl: in odd passes the write request must reach RAM A and
// the read request RAM B, in even passes the other way round; the read data
// returned must be that of the RAM that was read one cycle earlier.
module tb_data_addr_ctrl;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  localparam int ADDR_W = 18;
  logic clk = 0, rst_n = 0, pass_odd, rd_en, wr_en;
  logic [ADDR_W-1:0] rd_addr, wr_addr, a_addr, b_addr;
  fp18_t rd_data, wr_data, a_wdata, b_wdata, a_rdata, b_rdata;
  logic a_en, a_we, b_en, b_we;
  int checks = 0, failures = 0;

  data_addr_ctrl #(.ADDR_W(ADDR_W)) dut (.clk, .rst_n, .pass_odd, .rd_en, .rd_addr, .rd_data,
    .wr_en, .wr_addr, .wr_data, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_odd;
    pass_odd = 1; rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0;
    wr_data = FP_ZERO; a_rdata = FP_ZERO; b_rdata = FP_ZERO;
    #22 rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i % 50 == 0) pass_odd = 1'($urandom);
      rd_en = 1'b1; wr_en = 1'($urandom);
      rd_addr = ADDR_W'($urandom); wr_addr = ADDR_W'($urandom); wr_data = rand_fp(1, 62);
      #1;
      checks++;
      if (pass_odd) begin
        if (a_en != wr_en || !a_we || a_addr != wr_addr || a_wdata != wr_data ||
            !b_en || b_we || b_addr != rd_addr) begin failures++; $display("FAIL odd routing"); end
      end else begin
        if (b_en != wr_en || !b_we || b_addr != wr_addr || b_wdata != wr_data ||
            !a_en || a_we || a_addr != rd_addr) begin failures++; $display("FAIL even routing"); end
      end
      prev_odd = pass_odd;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      a_rdata = rand_fp(1, 62); b_rdata = rand_fp(1, 62);
      if ($urandom % 2 == 1) pass_odd = ~pass_odd;
      #1;
      checks++;
      if (rd_data != (prev_odd ? b_rdata : a_rdata)) begin failures++; $display("FAIL read data select"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
