// tb_dwt_ram: writes random words to random addresses of a reduced RAM,
// keeps a shadow copy and checks every read one cycle after it is issued.
module tb_dwt_ram;
  localparam int ADDR_W = 8, DATA_W = 18;
  logic clk = 0, en = 0, we = 0;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata;
  logic [DATA_W-1:0] shadow [2**ADDR_W];
  int checks = 0, failures = 0;

  dwt_ram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] expv;
    for (int a = 0; a < 2**ADDR_W; a++) begin
      @(negedge clk); en = 1; we = 1; addr = ADDR_W'(a); wdata = DATA_W'($urandom);
      shadow[a] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1; addr = ADDR_W'($urandom); we = 1'($urandom);
      wdata = DATA_W'($urandom);
      if (we) shadow[addr] = wdata;
      else begin
        expv = shadow[addr];
        @(negedge clk);
        en = 0;
        checks++;
        if (rdata != expv) begin failures++; $display("FAIL read %0d: %h vs %h", addr, rdata, expv); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
