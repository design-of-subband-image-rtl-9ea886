// tb_normalization: every pixel value must convert to a float of exactly the
// same value, and the RAM input must be passed when selected.
module tb_normalization;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  logic [7:0] pix;
  fp18_t ram_data, y;
  logic sel_ram;
  int checks = 0, failures = 0;

  normalization dut (.pix, .ram_data, .sel_ram, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel_ram = 1'b0;
    ram_data = '{1'b1, 6'd40, 11'h2A5};
    for (int v = 0; v < 256; v++) begin
      pix = 8'(v);
      #1;
      checks++;
      if (fp2r(y) != real'(v) || (v == 0 && y != FP_ZERO)) begin
        failures++;
        $display("FAIL pixel %0d -> %h (%g)", v, y, fp2r(y));
      end
    end
    sel_ram = 1'b1;
    for (int i = 0; i < 50; i++) begin
      ram_data = rand_fp(1, 63);
      pix = 8'($urandom);
      #1;
      checks++;
      if (y != ram_data) begin failures++; $display("FAIL ram select"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
