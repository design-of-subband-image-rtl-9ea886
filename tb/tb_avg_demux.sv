// tb_avg_demux: the average coefficient must reach the RAM side in every
// pass but the last and the output side in the last pass, never both.
module tb_avg_demux;
  import dwt_pkg::*;
  import dwt_tb_pkg::*;
  logic last_pass;
  coef_stream_t in_avg, to_ram, to_out;
  int checks = 0, failures = 0;

  avg_demux dut (.last_pass, .in_avg, .to_ram, .to_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      last_pass = 1'($urandom);
      in_avg.valid = 1'($urandom);
      in_avg.data = rand_fp(1, 62);
      #1;
      checks++;
      if (last_pass) begin
        if (to_out != in_avg || to_ram.valid) begin failures++; $display("FAIL last pass"); end
      end else begin
        if (to_ram != in_avg || to_out.valid) begin failures++; $display("FAIL inner pass"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
