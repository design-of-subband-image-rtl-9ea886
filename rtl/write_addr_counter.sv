// write_addr_counter: write address generator of the memory controller.
//
// Each valid average coefficient of a pass advances the address by one, so
// the results of a pass are stored in the order they are produced. The
// counter also tells the controller when the pass is complete: done is high
// once `expected` coefficients have been counted (it counts in the last
// pass too, when the coefficients leave the chip instead of going to RAM).
// load restarts the count at 0. The increment-on-valid behaviour is the
// original design's; the completion count is this design's choice.
module write_addr_counter #(
  parameter int ADDR_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] expected,
  input  logic              wr_valid,
  output logic [ADDR_W-1:0] addr,
  output logic              done
);
  logic [ADDR_W-1:0] exp_r;

  assign done = (addr == exp_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr  <= '0;
      exp_r <= '0;
    end else if (load) begin
      addr  <= '0;
      exp_r <= expected;
    end else if (wr_valid && !done) begin
      addr <= addr + 1'b1;
    end
  end
endmodule
