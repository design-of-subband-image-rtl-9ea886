// data_addr_ctrl: data/address selector between the two RAMs.
//
// The two RAMs are used in ping-pong: in odd passes RAM A is written and RAM
// B is read, in even passes RAM B is written and RAM A is read (pass 1
// reads the image, not a RAM). The block steers the read address to one RAM
// and the write address and data to the other, and returns the read data of
// the RAM that was read in the previous cycle. Because reading and writing
// never meet in one RAM, a read can never see a word being overwritten.
// The write data goes to both RAMs unchanged (a_wdata, b_wdata); only the
// enables and addresses are steered.
// The ping-pong order is the original design's memory access style; the
// port-level encoding is this design's choice.
module data_addr_ctrl
  import dwt_pkg::*;
#(
  parameter int ADDR_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pass_odd,   // 1: write A / read B
  // read side
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output fp18_t             rd_data,
  // write side
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  fp18_t             wr_data,
  // RAM A
  output logic              a_en,
  output logic              a_we,
  output logic [ADDR_W-1:0] a_addr,
  output fp18_t             a_wdata,
  input  fp18_t             a_rdata,
  // RAM B
  output logic              b_en,
  output logic              b_we,
  output logic [ADDR_W-1:0] b_addr,
  output fp18_t             b_wdata,
  input  fp18_t             b_rdata
);
  logic rd_from_b;

  always_comb begin
    a_wdata = wr_data;
    b_wdata = wr_data;
    if (pass_odd) begin
      a_en = wr_en;  a_we = 1'b1;  a_addr = wr_addr;
      b_en = rd_en;  b_we = 1'b0;  b_addr = rd_addr;
    end else begin
      a_en = rd_en;  a_we = 1'b0;  a_addr = rd_addr;
      b_en = wr_en;  b_we = 1'b1;  b_addr = wr_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_from_b <= 1'b0;
    else if (rd_en) rd_from_b <= pass_odd;
  end

  assign rd_data = rd_from_b ? b_rdata : a_rdata;

  // A RAM is never read and written in the same cycle.
  a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
    !(a_en && b_en && (a_we == b_we)));
endmodule
