// dwt_ram: one of the two separated coefficient RAMs (A and B).
//
// Single-port synchronous RAM of 2^ADDR_W words of DATA_W bits: with en and
// we it writes wdata at addr; with en alone it reads, and rdata holds the
// word one cycle later. In any pass one RAM is only read and the other only
// written, so one port per RAM is enough. The memory is not reset; the
// encoder only reads words written earlier in the same encoding. The sizes
// follow the original design (18-bit addresses, 18-bit floats); single-port
// synchronous behaviour is this design's choice.
module dwt_ram #(
  parameter int ADDR_W = 18,
  parameter int DATA_W = 18
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
