// read_addr_counter: read address generator of the memory controller.
//
// A pass filters n_seq sequences of seq_len samples. The data of a pass is
// stored row-major in a RAM as a matrix of seq_len rows and n_seq columns,
// and each sequence is one column of it: the counter walks down a column
// (address step n_seq), then moves to the top of the next column. Because
// the write side stores results in plain increasing order, this column-wise
// read both filters the other image direction and restores the
// orientation every second pass, so rows and columns alternate with no
// separate transpose.
//
// Interface: load (one cycle) sets the sizes and restarts at address 0;
// while active, step advances one sample. first marks the first sample of a
// sequence. In the first pass the image
// arrives in raster order, the address is unused and the same counter only
// tracks the position in the row. Column-wise reading with a constant stride
// is this design's choice.
module read_addr_counter #(
  parameter int ADDR_W = 18,
  parameter int CNT_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [CNT_W-1:0]  seq_len,
  input  logic [CNT_W-1:0]  n_seq,
  input  logic              step,
  output logic [ADDR_W-1:0] addr,
  output logic              active,
  output logic              first
);
  logic [CNT_W-1:0] i, j;
  logic [CNT_W-1:0] len_r, nseq_r;
  logic             last_seq_sample;

  assign first           = (i == '0);
  assign last_seq_sample = (i == len_r - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; j <= '0; addr <= '0; active <= 1'b0;
      len_r <= '0; nseq_r <= '0;
    end else if (load) begin
      i <= '0; j <= '0; addr <= '0; active <= 1'b1;
      len_r <= seq_len; nseq_r <= n_seq;
    end else if (step && active) begin
      if (last_seq_sample) begin
        i <= '0;
        if (j == nseq_r - 1'b1) begin
          active <= 1'b0;
        end else begin
          j    <= j + 1'b1;
          addr <= ADDR_W'(j) + 1'b1;
        end
      end else begin
        i    <= i + 1'b1;
        addr <= addr + ADDR_W'(nseq_r);
      end
    end
  end
endmodule
