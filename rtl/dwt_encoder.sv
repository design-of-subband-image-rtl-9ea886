// dwt_encoder: subband image encoder by discrete wavelet transform.
//
// A single Daubechies-4 filter cell, reused for every resolution level,
// decomposes an 8-bit IMG_W x IMG_H image. The only control input is the
// number of one-dimensional passes (1..10), which sets the compression
// rate. Pass 1 filters the image rows as pixels stream in; each later pass
// filters, in the other direction, the average (lowpass) coefficients that
// the previous pass stored. Detail (highpass) coefficients leave the
// encoder in every pass; the average coefficients of the last pass leave
// through the average output.
//
// Blocks: normalization (pixel to float, image/RAM select), hardwired
// coefficients (dwt_pkg::DB4_H), filter bank with four shared floating-point multipliers, two
// down-by-2 samplers, average demultiplexer, and the memory controller:
// central controller, read and write address counters, data/address
// selector and two RAMs used in ping-pong (pass 1 writes A, pass 2 reads A
// and writes B, pass 3 reads B and writes A, ...).
//
// Interface: pulse start with parameter_in valid. During pass 1 pixels are
// taken in raster order whenever pix_valid and pix_ready are both high.
// avg_out and det_out are 19-bit words (valid bit + 18-bit float) with
// cur_pass telling which pass they belong to. Output order: in odd passes
// sequence by sequence along image rows, in even passes along image
// columns; within a sequence in increasing position. done pulses once when
// the last coefficient has left.
//
// Timing: one sample enters the filter per clock in passes 2..10, so a
// pass of L samples takes about L cycles plus a few cycles of pipeline and
// pass set-up; coefficients of each kind come at most every second cycle.
module dwt_encoder
  import dwt_pkg::*;
#(
  parameter int IMG_W  = 512,
  parameter int IMG_H  = 512,
  parameter int ADDR_W = 18,
  parameter int CNT_W  = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [PASS_W-1:0] parameter_in,
  input  logic              pix_valid,
  output logic              pix_ready,
  input  logic [7:0]        pix,
  output coef_stream_t      avg_out,
  output coef_stream_t      det_out,
  output logic [PASS_W-1:0] cur_pass,
  output logic              busy,
  output logic              done
);
  // controller
  logic              load, first_pass, last_pass, pass_odd, running, wr_done;
  logic [PASS_W-1:0] pass;
  logic [CNT_W-1:0]  seq_len, n_seq;
  logic [ADDR_W-1:0] expected;

  controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W), .CNT_W(CNT_W)) u_ctrl (
    .clk, .rst_n, .start, .parameter_in, .wr_done,
    .busy, .done, .load, .pass, .first_pass, .last_pass, .pass_odd, .running,
    .seq_len, .n_seq, .expected
  );
  assign cur_pass = pass;

  // read side
  logic              rd_step, rd_active, rd_first, rd_en, pix_take;
  logic [ADDR_W-1:0] rd_addr;

  assign pix_ready = running & first_pass & rd_active;
  assign pix_take  = pix_valid & pix_ready;
  assign rd_en     = running & ~first_pass & rd_active;
  assign rd_step   = first_pass ? pix_take : rd_en;

  read_addr_counter #(.ADDR_W(ADDR_W), .CNT_W(CNT_W)) u_rdc (
    .clk, .rst_n, .load, .seq_len, .n_seq, .step(rd_step),
    .addr(rd_addr), .active(rd_active), .first(rd_first)
  );

  logic ram_v_q, ram_f_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ram_v_q <= 1'b0;
      ram_f_q <= 1'b0;
    end else begin
      ram_v_q <= rd_en;
      ram_f_q <= rd_en & rd_first;
    end
  end

  // filter bank input
  fp18_t rd_data, x;
  logic  f_valid, f_first;
  normalization u_norm (.pix, .ram_data(rd_data), .sel_ram(~first_pass), .y(x));
  assign f_valid = first_pass ? pix_take : ram_v_q;
  assign f_first = first_pass ? rd_first : ram_f_q;

  // hardwired coefficient register
  fp18_t h [4];
  assign h = DB4_H;

  logic  fb_valid, fb_first;
  fp18_t lo, hi;
  dwt_filter_bank u_fb (
    .clk, .rst_n, .in_valid(f_valid), .in_first(f_first), .x, .h,
    .out_valid(fb_valid), .out_first(fb_first), .lo, .hi
  );

  coef_stream_t avg, to_ram;
  downsampler u_ds (
    .clk, .rst_n, .in_valid(fb_valid), .in_first(fb_first),
    .lo_in(lo), .hi_in(hi), .avg, .det(det_out)
  );

  avg_demux u_demux (.last_pass, .in_avg(avg), .to_ram, .to_out(avg_out));

  // write side
  logic [ADDR_W-1:0] wr_addr;
  write_addr_counter #(.ADDR_W(ADDR_W)) u_wrc (
    .clk, .rst_n, .load, .expected, .wr_valid(avg.valid), .addr(wr_addr), .done(wr_done)
  );

  // RAMs
  logic              a_en, a_we, b_en, b_we;
  logic [ADDR_W-1:0] a_addr, b_addr;
  fp18_t             a_wdata, b_wdata, a_rdata, b_rdata;

  data_addr_ctrl #(.ADDR_W(ADDR_W)) u_dac (
    .clk, .rst_n, .pass_odd,
    .rd_en, .rd_addr, .rd_data,
    .wr_en(to_ram.valid), .wr_addr, .wr_data(to_ram.data),
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  dwt_ram #(.ADDR_W(ADDR_W), .DATA_W(FP_W)) u_ram_a (
    .clk, .en(a_en), .we(a_we), .addr(a_addr), .wdata(a_wdata), .rdata(a_rdata));
  dwt_ram #(.ADDR_W(ADDR_W), .DATA_W(FP_W)) u_ram_b (
    .clk, .en(b_en), .we(b_we), .addr(b_addr), .wdata(b_wdata), .rdata(b_rdata));
endmodule
