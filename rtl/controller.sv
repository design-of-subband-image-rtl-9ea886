// controller: central controller of the encoder.
//
// Takes the user's single parameter, the number of one-dimensional filter
// passes (1..10; two passes make one two-dimensional level, so 10 passes
// give five levels), and runs the passes one after the other. Pass 1
// filters the rows of the IMG_W x IMG_H image as it streams in; every later
// pass filters the other direction of the average coefficients the previous
// pass left in RAM. Sizes per pass: sequence length and number of
// sequences start at (IMG_W, IMG_H) and become (previous count, previous
// length / 2) at each new pass.
//
// Per pass it pulses load for one cycle (restarting both address counters
// with the pass sizes), then waits in RUN until the write address counter
// reports that all average coefficients of the pass have been produced;
// only then does the next pass start reading. After the last pass it
// pulses done. A parameter of 0 is taken as 1 and one above 10 as 10.
// Pass sequencing and the ping-pong order are the original design's; the
// state encoding and the handshake are this design's choices.
module controller
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
  input  logic              wr_done,
  output logic              busy,
  output logic              done,
  output logic              load,
  output logic [PASS_W-1:0] pass,
  output logic              first_pass,
  output logic              last_pass,
  output logic              pass_odd,
  output logic              running,
  output logic [CNT_W-1:0]  seq_len,
  output logic [CNT_W-1:0]  n_seq,
  output logic [ADDR_W-1:0] expected
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN} state_t;
  state_t state;
  logic [PASS_W-1:0] num_pass;

  assign busy       = (state != S_IDLE);
  assign load       = (state == S_LOAD);
  assign running    = (state == S_RUN);
  assign first_pass = (pass == PASS_W'(1));
  assign last_pass  = (pass == num_pass);
  assign pass_odd   = pass[0];
  assign expected   = ADDR_W'(seq_len >> 1) * ADDR_W'(n_seq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      num_pass <= PASS_W'(1);
      pass     <= PASS_W'(1);
      seq_len  <= CNT_W'(IMG_W);
      n_seq    <= CNT_W'(IMG_H);
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (parameter_in == '0)                   num_pass <= PASS_W'(1);
          else if (parameter_in > PASS_W'(MAX_PASS)) num_pass <= PASS_W'(MAX_PASS);
          else                                      num_pass <= parameter_in;
          pass    <= PASS_W'(1);
          seq_len <= CNT_W'(IMG_W);
          n_seq   <= CNT_W'(IMG_H);
          state   <= S_LOAD;
        end
        S_LOAD: state <= S_RUN;
        S_RUN: if (wr_done) begin
          if (last_pass) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            pass    <= pass + 1'b1;
            seq_len <= n_seq;
            n_seq   <= seq_len >> 1;
            state   <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
