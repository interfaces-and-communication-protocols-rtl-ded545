// lll_rx -- Low Latency Link receiver.
//
// Recovers the partial vector sums sent by lll_tx (see there for the frame
// format) from the 32-bit user words of one transceiver lane. A frame starts
// with the K27.7 word; the next three words are I, Q and the check word. When
// the check word matches, `out_i`/`out_q` are updated and `out_valid` pulses
// in the clock after the check word arrived (one clock of receiver latency).
// A check mismatch, or a control character inside a frame, drops the frame and
// counts in `err_count`; a frame whose sequence number is not the previous one
// plus one (after the first good frame) counts in `seq_err_count` but is
// still delivered, as the newest value is always the one to use. All of this
// framing is this design's own choice.
module lll_rx #(
  parameter int unsigned SUM_W = llrf_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  llrf_pkg::lll_word_t     rx,
  output logic                    out_valid,
  output logic signed [SUM_W-1:0] out_i,
  output logic signed [SUM_W-1:0] out_q,
  output logic [31:0]             frames_ok,
  output logic [31:0]             err_count,
  output logic [31:0]             seq_err_count
);
  import llrf_pkg::*;

  typedef enum logic [1:0] {R_HUNT, R_I, R_Q, R_CHK} rx_state_t;

  rx_state_t   state;
  logic [31:0] got_i, got_q;
  logic [7:0]  seq, exp_seq;
  logic        synced;
  logic        sof;

  assign sof = (rx.charisk == 4'b1000) && (rx.data[31:24] == K27_7);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= R_HUNT;
      got_i         <= '0;
      got_q         <= '0;
      seq           <= '0;
      exp_seq       <= '0;
      synced        <= 1'b0;
      out_valid     <= 1'b0;
      out_i         <= '0;
      out_q         <= '0;
      frames_ok     <= '0;
      err_count     <= '0;
      seq_err_count <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        R_HUNT: if (sof) begin
          seq   <= rx.data[23:16];
          state <= R_I;
        end
        R_I, R_Q, R_CHK: begin
          if (rx.charisk != 4'b0000) begin
            // control character inside a frame: drop it, resynchronise
            err_count <= err_count + 32'd1;
            if (sof) begin
              seq   <= rx.data[23:16];
              state <= R_I;
            end else begin
              state <= R_HUNT;
            end
          end else if (state == R_I) begin
            got_i <= rx.data;
            state <= R_Q;
          end else if (state == R_Q) begin
            got_q <= rx.data;
            state <= R_CHK;
          end else begin
            state <= R_HUNT;
            if (rx.data == (got_i ^ got_q ^ {seq, 24'h0} ^ 32'hA5A5_A5A5)) begin
              out_valid <= 1'b1;
              out_i     <= SUM_W'(got_i);
              out_q     <= SUM_W'(got_q);
              frames_ok <= frames_ok + 32'd1;
              synced    <= 1'b1;
              exp_seq   <= seq + 8'd1;
              if (synced && seq != exp_seq) seq_err_count <= seq_err_count + 32'd1;
            end else begin
              err_count <= err_count + 32'd1;
            end
          end
        end
      endcase
    end
  end
endmodule
