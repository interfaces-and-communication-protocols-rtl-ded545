// lll_tx -- Low Latency Link transmitter.
//
// Carries the partial vector sum of a data acquisition carrier to the main
// controller over one transceiver lane of the full-mesh fabric. The link is a
// light custom protocol on the 32-bit user interface of the transceiver (four
// 8b/10b bytes per word, `charisk` marks control characters):
//
//   word 0  {K27.7, seq[7:0], 16'h0000}   charisk 4'b1000  start of frame
//   word 1  I, sign-extended to 32 bits   charisk 4'b0000
//   word 2  Q, sign-extended to 32 bits   charisk 4'b0000
//   word 3  check = I ^ Q ^ {seq, 24'h0} ^ 32'hA5A5_A5A5
//   idle    {K28.5, D16.2, D16.2, D16.2}  charisk 4'b1000
//
// The frame layout, the sequence number and the check word are this design's
// own choices; the protocol itself is described only by its purpose and its
// latency budget. While `en` is high frames are sent back to back, each
// carrying the newest sum presented with `in_valid` (a sum that is replaced
// before a frame starts is skipped: only the newest value matters to a
// feedback loop). A frame starts in the clock after a new sum is seen if the
// lane is idle, so the transmitter adds one clock of latency to the first word.
module lll_tx #(
  parameter int unsigned SUM_W = llrf_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    in_valid,
  input  logic signed [SUM_W-1:0] in_i,
  input  logic signed [SUM_W-1:0] in_q,
  output llrf_pkg::lll_word_t     tx,
  output logic [31:0]             frames_sent
);
  import llrf_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_I, S_Q, S_CHK} tx_state_t;

  // `state` names the word put on the lane at the next clock edge
  tx_state_t   state;
  logic        pending;
  logic [31:0] hold_i, hold_q, fr_i, fr_q;
  logic [7:0]  seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pending     <= 1'b0;
      hold_i      <= '0;
      hold_q      <= '0;
      fr_i        <= '0;
      fr_q        <= '0;
      seq         <= '0;
      tx          <= LLL_IDLE;
      frames_sent <= '0;
    end else begin
      if (in_valid) begin
        hold_i <= 32'(in_i);
        hold_q <= 32'(in_q);
      end
      unique case (state)
        S_IDLE: begin
          if (en && (pending || in_valid)) begin
            fr_i    <= in_valid ? 32'(in_i) : hold_i;
            fr_q    <= in_valid ? 32'(in_q) : hold_q;
            tx      <= '{data: {K27_7, seq, 16'h0000}, charisk: 4'b1000};
            pending <= 1'b0;
            state   <= S_I;
          end else begin
            tx      <= LLL_IDLE;
            pending <= pending || in_valid;
          end
        end
        S_I: begin
          tx      <= '{data: fr_i, charisk: 4'b0000};
          pending <= pending || in_valid;
          state   <= S_Q;
        end
        S_Q: begin
          tx      <= '{data: fr_q, charisk: 4'b0000};
          pending <= pending || in_valid;
          state   <= S_CHK;
        end
        S_CHK: begin
          tx          <= '{data: fr_i ^ fr_q ^ {seq, 24'h0} ^ 32'hA5A5_A5A5, charisk: 4'b0000};
          pending     <= pending || in_valid;
          seq         <= seq + 8'd1;
          frames_sent <= frames_sent + 32'd1;
          state       <= S_IDLE;
        end
      endcase
    end
  end
endmodule
