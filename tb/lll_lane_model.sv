// lll_lane_model -- behavioural model of one transceiver lane (transmitter,
// backplane, receiver) as seen from the 32-bit user interface: words arrive
// DELAY clocks after they were sent. The transceiver path of the real part
// takes 12.5 to 23 user clocks, depending on its configuration. `corrupt`
// flips bit 20 (in the sequence byte of a start-of-frame word) of the word entering the lane, to test error handling.
module lll_lane_model #(
  parameter int unsigned DELAY = 13
) (
  input  logic                clk,
  input  llrf_pkg::lll_word_t din,
  input  logic                corrupt,
  output llrf_pkg::lll_word_t dout
);
  llrf_pkg::lll_word_t pipe [DELAY];
  initial for (int k = 0; k < int'(DELAY); k++) pipe[k] = llrf_pkg::LLL_IDLE;
  always_ff @(posedge clk) begin
    pipe[0] <= corrupt ? '{data: din.data ^ 32'h0010_0000, charisk: din.charisk} : din;
    for (int k = 1; k < int'(DELAY); k++) pipe[k] <= pipe[k-1];
  end
  assign dout = pipe[DELAY-1];
endmodule
