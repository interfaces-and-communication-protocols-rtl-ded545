// tb_lll -- Low Latency Link transmitter and receiver through a lane model.
// Checks: values (with sign) arrive intact; the latency of an isolated sum,
// from in_valid to out_valid, is 1 (transmitter) + lane delay + 3 (rest of
// the frame) + 1 (receiver) clocks; a stream of sums arrives in order; a
// corrupted word drops exactly that frame and is counted, and the lost frame
// shows as a sequence error; with the transmitter disabled nothing arrives.
module tb_lll;
  import llrf_pkg::*;
  localparam int unsigned DLY = 13;
  localparam int unsigned LAT = 1 + DLY + 3 + 1;

  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, corrupt = 0;
  logic signed [23:0] in_i = 0, in_q = 0;
  lll_word_t tx, rx;
  logic out_valid;
  logic signed [23:0] out_i, out_q;
  logic [31:0] frames_sent, frames_ok, err_count, seq_err_count;
  int checks = 0, failures = 0;
  longint cyc = 0;

  lll_tx #(.SUM_W (24)) u_tx (.clk, .rst_n, .en, .in_valid, .in_i, .in_q, .tx, .frames_sent);
  lll_lane_model #(.DELAY (DLY)) u_lane (.clk, .din (tx), .corrupt, .dout (rx));
  lll_rx #(.SUM_W (24)) u_rx (.clk, .rst_n, .rx, .out_valid, .out_i, .out_q,
                              .frames_ok, .err_count, .seq_err_count);

  always #5 clk = ~clk;
  always @(negedge clk) cyc++;  // stable at the rising edge
  longint t_in;
  always @(posedge clk) if (in_valid) t_in = cyc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // received values, in order
  logic signed [23:0] got_i [$], got_q [$];
  longint             got_t [$];
  always @(posedge clk) if (out_valid) begin
    got_i.push_back(out_i); got_q.push_back(out_q); got_t.push_back(cyc);
  end

  task automatic send(input logic signed [23:0] vi, input logic signed [23:0] vq);
    @(negedge clk);
    in_i = vi; in_q = vq; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    longint t0;
    logic signed [23:0] si [$], sq [$];
    int k, n0, e0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    en = 1;
    repeat (30) @(negedge clk);

    // 1. isolated sums: value and latency
    for (int n = 0; n < 6; n++) begin
      logic signed [23:0] vi, vq;
      vi = (n == 0) ? -24'sd1 : $signed(24'($urandom));
      vq = (n == 1) ? -24'sd8388608 : $signed(24'($urandom));
      got_i.delete(); got_q.delete(); got_t.delete();
      @(negedge clk);
      t0 = cyc;
      in_i = vi; in_q = vq; in_valid = 1;
      @(negedge clk) in_valid = 0;
      repeat (LAT + 10) @(negedge clk);
      check(got_i.size() == 1, "one frame for an isolated sum");
      if (got_i.size() == 1) begin
        check(got_i[0] == vi && got_q[0] == vq,
              $sformatf("value %0d,%0d got %0d,%0d", vi, vq, got_i[0], got_q[0]));
        check(got_t[0] - t_in == longint'(LAT), $sformatf("latency %0d, expected %0d", got_t[0] - t_in, LAT));
      end
    end

    // 2. stream of sums, one every frame time
    got_i.delete(); got_q.delete(); got_t.delete();
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_i = $signed(24'($urandom)); in_q = $signed(24'($urandom)); in_valid = 1;
      si.push_back(in_i); sq.push_back(in_q);
      @(negedge clk) in_valid = 0;
      repeat (2) @(negedge clk);
    end
    repeat (LAT + 10) @(negedge clk);
    check(got_i.size() >= 95, $sformatf("stream: %0d of 100 sums delivered", got_i.size()));
    k = 0;
    for (int g = 0; g < got_i.size(); g++) begin
      while (k < si.size() && !(si[k] == got_i[g] && sq[k] == got_q[g])) k++;
      check(k < si.size(), $sformatf("stream: received value %0d is a sent value, in order", g));
    end
    check(got_i[got_i.size()-1] == si[si.size()-1], "stream: last value delivered");
    check(err_count == 0 && seq_err_count == 0, "stream: no errors");

    // 3. corruption: one bad word drops one frame
    n0 = int'(frames_ok); e0 = int'(err_count);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      in_i = 24'(n); in_q = -24'(n); in_valid = 1;
      corrupt = (n == 10);
      @(negedge clk) in_valid = 0; corrupt = 0;
      repeat (2) @(negedge clk);
    end
    repeat (LAT + 10) @(negedge clk);
    check(int'(err_count) == e0 + 1, $sformatf("corruption counted (%0d)", err_count));
    check(seq_err_count == 1, $sformatf("lost frame seen as sequence gap (%0d)", seq_err_count));
    check(int'(frames_ok) == n0 + 19, $sformatf("19 of 20 frames good (%0d)", int'(frames_ok) - n0));

    // 4. transmitter disabled
    en = 0;
    repeat (10) @(negedge clk);
    n0 = int'(frames_ok);
    for (int n = 0; n < 5; n++) send(24'sd5, 24'sd7);
    repeat (LAT + 10) @(negedge clk);
    check(int'(frames_ok) == n0, "no frames while disabled");
    check(rx == LLL_IDLE, "idle pattern while disabled");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
