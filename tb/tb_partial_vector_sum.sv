// tb_partial_vector_sum -- random I/Q samples on all channels; the sums must
// equal a reference computed in the testbench, one clock later.
module tb_partial_vector_sum;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] in_i [N], in_q [N];
  logic out_valid;
  logic signed [23:0] sum_i, sum_q;
  int checks = 0, failures = 0;

  partial_vector_sum #(.N_CH (N), .IN_W (16), .OUT_W (24)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int ri, rq;
    for (int c = 0; c < int'(N); c++) begin in_i[c] = 0; in_q[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      ri = 0; rq = 0;
      for (int c = 0; c < int'(N); c++) begin
        // extreme values on some iterations
        in_i[c] = (t % 10 == 0) ? -16'sd32768 : $signed(16'($urandom));
        in_q[c] = (t % 10 == 1) ?  16'sd32767 : $signed(16'($urandom));
        ri += int'(in_i[c]);
        rq += int'(in_q[c]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(sum_i) != ri || int'(sum_q) != rq) begin
        failures++;
        $display("FAIL t=%0d got %0d,%0d exp %0d,%0d", t, sum_i, sum_q, ri, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
