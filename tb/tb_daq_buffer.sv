// tb_daq_buffer -- pulse record: samples valid inside the window are stored in
// order from address 0, samples outside the window or without in_valid are
// not; the count, the overflow counter and the one-clock read latency are
// checked over two pulses (the second longer than the memory).
module tb_daq_buffer;
  localparam int unsigned D = 64;
  logic clk = 0, rst_n = 0, pulse_start = 0, rf_pulse = 0, in_valid = 0;
  logic [31:0] in_data = 0, rd_data;
  logic [5:0] rd_addr = 0;
  logic [6:0] count;
  logic [31:0] overflow;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [$];

  daq_buffer #(.DEPTH (D), .W (32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(input int len);
    ref_mem.delete();
    @(negedge clk); in_valid = 1; in_data = 32'hDEAD_0000; // before the window: ignored
    @(negedge clk);
    for (int t = 0; t < len; t++) begin
      rf_pulse = 1; pulse_start = (t == 0);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data = $urandom;
      if (in_valid) ref_mem.push_back(in_data);
      @(negedge clk);
    end
    rf_pulse = 0; pulse_start = 0; in_data = 32'hBEEF_0000;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic readback;
    int n;
    n = (ref_mem.size() > int'(D)) ? int'(D) : ref_mem.size();
    check(int'(count) == n, $sformatf("count %0d expected %0d", count, n));
    for (int a = 0; a < n; a++) begin
      rd_addr = 6'(a);
      @(negedge clk);
      check(rd_data == ref_mem[a], $sformatf("word %0d: %h expected %h", a, rd_data, ref_mem[a]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    pulse(40);
    readback();
    check(overflow == 0, "no overflow on a short pulse");
    pulse(120);
    readback();
    check(int'(overflow) == ref_mem.size() - int'(D),
          $sformatf("overflow %0d expected %0d", overflow, ref_mem.size() - int'(D)));
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
