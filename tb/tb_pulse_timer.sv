// tb_pulse_timer -- checks the RF pulse window: exact length in clocks, step
// counting, one-clock start/end pulses, a trigger inside the window ignored,
// and the pulse counter.
module tb_pulse_timer;
  localparam int unsigned PC = 50, CPS = 5;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic rf_pulse, pulse_start, pulse_end;
  logic [9:0] step_idx;
  logic [31:0] pulse_count;
  int checks = 0, failures = 0;

  pulse_timer #(.PULSE_CYCLES (PC), .CLKS_PER_STEP (CPS), .STEP_W (10)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int width, ends, starts, max_step;
  always @(posedge clk) begin
    if (rf_pulse) width++;
    if (pulse_end) ends++;
    if (pulse_start) starts++;
    if (rf_pulse && int'(step_idx) > max_step) max_step = int'(step_idx);
  end

  task automatic one_pulse(input bit retrigger);
    width = 0; ends = 0; starts = 0; max_step = 0;
    @(negedge clk) trigger = 1;
    @(negedge clk) trigger = 0;
    check(rf_pulse == 1, "window opens one clock after the trigger edge");
    if (retrigger) begin
      repeat (10) @(negedge clk);
      trigger = 1; @(negedge clk) trigger = 0;
    end
    repeat (PC + 10) @(negedge clk);
    check(width == PC, $sformatf("window is %0d clocks, expected %0d", width, PC));
    check(ends == 1 && starts == 1, "one start and one end pulse");
    check(max_step == PC / CPS - 1, $sformatf("last step %0d", max_step));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_pulse(0);
    check(pulse_count == 1, "one pulse counted");
    one_pulse(1);
    check(pulse_count == 2, "retrigger inside window ignored");
    check(rf_pulse == 0, "window closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
