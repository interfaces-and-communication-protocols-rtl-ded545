// pulse_timer -- RF pulse window and end-of-pulse interrupt from the trigger.
//
// A rising edge on `trigger` (the machine trigger, at most 10 Hz, distributed
// on the backplane) opens the RF pulse window: `rf_pulse` is high for exactly
// PULSE_CYCLES clocks, i.e. the 1024 us intra-pulse period at 81 MHz. During
// the window `step_idx` counts microseconds (one step every CLKS_PER_STEP
// clocks); the intra-pulse tables of the controller are indexed by it. When the
// window closes, `pulse_end` pulses for one clock: this is the interrupt that
// starts the inter-pulse DAQ readout. `pulse_start` pulses in the first clock
// of the window and `pulse_count` counts pulses since reset.
//
// Timing: the window starts the clock after the trigger edge is sampled.
// A trigger edge that arrives while the window is open is ignored (own choice).
// The trigger is assumed to be synchronous to `clk`.
module pulse_timer #(
  parameter int unsigned PULSE_CYCLES  = llrf_pkg::PULSE_CYCLES,
  parameter int unsigned CLKS_PER_STEP = llrf_pkg::CLK_MHZ,
  parameter int unsigned STEP_W        = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trigger,
  output logic              rf_pulse,
  output logic              pulse_start,
  output logic              pulse_end,
  output logic [STEP_W-1:0] step_idx,
  output logic [31:0]       pulse_count
);
  localparam int unsigned CNT_W = $clog2(PULSE_CYCLES + 1);
  localparam int unsigned SUB_W = $clog2(CLKS_PER_STEP + 1);

  logic             trig_q;
  logic [CNT_W-1:0] remaining;
  logic [SUB_W-1:0] sub;
  logic             start;

  assign start = trigger && !trig_q && !rf_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q      <= 1'b0;
      rf_pulse    <= 1'b0;
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
      remaining   <= '0;
      sub         <= '0;
      step_idx    <= '0;
      pulse_count <= '0;
    end else begin
      trig_q      <= trigger;
      pulse_start <= 1'b0;
      pulse_end   <= 1'b0;
      if (start) begin
        rf_pulse    <= 1'b1;
        pulse_start <= 1'b1;
        remaining   <= CNT_W'(PULSE_CYCLES - 1);
        sub         <= '0;
        step_idx    <= '0;
        pulse_count <= pulse_count + 32'd1;
      end else if (rf_pulse) begin
        if (remaining == '0) begin
          rf_pulse  <= 1'b0;
          pulse_end <= 1'b1;
        end else begin
          remaining <= remaining - 1'b1;
        end
        if (sub == SUB_W'(CLKS_PER_STEP - 1)) begin
          sub      <= '0;
          step_idx <= step_idx + 1'b1;
        end else begin
          sub <= sub + 1'b1;
        end
      end
    end
  end

  // the window always lasts exactly PULSE_CYCLES clocks
  a_end_only_after_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    pulse_end |-> $past(rf_pulse));

endmodule
