// daq_buffer -- pulse data acquisition memory.
//
// During the RF pulse every valid sample is written to consecutive addresses
// of a DEPTH-word memory, starting again at address 0 with each pulse. After
// the pulse the stored record is read out between pulses through the read
// port (synchronous, data one clock after `rd_addr`). `count` holds the number
// of samples of the last (or current) pulse; samples beyond DEPTH are dropped
// and counted in `overflow`. The default depth is one word per 81 MHz clock
// of the 1024 us pulse. Word width and what is recorded are chosen by the
// instantiating carrier (here: the partial vector sum, I and Q packed).
module daq_buffer #(
  parameter int unsigned DEPTH = llrf_pkg::PULSE_CYCLES,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pulse_start,   // first clock of the pulse window
  input  logic          rf_pulse,
  input  logic          in_valid,
  input  logic [W-1:0]  in_data,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data,
  output logic [AW:0]   count,
  output logic [31:0]   overflow
);
  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wptr;
  assign wptr = pulse_start ? '0 : count;

  always_ff @(posedge clk) begin
    if (rf_pulse && in_valid && wptr < (AW+1)'(DEPTH)) mem[wptr[AW-1:0]] <= in_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= '0;
    end else begin
      if (pulse_start) count <= '0;
      if (rf_pulse && in_valid) begin
        if (wptr < (AW+1)'(DEPTH)) count <= wptr + 1'b1;
        else                       overflow <= overflow + 32'd1;
      end
    end
  end
endmodule
