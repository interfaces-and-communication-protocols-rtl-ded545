// partial_vector_sum -- sum of the cavity field vectors measured on one carrier.
//
// Each carrier blade digitizes the probe signals of its share of the cavities
// and adds their complex (I/Q) field vectors; the result, the partial vector
// sum, is sent to the main controller over the Low Latency Link. The inputs are
// the I and Q samples of N_CH channels, valid together when `in_valid` is high.
// The sum is computed as a balanced adder tree in one clock: `sum_i`/`sum_q`
// and `out_valid` appear one clock after the inputs.
//
// Calibration rotation and per-channel gain, which a vector sum usually
// applies, are not part of this block (own choice: the plain sum); the I/Q
// samples are taken as given by the ADC modules.
module partial_vector_sum #(
  parameter int unsigned N_CH  = llrf_pkg::CH_PER_BOARD,
  parameter int unsigned IN_W  = llrf_pkg::SAMPLE_W,
  parameter int unsigned OUT_W = llrf_pkg::SUM_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i [N_CH],
  input  logic signed [IN_W-1:0]  in_q [N_CH],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum_i,
  output logic signed [OUT_W-1:0] sum_q
);
  logic signed [OUT_W-1:0] acc_i, acc_q;

  always_comb begin
    acc_i = '0;
    acc_q = '0;
    for (int c = 0; c < int'(N_CH); c++) begin
      acc_i = acc_i + OUT_W'(in_i[c]);
      acc_q = acc_q + OUT_W'(in_q[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum_i     <= '0;
      sum_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum_i <= acc_i;
        sum_q <= acc_q;
      end
    end
  end
endmodule
