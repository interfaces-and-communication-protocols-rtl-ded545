// llrf_top -- digital part of an ATCA-based LLRF controller for one RF station.
//
// Four carrier blades share the 32 cavities of the station, eight each. The
// carrier in slot MAIN (ATCA #2, index 1) is the main controller: the other
// three send their partial vector sums to it over Low Latency Links in the
// full-mesh fabric, and it drives the vector modulator. Every carrier has its
// own PCIe transaction-layer port (towards the PCIe switch on the blade and
// the root complex) for register access and pulse-record readout between
// pulses, and all carriers see the same clock and trigger from the backplane.
//
// The multi-gigabit transceivers that carry the links, the PCIe endpoints and
// switch, the ADCs and DACs are not part of this RTL; their digital sides are
// the ports of this module:
//   lll_tx[b]        link word transmitted by carrier b (idle on the main one)
//   lll_rx[k]        link word received by the main carrier on its link k;
//                    link k is fed by the k-th non-main carrier in slot order
//   adc_i/q[b][c]    I/Q sample of channel c of carrier b, all valid with adc_valid
//   rx_*/tx_*[b]     TLP request/completion streams of carrier b's endpoint
//   dac_i/dac_q      vector modulator DAC codes
// clk is the 81 MHz backplane clock, clk_pci the endpoint transaction clock.
//
// Beside the LLRF system, and not connected to it, sits the register set of a
// small example Integral Interface definition (ii_example_regs) with its own
// bus and user ports (ex_*), clocked by clk.
module llrf_top #(
  parameter int unsigned N_BRD         = llrf_pkg::N_BOARDS,
  parameter int unsigned MAIN          = 1,
  parameter int unsigned N_CH          = llrf_pkg::CH_PER_BOARD,
  parameter int unsigned PULSE_CYCLES  = llrf_pkg::PULSE_CYCLES,
  parameter int unsigned CLKS_PER_STEP = llrf_pkg::CLK_MHZ,
  parameter int unsigned TABLE_DEPTH   = llrf_pkg::PULSE_US,
  parameter int unsigned DAQ_DEPTH     = llrf_pkg::PULSE_CYCLES
) (
  input  logic                 clk,
  input  logic                 clk_pci,
  input  logic                 pci_rst_n [N_BRD],
  input  logic                 trigger,
  input  logic                 adc_valid,
  input  logic signed [15:0]   adc_i [N_BRD][N_CH],
  input  logic signed [15:0]   adc_q [N_BRD][N_CH],
  input  logic [31:0]          rx_data  [N_BRD],
  input  logic                 rx_sof   [N_BRD],
  input  logic                 rx_eof   [N_BRD],
  input  logic                 rx_valid [N_BRD],
  output logic                 rx_ready [N_BRD],
  output logic [31:0]          tx_data  [N_BRD],
  output logic                 tx_sof   [N_BRD],
  output logic                 tx_eof   [N_BRD],
  output logic                 tx_valid [N_BRD],
  input  logic                 tx_ready [N_BRD],
  output logic                 cfg_interrupt_n     [N_BRD],
  input  logic                 cfg_interrupt_rdy_n [N_BRD],
  output llrf_pkg::lll_word_t  lll_tx [N_BRD],
  input  llrf_pkg::lll_word_t  lll_rx [N_BRD-1],
  output logic signed [15:0]   dac_i,
  output logic signed [15:0]   dac_q,
  output logic                 rf_pulse,
  // example Integral Interface register set
  input  logic                 ex_rst_n,
  input  llrf_pkg::ii_req_t    ex_ii_req,
  output llrf_pkg::ii_rsp_t    ex_ii_rsp,
  output logic [13:0]          ex_reg1,
  input  logic [7:0]           ex_area1_addr,
  output logic [11:0]          ex_area1_data
);
  import llrf_pkg::*;

  logic signed [15:0] b_dac_i [N_BRD];
  logic signed [15:0] b_dac_q [N_BRD];
  logic               b_pulse [N_BRD];

  for (genvar b = 0; b < int'(N_BRD); b++) begin : g_brd
    carrier_fpga #(
      .BOARD_ID (b + 1), .IS_MAIN (b == int'(MAIN)), .N_CH (N_CH),
      .N_REMOTE (N_BRD - 1), .PULSE_CYCLES (PULSE_CYCLES),
      .CLKS_PER_STEP (CLKS_PER_STEP), .TABLE_DEPTH (TABLE_DEPTH),
      .DAQ_DEPTH (DAQ_DEPTH)
    ) u_carrier (
      .clk_user (clk), .clk_pci, .pci_rst_n (pci_rst_n[b]), .trigger,
      .adc_valid, .adc_i (adc_i[b]), .adc_q (adc_q[b]),
      .rx_data (rx_data[b]), .rx_sof (rx_sof[b]), .rx_eof (rx_eof[b]),
      .rx_valid (rx_valid[b]), .rx_ready (rx_ready[b]),
      .tx_data (tx_data[b]), .tx_sof (tx_sof[b]), .tx_eof (tx_eof[b]),
      .tx_valid (tx_valid[b]), .tx_ready (tx_ready[b]),
      .cfg_interrupt_n (cfg_interrupt_n[b]), .cfg_interrupt_rdy_n (cfg_interrupt_rdy_n[b]),
      .lll_tx (lll_tx[b]), .lll_rx (lll_rx),
      .dac_i (b_dac_i[b]), .dac_q (b_dac_q[b]), .rf_pulse (b_pulse[b])
    );
  end

  ii_example_regs u_example (
    .clk, .rst_n (ex_rst_n), .ii_req (ex_ii_req), .ii_rsp (ex_ii_rsp),
    .reg1 (ex_reg1), .user_area1_addr (ex_area1_addr), .user_area1_data (ex_area1_data)
  );

  assign dac_i    = b_dac_i[MAIN];
  assign dac_q    = b_dac_q[MAIN];
  assign rf_pulse = b_pulse[MAIN];

endmodule
