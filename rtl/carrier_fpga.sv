// carrier_fpga -- processing FPGA of one ATCA carrier blade.
//
// Every carrier digitizes its share of the cavity probe signals (on its ADC
// mezzanine modules), forms the partial vector sum of its cavities and records
// it during the RF pulse. The data acquisition carriers (IS_MAIN = 0) send
// their partial sum to the main carrier over a Low Latency Link; the main
// carrier (IS_MAIN = 1) receives N_REMOTE such links, adds them to its own sum
// and runs the field controller that drives the vector modulator DACs.
// Between pulses software reaches the registers, the controller tables and
// the pulse record through the PCIe endpoint: PCIe bridge (PCIe clock) ->
// clock-domain synchronizer -> register slave (user clock). The end of each
// pulse raises the II interrupt, which the bridge forwards to the endpoint.
//
//   adc_* -> partial_vector_sum -+-> daq_buffer (record {mean Q, mean I})
//                                +-> lll_tx                    (IS_MAIN = 0)
//                                +-> field_controller -> dac_* (IS_MAIN = 1)
//                     lll_rx[] --^
//
// Status words (register STATUS[k]): 0 pulses, 1 samples in the last record,
// 2 record overflows, 3 LLL frames sent (DAQ carrier) or received (main),
// 4 LLL frame errors, 5 LLL sequence errors, 6 saturated DAC samples,
// 7 LLL frames per remote link packed 8 bits each (main only).
//
// Timing: ADC samples are taken every clk_user cycle while adc_valid is high;
// the DAC codes follow the ADC inputs of the main carrier after 1 clock (sum)
// + 3 clocks (controller). The user reset comes from the PCIe-side reset
// through the synchronizer. Which signals are recorded, the link framing and
// the register map are this design's own choices.
module carrier_fpga #(
  parameter int unsigned BOARD_ID      = 1,
  parameter bit          IS_MAIN       = 1'b1,
  parameter int unsigned N_CH          = llrf_pkg::CH_PER_BOARD,
  parameter int unsigned N_REMOTE      = llrf_pkg::N_BOARDS - 1,
  parameter int unsigned PULSE_CYCLES  = llrf_pkg::PULSE_CYCLES,
  parameter int unsigned CLKS_PER_STEP = llrf_pkg::CLK_MHZ,
  parameter int unsigned TABLE_DEPTH   = llrf_pkg::PULSE_US,
  parameter int unsigned DAQ_DEPTH     = llrf_pkg::PULSE_CYCLES
) (
  input  logic                   clk_user,
  input  logic                   clk_pci,
  input  logic                   pci_rst_n,
  input  logic                   trigger,
  // ADC modules
  input  logic                   adc_valid,
  input  logic signed [15:0]     adc_i [N_CH],
  input  logic signed [15:0]     adc_q [N_CH],
  // PCIe endpoint transaction layer
  input  logic [31:0]            rx_data,
  input  logic                   rx_sof,
  input  logic                   rx_eof,
  input  logic                   rx_valid,
  output logic                   rx_ready,
  output logic [31:0]            tx_data,
  output logic                   tx_sof,
  output logic                   tx_eof,
  output logic                   tx_valid,
  input  logic                   tx_ready,
  output logic                   cfg_interrupt_n,
  input  logic                   cfg_interrupt_rdy_n,
  // Low Latency Links (transceiver user words)
  output llrf_pkg::lll_word_t    lll_tx,
  input  llrf_pkg::lll_word_t    lll_rx [N_REMOTE],
  // vector modulator DACs (main carrier)
  output logic signed [15:0]     dac_i,
  output logic signed [15:0]     dac_q,
  output logic                   rf_pulse
);
  import llrf_pkg::*;

  localparam int unsigned TAW   = $clog2(TABLE_DEPTH);
  localparam int unsigned DAW   = $clog2(DAQ_DEPTH);
  localparam int unsigned MEANS = $clog2(N_CH);

  // ---- register path: PCIe bridge -> synchronizer -> register slave ----------
  ii_req_t pci_req, user_req;
  ii_rsp_t pci_rsp, user_rsp;
  logic    rst_n;

  ii_pcie_bridge u_bridge (
    .clk (clk_pci), .rst_n (pci_rst_n), .completer_id (16'(BOARD_ID << 3)),
    .rx_data, .rx_sof, .rx_eof, .rx_valid, .rx_ready,
    .tx_data, .tx_sof, .tx_eof, .tx_valid, .tx_ready,
    .cfg_interrupt_n, .cfg_interrupt_rdy_n,
    .ii_req (pci_req), .ii_rsp (pci_rsp)
  );

  ii_sync_clk u_sync (
    .clk_pci, .pci_ii_resetN (pci_rst_n), .pci_req, .pci_rsp,
    .clk_user, .user_ii_resetN (rst_n), .user_req, .user_rsp
  );

  logic [31:0]        ctrl;
  logic signed [15:0] kp;
  logic [31:0]        status [8];
  logic               tbl_we, tbl_sel;
  logic [TAW-1:0]     tbl_addr;
  logic [31:0]        tbl_wdata, tbl_rdata;
  logic [DAW-1:0]     daq_addr;
  logic [31:0]        daq_rdata;
  logic               pulse_start, pulse_end;
  logic [TAW-1:0]     step_idx;
  logic [31:0]        pulse_count;

  carrier_regs #(
    .BOARD_ID (BOARD_ID), .IS_MAIN (IS_MAIN), .N_STATUS (8),
    .TABLE_DEPTH (TABLE_DEPTH), .DAQ_DEPTH (DAQ_DEPTH)
  ) u_regs (
    .clk (clk_user), .rst_n, .ii_req (user_req), .ii_rsp (user_rsp),
    .irq_set (pulse_end), .ctrl, .kp, .status,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata, .tbl_rdata,
    .daq_addr, .daq_rdata
  );

  // ---- pulse timing ------------------------------------------------------------
  pulse_timer #(
    .PULSE_CYCLES (PULSE_CYCLES), .CLKS_PER_STEP (CLKS_PER_STEP), .STEP_W (TAW)
  ) u_timer (
    .clk (clk_user), .rst_n, .trigger, .rf_pulse, .pulse_start, .pulse_end,
    .step_idx, .pulse_count
  );

  // ---- partial vector sum and pulse record ------------------------------------
  logic                    sum_valid;
  logic signed [SUM_W-1:0] sum_i, sum_q;

  partial_vector_sum #(.N_CH (N_CH), .IN_W (16), .OUT_W (SUM_W)) u_pvs (
    .clk (clk_user), .rst_n, .in_valid (adc_valid), .in_i (adc_i), .in_q (adc_q),
    .out_valid (sum_valid), .sum_i, .sum_q
  );

  logic signed [SUM_W-1:0] mean_i, mean_q;
  logic [DAW:0]            daq_count;
  logic [31:0]             daq_overflow;
  assign mean_i = sum_i >>> MEANS;
  assign mean_q = sum_q >>> MEANS;

  daq_buffer #(.DEPTH (DAQ_DEPTH), .W (32)) u_daq (
    .clk (clk_user), .rst_n, .pulse_start, .rf_pulse, .in_valid (sum_valid),
    .in_data ({mean_q[15:0], mean_i[15:0]}), .rd_addr (daq_addr), .rd_data (daq_rdata),
    .count (daq_count), .overflow (daq_overflow)
  );

  logic [31:0] lll_frames, lll_err, lll_seq_err, sat_count, per_link;

  generate
    if (IS_MAIN) begin : g_main
      // ---- main carrier: receive the other partial sums, close the loop -------
      logic                    r_valid [N_REMOTE];
      logic signed [SUM_W-1:0] r_i     [N_REMOTE];
      logic signed [SUM_W-1:0] r_q     [N_REMOTE];
      logic [31:0]             r_ok    [N_REMOTE];
      logic [31:0]             r_err   [N_REMOTE];
      logic [31:0]             r_seq   [N_REMOTE];

      for (genvar r = 0; r < int'(N_REMOTE); r++) begin : g_rx
        lll_rx #(.SUM_W (SUM_W)) u_rx (
          .clk (clk_user), .rst_n, .rx (lll_rx[r]),
          .out_valid (r_valid[r]), .out_i (r_i[r]), .out_q (r_q[r]),
          .frames_ok (r_ok[r]), .err_count (r_err[r]), .seq_err_count (r_seq[r])
        );
      end

      always_comb begin
        lll_frames  = '0;
        lll_err     = '0;
        lll_seq_err = '0;
        per_link    = '0;
        for (int r = 0; r < int'(N_REMOTE); r++) begin
          lll_frames  = lll_frames  + r_ok[r];
          lll_err     = lll_err     + r_err[r];
          lll_seq_err = lll_seq_err + r_seq[r];
          if (r < 4) per_link[8*r +: 8] = r_ok[r][7:0];
        end
      end

      field_controller #(
        .N_REMOTE (N_REMOTE), .SUM_W (SUM_W), .DAC_W (16),
        .AVG_SHIFT ($clog2(N_CH * (N_REMOTE + 1))), .TABLE_DEPTH (TABLE_DEPTH)
      ) u_ctrl (
        .clk (clk_user), .rst_n, .rf_pulse, .step_idx,
        .fb_en (ctrl[0]), .ff_en (ctrl[1]), .kp,
        .local_i (sum_i), .local_q (sum_q),
        .remote_valid (r_valid), .remote_i (r_i), .remote_q (r_q),
        .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata, .tbl_rdata,
        .dac_i, .dac_q, .sat_count
      );
      assign lll_tx = LLL_IDLE;
    end else begin : g_daq
      // ---- data acquisition carrier: send the partial sum ------------------------
      lll_tx #(.SUM_W (SUM_W)) u_tx (
        .clk (clk_user), .rst_n, .en (ctrl[2]), .in_valid (sum_valid),
        .in_i (sum_i), .in_q (sum_q), .tx (lll_tx), .frames_sent (lll_frames)
      );
      assign lll_err     = '0;
      assign lll_seq_err = '0;
      assign sat_count   = '0;
      assign per_link    = '0;
      assign tbl_rdata   = '0;
      assign dac_i       = '0;
      assign dac_q       = '0;
    end
  endgenerate

  assign status[0] = pulse_count;
  assign status[1] = 32'(daq_count);
  assign status[2] = daq_overflow;
  assign status[3] = lll_frames;
  assign status[4] = lll_err;
  assign status[5] = lll_seq_err;
  assign status[6] = sat_count;
  assign status[7] = per_link;

endmodule
