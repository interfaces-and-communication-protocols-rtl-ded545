// tb_carrier_fpga -- one data acquisition carrier linked to one main carrier
// (N_REMOTE = 1, so the mean is taken over 16 channels). Both are set up
// through their PCIe host models. Checks: IDs, the DAC codes of every clock
// of a pulse against the control law computed here, the interrupt of both
// carriers at the end of the pulse, the pulse record contents and length,
// the link frame counters, and the DAC staying at zero after the pulse.
module tb_carrier_fpga;
  import llrf_pkg::*;
  localparam int unsigned NCH = 8, PC = 200, CPS = 8, TD = 32, DD = 256;

  logic clk = 0, clk_pci = 0, trigger = 0, adc_valid = 0;
  logic rst_n [2];
  logic signed [15:0] adc_i [2][NCH], adc_q [2][NCH];
  logic [31:0] rx_data [2], tx_data [2];
  logic rx_sof [2], rx_eof [2], rx_valid [2], rx_ready [2];
  logic tx_sof [2], tx_eof [2], tx_valid [2], tx_ready [2];
  logic cfg_interrupt_n [2], cfg_interrupt_rdy_n [2];
  lll_word_t ltx [2];
  lll_word_t lrx [2][1];
  logic signed [15:0] dac_i [2], dac_q [2];
  logic rf_pulse [2];
  int checks = 0, failures = 0;

  always #6.17 clk = ~clk;
  always #4    clk_pci = ~clk_pci;

  for (genvar b = 0; b < 2; b++) begin : g_c
    carrier_fpga #(
      .BOARD_ID (b == 0 ? 3 : 2), .IS_MAIN (b == 1), .N_CH (NCH), .N_REMOTE (1),
      .PULSE_CYCLES (PC), .CLKS_PER_STEP (CPS), .TABLE_DEPTH (TD), .DAQ_DEPTH (DD)
    ) u_c (
      .clk_user (clk), .clk_pci, .pci_rst_n (rst_n[b]), .trigger, .adc_valid,
      .adc_i (adc_i[b]), .adc_q (adc_q[b]),
      .rx_data (rx_data[b]), .rx_sof (rx_sof[b]), .rx_eof (rx_eof[b]),
      .rx_valid (rx_valid[b]), .rx_ready (rx_ready[b]),
      .tx_data (tx_data[b]), .tx_sof (tx_sof[b]), .tx_eof (tx_eof[b]),
      .tx_valid (tx_valid[b]), .tx_ready (tx_ready[b]),
      .cfg_interrupt_n (cfg_interrupt_n[b]), .cfg_interrupt_rdy_n (cfg_interrupt_rdy_n[b]),
      .lll_tx (ltx[b]), .lll_rx (lrx[b]),
      .dac_i (dac_i[b]), .dac_q (dac_q[b]), .rf_pulse (rf_pulse[b])
    );
    pcie_host_bfm u_host (
      .clk (clk_pci), .rx_data (rx_data[b]), .rx_sof (rx_sof[b]), .rx_eof (rx_eof[b]),
      .rx_valid (rx_valid[b]), .rx_ready (rx_ready[b]), .tx_data (tx_data[b]),
      .tx_sof (tx_sof[b]), .tx_eof (tx_eof[b]), .tx_valid (tx_valid[b]),
      .tx_ready (tx_ready[b]), .cfg_interrupt_n (cfg_interrupt_n[b]),
      .cfg_interrupt_rdy_n (cfg_interrupt_rdy_n[b])
    );
  end
  lll_word_t lane_out;
  lll_lane_model #(.DELAY (13)) u_lane (.clk, .din (ltx[0]), .corrupt (1'b0), .dout (lane_out));
  assign lrx[1][0] = lane_out;
  assign lrx[0][0] = LLL_IDLE;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint ps_i [2], ps_q [2];
  logic [31:0] sp [TD], ff [TD];
  localparam logic signed [15:0] KP = 16'sd200;

  // DAC check: the code seen in pulse clock p+3 belongs to step(p)
  longint pcyc = -1;
  int dac_checked = 0, dac_bad = 0, after = 100, dac_out = 0;
  always @(posedge clk) begin
    longint vi, vq, ui, uq;
    int st;
    if (rf_pulse[1]) pcyc = pcyc + 1; else pcyc = -1;
    if (rf_pulse[1]) after = 0; else if (after < 100) after++;
    if (pcyc >= 63 && pcyc < PC) begin
      st = int'((pcyc - 3) / CPS);
      vi = (ps_i[0] + ps_i[1]) >>> 4;
      vq = (ps_q[0] + ps_q[1]) >>> 4;
      ui = (((longint'($signed(sp[st][15:0])) - vi) * longint'(KP)) >>> 8) + longint'($signed(ff[st][15:0]));
      uq = (((longint'($signed(sp[st][31:16])) - vq) * longint'(KP)) >>> 8) + longint'($signed(ff[st][31:16]));
      dac_checked++;
      if (longint'(dac_i[1]) != ui || longint'(dac_q[1]) != uq) begin
        dac_bad++;
        if (dac_bad < 4) $display("clock %0d: %0d,%0d expected %0d,%0d", pcyc, dac_i[1], dac_q[1], ui, uq);
      end
    end
    if (after > 3 && (dac_i[1] != 0 || dac_q[1] != 0)) dac_out++;
  end

  initial begin
    logic [31:0] d, exp;
    int w;
    for (int b = 0; b < 2; b++) rst_n[b] = 1;
    #1;
    for (int b = 0; b < 2; b++) begin
      rst_n[b] = 0;
      ps_i[b] = 0; ps_q[b] = 0;
      for (int c = 0; c < int'(NCH); c++) begin
        adc_i[b][c] = $signed(16'($urandom_range(0, 6000)) - 16'sd3000);
        adc_q[b][c] = $signed(16'($urandom_range(0, 6000)) - 16'sd3000);
        ps_i[b] += longint'(adc_i[b][c]); ps_q[b] += longint'(adc_q[b][c]);
      end
    end
    adc_valid = 1;
    repeat (5) @(negedge clk_pci);
    rst_n[0] = 1; rst_n[1] = 1;
    repeat (10) @(negedge clk);
    g_c[0].u_host.read(32'h0, d); check(d == 32'hA7CA_0300, $sformatf("DAQ carrier ID %h", d));
    g_c[1].u_host.read(32'h0, d); check(d == 32'hA7CA_0201, $sformatf("main carrier ID %h", d));
    g_c[0].u_host.write(32'h1, 32'h4);
    for (int k = 0; k < int'(TD); k++) begin
      sp[k] = {16'($urandom_range(0, 3000)), 16'($urandom_range(0, 3000))};
      ff[k] = {16'($urandom_range(0, 8000) - 4000), 16'($urandom_range(0, 8000) - 4000)};
      g_c[1].u_host.write(32'h1000 + k, sp[k]);
      g_c[1].u_host.write(32'h2000 + k, ff[k]);
    end
    g_c[1].u_host.write(32'h2, 32'(KP));
    g_c[1].u_host.write(32'h1, 32'h3);
    repeat (100) @(negedge clk);
    @(negedge clk) trigger = 1;
    repeat (2) @(negedge clk);
    trigger = 0;
    wait (rf_pulse[1]);
    wait (!rf_pulse[1]);
    w = 0;
    while (w < 500 && (g_c[0].u_host.irq_count < 1 || g_c[1].u_host.irq_count < 1)) begin
      @(negedge clk_pci); w++;
    end
    check(g_c[0].u_host.irq_count == 1 && g_c[1].u_host.irq_count == 1, "both carriers interrupted");
    check(dac_checked == int'(PC) - 63 && dac_bad == 0,
          $sformatf("%0d of %0d DAC codes wrong", dac_bad, dac_checked));
    for (int b = 0; b < 2; b++) begin
      if (b == 0) g_c[0].u_host.read(32'h4, d); else g_c[1].u_host.read(32'h4, d);
      check(d == PC, $sformatf("carrier %0d record length %0d", b, d));
      exp = {16'(ps_q[b] >>> 3), 16'(ps_i[b] >>> 3)};
      for (int a = 0; a < int'(PC); a += 19) begin
        if (b == 0) g_c[0].u_host.read(32'h0010_0000 + a, d);
        else        g_c[1].u_host.read(32'h0010_0000 + a, d);
        check(d == exp, $sformatf("carrier %0d record[%0d] %h expected %h", b, a, d, exp));
      end
    end
    g_c[0].u_host.read(32'h6, d); check(d > 0, $sformatf("frames sent %0d", d));
    g_c[1].u_host.read(32'h6, d); check(d > 0, $sformatf("frames received %0d", d));
    g_c[1].u_host.read(32'h7, d); check(d == 0, "no link errors");
    check(dac_out == 0, "DAC zero after the pulse");
    check(g_c[0].u_host.timeouts + g_c[1].u_host.timeouts == 0, "no PCIe time-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
