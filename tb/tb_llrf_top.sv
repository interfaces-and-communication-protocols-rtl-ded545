// tb_llrf_top -- end-to-end test of the four-carrier LLRF system,
// at reduced sizes: 300-clock pulse, 10 clocks per table step, 32-entry
// tables, 256-word pulse record (shorter than the pulse, so it overflows).
//
// Three data acquisition carriers send their partial vector sums over Low
// Latency Links (each through a lane model with the transceiver delay) to the
// main carrier, which closes the loop. Each carrier is reached through its own
// PCIe host model: transaction layer packets -> bridge -> clock-domain
// synchronizer (125 MHz to 81 MHz) -> registers. The ADC inputs are constant
// random values, so every partial sum, and the DAC output of each clock, can
// be predicted here from the control law
//     u = FF(t) + floor(Kp * (SP(t) - floor(total / 32)) / 256)   (saturated).
// Three RF pulses: feedback + feed-forward, feed-forward only, and feedback
// with a gain large enough to saturate the DACs; during the third one word on
// link 0 is corrupted. After each pulse every carrier interrupts, and the
// host reads the status words and part of the pulse record. After the first
// pulse the whole record of every carrier is also moved to host memory by the
// bridge DMA and checked word by word. Each mechanism is counted and must
// have happened.
module tb_llrf_top;
  import llrf_pkg::*;

  localparam int unsigned NB   = 4;
  localparam int unsigned MAIN = 1;
  localparam int unsigned NCH  = 8;
  localparam int unsigned PC = 300, CPS = 10, TD = 32, DD = 256;
  localparam int unsigned DLY  = 13;
  localparam int unsigned SETTLE = 60;   // clocks before the loop inputs are steady

  logic clk = 0, clk_pci = 0, trigger = 0, adc_valid = 0;
  logic pci_rst_n [NB];
  logic signed [15:0] adc_i [NB][NCH], adc_q [NB][NCH];
  logic [31:0] rx_data [NB], tx_data [NB];
  logic rx_sof [NB], rx_eof [NB], rx_valid [NB], rx_ready [NB];
  logic tx_sof [NB], tx_eof [NB], tx_valid [NB], tx_ready [NB];
  logic cfg_interrupt_n [NB], cfg_interrupt_rdy_n [NB];
  lll_word_t lll_tx [NB], lll_rx [NB-1];
  logic signed [15:0] dac_i, dac_q;
  logic rf_pulse;
  logic corrupt0 = 0;
  logic ex_rst_n;
  ii_req_t ex_ii_req;
  ii_rsp_t ex_ii_rsp;
  logic [13:0] ex_reg1;
  logic [7:0] ex_area1_addr = 0;
  logic [11:0] ex_area1_data;

  int checks = 0, failures = 0;

  always #6.17 clk = ~clk;     // 81 MHz
  always #4    clk_pci = ~clk_pci;  // 125 MHz

  llrf_top #(.PULSE_CYCLES (PC), .CLKS_PER_STEP (CPS), .TABLE_DEPTH (TD),
             .DAQ_DEPTH (DD)) dut (
    .clk, .clk_pci, .pci_rst_n, .trigger, .adc_valid, .adc_i, .adc_q,
    .rx_data, .rx_sof, .rx_eof, .rx_valid, .rx_ready,
    .tx_data, .tx_sof, .tx_eof, .tx_valid, .tx_ready,
    .cfg_interrupt_n, .cfg_interrupt_rdy_n, .lll_tx, .lll_rx,
    .dac_i, .dac_q, .rf_pulse,
    .ex_rst_n, .ex_ii_req, .ex_ii_rsp, .ex_reg1, .ex_area1_addr, .ex_area1_data
  );

  // hosts (one per carrier) and link lanes
  for (genvar b = 0; b < int'(NB); b++) begin : g_host
    pcie_host_bfm #(.REQ_ID (16'h0100)) u_host (
      .clk (clk_pci), .rx_data (rx_data[b]), .rx_sof (rx_sof[b]), .rx_eof (rx_eof[b]),
      .rx_valid (rx_valid[b]), .rx_ready (rx_ready[b]), .tx_data (tx_data[b]),
      .tx_sof (tx_sof[b]), .tx_eof (tx_eof[b]), .tx_valid (tx_valid[b]),
      .tx_ready (tx_ready[b]), .cfg_interrupt_n (cfg_interrupt_n[b]),
      .cfg_interrupt_rdy_n (cfg_interrupt_rdy_n[b])
    );
  end
  ii_master_bfm u_ex_bfm (.clk, .req (ex_ii_req), .rsp (ex_ii_rsp));
  lll_lane_model #(.DELAY (DLY)) u_lane0 (.clk, .din (lll_tx[0]), .corrupt (corrupt0), .dout (lll_rx[0]));
  lll_lane_model #(.DELAY (DLY)) u_lane1 (.clk, .din (lll_tx[2]), .corrupt (1'b0),     .dout (lll_rx[1]));
  lll_lane_model #(.DELAY (DLY)) u_lane2 (.clk, .din (lll_tx[3]), .corrupt (1'b0),     .dout (lll_rx[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hwrite(input int b, input logic [31:0] a, input logic [31:0] d);
    case (b)
      0: g_host[0].u_host.write(a, d);
      1: g_host[1].u_host.write(a, d);
      2: g_host[2].u_host.write(a, d);
      default: g_host[3].u_host.write(a, d);
    endcase
  endtask

  task automatic hread(input int b, input logic [31:0] a, output logic [31:0] d);
    case (b)
      0: g_host[0].u_host.read(a, d);
      1: g_host[1].u_host.read(a, d);
      2: g_host[2].u_host.read(a, d);
      default: g_host[3].u_host.read(a, d);
    endcase
  endtask

  function automatic int irqs(input int b);
    case (b)
      0: return g_host[0].u_host.irq_count;
      1: return g_host[1].u_host.irq_count;
      2: return g_host[2].u_host.irq_count;
      default: return g_host[3].u_host.irq_count;
    endcase
  endfunction

  // ---- reference model -------------------------------------------------------
  longint psum_i [NB], psum_q [NB];
  logic [31:0] sp [TD], ff [TD];
  logic signed [15:0] kp_m;
  bit fb_m, ff_m;

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic void model(input int step, output longint ui, output longint uq, output bit s);
    longint ti, tq, vi, vq;
    ti = 0; tq = 0;
    for (int b = 0; b < int'(NB); b++) begin ti += psum_i[b]; tq += psum_q[b]; end
    vi = ti >>> 5; vq = tq >>> 5;
    ui = fb_m ? ((longint'($signed(sp[step][15:0]))  - vi) * longint'(kp_m)) >>> 8 : 0;
    uq = fb_m ? ((longint'($signed(sp[step][31:16])) - vq) * longint'(kp_m)) >>> 8 : 0;
    if (ff_m) begin
      ui += longint'($signed(ff[step][15:0]));
      uq += longint'($signed(ff[step][31:16]));
    end
    s = (ui != sat16(ui)) || (uq != sat16(uq));
    ui = sat16(ui); uq = sat16(uq);
  endfunction

  // ---- DAC checker: the code seen in pulse clock p+3 belongs to step(p) -------
  longint pcyc = -1;
  int since_end = 100;
  int dac_checked = 0, dac_bad = 0, dac_sat_seen = 0, dac_nonzero_out = 0;
  bit do_corrupt = 0;
  always @(posedge clk) begin
    longint ui, uq;
    bit s;
    if (rf_pulse) pcyc = pcyc + 1; else pcyc = -1;
    if (pcyc >= SETTLE + 3 && pcyc < PC) begin
      model(int'((pcyc - 3) / CPS), ui, uq, s);
      dac_checked++;
      if (s) dac_sat_seen++;
      if (longint'(dac_i) != ui || longint'(dac_q) != uq) begin
        dac_bad++;
        if (dac_bad < 5) $display("DAC mismatch at pulse clock %0d: %0d,%0d expected %0d,%0d",
                                  pcyc, dac_i, dac_q, ui, uq);
      end
    end
    // the pipeline drains three clocks after the window closes
    if (rf_pulse) since_end = 0; else if (since_end < 100) since_end++;
    if (since_end > 3 && (dac_i != 0 || dac_q != 0)) dac_nonzero_out++;
  end

  // corrupt one word on link 0 once during a pulse, then count it
  always @(negedge clk) corrupt0 = do_corrupt && (pcyc == SETTLE / 2);

  task automatic run_pulse(input int n);
    int w;
    @(negedge clk) trigger = 1;
    repeat (2) @(negedge clk);
    trigger = 0;
    wait (rf_pulse == 1);
    wait (rf_pulse == 0);
    // every carrier interrupts at the end of the pulse
    w = 0;
    while (w < 2000 && (irqs(0) < n || irqs(1) < n || irqs(2) < n || irqs(3) < n)) begin
      @(negedge clk_pci); w++;
    end
    for (int b = 0; b < int'(NB); b++)
      check(irqs(b) == n, $sformatf("carrier %0d: %0d interrupts after pulse %0d", b, irqs(b), n));
  endtask

  task automatic readout(input int n);
    logic [31:0] d, exp;
    int nrec, step;
    nrec = (PC < DD) ? int'(PC) : int'(DD);
    for (int b = 0; b < int'(NB); b++) begin
      hread(b, 32'h3, d);
      check(d == 32'(n), $sformatf("carrier %0d pulse count %0d", b, d));
      hread(b, 32'h4, d);
      check(d == 32'(nrec), $sformatf("carrier %0d record length %0d expected %0d", b, d, nrec));
      hread(b, 32'h5, d);
      check(d == 32'(n * (int'(PC) - nrec)), $sformatf("carrier %0d overflow %0d", b, d));
      if (d != 0) mech_overflow++;
      exp = {16'(psum_q[b] >>> 3), 16'(psum_i[b] >>> 3)};
      step = (nrec > 16) ? nrec / 16 : 1;
      for (int a = 0; a < nrec; a += step) begin
        hread(b, 32'h0010_0000 + a, d);
        check(d == exp, $sformatf("carrier %0d record[%0d] %h expected %h", b, a, d, exp));
        mech_daq_reads++;
      end
      hread(b, 32'h0010_0000 + nrec - 1, d);
      check(d == exp, $sformatf("carrier %0d last record word", b));
    end
  endtask

  int mech_overflow = 0, mech_daq_reads = 0, mech_dma_words = 0;

  task automatic dma_readout(input int b);
    int nrec, polls, bad;
    logic [31:0] exp;
    realtime t0;
    nrec = (PC < DD) ? int'(PC) : int'(DD);
    exp = {16'(psum_q[b] >>> 3), 16'(psum_i[b] >>> 3)};
    t0 = $realtime;
    case (b)
      0: g_host[0].u_host.dma(32'h0010_0000, 32'h4000_0000, nrec, polls);
      1: g_host[1].u_host.dma(32'h0010_0000, 32'h4000_0000, nrec, polls);
      2: g_host[2].u_host.dma(32'h0010_0000, 32'h4000_0000, nrec, polls);
      default: g_host[3].u_host.dma(32'h0010_0000, 32'h4000_0000, nrec, polls);
    endcase
    $display("carrier %0d: %0d-word record moved by DMA in %0.1f us", b, nrec, ($realtime - t0) / 1000.0);
    bad = 0;
    for (int a = 0; a < nrec; a++) begin
      logic [31:0] d;
      case (b)
        0: d = g_host[0].u_host.hostmem.exists(32'h1000_0000 + a) ? g_host[0].u_host.hostmem[32'h1000_0000 + a] : 'x;
        1: d = g_host[1].u_host.hostmem.exists(32'h1000_0000 + a) ? g_host[1].u_host.hostmem[32'h1000_0000 + a] : 'x;
        2: d = g_host[2].u_host.hostmem.exists(32'h1000_0000 + a) ? g_host[2].u_host.hostmem[32'h1000_0000 + a] : 'x;
        default: d = g_host[3].u_host.hostmem.exists(32'h1000_0000 + a) ? g_host[3].u_host.hostmem[32'h1000_0000 + a] : 'x;
      endcase
      if (d !== exp) bad++; else mech_dma_words++;
    end
    check(bad == 0, $sformatf("carrier %0d: %0d of %0d DMA words wrong", b, bad, nrec));
  endtask

  initial begin
    logic [31:0] d;
    int sat0, e0;
    for (int b = 0; b < int'(NB); b++) pci_rst_n[b] = 1;
    ex_rst_n = 1;
    #1;
    ex_rst_n = 0;
    for (int b = 0; b < int'(NB); b++) begin
      pci_rst_n[b] = 0;   // a falling edge, so that the asynchronous resets act
      psum_i[b] = 0; psum_q[b] = 0;
      for (int c = 0; c < int'(NCH); c++) begin
        adc_i[b][c] = $signed(16'($urandom_range(0, 8000)) - 16'sd4000);
        adc_q[b][c] = $signed(16'($urandom_range(0, 8000)) - 16'sd4000);
        psum_i[b] += longint'(adc_i[b][c]);
        psum_q[b] += longint'(adc_q[b][c]);
      end
    end
    adc_valid = 1;
    repeat (5) @(negedge clk_pci);
    for (int b = 0; b < int'(NB); b++) pci_rst_n[b] = 1;
    ex_rst_n = 1;
    repeat (10) @(negedge clk);

    // the example register set beside the system
    u_ex_bfm.write(32'h000, 32'h0000_1234);
    check(ex_reg1 == 14'h1234, "example reg1 written");
    u_ex_bfm.write(32'h400 + 17, 32'h0000_0ABC);
    u_ex_bfm.read(32'h400 + 17, d);
    check(d == 32'h0ABC, $sformatf("example area1[17] %h", d));
    ex_area1_addr = 8'd17;
    repeat (2) @(negedge clk);
    check(ex_area1_data == 12'hABC, "example area1 user port");

    // identify the carriers
    for (int b = 0; b < int'(NB); b++) begin
      hread(b, 32'h0, d);
      check(d == {16'hA7CA, 8'(b + 1), 7'd0, b == int'(MAIN)}, $sformatf("carrier %0d ID %h", b, d));
    end
    // links on, tables and gain into the main carrier
    for (int b = 0; b < int'(NB); b++) if (b != int'(MAIN)) hwrite(b, 32'h1, 32'h4);
    for (int k = 0; k < int'(TD); k++) begin
      sp[k] = {16'($urandom_range(0, 4000)), 16'($urandom_range(0, 4000))};
      ff[k] = {16'($urandom_range(0, 20000) - 10000), 16'($urandom_range(0, 20000) - 10000)};
      hwrite(MAIN, 32'h1000 + k, sp[k]);
      hwrite(MAIN, 32'h2000 + k, ff[k]);
    end
    for (int k = 0; k < int'(TD); k += (TD > 16 ? TD / 16 : 1)) begin
      hread(MAIN, 32'h1000 + k, d); check(d == sp[k], $sformatf("SP[%0d] read back", k));
      hread(MAIN, 32'h2000 + k, d); check(d == ff[k], $sformatf("FF[%0d] read back", k));
    end

    // pulse 1: feedback and feed-forward
    kp_m = 16'sd384; fb_m = 1; ff_m = 1;
    hwrite(MAIN, 32'h2, 32'(kp_m));
    hwrite(MAIN, 32'h1, 32'h3);
    repeat (200) @(negedge clk);
    run_pulse(1);
    readout(1);
    for (int b = 0; b < int'(NB); b++) dma_readout(b);
    check(dac_bad == 0, $sformatf("pulse 1: %0d of %0d DAC codes wrong", dac_bad, dac_checked));
    check(dac_checked > 0, "pulse 1 checked");

    // pulse 2: feed-forward only (mode switch)
    fb_m = 0;
    hwrite(MAIN, 32'h1, 32'h2);
    dac_checked = 0;
    run_pulse(2);
    readout(2);
    check(dac_bad == 0, $sformatf("pulse 2: %0d of %0d DAC codes wrong", dac_bad, dac_checked));

    // pulse 3: feedback only with a large gain: saturation; one link word corrupted
    kp_m = 16'sh7fff; fb_m = 1; ff_m = 0;
    hwrite(MAIN, 32'h2, 32'(kp_m));
    hwrite(MAIN, 32'h1, 32'h1);
    hread(MAIN, 32'h7, d); e0 = int'(d);
    hread(MAIN, 32'h9, d); sat0 = int'(d);
    do_corrupt = 1;
    dac_checked = 0;
    run_pulse(3);
    do_corrupt = 0;
    readout(3);
    check(dac_bad == 0, $sformatf("pulse 3: %0d of %0d DAC codes wrong", dac_bad, dac_checked));

    // mechanisms
    hread(MAIN, 32'h9, d);
    check(int'(d) > sat0, $sformatf("saturation counted (%0d)", int'(d) - sat0));
    check(dac_sat_seen > 0, "saturation happened");
    hread(MAIN, 32'h7, d);
    check(int'(d) == e0 + 1, $sformatf("corrupted link word detected (%0d)", int'(d) - e0));
    hread(MAIN, 32'h8, d);
    check(d == 1, $sformatf("lost frame seen as a sequence gap (%0d)", d));
    hread(MAIN, 32'ha, d);
    check(d[7:0] != 0 && d[15:8] != 0 && d[23:16] != 0, $sformatf("frames on every link %h", d));
    for (int b = 0; b < int'(NB); b++) if (b != int'(MAIN)) begin
      hread(b, 32'h6, d);
      check(d > 0, $sformatf("carrier %0d sent frames", b));
    end
    check(dac_nonzero_out == 0, "DAC silent between pulses");
    check(mech_daq_reads > 0, "pulse record read out");
    check(mech_dma_words > 0, "pulse record moved by DMA");
    check(g_host[0].u_host.bad_mwr + g_host[1].u_host.bad_mwr + g_host[2].u_host.bad_mwr
          + g_host[3].u_host.bad_mwr == 0, "all DMA packets well formed");
    check(mech_overflow > 0, "pulse record overflow happened");
    check(g_host[0].u_host.timeouts + g_host[1].u_host.timeouts + g_host[2].u_host.timeouts
          + g_host[3].u_host.timeouts == 0, "no PCIe time-outs");
    check(g_host[0].u_host.bad_cpl + g_host[1].u_host.bad_cpl + g_host[2].u_host.bad_cpl
          + g_host[3].u_host.bad_cpl == 0, "all completions well formed");
    $display("mechanisms: pulses=3 interrupts=%0d,%0d,%0d,%0d dac_checked=%0d saturated=%0d overflows=%0d record_reads=%0d dma_words=%0d",
             irqs(0), irqs(1), irqs(2), irqs(3), dac_checked, dac_sat_seen, mech_overflow, mech_daq_reads, mech_dma_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
