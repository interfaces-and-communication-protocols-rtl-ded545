// tb_ii_pcie_bridge -- transaction layer packets in, Integral Interface cycles
// out. A behavioural II slave with a 256-word memory answers. Checks: MWr32
// lands at the byte address / 4; MRd32 returns a CplD with the standard header
// fields (format/type, length 1, completer ID, byte count 4, requester ID,
// tag, lower address) and the data; completions survive back-pressure on
// the transmit side; packets the bridge does not support (64-bit address,
// length above one doubleword, messages) are consumed without any bus cycle;
// an II interrupt is forwarded to the endpoint and acknowledged. DMA: the
// bridge registers are reached without any II cycle and read back; a
// 70-word transfer to a host address 48 words below a 4 KB boundary arrives
// as MWr32 packets of 16, 32 and 22 words (aligned, none crossing the
// boundary) holding the slave's words in order, while a register read issued
// during the transfer is still answered; a zero-length start completes at once.
module tb_ii_pcie_bridge;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] rx_data = 0, tx_data;
  logic rx_sof = 0, rx_eof = 0, rx_valid = 0, rx_ready;
  logic tx_sof, tx_eof, tx_valid, tx_ready = 1;
  logic cfg_interrupt_n, cfg_interrupt_rdy_n = 1;
  ii_req_t ii_req;
  ii_rsp_t ii_rsp;
  int checks = 0, failures = 0, strobes = 0;
  logic [31:0] mem [256];
  logic [15:0] completer_id = 16'h0108;
  logic slave_irq_n = 1;

  ii_pcie_bridge #(.BAR_AW (24)) dut (.*);
  always #4 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural II slave
  initial begin
    ii_rsp = '{ack_n: 1'b1, data: '0, irq_n: 1'b1};
    forever begin
      @(posedge clk);
      ii_rsp.irq_n <= slave_irq_n;
      if (!ii_req.strobe_n && ii_rsp.ack_n) begin
        strobes++;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        if (!ii_req.write_n) mem[ii_req.addr[7:0]] = ii_req.data;
        ii_rsp.data  <= mem[ii_req.addr[7:0]];
        ii_rsp.ack_n <= 1'b0;
        while (!ii_req.strobe_n) @(posedge clk);
        ii_rsp.ack_n <= 1'b1;
      end
    end
  end

  // random back-pressure on completions
  bit bp = 0;
  always @(negedge clk) tx_ready = bp ? ($urandom_range(0, 2) == 0) : 1'b1;

  // received completion words
  logic [31:0] cpl [$];
  int cpl_sof = 0, cpl_eof = 0;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    cpl.push_back(tx_data);
    if (tx_sof) cpl_sof++;
    if (tx_eof) cpl_eof++;
  end

  task automatic send_tlp(input logic [31:0] w [$]);
    for (int k = 0; k < w.size(); k++) begin
      @(negedge clk);
      rx_data = w[k]; rx_sof = (k == 0); rx_eof = (k == w.size() - 1); rx_valid = 1;
      @(posedge clk);
      while (!rx_ready) @(posedge clk);
    end
    @(negedge clk) rx_valid = 0; rx_sof = 0; rx_eof = 0;
  endtask

  task automatic mwr(input logic [31:0] byte_addr, input logic [31:0] d);
    send_tlp('{{TLP_MWR32, 14'd0, 10'd1}, 32'h0000_000F, byte_addr, d});
  endtask

  task automatic mrd(input logic [31:0] byte_addr, input logic [7:0] tag,
                     output logic [31:0] d);
    int n;
    cpl.delete();
    send_tlp('{{TLP_MRD32, 14'd0, 10'd1}, {16'h0000, tag, 8'h0F}, byte_addr});
    n = 0;
    while (cpl.size() < 4 && n < 200) begin @(negedge clk); n++; end
    check(cpl.size() == 4, "completion of four words");
    if (cpl.size() == 4) begin
      check(cpl[0] == {TLP_CPLD, 14'd0, 10'd1}, $sformatf("CplD DW0 %h", cpl[0]));
      check(cpl[1] == {completer_id, 4'b0000, 12'd4}, $sformatf("CplD DW1 %h", cpl[1]));
      check(cpl[2] == {16'h0000, tag, 1'b0, byte_addr[6:0]}, $sformatf("CplD DW2 %h", cpl[2]));
      d = cpl[3];
    end else d = 'x;
  endtask

  localparam logic [31:0] DMA_B = 32'h00FF_FFFC << 2;   // byte address of SRC

  task automatic dma_test();
    logic [31:0] d, dst;
    int s0, n, k, pk, lens [$];
    logic [31:0] got [$];
    bit hdr_ok;
    for (int a = 0; a < 256; a++) mem[a] = 32'hC000_0000 + 32'(a * 3);
    dst = 32'h1000_0F40;
    s0 = strobes;
    mwr(DMA_B + 0, 32'd5);
    mwr(DMA_B + 4, dst);
    mwr(DMA_B + 8, 32'd70);
    mrd(DMA_B + 0, 8'h01, d); check(d == 5, $sformatf("DMA SRC %h", d));
    mrd(DMA_B + 4, 8'h02, d); check(d == dst, $sformatf("DMA DST %h", d));
    mrd(DMA_B + 8, 8'h03, d); check(d == 70, $sformatf("DMA LEN %h", d));
    mrd(DMA_B + 12, 8'h04, d); check(d == 0, $sformatf("DMA CTRL idle %h", d));
    check(strobes == s0, "bridge registers cause no bus cycle");
    cpl.delete();
    bp = 1;
    mwr(DMA_B + 12, 32'h1);
    // a register read while the transfer runs: find its completion among the packets
    send_tlp('{{TLP_MRD32, 14'd0, 10'd1}, {16'h0000, 8'h55, 8'h0F}, 32'h0000_0020});
    n = 0;
    do begin
      repeat (20) @(negedge clk);
      n++;
    end while (n < 500 && (dut.dma_busy || dut.state != 0));
    repeat (10) @(negedge clk);
    bp = 0;
    check(strobes - s0 == 71, $sformatf("70 DMA reads plus one register read (%0d)", strobes - s0));
    // parse the transmit stream: MWr packets and one completion
    k = 0; pk = 0; hdr_ok = 1;
    while (k < cpl.size()) begin
      if (cpl[k][31:24] == TLP_MWR32) begin
        int len;
        len = int'(cpl[k][9:0]);
        lens.push_back(len);
        hdr_ok &= cpl[k+1] == {completer_id, 8'h00, 8'hFF};
        hdr_ok &= cpl[k+2] == dst + 32'(4 * pk);
        hdr_ok &= (cpl[k+2] >> 12) == ((cpl[k+2] + 32'(4 * len) - 1) >> 12);
        for (int j = 0; j < len; j++) got.push_back(cpl[k+3+j]);
        pk += len;
        k += 3 + len;
      end else if (cpl[k][31:24] == TLP_CPLD) begin
        check(cpl[k+2][15:8] == 8'h55 && cpl[k+3] == mem[8], "register read answered during DMA");
        k += 4;
      end else begin
        check(0, $sformatf("unexpected word %h", cpl[k]));
        k++;
      end
    end
    check(lens.size() == 3 && lens[0] == 16 && lens[1] == 32 && lens[2] == 22,
          $sformatf("packet lengths %p", lens));
    check(hdr_ok, "MWr headers: requester ID, byte enables, addresses, no 4 KB crossing");
    n = 0;
    for (int j = 0; j < got.size(); j++) if (got[j] != mem[5 + j]) n++;
    check(got.size() == 70 && n == 0, $sformatf("%0d words moved, %0d wrong", got.size(), n));
    mrd(DMA_B + 12, 8'h05, d); check(d == 2, $sformatf("DMA CTRL done %h", d));
    mrd(DMA_B + 0, 8'h06, d); check(d == 75, $sformatf("SRC advanced %h", d));
    // zero length
    cpl.delete();
    mwr(DMA_B + 8, 32'd0);
    mwr(DMA_B + 12, 32'h1);
    mrd(DMA_B + 12, 8'h07, d); check(d == 2, "zero-length transfer is done at once");
    check(cpl.size() == 4, "and sends nothing");
    // short transfer of one word: last byte enables zero
    cpl.delete();
    mwr(DMA_B + 4, 32'h2000_0000);
    mwr(DMA_B + 8, 32'd1);
    mwr(DMA_B + 12, 32'h1);
    repeat (40) @(negedge clk);
    check(cpl.size() == 4 && cpl[0] == {TLP_MWR32, 14'd0, 10'd1} &&
          cpl[1][7:0] == 8'h0F && cpl[2] == 32'h2000_0000 && cpl[3] == mem[75],
          "single-word DMA packet");
  endtask

  initial begin
    logic [31:0] d, model [256];
    int s0, n;
    for (int k = 0; k < 256; k++) begin mem[k] = 0; model[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [7:0] a;
      a = 8'($urandom);
      bp = (t >= 100);
      if ($urandom_range(0, 1) == 0) begin
        model[a] = $urandom;
        mwr({22'h0, a, 2'b00}, model[a]);
      end else begin
        mrd({22'h0, a, 2'b00}, 8'(t), d);
        check(d == model[a], $sformatf("read %h: %h expected %h", a, d, model[a]));
      end
    end
    repeat (20) @(negedge clk);
    n = 0;
    for (int k = 0; k < 256; k++) if (mem[k] != model[k]) n++;
    check(n == 0, $sformatf("%0d words differ after the writes", n));
    check(cpl_sof == cpl_eof, "completions framed");
    // unsupported packets
    s0 = strobes;
    cpl.delete();
    send_tlp('{32'h2000_0001, 32'h0000_000F, 32'h0000_0000, 32'h0000_0010});     // MRd64
    send_tlp('{{TLP_MWR32, 14'd0, 10'd2}, 32'h0000_00FF, 32'h10, 32'h1, 32'h2}); // 2 DW write
    send_tlp('{32'h3400_0000, 32'h0, 32'h0, 32'h0});                             // message
    repeat (30) @(negedge clk);
    check(strobes == s0, "unsupported packets cause no bus cycle");
    check(cpl.size() == 0, "and no completion");
    mrd(32'h0000_0010, 8'h77, d);
    check(d == model[4], "bridge still works after dropped packets");
    // interrupt forwarding
    slave_irq_n = 0;
    n = 0;
    while (cfg_interrupt_n && n < 50) begin @(negedge clk); n++; end
    check(!cfg_interrupt_n, "interrupt requested from the endpoint");
    repeat (3) @(negedge clk);
    check(ii_req.irq_ack_n == 1, "not acknowledged before the endpoint takes it");
    cfg_interrupt_rdy_n = 0; @(negedge clk); cfg_interrupt_rdy_n = 1;
    @(negedge clk);
    check(cfg_interrupt_n == 1 && ii_req.irq_ack_n == 0, "interrupt taken and acknowledged");
    slave_irq_n = 1;
    repeat (4) @(negedge clk);
    check(ii_req.irq_ack_n == 1, "acknowledge released");
    dma_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
