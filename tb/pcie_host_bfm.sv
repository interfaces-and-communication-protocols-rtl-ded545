// pcie_host_bfm -- behavioural stand-in for the PCIe endpoint and everything
// above it (switch, root complex, software). write()/read() send 32-bit
// memory write/read TLPs of one doubleword for a word address (byte address
// = 4 * word address) and wait for the completion of a read. Interrupt
// requests from the bridge are taken after a short delay and counted in
// `irq_count`. `bad_cpl` counts completions with a wrong header.
// Memory writes coming up from the bridge (DMA) land in `hostmem`, indexed by
// doubleword address; `mwr_pkts` counts them and `bad_mwr` counts packets
// with a wrong header, a length that does not match the payload, or a
// 4 KB boundary crossing. dma() programs the bridge DMA registers at
// `DMA_BASE`, starts a transfer and polls until it is done.
module pcie_host_bfm #(
  parameter logic [15:0] REQ_ID = 16'h0000,
  parameter logic [31:0] DMA_BASE = 32'h00FF_FFFC
) (
  input  logic        clk,
  output logic [31:0] rx_data,
  output logic        rx_sof,
  output logic        rx_eof,
  output logic        rx_valid,
  input  logic        rx_ready,
  input  logic [31:0] tx_data,
  input  logic        tx_sof,
  input  logic        tx_eof,
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic        cfg_interrupt_n,
  output logic        cfg_interrupt_rdy_n
);
  int irq_count = 0, bad_cpl = 0, timeouts = 0, reads = 0, writes = 0;
  logic [7:0] tag = 0;
  logic [31:0] cpl [$];

  initial begin
    rx_data = 0; rx_sof = 0; rx_eof = 0; rx_valid = 0;
    tx_ready = 1; cfg_interrupt_rdy_n = 1;
  end

  int mwr_pkts = 0, bad_mwr = 0;
  logic [31:0] hostmem [int];
  logic [31:0] pkt [$];
  bit in_mwr = 0;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    if (tx_sof) in_mwr = tx_data[31:24] == llrf_pkg::TLP_MWR32;
    if (in_mwr) begin
      if (tx_sof) pkt.delete();
      pkt.push_back(tx_data);
      if (tx_eof) begin
        int len;
        logic [31:0] a;
        len = int'(pkt[0][9:0]);
        a = pkt[2];
        mwr_pkts++;
        if (pkt.size() != len + 3 || len == 0 || pkt[2][1:0] != 0 || pkt[1][3:0] != 4'hF ||
            pkt[1][7:4] != ((len == 1) ? 4'h0 : 4'hF) ||
            (a[31:12] != 20'((a + 32'(4 * len) - 1) >> 12)))
          bad_mwr++;
        for (int k = 3; k < pkt.size(); k++) hostmem[int'(a[31:2]) + k - 3] = pkt[k];
        in_mwr = 0;
      end
    end else cpl.push_back(tx_data);
  end

  // interrupt controller: take each request a few clocks later
  initial forever begin
    @(negedge clk);
    if (!cfg_interrupt_n) begin
      repeat (3) @(negedge clk);
      cfg_interrupt_rdy_n = 0;
      @(negedge clk);
      cfg_interrupt_rdy_n = 1;
      irq_count++;
    end
  end

  task automatic send(input logic [31:0] w [$]);
    int n;
    for (int k = 0; k < w.size(); k++) begin
      @(negedge clk);
      rx_data = w[k]; rx_sof = (k == 0); rx_eof = (k == w.size() - 1); rx_valid = 1;
      n = 0;
      @(posedge clk);
      while (!rx_ready && n < 10000) begin @(posedge clk); n++; end
      if (n >= 10000) timeouts++;
    end
    @(negedge clk) rx_valid = 0; rx_sof = 0; rx_eof = 0;
  endtask

  task automatic write(input logic [31:0] waddr, input logic [31:0] d);
    send('{{llrf_pkg::TLP_MWR32, 14'd0, 10'd1}, {REQ_ID, 8'h00, 8'h0F}, {waddr[29:0], 2'b00}, d});
    writes++;
  endtask

  task automatic read(input logic [31:0] waddr, output logic [31:0] d);
    int n;
    cpl.delete();
    tag++;
    send('{{llrf_pkg::TLP_MRD32, 14'd0, 10'd1}, {REQ_ID, tag, 8'h0F}, {waddr[29:0], 2'b00}});
    n = 0;
    while (cpl.size() < 4 && n < 10000) begin @(negedge clk); n++; end
    if (n >= 10000) timeouts++;
    if (cpl.size() == 4) begin
      if (cpl[0] != {llrf_pkg::TLP_CPLD, 14'd0, 10'd1} || cpl[2][31:8] != {REQ_ID, tag})
        bad_cpl++;
      d = cpl[3];
    end else d = 32'hDEAD_DEAD;
    reads++;
  endtask

  task automatic dma(input logic [31:0] src, input logic [31:0] dst_byte, input int len,
                     output int polls);
    logic [31:0] st;
    write(DMA_BASE + 0, src);
    write(DMA_BASE + 1, dst_byte);
    write(DMA_BASE + 2, 32'(len));
    write(DMA_BASE + 3, 32'h1);
    polls = 0;
    do begin
      read(DMA_BASE + 3, st);
      polls++;
    end while (st[0] && polls < 1000000);
    if (st[1:0] != 2'b10) timeouts++;
  endtask
endmodule
