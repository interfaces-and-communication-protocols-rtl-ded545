// ii_sync_clk -- Integral Interface clock-domain synchronizer.
//
// The PCIe endpoint's transaction side runs at a fixed 62.5, 125 or 250 MHz,
// while the user logic runs at the clock the application needs (here the
// 81 MHz ADC clock). This block sits between the bridge's II master (pci_*
// side, clock clk_pci) and the user logic's II slave (user_* side, clock
// clk_user) and passes every bus cycle across.
//
// How: the II bus is a four-phase handshake, so only levels have to cross.
// strobe_n is synchronized into the user domain with two flip-flops; address,
// write flag and data are stable for as long as strobe_n is low and are
// sampled in the user domain when the synchronized strobe arrives, one clock
// before the user strobe is raised. The user slave's ack_n is synchronized
// back; its read data is captured in the user domain when ack_n falls and
// stays constant until the next access, so the PCIe side may sample it when
// the synchronized ack arrives. irq_n goes to the PCIe side and irq_ack_n to
// the user side through two-flip-flop synchronizers; the interrupt acknowledge
// is therefore expected as a level held until irq_n rises. The user-side reset
// is asserted asynchronously with pci_resetN and released synchronously.
//
// Latency: about 3 user clocks + 3 PCIe clocks for the request and the same
// for the release, plus the slave's own response time.
module ii_sync_clk (
  input  logic              clk_pci,
  input  logic              pci_ii_resetN,
  input  llrf_pkg::ii_req_t pci_req,
  output llrf_pkg::ii_rsp_t pci_rsp,
  input  logic              clk_user,
  output logic              user_ii_resetN,
  output llrf_pkg::ii_req_t user_req,
  input  llrf_pkg::ii_rsp_t user_rsp
);
  // ---- user-domain reset ------------------------------------------------------
  logic [1:0] rst_sync;
  always_ff @(posedge clk_user or negedge pci_ii_resetN) begin
    if (!pci_ii_resetN) rst_sync <= 2'b00;
    else                rst_sync <= {rst_sync[0], 1'b1};
  end
  assign user_ii_resetN = rst_sync[1];

  // ---- PCIe -> user ----------------------------------------------------------
  logic [1:0] stb_sync;     // synchronized "strobe active"
  logic [1:0] iack_sync;    // synchronized "irq acknowledge active"
  logic       stb_seen;
  always_ff @(posedge clk_user or negedge user_ii_resetN) begin
    if (!user_ii_resetN) begin
      stb_sync  <= '0;
      iack_sync <= '0;
      stb_seen  <= 1'b0;
      user_req  <= llrf_pkg::II_REQ_IDLE;
    end else begin
      stb_sync  <= {stb_sync[0], !pci_req.strobe_n};
      iack_sync <= {iack_sync[0], !pci_req.irq_ack_n};
      user_req.irq_ack_n <= !iack_sync[1];
      if (stb_sync[1] && !stb_seen) begin
        // request lines have been stable for at least two user clocks
        user_req.addr    <= pci_req.addr;
        user_req.data    <= pci_req.data;
        user_req.write_n <= pci_req.write_n;
        stb_seen         <= 1'b1;
      end else if (stb_seen && stb_sync[1]) begin
        user_req.strobe_n <= 1'b0;
      end
      if (!stb_sync[1]) begin
        stb_seen          <= 1'b0;
        user_req.strobe_n <= 1'b1;
      end
    end
  end

  // ---- user -> PCIe ----------------------------------------------------------
  logic [31:0] rdata_hold;
  logic        uack_q;
  always_ff @(posedge clk_user or negedge user_ii_resetN) begin
    if (!user_ii_resetN) begin
      rdata_hold <= '0;
      uack_q     <= 1'b0;
    end else begin
      uack_q <= !user_rsp.ack_n;
      if (!user_rsp.ack_n && !uack_q) rdata_hold <= user_rsp.data;
    end
  end

  logic [1:0] ack_sync;     // synchronized "ack active" (captured data stable)
  logic [1:0] irq_sync;     // synchronized "irq active"
  always_ff @(posedge clk_pci or negedge pci_ii_resetN) begin
    if (!pci_ii_resetN) begin
      ack_sync <= '0;
      irq_sync <= '0;
      pci_rsp  <= '{ack_n: 1'b1, data: '0, irq_n: 1'b1};
    end else begin
      ack_sync      <= {ack_sync[0], uack_q};
      irq_sync      <= {irq_sync[0], !user_rsp.irq_n};
      pci_rsp.irq_n <= !irq_sync[1];
      pci_rsp.ack_n <= !ack_sync[1];
      if (ack_sync[1] && pci_rsp.ack_n) pci_rsp.data <= rdata_hold;
    end
  end

endmodule
