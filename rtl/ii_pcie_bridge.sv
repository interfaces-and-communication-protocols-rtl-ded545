// ii_pcie_bridge -- PCI Express transaction layer to Integral Interface bridge.
//
// The FPGA's hard PCIe endpoint handles configuration space and the link, and
// hands memory requests to the fabric as transaction layer packets (TLPs).
// This bridge turns those packets into Integral Interface bus cycles, so the
// user logic only sees the simple II register bus, and returns completions
// for reads. It runs on the endpoint's transaction clock.
//
// TLP streams are one 32-bit header/data word per clock with sof/eof framing
// and a valid/ready handshake on each side. Supported requests are 32-bit
// address memory writes (MWr32) and memory reads (MRd32) of one doubleword;
// anything else is consumed and dropped. The byte address of the request,
// shifted right by two and masked to the BAR window (BAR_AW word-address
// bits), becomes the II word address. A read returns a CplD of one
// doubleword with successful status, byte count 4, and the requester ID and
// tag of the request. Byte enables are ignored: every access is a full word.
//
// Interrupt: while the II slave holds irq_n low, the bridge requests an
// interrupt from the endpoint (cfg_interrupt_n low until cfg_interrupt_rdy_n
// is low for a clock, as on the Virtex-5 endpoint). Once the endpoint has taken
// it, the bridge holds ii_req.irq_ack_n low until irq_n rises.
//
// DMA: single-word reads cost about two microseconds each across the bus, so
// large blocks (the pulse record) are pushed to host memory by the bridge
// itself. Four bridge registers sit at the top of the BAR window (word
// addresses DMA_BASE..DMA_BASE+3, never passed to the II bus):
//   +0 SRC   II word address of the first word
//   +1 DST   host byte address of the destination (doubleword aligned)
//   +2 LEN   number of words
//   +3 CTRL  write bit 0 = 1 to start (ignored while busy);
//            read {30'b0, done, busy}; done stays set until the next start
// While a transfer is busy the bridge, whenever no request is waiting, reads
// up to MAX_PAYLOAD words over the II bus and sends them as one 32-bit
// address memory write (MWr32) TLP with its own ID as requester. Packets end
// at MAX_PAYLOAD-doubleword aligned host addresses, so none crosses a 4 KB
// boundary. The host polls CTRL for completion.
//
// Everything here beyond "convert between the transaction layer and the II
// bus" and the DMA push is this design's own choice: one request at a time.
module ii_pcie_bridge #(
  parameter int unsigned BAR_AW      = 24,
  parameter int unsigned MAX_PAYLOAD = 32   // doublewords per DMA packet, power of two
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       completer_id,
  // requests from the endpoint
  input  logic [31:0]       rx_data,
  input  logic              rx_sof,
  input  logic              rx_eof,
  input  logic              rx_valid,
  output logic              rx_ready,
  // completions to the endpoint
  output logic [31:0]       tx_data,
  output logic              tx_sof,
  output logic              tx_eof,
  output logic              tx_valid,
  input  logic              tx_ready,
  // endpoint interrupt request
  output logic              cfg_interrupt_n,
  input  logic              cfg_interrupt_rdy_n,
  // Integral Interface master
  output llrf_pkg::ii_req_t ii_req,
  input  llrf_pkg::ii_rsp_t ii_rsp
);
  import llrf_pkg::*;

  localparam int unsigned PW = $clog2(MAX_PAYLOAD);
  localparam logic [BAR_AW-1:0] DMA_BASE = {{(BAR_AW-2){1'b1}}, 2'b00};

  typedef enum logic [4:0] {
    T_HDR0, T_HDR1, T_HDR2, T_DATA, T_DROP,
    T_II_REQ, T_II_REL, T_CPL0, T_CPL1, T_CPL2, T_CPL3,
    T_DMA_REQ, T_DMA_REL, T_MWR0, T_MWR1, T_MWR2, T_MWR_D
  } br_state_t;

  br_state_t   state;
  logic        is_wr, ok;
  logic [15:0] req_id;
  logic [7:0]  tag;
  logic [6:0]  low_addr;
  logic [31:0] rdata;

  // DMA
  logic [31:0] dma_src, dma_dst;
  logic [BAR_AW-1:0] dma_left;
  logic        dma_busy, dma_done;
  logic [31:0] pbuf [MAX_PAYLOAD];
  logic [PW:0] blen, bcnt;
  wire         is_local = ii_req.addr[BAR_AW-1:2] == DMA_BASE[BAR_AW-1:2];
  // length of the next packet: up to the next aligned boundary, at most what is left
  wire [PW:0]  to_boundary = (PW+1)'(MAX_PAYLOAD) - {1'b0, dma_dst[PW+1:2]};
  wire [PW:0]  next_blen = (dma_left < BAR_AW'(to_boundary)) ? dma_left[PW:0] : to_boundary;

  wire rx_fire = rx_valid && rx_ready;

  assign rx_ready = (state == T_HDR0) || (state == T_HDR1) || (state == T_HDR2) ||
                    (state == T_DATA) || (state == T_DROP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_HDR0;
      is_wr    <= 1'b0;
      ok       <= 1'b0;
      req_id   <= '0;
      tag      <= '0;
      low_addr <= '0;
      rdata    <= '0;
      dma_src  <= '0;
      dma_dst  <= '0;
      dma_left <= '0;
      dma_busy <= 1'b0;
      dma_done <= 1'b0;
      blen     <= '0;
      bcnt     <= '0;
      ii_req.strobe_n <= 1'b1;
      ii_req.write_n  <= 1'b1;
      ii_req.addr     <= '0;
      ii_req.data     <= '0;
      tx_data  <= '0;
      tx_sof   <= 1'b0;
      tx_eof   <= 1'b0;
      tx_valid <= 1'b0;
    end else begin
      // retire the last completion word
      if (tx_valid && tx_ready && tx_eof) begin
        tx_valid <= 1'b0;
        tx_eof   <= 1'b0;
      end
      unique case (state)
        T_HDR0: if (rx_fire && rx_sof) begin
          is_wr <= rx_data[31:24] == TLP_MWR32;
          ok    <= (rx_data[31:24] == TLP_MWR32 || rx_data[31:24] == TLP_MRD32) &&
                   rx_data[9:0] == 10'd1;
          state <= rx_eof ? T_HDR0 : T_HDR1;
        end else if (!rx_valid && dma_busy && (!tx_valid || tx_ready)) begin
          // no request waiting: move the next DMA packet
          blen        <= next_blen;
          bcnt        <= '0;
          ii_req.addr <= dma_src;
          state       <= T_DMA_REQ;
        end
        T_HDR1: if (rx_fire) begin
          req_id <= rx_data[31:16];
          tag    <= rx_data[15:8];
          state  <= rx_eof ? T_HDR0 : T_HDR2;
        end
        T_HDR2: if (rx_fire) begin
          ii_req.addr <= 32'(rx_data[BAR_AW+1:2]);
          low_addr    <= rx_data[6:0];
          if (rx_eof)      state <= (ok && !is_wr) ? T_II_REQ : T_HDR0;
          else if (is_wr)  state <= T_DATA;
          else             state <= T_DROP;
        end
        T_DATA: if (rx_fire) begin
          ii_req.data <= rx_data;
          if (rx_eof) state <= ok ? T_II_REQ : T_HDR0;
          else        state <= T_DROP;
        end
        T_DROP: if (rx_fire && rx_eof) state <= T_HDR0;
        T_II_REQ: if (is_local) begin
          // bridge DMA registers
          unique case (ii_req.addr[1:0])
            2'd0: if (is_wr) dma_src <= ii_req.data; else rdata <= dma_src;
            2'd1: if (is_wr) dma_dst <= ii_req.data; else rdata <= dma_dst;
            2'd2: if (is_wr) dma_left <= ii_req.data[BAR_AW-1:0];
                  else rdata <= 32'(dma_left);
            default: if (is_wr) begin
              if (ii_req.data[0] && !dma_busy) begin
                dma_busy <= dma_left != 0;
                dma_done <= dma_left == 0;
              end
            end else rdata <= {30'd0, dma_done, dma_busy};
          endcase
          state <= is_wr ? T_HDR0 : T_CPL0;
        end else begin
          ii_req.write_n  <= !is_wr;
          ii_req.strobe_n <= 1'b0;
          if (!ii_req.strobe_n && !ii_rsp.ack_n) begin
            rdata           <= ii_rsp.data;
            ii_req.strobe_n <= 1'b1;
            state           <= T_II_REL;
          end
        end
        T_II_REL: if (ii_rsp.ack_n) begin
          ii_req.write_n <= 1'b1;
          state          <= is_wr ? T_HDR0 : T_CPL0;
        end
        T_CPL0: if (!tx_valid || tx_ready) begin
          tx_data  <= {TLP_CPLD, 14'd0, 10'd1};
          tx_sof   <= 1'b1;
          tx_eof   <= 1'b0;
          tx_valid <= 1'b1;
          state    <= T_CPL1;
        end
        T_CPL1: if (tx_ready) begin
          tx_data <= {completer_id, 3'b000, 1'b0, 12'd4};
          tx_sof  <= 1'b0;
          state   <= T_CPL2;
        end
        T_CPL2: if (tx_ready) begin
          tx_data <= {req_id, tag, 1'b0, low_addr};
          state   <= T_CPL3;
        end
        T_CPL3: if (tx_ready) begin
          tx_data <= rdata;
          tx_eof  <= 1'b1;
          state   <= T_HDR0;
        end
        // ---- DMA packet: read blen words, then send them -----------------------
        T_DMA_REQ: begin
          ii_req.write_n  <= 1'b1;
          ii_req.strobe_n <= 1'b0;
          if (!ii_req.strobe_n && !ii_rsp.ack_n) begin
            pbuf[bcnt[PW-1:0]] <= ii_rsp.data;
            ii_req.strobe_n    <= 1'b1;
            state              <= T_DMA_REL;
          end
        end
        T_DMA_REL: if (ii_rsp.ack_n) begin
          ii_req.addr <= ii_req.addr + 32'd1;
          bcnt        <= bcnt + 1'b1;
          state       <= (bcnt + 1'b1 == blen) ? T_MWR0 : T_DMA_REQ;
        end
        T_MWR0: if (!tx_valid || tx_ready) begin
          tx_data  <= {TLP_MWR32, 14'd0, 10'(blen)};
          tx_sof   <= 1'b1;
          tx_eof   <= 1'b0;
          tx_valid <= 1'b1;
          bcnt     <= '0;
          state    <= T_MWR1;
        end
        T_MWR1: if (tx_ready) begin
          tx_data <= {completer_id, 8'd0, (blen == 1) ? 4'h0 : 4'hF, 4'hF};
          tx_sof  <= 1'b0;
          state   <= T_MWR2;
        end
        T_MWR2: if (tx_ready) begin
          tx_data <= {dma_dst[31:2], 2'b00};
          state   <= T_MWR_D;
        end
        T_MWR_D: if (tx_ready) begin
          tx_data <= pbuf[bcnt[PW-1:0]];
          bcnt    <= bcnt + 1'b1;
          if (bcnt + 1'b1 == blen) begin
            tx_eof   <= 1'b1;
            dma_src  <= dma_src + 32'(blen);
            dma_dst  <= dma_dst + {25'(blen), 2'b00};
            dma_left <= dma_left - BAR_AW'(blen);
            if (dma_left == BAR_AW'(blen)) begin
              dma_busy <= 1'b0;
              dma_done <= 1'b1;
            end
            state <= T_HDR0;
          end
        end
        default: state <= T_HDR0;
      endcase
    end
  end

  // ---- interrupt --------------------------------------------------------------
  typedef enum logic [1:0] {I_IDLE, I_REQ, I_ACK} irq_state_t;
  irq_state_t istate;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      istate           <= I_IDLE;
      cfg_interrupt_n  <= 1'b1;
      ii_req.irq_ack_n <= 1'b1;
    end else begin
      unique case (istate)
        I_IDLE: if (!ii_rsp.irq_n) begin
          cfg_interrupt_n <= 1'b0;
          istate          <= I_REQ;
        end
        I_REQ: if (!cfg_interrupt_rdy_n) begin
          cfg_interrupt_n  <= 1'b1;
          ii_req.irq_ack_n <= 1'b0;
          istate           <= I_ACK;
        end
        I_ACK: if (ii_rsp.irq_n) begin
          ii_req.irq_ack_n <= 1'b1;
          istate           <= I_IDLE;
        end
        default: istate <= I_IDLE;
      endcase
    end
  end

  a_dma_len: assert property (@(posedge clk) disable iff (!rst_n)
    (state == T_MWR0) |-> (blen != 0 && blen <= (PW+1)'(MAX_PAYLOAD)));
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_data)));

endmodule
