// carrier_regs -- Integral Interface register slave of a carrier FPGA.
//
// Gives software (through the PCIe bridge) access to the working registers and
// memory areas of the carrier, in the style of the Integral Interface: scalar
// registers and memory "areas" at fixed word addresses behind one simple bus.
//
//   word address         name         access
//   0x0000_0000          ID           r   {16'hA7CA, board id, main flag}
//   0x0000_0001          CTRL         rw  [0] feedback on, [1] feed-forward on,
//                                         [2] LLL transmitter on
//   0x0000_0002          KP           rw  [15:0] signed proportional gain
//   0x0000_0003 + k      STATUS[k]    r   status words from the carrier
//   0x0000_1000 + n      SP[n]        rw  set-point table  {Q, I}
//   0x0000_2000 + n      FF[n]        rw  feed-forward table {Q, I}
//   0x0010_0000 + n      DAQ[n]       r   pulse record
//
// Unmapped addresses read as 0 and ignore writes. The register map and the
// reset values (all zero) are this design's own choices.
//
// Bus protocol (four-phase, control lines active low): the master drives
// addr, write_n and data, then pulls strobe_n low and holds everything until
// ack_n goes low; read data is valid while ack_n is low. The master then
// releases strobe_n and the slave releases ack_n. An access takes three clocks
// from strobe_n to ack_n (latch, memory read, acknowledge). The interrupt
// irq_n goes low when `irq_set` pulses (end of the RF pulse) and is released
// on the falling edge of irq_ack_n.
module carrier_regs #(
  parameter int unsigned BOARD_ID    = 0,
  parameter bit          IS_MAIN     = 1'b0,
  parameter int unsigned N_STATUS    = 8,
  parameter int unsigned TABLE_DEPTH = llrf_pkg::PULSE_US,
  parameter int unsigned DAQ_DEPTH   = llrf_pkg::PULSE_CYCLES,
  localparam int unsigned TAW        = $clog2(TABLE_DEPTH),
  localparam int unsigned DAW        = $clog2(DAQ_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  llrf_pkg::ii_req_t  ii_req,
  output llrf_pkg::ii_rsp_t  ii_rsp,
  input  logic               irq_set,
  // registers
  output logic [31:0]        ctrl,
  output logic signed [15:0] kp,
  input  logic [31:0]        status [N_STATUS],
  // controller tables
  output logic               tbl_we,
  output logic               tbl_sel,
  output logic [TAW-1:0]     tbl_addr,
  output logic [31:0]        tbl_wdata,
  input  logic [31:0]        tbl_rdata,
  // DAQ memory
  output logic [DAW-1:0]     daq_addr,
  input  logic [31:0]        daq_rdata
);
  localparam logic [31:0] A_ID   = 32'h0000_0000;
  localparam logic [31:0] A_CTRL = 32'h0000_0001;
  localparam logic [31:0] A_KP   = 32'h0000_0002;
  localparam logic [31:0] A_STAT = 32'h0000_0003;
  localparam logic [31:0] A_SP   = 32'h0000_1000;
  localparam logic [31:0] A_FF   = 32'h0000_2000;
  localparam logic [31:0] A_DAQ  = 32'h0010_0000;

  typedef enum logic [1:0] {B_IDLE, B_WAIT, B_READ, B_ACK} bus_state_t;

  bus_state_t  state;
  logic [31:0] a_q, d_q;
  logic        wr_q;
  logic        irq_ack_q;
  logic        in_sp, in_ff, in_daq, in_stat;

  assign in_sp   = a_q >= A_SP   && a_q < A_SP   + TABLE_DEPTH;
  assign in_ff   = a_q >= A_FF   && a_q < A_FF   + TABLE_DEPTH;
  assign in_daq  = a_q >= A_DAQ  && a_q < A_DAQ  + DAQ_DEPTH;
  assign in_stat = a_q >= A_STAT && a_q < A_STAT + N_STATUS;

  assign tbl_sel   = in_ff;
  assign tbl_addr  = TAW'(a_q - (in_ff ? A_FF : A_SP));
  assign tbl_wdata = d_q;
  assign tbl_we    = (state == B_WAIT) && wr_q && (in_sp || in_ff);
  assign daq_addr  = DAW'(a_q - A_DAQ);

  logic [31:0] rd_mux;
  always_comb begin
    rd_mux = '0;
    if      (a_q == A_ID)   rd_mux = {16'hA7CA, 8'(BOARD_ID), 7'd0, IS_MAIN};
    else if (a_q == A_CTRL) rd_mux = ctrl;
    else if (a_q == A_KP)   rd_mux = 32'(kp);
    else if (in_stat)       rd_mux = status[a_q - A_STAT];
    else if (in_sp || in_ff) rd_mux = tbl_rdata;
    else if (in_daq)        rd_mux = daq_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= B_IDLE;
      a_q           <= '0;
      d_q           <= '0;
      wr_q          <= 1'b0;
      ctrl          <= '0;
      kp            <= '0;
      ii_rsp        <= '{ack_n: 1'b1, data: '0, irq_n: 1'b1};
      irq_ack_q     <= 1'b1;
    end else begin
      // interrupt: set by the end of the pulse, cleared by an acknowledge edge
      irq_ack_q <= ii_req.irq_ack_n;
      if (irq_set)                              ii_rsp.irq_n <= 1'b0;
      else if (irq_ack_q && !ii_req.irq_ack_n)  ii_rsp.irq_n <= 1'b1;

      unique case (state)
        B_IDLE: if (!ii_req.strobe_n) begin
          a_q   <= ii_req.addr;
          d_q   <= ii_req.data;
          wr_q  <= !ii_req.write_n;
          state <= B_WAIT;
        end
        B_WAIT: begin
          if (wr_q) begin
            if (a_q == A_CTRL) ctrl <= d_q;
            if (a_q == A_KP)   kp   <= d_q[15:0];
          end
          state <= B_READ;
        end
        B_READ: begin
          ii_rsp.data  <= wr_q ? '0 : rd_mux;
          ii_rsp.ack_n <= 1'b0;
          state        <= B_ACK;
        end
        B_ACK: if (ii_req.strobe_n) begin
          ii_rsp.ack_n <= 1'b1;
          state        <= B_IDLE;
        end
      endcase
    end
  end

  // the master keeps the request stable until it is acknowledged
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (!ii_req.strobe_n && ii_rsp.ack_n && state != B_IDLE) |-> (ii_req.addr == a_q));

endmodule
