// ii_example_regs -- register set of the example Integral Interface definition.
//
// The Integral Interface describes a block's registers in a small text file
// from which a generator assigns addresses and produces the HDL. This module
// is that register set written out by hand for the example definition:
//
//   reg  reg1   width 14, read/write, unsigned     word address 0x000
//   area area1  width 12, read/write, 234 entries  word address 0x400
//
// The widths, the entry count and the area address are those of the
// definition; the address of reg1 (0x000) is this design's choice, since the
// generator assigns it. Read data is zero-extended to 32 bits; unmapped
// addresses read as 0. `reg1` and a read port into area1 are brought out for
// the user logic. Bus protocol as in carrier_regs: four-phase, active-low
// strobe_n/ack_n, ack_n low three clocks after strobe_n is sampled low, held until
// strobe_n rises. This block raises no interrupt.
module ii_example_regs #(
  parameter int unsigned REG1_W    = 14,
  parameter int unsigned AREA1_W   = 12,
  parameter int unsigned AREA1_N   = 234,
  parameter logic [31:0] REG1_ADDR = 32'h000,
  parameter logic [31:0] AREA1_ADDR = 32'h400,
  localparam int unsigned A1W      = $clog2(AREA1_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  llrf_pkg::ii_req_t  ii_req,
  output llrf_pkg::ii_rsp_t  ii_rsp,
  output logic [REG1_W-1:0]  reg1,
  input  logic [A1W-1:0]     user_area1_addr,
  output logic [AREA1_W-1:0] user_area1_data
);
  logic [AREA1_W-1:0] area1 [AREA1_N];

  typedef enum logic [1:0] {E_IDLE, E_WAIT, E_RESP, E_ACK} ex_state_t;
  ex_state_t          state;
  logic [31:0]        a_q;
  logic [AREA1_W-1:0] d_q;
  logic               wr_q;
  logic               in_area;
  logic [A1W-1:0]     a1;
  logic [AREA1_W-1:0] a1_rd;

  assign in_area = a_q >= AREA1_ADDR && a_q < AREA1_ADDR + AREA1_N;
  assign a1      = A1W'(a_q - AREA1_ADDR);

  always_ff @(posedge clk) begin
    if (state == E_WAIT && wr_q && in_area) area1[a1] <= d_q;
    a1_rd           <= area1[a1];
    user_area1_data <= area1[user_area1_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= E_IDLE;
      a_q    <= '0;
      d_q    <= '0;
      wr_q   <= 1'b0;
      reg1   <= '0;
      ii_rsp <= '{ack_n: 1'b1, data: '0, irq_n: 1'b1};
    end else begin
      unique case (state)
        E_IDLE: if (!ii_req.strobe_n) begin
          a_q   <= ii_req.addr;
          d_q   <= ii_req.data[AREA1_W-1:0];
          wr_q  <= !ii_req.write_n;
          if (!ii_req.write_n && ii_req.addr == REG1_ADDR) reg1 <= ii_req.data[REG1_W-1:0];
          state <= E_WAIT;
        end
        E_WAIT: state <= E_RESP;
        E_RESP: begin
          ii_rsp.ack_n <= 1'b0;
          ii_rsp.data  <= '0;
          if (!wr_q && a_q == REG1_ADDR) ii_rsp.data <= 32'(reg1);
          else if (!wr_q && in_area)     ii_rsp.data <= 32'(a1_rd);
          state <= E_ACK;
        end
        E_ACK: if (ii_req.strobe_n) begin
          ii_rsp.ack_n <= 1'b1;
          state        <= E_IDLE;
        end
      endcase
    end
  end
endmodule
