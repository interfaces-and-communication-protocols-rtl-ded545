// ii_master_bfm -- bus-functional Integral Interface master for testbenches.
// write() and read() run one four-phase cycle: drive address/data, pull
// strobe_n low, wait for ack_n low (sampling the read data at the falling clock edge), release
// strobe_n, wait for ack_n high. `last_cycles` holds the clocks from strobe
// to acknowledge of the last access. irq_ack() acknowledges an interrupt and
// holds the acknowledge until irq_n rises. A time-out makes a hung slave
// visible as `timeouts`.
module ii_master_bfm (
  input  logic              clk,
  output llrf_pkg::ii_req_t req,
  input  llrf_pkg::ii_rsp_t rsp
);
  int last_cycles = 0;
  int timeouts = 0;
  initial req = llrf_pkg::II_REQ_IDLE;

  task automatic access(input bit wr, input logic [31:0] addr, input logic [31:0] wdata,
                        output logic [31:0] rdata);
    int n;
    @(negedge clk);
    req.addr = addr; req.data = wdata; req.write_n = !wr;
    req.strobe_n = 0;
    n = 0;
    do begin @(negedge clk); n++; end while (rsp.ack_n && n < 1000);
    if (n >= 1000) timeouts++;
    last_cycles = n;
    rdata = rsp.data;
    req.strobe_n = 1; req.write_n = 1;
    n = 0;
    do begin @(negedge clk); n++; end while (!rsp.ack_n && n < 1000);
    if (n >= 1000) timeouts++;
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] wdata);
    logic [31:0] d;
    access(1'b1, addr, wdata, d);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] rdata);
    access(1'b0, addr, 32'h0, rdata);
  endtask

  task automatic irq_ack;
    int n;
    @(negedge clk) req.irq_ack_n = 0;
    n = 0;
    do begin @(negedge clk); n++; end while (!rsp.irq_n && n < 1000);
    if (n >= 1000) timeouts++;
    req.irq_ack_n = 1;
  endtask
endmodule
