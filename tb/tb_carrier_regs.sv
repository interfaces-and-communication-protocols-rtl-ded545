// tb_carrier_regs -- register map of a carrier: ID, CTRL and KP read/write,
// status words, set-point and feed-forward areas (through a one-clock table
// model), the DAQ area (through a one-clock memory model), unmapped
// addresses, acknowledge timing, and the pulse-end interrupt with its
// acknowledge.
module tb_carrier_regs;
  import llrf_pkg::*;
  localparam int unsigned TD = 32, DD = 100;
  logic clk = 0, rst_n = 0, irq_set = 0;
  ii_req_t ii_req;
  ii_rsp_t ii_rsp;
  logic [31:0] ctrl;
  logic signed [15:0] kp;
  logic [31:0] status [8];
  logic tbl_we, tbl_sel;
  logic [4:0] tbl_addr;
  logic [31:0] tbl_wdata, tbl_rdata;
  logic [6:0] daq_addr;
  logic [31:0] daq_rdata;
  int checks = 0, failures = 0;
  logic [31:0] sp [TD], ff [TD], daq [DD];

  carrier_regs #(.BOARD_ID (3), .IS_MAIN (1'b0), .N_STATUS (8),
                 .TABLE_DEPTH (TD), .DAQ_DEPTH (DD)) dut (.*);
  ii_master_bfm bfm (.clk, .req (ii_req), .rsp (ii_rsp));
  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (tbl_we && !tbl_sel) sp[tbl_addr] <= tbl_wdata;
    if (tbl_we &&  tbl_sel) ff[tbl_addr] <= tbl_wdata;
    tbl_rdata <= tbl_sel ? ff[tbl_addr] : sp[tbl_addr];
    daq_rdata <= daq[daq_addr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d, w;
    for (int k = 0; k < 8; k++) status[k] = 32'h5000_0000 + 32'(k * 17);
    for (int k = 0; k < int'(DD); k++) daq[k] = $urandom;
    for (int k = 0; k < int'(TD); k++) begin sp[k] = 0; ff[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.read(32'h0, d);
    check(d == 32'hA7CA_0300, $sformatf("ID %h", d));
    check(bfm.last_cycles == 3, $sformatf("acknowledge after %0d clocks", bfm.last_cycles));
    bfm.write(32'h1, 32'h0000_0007);
    check(ctrl == 32'h7, "CTRL written");
    bfm.write(32'h2, 32'h1234_8001);
    check(kp == 16'sh8001, "KP written");
    bfm.read(32'h1, d);  check(d == 32'h7, "CTRL read");
    bfm.read(32'h2, d);  check(d == 32'hFFFF_8001, "KP read, sign-extended");
    for (int k = 0; k < 8; k++) begin
      bfm.read(32'h3 + k, d);
      check(d == status[k], $sformatf("STATUS[%0d] %h", k, d));
    end
    bfm.read(32'hB, d);  check(d == 0, "unmapped address reads 0");
    for (int k = 0; k < int'(TD); k++) begin
      w = $urandom;
      bfm.write(32'h1000 + k, w);
      check(sp[k] == w, $sformatf("SP[%0d] written", k));
      bfm.write(32'h2000 + k, ~w);
      check(ff[k] == ~w, $sformatf("FF[%0d] written", k));
      bfm.read(32'h1000 + k, d); check(d == w, $sformatf("SP[%0d] read", k));
      bfm.read(32'h2000 + k, d); check(d == ~w, $sformatf("FF[%0d] read", k));
    end
    w = sp[0];
    bfm.write(32'h1000 + TD, ~w);   // beyond the table: ignored
    check(sp[0] == w, "write beyond SP ignored");
    for (int k = 0; k < int'(DD); k += 3) begin
      bfm.read(32'h0010_0000 + k, d);
      check(d == daq[k], $sformatf("DAQ[%0d] %h expected %h", k, d, daq[k]));
    end
    bfm.read(32'h0010_0000 + DD, d); check(d == 0, "beyond DAQ reads 0");
    // interrupt
    check(ii_rsp.irq_n == 1, "no interrupt after reset");
    @(negedge clk) irq_set = 1; @(negedge clk) irq_set = 0;
    @(negedge clk);
    check(ii_rsp.irq_n == 0, "interrupt raised at pulse end");
    repeat (5) @(negedge clk);
    check(ii_rsp.irq_n == 0, "interrupt held until acknowledged");
    bfm.irq_ack();
    check(ii_rsp.irq_n == 1, "interrupt released by acknowledge");
    check(bfm.timeouts == 0, "no bus time-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
