// tb_ii_example_regs -- the example register set: reg1 keeps 14 bits, area1
// holds 234 twelve-bit words at 0x400, the user read port sees them,
// addresses just past the area read as 0, and every access is acknowledged
// three clocks after the strobe.
module tb_ii_example_regs;
  import llrf_pkg::*;
  logic clk = 0, rst_n = 0;
  ii_req_t ii_req;
  ii_rsp_t ii_rsp;
  logic [13:0] reg1;
  logic [7:0]  user_area1_addr = 0;
  logic [11:0] user_area1_data;
  int checks = 0, failures = 0;
  logic [11:0] model [234];

  ii_example_regs dut (.*);
  ii_master_bfm bfm (.clk, .req (ii_req), .rsp (ii_rsp));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bfm.write(32'h000, 32'hFFFF_ABCD);
    check(reg1 == 14'h2BCD, "reg1 keeps its 14 bits");
    bfm.read(32'h000, d);
    check(d == 32'h0000_2BCD, $sformatf("reg1 read %h", d));
    check(bfm.last_cycles == 3, $sformatf("ack after %0d clocks", bfm.last_cycles));
    for (int k = 0; k < 234; k++) begin
      model[k] = 12'($urandom);
      bfm.write(32'h400 + k, {20'hFFFFF, model[k]});
    end
    for (int k = 0; k < 234; k += 7) begin
      bfm.read(32'h400 + k, d);
      check(d == 32'(model[k]), $sformatf("area1[%0d] = %h expected %h", k, d, model[k]));
    end
    bfm.read(32'h400 + 233, d);
    check(d == 32'(model[233]), "last area1 word");
    bfm.read(32'h400 + 234, d);
    check(d == 0, "past the end of area1 reads 0");
    bfm.write(32'h400 + 234, 32'h123);
    bfm.read(32'h400, d);
    check(d == 32'(model[0]), "write past the end changes nothing");
    for (int k = 0; k < 234; k += 13) begin
      @(negedge clk) user_area1_addr = 8'(k);
      @(negedge clk);
      check(user_area1_data == model[k], $sformatf("user port area1[%0d]", k));
    end
    check(ii_rsp.irq_n == 1, "no interrupt");
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
