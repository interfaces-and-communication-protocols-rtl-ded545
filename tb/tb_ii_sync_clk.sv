// tb_ii_sync_clk -- bus cycles across two unrelated clocks (125 MHz PCIe side,
// 81 MHz user side). A behavioural slave on the user side answers after a
// random delay. Checks: every write lands once with the right address and
// data, every read returns the slave's data, the user side sees exactly one
// strobe per access, the interrupt and its acknowledge cross, and the user
// reset follows the PCIe reset.
module tb_ii_sync_clk;
  import llrf_pkg::*;
  logic clk_pci = 0, clk_user = 0, pci_ii_resetN = 0, user_ii_resetN;
  ii_req_t pci_req, user_req;
  ii_rsp_t pci_rsp, user_rsp;
  int checks = 0, failures = 0;
  logic [31:0] mem [256];
  int strobes = 0;

  ii_sync_clk dut (.*);
  ii_master_bfm bfm (.clk (clk_pci), .req (pci_req), .rsp (pci_rsp));
  always #4 clk_pci = ~clk_pci;
  always #6.17 clk_user = ~clk_user;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural user-side slave
  logic user_irq_n = 1;
  initial begin
    user_rsp = '{ack_n: 1'b1, data: '0, irq_n: 1'b1};
    forever begin
      @(posedge clk_user);
      user_rsp.irq_n <= user_irq_n;
      if (!user_req.strobe_n && user_rsp.ack_n) begin
        strobes++;
        repeat ($urandom_range(0, 4)) @(posedge clk_user);
        if (!user_req.write_n) mem[user_req.addr[7:0]] = user_req.data;
        user_rsp.data  <= user_req.write_n ? mem[user_req.addr[7:0]] : 32'h0BAD_0000;
        user_rsp.ack_n <= 1'b0;
        while (!user_req.strobe_n) @(posedge clk_user);
        user_rsp.ack_n <= 1'b1;
        user_rsp.data  <= $urandom;   // data is only valid with ack
      end
    end
  end

  initial begin
    logic [31:0] d, model [256];
    int n;
    for (int k = 0; k < 256; k++) begin mem[k] = 0; model[k] = 0; end
    repeat (3) @(negedge clk_pci);
    check(user_ii_resetN == 0, "user reset held while PCIe reset is low");
    pci_ii_resetN = 1;
    repeat (4) @(negedge clk_user);
    check(user_ii_resetN == 1, "user reset released");
    for (int t = 0; t < 300; t++) begin
      logic [7:0] a;
      a = 8'($urandom);
      if ($urandom_range(0, 1) == 0) begin
        model[a] = $urandom;
        bfm.write({24'h0, a}, model[a]);
      end else begin
        bfm.read({24'h0, a}, d);
        check(d == model[a], $sformatf("read %h: %h expected %h", a, d, model[a]));
      end
    end
    n = 0;
    for (int k = 0; k < 256; k++) if (mem[k] != model[k]) n++;
    check(n == 0, $sformatf("%0d words differ after the writes", n));
    check(strobes == 300, $sformatf("%0d user strobes for 300 accesses", strobes));
    // interrupt
    user_irq_n = 0;
    repeat (6) @(negedge clk_pci);
    check(pci_rsp.irq_n == 0, "interrupt crossed");
    fork
      bfm.irq_ack();
      begin
        wait (user_req.irq_ack_n == 0);
        @(negedge clk_user) user_irq_n = 1;
      end
    join
    check(pci_rsp.irq_n == 1, "interrupt released");
    repeat (6) @(negedge clk_user);
    check(user_req.irq_ack_n == 1, "acknowledge released on the user side");
    check(bfm.timeouts == 0, "no bus time-outs");
    // reset again
    pci_ii_resetN = 0;
    #1;
    check(user_ii_resetN == 0, "reset asserts at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk_pci);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
