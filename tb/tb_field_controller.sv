// tb_field_controller -- proportional + feed-forward control law.
// Loads random set-point and feed-forward tables, applies random partial sums,
// gains and time steps, and compares the DAC codes with a reference computed
// here: u = FF + floor(Kp * (SP - floor(total / 32)) / 256), saturated to 16
// bits. Also checks: the three-clock latency, the feedback and feed-forward
// enables, zero output outside the pulse, the saturation counter, and table
// read-back through the register port.
module tb_field_controller;
  localparam int unsigned NR = 3, TD = 16;
  logic clk = 0, rst_n = 0, rf_pulse = 0, fb_en = 0, ff_en = 0;
  logic [3:0] step_idx = 0;
  logic signed [15:0] kp = 0;
  logic signed [23:0] local_i = 0, local_q = 0;
  logic remote_valid [NR];
  logic signed [23:0] remote_i [NR], remote_q [NR];
  logic tbl_we = 0, tbl_sel = 0;
  logic [3:0] tbl_addr = 0;
  logic [31:0] tbl_wdata = 0, tbl_rdata;
  logic signed [15:0] dac_i, dac_q;
  logic [31:0] sat_count;
  int checks = 0, failures = 0;
  logic [31:0] sp [TD], ff [TD];

  field_controller #(.N_REMOTE (NR), .SUM_W (24), .DAC_W (16), .AVG_SHIFT (5),
                     .TABLE_DEPTH (TD), .KP_FRAC (8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic longint fdiv(input longint a, input int sh); // floor(a / 2^sh)
    return a >>> sh;
  endfunction

  longint rsum_i, rsum_q;
  function automatic void expect_u(output longint ui, output longint uq, output bit sat);
    longint vi, vq, ei, eq;
    vi = fdiv(longint'(local_i) + rsum_i, 5);
    vq = fdiv(longint'(local_q) + rsum_q, 5);
    ei = longint'($signed(sp[step_idx][15:0])) - vi;
    eq = longint'($signed(sp[step_idx][31:16])) - vq;
    ui = fb_en ? fdiv(ei * longint'(kp), 8) : 0;
    uq = fb_en ? fdiv(eq * longint'(kp), 8) : 0;
    if (ff_en) begin
      ui += longint'($signed(ff[step_idx][15:0]));
      uq += longint'($signed(ff[step_idx][31:16]));
    end
    sat = (ui != sat16(ui)) || (uq != sat16(uq));
    ui = sat16(ui); uq = sat16(uq);
  endfunction

  initial begin
    longint ui, uq;
    bit s;
    int sat0, lat;
    for (int r = 0; r < int'(NR); r++) begin remote_valid[r] = 0; remote_i[r] = 0; remote_q[r] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load tables
    for (int k = 0; k < int'(TD); k++) begin
      sp[k] = $urandom; ff[k] = {2'b00, 14'($urandom), 2'b00, 14'($urandom)};
      @(negedge clk); tbl_we = 1; tbl_sel = 0; tbl_addr = 4'(k); tbl_wdata = sp[k];
      @(negedge clk); tbl_sel = 1; tbl_wdata = ff[k];
    end
    @(negedge clk) tbl_we = 0;
    // read back
    for (int k = 0; k < int'(TD); k++) begin
      tbl_sel = k[0]; tbl_addr = 4'(k);
      @(negedge clk);
      check(tbl_rdata == (k[0] ? ff[k] : sp[k]), $sformatf("table read-back %0d", k));
    end
    // outside the pulse: zero
    fb_en = 1; ff_en = 1; kp = 16'sd300;
    repeat (6) @(negedge clk);
    check(dac_i == 0 && dac_q == 0, "zero outside the pulse");
    rf_pulse = 1;
    // random vectors
    for (int n = 0; n < 300; n++) begin
      fb_en = (n % 7) != 3; ff_en = (n % 5) != 2;
      kp = (n % 50 == 0) ? 16'sh7fff : $signed(16'($urandom_range(0, 2000)) - 16'sd1000);
      step_idx = 4'($urandom);
      local_i = $signed(24'($urandom_range(0, 1 << 19)) - 24'(1 << 18));
      local_q = $signed(24'($urandom_range(0, 1 << 19)) - 24'(1 << 18));
      rsum_i = 0; rsum_q = 0;
      for (int r = 0; r < int'(NR); r++) begin
        remote_valid[r] = 1;
        remote_i[r] = $signed(24'($urandom_range(0, 1 << 19)) - 24'(1 << 18));
        remote_q[r] = $signed(24'($urandom_range(0, 1 << 19)) - 24'(1 << 18));
        rsum_i += longint'(remote_i[r]); rsum_q += longint'(remote_q[r]);
      end
      @(negedge clk);
      for (int r = 0; r < int'(NR); r++) begin
        remote_valid[r] = 0; remote_i[r] = 24'sd12345; remote_q[r] = 24'sd999; // not taken
      end
      repeat (4) @(negedge clk);
      sat0 = int'(sat_count);
      @(negedge clk);
      expect_u(ui, uq, s);
      check(longint'(dac_i) == ui && longint'(dac_q) == uq,
            $sformatf("vector %0d: got %0d,%0d expected %0d,%0d", n, dac_i, dac_q, ui, uq));
      check(int'(sat_count) - sat0 == int'(s), $sformatf("vector %0d: saturation counted", n));
    end
    // latency: change the local sum and count clocks until the output moves
    fb_en = 1; ff_en = 0; kp = 16'sd256; step_idx = 0;
    local_i = 0; local_q = 0;
    repeat (6) @(negedge clk);
    local_i = 24'sd3200;  // mean changes by 100
    lat = 0;
    begin
      logic signed [15:0] prev_i;
      prev_i = dac_i;
      while (dac_i == prev_i && lat < 20) begin @(negedge clk); lat++; end
      check(lat == 3, $sformatf("latency %0d clocks, expected 3", lat));
      check(int'(prev_i) - int'(dac_i) == 100, "gain of one gives the error back");
    end
    // end of pulse
    rf_pulse = 0;
    repeat (4) @(negedge clk);
    check(dac_i == 0 && dac_q == 0, "zero after the pulse");
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
