// field_controller -- proportional field controller with feed-forward.
//
// The main carrier closes the fast feedback loop of the RF station. It adds its
// own partial vector sum to the partial sums received from the other carriers
// over the Low Latency Links, scales the total to the mean cavity vector
// (arithmetic shift by AVG_SHIFT, 32 cavities -> 5), and during the RF pulse
// drives the vector modulator DACs with
//
//     u = FF(t) + Kp * (SP(t) - VS)        separately for I and Q
//
// where SP and FF are set-point and feed-forward tables indexed by the pulse
// time step (one entry per microsecond of the 1024 us pulse) and Kp is a
// signed gain with KP_FRAC fractional bits. `fb_en` and `ff_en` switch the
// two terms; outside the pulse the DAC codes are zero. The result saturates
// to DAC_W bits, and `sat_count` counts saturated samples.
//
// The tables are dual-ported: the control path reads them at `step_idx`,
// the register interface reads and writes them between pulses (the adaptive
// feed-forward is computed in software between pulses and written here). A
// table entry packs {Q[31:16], I[15:0]}. The partial sums from other boards
// are held until replaced, so the loop always uses the newest value.
//
// Timing: three clocks from the inputs to the DAC codes (sum and table read;
// error; gain, add and saturate). Fixed-point formats, table sizes and the
// averaging are this design's own choices.
module field_controller #(
  parameter int unsigned N_REMOTE    = llrf_pkg::N_BOARDS - 1,
  parameter int unsigned SUM_W       = llrf_pkg::SUM_W,
  parameter int unsigned DAC_W       = llrf_pkg::DAC_W,
  parameter int unsigned AVG_SHIFT   = $clog2(llrf_pkg::N_CAVITIES),
  parameter int unsigned TABLE_DEPTH = llrf_pkg::PULSE_US,
  parameter int unsigned KP_FRAC     = 8,
  localparam int unsigned TAW        = $clog2(TABLE_DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    rf_pulse,
  input  logic [TAW-1:0]          step_idx,
  input  logic                    fb_en,
  input  logic                    ff_en,
  input  logic signed [15:0]      kp,
  input  logic signed [SUM_W-1:0] local_i,
  input  logic signed [SUM_W-1:0] local_q,
  input  logic                    remote_valid [N_REMOTE],
  input  logic signed [SUM_W-1:0] remote_i     [N_REMOTE],
  input  logic signed [SUM_W-1:0] remote_q     [N_REMOTE],
  // table port (register interface side)
  input  logic                    tbl_we,
  input  logic                    tbl_sel,      // 0 = set point, 1 = feed-forward
  input  logic [TAW-1:0]          tbl_addr,
  input  logic [31:0]             tbl_wdata,
  output logic [31:0]             tbl_rdata,    // one clock after tbl_addr
  // vector modulator
  output logic signed [DAC_W-1:0] dac_i,
  output logic signed [DAC_W-1:0] dac_q,
  output logic [31:0]             sat_count
);
  localparam int unsigned ACC_W = SUM_W + 2 + $clog2(N_REMOTE + 1);
  localparam int unsigned PRD_W = ACC_W + 16;
  localparam logic signed [PRD_W-1:0] DMAX = PRD_W'(2**(DAC_W-1) - 1);
  localparam logic signed [PRD_W-1:0] DMIN = -PRD_W'(2**(DAC_W-1));

  logic [31:0] sp_mem [TABLE_DEPTH];
  logic [31:0] ff_mem [TABLE_DEPTH];

  logic signed [SUM_W-1:0] rem_i [N_REMOTE];
  logic signed [SUM_W-1:0] rem_q [N_REMOTE];

  // ---- table port ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (tbl_we && !tbl_sel) sp_mem[tbl_addr] <= tbl_wdata;
    if (tbl_we &&  tbl_sel) ff_mem[tbl_addr] <= tbl_wdata;
    tbl_rdata <= tbl_sel ? ff_mem[tbl_addr] : sp_mem[tbl_addr];
  end

  // ---- newest partial sums of the other carriers ----------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_REMOTE); r++) begin
        rem_i[r] <= '0;
        rem_q[r] <= '0;
      end
    end else begin
      for (int r = 0; r < int'(N_REMOTE); r++) begin
        if (remote_valid[r]) begin
          rem_i[r] <= remote_i[r];
          rem_q[r] <= remote_q[r];
        end
      end
    end
  end

  // ---- stage 1: total vector sum, table read --------------------------------
  logic signed [ACC_W-1:0] tot_i, tot_q;
  always_comb begin
    tot_i = ACC_W'(local_i);
    tot_q = ACC_W'(local_q);
    for (int r = 0; r < int'(N_REMOTE); r++) begin
      tot_i = tot_i + ACC_W'(rem_i[r]);
      tot_q = tot_q + ACC_W'(rem_q[r]);
    end
  end

  logic signed [ACC_W-1:0] vs_i1, vs_q1;
  logic [31:0]             sp1, ff1;
  logic                    p1, p2, p3;

  always_ff @(posedge clk) begin
    sp1 <= sp_mem[step_idx];
    ff1 <= ff_mem[step_idx];
  end

  // ---- stage 2: control error ----------------------------------------------
  logic signed [ACC_W-1:0] err_i2, err_q2;
  logic signed [15:0]      ff_i2, ff_q2;

  // ---- stage 3: gain, feed-forward, saturation ------------------------------
  logic signed [PRD_W-1:0] u_i, u_q;
  always_comb begin
    u_i = '0;
    u_q = '0;
    if (fb_en) begin
      u_i = (PRD_W'(err_i2) * PRD_W'(kp)) >>> KP_FRAC;
      u_q = (PRD_W'(err_q2) * PRD_W'(kp)) >>> KP_FRAC;
    end
    if (ff_en) begin
      u_i = u_i + PRD_W'(ff_i2);
      u_q = u_q + PRD_W'(ff_q2);
    end
  end

  function automatic logic signed [DAC_W-1:0] sat(input logic signed [PRD_W-1:0] v);
    if (v > DMAX) return DAC_W'(DMAX);
    if (v < DMIN) return DAC_W'(DMIN);
    return DAC_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_i1     <= '0;
      vs_q1     <= '0;
      p1        <= 1'b0;
      p2        <= 1'b0;
      p3        <= 1'b0;
      err_i2    <= '0;
      err_q2    <= '0;
      ff_i2     <= '0;
      ff_q2     <= '0;
      dac_i     <= '0;
      dac_q     <= '0;
      sat_count <= '0;
    end else begin
      // stage 1
      vs_i1 <= tot_i >>> AVG_SHIFT;
      vs_q1 <= tot_q >>> AVG_SHIFT;
      p1    <= rf_pulse;
      // stage 2
      err_i2 <= ACC_W'($signed(sp1[15:0]))  - vs_i1;
      err_q2 <= ACC_W'($signed(sp1[31:16])) - vs_q1;
      ff_i2  <= $signed(ff1[15:0]);
      ff_q2  <= $signed(ff1[31:16]);
      p2     <= p1;
      // stage 3
      p3 <= p2;
      if (p2) begin
        dac_i <= sat(u_i);
        dac_q <= sat(u_q);
        if (u_i > DMAX || u_i < DMIN || u_q > DMAX || u_q < DMIN)
          sat_count <= sat_count + 32'd1;
      end else begin
        dac_i <= '0;
        dac_q <= '0;
      end
    end
  end

  // the DAC is driven only inside the pulse window (delayed by the pipeline)
  a_dac_zero_outside: assert property (@(posedge clk) disable iff (!rst_n)
    !p3 |-> (dac_i == '0 && dac_q == '0));

endmodule
