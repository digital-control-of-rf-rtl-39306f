// End-to-end test harness for fdc_top: drives the top's ports and checks
// the whole control loop against behavioural models.
//
// An ADC model sends the baseband samples over the serial DDR lines with
// the bit and system clocks; a DAC model decodes the SPI frames into the six
// control words. Between them a simple canceller model closes the loop: the
// three tap signals are copies of one complex tone with different phases
// plus a DC offset per channel, each tap is weighted by its DAC words
// (g = (code - 2^15) / 2^15 for I and Q), and the feedback channel carries
// e = G * sum_n (h_n - g_n) x_n, the residual self-interference for
// channel coefficients h_n. The LMS loop must drive e towards zero.
//
// One-cycle events inside the design (accumulator saturation, protected
// conjugation) are seen through the sticky bits of the status word, read
// with the status instruction like the processor would.
//
// The sequence exercises every mechanism of the design and counts each:
// offset estimation and restart, manual words, the switch from manual to
// automatic control (instruction 40 with the DAC FIFO flush 65), convergence
// by at least 20 dB, the DAC and ADC capture FIFOs, halt, a step size that
// freezes the weights, accumulator saturation under a disturbance too
// strong to cancel and re-convergence after it (tracking), the protected
// conjugation of a full-scale sample and the return to manual control.
// A mechanism that never happened counts as a failure.
module fdc_harness
  import fdc_pkg::*;
#(
  parameter int unsigned OFFSET_LOG2_N  = 16,
  parameter int unsigned ADC_FIFO_DEPTH = 128,
  parameter int unsigned DAC_FIFO_DEPTH = 65536,
  parameter longint      WATCHDOG_NS    = 64'd100_000_000
) (
  output logic                sclk,
  output logic                pclk,
  output logic                rst_n,
  output logic [ADC_CH-1:0]   lvds_data,
  output logic                ci_clk_en,
  output logic                ci_start,
  output logic [7:0]          ci_n,
  output logic [31:0]         ci_dataa,
  input  logic [31:0]         ci_result,
  input  logic                ci_done,
  input  logic                dac_sclk,
  input  logic                dac_sdi,
  input  logic                dac_sync_n,
  input  logic                dac_ldac_n,
  input  logic                dac_reset_n
);
  int checks = 0, failures = 0;
  int mech [string];

  // ------------------------------------------------------------- models
  logic [ADC_CH-1:0][11:0] frame_in;
  logic frame_req;
  int frames_sent;
  logic [15:0] dac_reg [8], input_reg [8];
  int dac_frames, ldac_pulses, bad_frames;
  logic [3:0] last_cmd, last_addr;

  adc_lvds_model #(.CH(ADC_CH)) u_adc (.frame_in, .sclk, .pclk, .data(lvds_data), .frame_req, .frames_sent);
  ad5676_model u_dac (.sclk(dac_sclk), .sdi(dac_sdi), .sync_n(dac_sync_n), .ldac_n(dac_ldac_n),
                      .reset_n(dac_reset_n), .dac_reg, .input_reg, .frames(dac_frames),
                      .ldac_pulses, .bad_frames, .last_cmd, .last_addr);

  // canceller model
  localparam real PI = 3.14159265358979;
  localparam real OMEGA = 2.0 * PI / 64.0;   // whole periods in any 2^n >= 64 samples
  real amp = 1000.0, gfb = 1.5, hscale = 1.0;
  real h_re [N_TAPS] = '{0.30, -0.15, 0.05};
  real h_im [N_TAPS] = '{0.20, 0.10, -0.10};
  real phi [N_TAPS] = '{0.0, 0.6, 1.3};
  int  dc [ADC_CH] = '{12, -7, 20, 5, -15, 9, 25, -18};
  real e_pow_acc = 0.0;
  int  e_pow_n = 0;
  longint k = 0;
  logic [ADC_CH*12-1:0] sent_hist [$];

  function automatic logic [11:0] adc(real v);
    int q;
    q = $rtoi(v + (v >= 0 ? 0.5 : -0.5));
    if (q > 2047) q = 2047;
    if (q < -2048) q = -2048;
    return 12'(q);
  endfunction

  function automatic real gain(logic [15:0] code);
    return (real'(int'(code)) - 32768.0) / 32768.0;
  endfunction

  always @(frame_req) begin
    real xr [N_TAPS], xi [N_TAPS];
    real er, ei;
    er = 0.0; ei = 0.0;
    for (int t = 0; t < N_TAPS; t++) begin
      real gr, gi, dr, di;
      xr[t] = amp * $cos(OMEGA * real'(k) + phi[t]);
      xi[t] = amp * $sin(OMEGA * real'(k) + phi[t]);
      gr = gain(dac_reg[DAC_ADDR[2*t][2:0]]);
      gi = gain(dac_reg[DAC_ADDR[2*t+1][2:0]]);
      dr = hscale * h_re[t] - gr;
      di = hscale * h_im[t] - gi;
      er += gfb * (dr * xr[t] - di * xi[t]);
      ei += gfb * (dr * xi[t] + di * xr[t]);
      frame_in[2*t]   = adc(xr[t] + dc[2*t]);
      frame_in[2*t+1] = adc(xi[t] + dc[2*t+1]);
    end
    frame_in[FB_I_CH] = adc(er + dc[FB_I_CH]);
    frame_in[FB_Q_CH] = adc(ei + dc[FB_Q_CH]);
    e_pow_acc += er * er + ei * ei;
    e_pow_n++;
    k++;
  end

  // history of the frames actually sent (frame_in is taken at frame start)
  always @(u_adc.frames_sent) begin
    sent_hist.push_back(u_adc.frame_in);
    if (sent_hist.size() > 8192) void'(sent_hist.pop_front());
  end

  // DAC outputs after each LDAC pulse
  logic [DAC_CH*16-1:0] dac_hist [$];
  always @(negedge dac_ldac_n) begin
    logic [DAC_CH-1:0][15:0] s;
    #1;
    for (int c = 0; c < DAC_CH; c++) s[c] = dac_reg[DAC_ADDR[c][2:0]];
    dac_hist.push_back(s);
    if (dac_hist.size() > 4096) void'(dac_hist.pop_front());
  end

  int dac_sclk_edges = 0;
  always @(posedge dac_sclk) dac_sclk_edges++;

  // ------------------------------------------------------------ helpers
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ci(input logic [7:0] num, input logic [31:0] a, output logic [31:0] r);
    @(negedge pclk);
    ci_clk_en = 1; ci_start = 1; ci_n = num; ci_dataa = a;
    @(negedge pclk);
    ci_clk_en = 0; ci_start = 0;
    if (!ci_done) begin failures++; $display("FAIL no done for instruction %0d", num); end
    r = ci_result;
  endtask

  task automatic updates(int n);
    repeat (n) @(negedge dac_ldac_n);
    #1;
  endtask

  // mean |e|^2 over n frames
  task automatic measure(int n, output real p);
    e_pow_acc = 0.0; e_pow_n = 0;
    wait (e_pow_n >= n);
    p = e_pow_acc / real'(e_pow_n);
  endtask

  function automatic real db(real a, real b);
    return 10.0 * $log10(a / b);
  endfunction

  // ----------------------------------------------------------- watchdog
  initial begin
    #(WATCHDOG_NS * 1ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------- sequence
  initial begin
    logic [31:0] r;
    real p_off, p_conv, p_dist, p_track;
    ci_clk_en = 0; ci_start = 0; ci_n = 0; ci_dataa = 0;
    for (int c = 0; c < ADC_CH; c++) frame_in[c] = '0;
    rst_n = 0;
    #200;
    @(negedge pclk) rst_n = 1;

    // 1. offset estimation: the mean over 2^N samples of the tone is zero,
    //    so the estimate must be the injected DC offset.
    do begin
      repeat (64) @(posedge pclk);
      ci(CI_READ_STATUS, 0, r);
    end while (!r[9]);
    mech["offset_estimate"]++;
    for (int c = 0; c < ADC_CH; c++) begin
      ci(CI_READ_OFFSET, 32'(c), r);
      check(r[31] && int'(signed'(r[11:0])) - dc[c] >= -2 && int'(signed'(r[11:0])) - dc[c] <= 2,
            $sformatf("offset of channel %0d = %0d, injected %0d", c, int'(signed'(r[11:0])), dc[c]));
    end

    // 2. manual words reach the DAC
    ci(CI_SET_DA_VALUE, {13'(0), 3'(2), 16'h9000}, r);
    updates(2);
    check(dac_reg[DAC_ADDR[2][2:0]] == 16'h9000, "manual word on the DAC");
    if (dac_reg[DAC_ADDR[2][2:0]] == 16'h9000) mech["manual_words"]++;
    ci(CI_SET_DA_VALUE, {13'(0), 3'(2), 16'h8000}, r);
    updates(2);

    // 3. flush the DAC FIFO and switch all taps to automatic control
    measure(256, p_off);
    ci(CI_DAC_FIFO_FLUSH, 0, r);
    ci(CI_ALL_AUTO, 0, r);
    mech["manual_to_auto"]++;
    updates(150);
    measure(256, p_conv);
    $display("residual power: uncancelled %0.1f, converged %0.3f (%0.1f dB)", p_off, p_conv, db(p_off, p_conv));
    check(db(p_off, p_conv) >= 20.0, "at least 20 dB of cancellation");
    if (db(p_off, p_conv) >= 20.0) mech["convergence"]++;

    // 4. DAC capture FIFO: consecutive updates, stopped when full
    ci(CI_DAC_FIFO_COUNT, 0, r);
    if (DAC_FIFO_DEPTH <= 150) begin
      check(r == DAC_FIFO_DEPTH, $sformatf("DAC FIFO full (%0d)", r));
      if (r == DAC_FIFO_DEPTH) mech["dac_fifo_full"]++;
    end else begin
      check(r >= 150 && r <= 160, $sformatf("DAC FIFO holds the updates since the flush (%0d)", r));
      if (r >= 150) mech["dac_fifo_capture"]++;
    end
    begin
      logic [DAC_CH*16-1:0] ent [$];
      int n_read;
      bit found;
      n_read = (r < 64) ? int'(r) : 64;
      for (int j = 0; j < n_read; j++) begin
        logic [DAC_CH-1:0][15:0] w;
        for (int c = 0; c < DAC_CH; c++) begin
          ci(CI_DAC_FIFO_READ, 32'(c) | ((c == DAC_CH - 1) ? 32'h8000_0000 : 0), r);
          w[c] = r[15:0];
        end
        ent.push_back(w);
      end
      found = 0;
      for (int s = 0; s + n_read <= dac_hist.size() && !found; s++) begin
        bit ok;
        ok = 1;
        for (int j = 0; j < n_read && ok; j++) if (dac_hist[s + j] != ent[j]) ok = 0;
        if (ok) found = 1;
      end
      check(found == 1 && n_read > 0, "DAC FIFO entries are consecutive DAC updates");
    end

    // 5. halt: no SCK edges and no updates while halted
    ci(CI_SET_HALT, 1, r);
    updates(1);
    repeat (20) @(posedge pclk);
    begin
      int l0, s0;
      l0 = ldac_pulses; s0 = dac_sclk_edges;
      repeat (2000) @(posedge pclk);
      check(ldac_pulses == l0 && dac_sclk_edges == s0, "halted: no DAC traffic");
      if (ldac_pulses == l0 && dac_sclk_edges == s0) mech["halt"]++;
    end
    ci(CI_SET_HALT, 0, r);
    updates(3);

    // 6. step size 2^-16 freezes the weights
    for (int t = 0; t < N_TAPS; t++) ci(CI_SET_STEP, {22'(0), 2'(t), 3'(0), 5'd16}, r);
    updates(3);
    begin
      logic [DAC_CH*16-1:0] w_before;
      w_before = dac_hist[$];
      updates(20);
      check(dac_hist[$] == w_before, "weights frozen with shift 16");
      if (dac_hist[$] == w_before) mech["step_freeze"]++;
    end
    for (int t = 0; t < N_TAPS; t++) ci(CI_SET_STEP, {22'(0), 2'(t), 3'(0), 5'd0}, r);

    // 7. disturbance beyond the canceller's range (the taps here carry the
    //    same tone, so only the sum of the weighted taps counts and its
    //    reach is 3 x sqrt(2)): weights saturate; then
    //    back to normal, the loop must re-converge (tracking)
    ci(CI_READ_STATUS, 0, r);
    hscale = 20.0;
    updates(100);
    measure(64, p_dist);
    ci(CI_READ_STATUS, 0, r);
    check(r[21:19] != 0, "accumulators saturated under the disturbance");
    if (r[21:19] != 0) mech["accumulator_saturation"]++;
    hscale = 1.0;
    updates(200);
    measure(256, p_track);
    $display("residual power: disturbed %0.1f, re-converged %0.3f (%0.1f dB below uncancelled)", p_dist, p_track, db(p_off, p_track));
    check(db(p_off, p_track) >= 20.0, "re-converged after the disturbance");
    if (db(p_off, p_track) >= 20.0) mech["tracking"]++;

    // 8. full-scale tap samples: the most negative Q sample is conjugated
    //    with protection
    ci(CI_READ_STATUS, 0, r);
    check(r[18:16] == 0, "no conjugation clip at normal amplitude");
    amp = 2150.0;
    updates(20);
    amp = 1000.0;
    ci(CI_READ_STATUS, 0, r);
    check(r[18:16] != 0, "protected conjugation exercised");
    if (r[18:16] != 0) mech["conjugation_clip"]++;
    updates(100);

    // 9. ADC capture FIFO: consecutive raw frames
    ci(CI_ADC_FIFO_FLUSH, 0, r);
    repeat (ADC_FIFO_DEPTH + 10) @(posedge pclk);
    ci(CI_ADC_FIFO_COUNT, 0, r);
    check(r == ADC_FIFO_DEPTH, $sformatf("ADC FIFO full (%0d)", r));
    if (r == ADC_FIFO_DEPTH) mech["adc_fifo_full"]++;
    begin
      logic [ADC_CH*12-1:0] ent [$];
      bit found;
      for (int j = 0; j < int'(ADC_FIFO_DEPTH); j++) begin
        logic [ADC_CH-1:0][11:0] w;
        for (int c = 0; c < ADC_CH; c++) begin
          ci(CI_ADC_FIFO_READ, 32'(c) | ((c == ADC_CH - 1) ? 32'h8000_0000 : 0), r);
          w[c] = r[11:0];
        end
        ent.push_back(w);
      end
      found = 0;
      for (int s = 0; s + int'(ADC_FIFO_DEPTH) <= sent_hist.size() && !found; s++) begin
        bit ok;
        ok = 1;
        for (int j = 0; j < int'(ADC_FIFO_DEPTH) && ok; j++) if (sent_hist[s + j] != ent[j]) ok = 0;
        if (ok) found = 1;
      end
      check(found == 1, "ADC FIFO holds consecutive frames as sent");
    end

    // 10. back to manual: the words return to the manual values
    ci(CI_ALL_MANUAL, 0, r);
    updates(3);
    begin
      bit ok;
        ok = 1;
      for (int c = 0; c < DAC_CH; c++) if (dac_reg[DAC_ADDR[c][2:0]] != 16'h8000) ok = 0;
      check(ok, "manual control restores the manual words");
      if (ok) mech["auto_to_manual"]++;
    end

    // 11. offset re-estimation after the feedback channel's offset moved
    dc[FB_I_CH] = dc[FB_I_CH] + 40;
    updates(1);
    ci(CI_OFFSET_RESTART, 0, r);
    repeat ((1 << OFFSET_LOG2_N) + 20) @(posedge pclk);
    ci(CI_READ_OFFSET, 32'(FB_I_CH), r);
    begin
      int est;
      est = int'(signed'(r[11:0]));
      check(est - dc[FB_I_CH] >= -2 && est - dc[FB_I_CH] <= 2,
            $sformatf("offset after restart %0d, injected %0d", est, dc[FB_I_CH]));
      if (est - dc[FB_I_CH] >= -2 && est - dc[FB_I_CH] <= 2) mech["offset_restart"]++;
      $display("offset of the feedback I channel re-estimated: %0d (injected %0d)", est, dc[FB_I_CH]);
    end

    check(bad_frames == 0 && last_cmd == DAC_CMD_WRITE_INPUT, "well-formed DAC frames");

    // every mechanism must have happened
    begin
      string need [$];
      need = '{"offset_estimate", "manual_words", "manual_to_auto", "convergence",
                          "halt", "step_freeze", "accumulator_saturation", "tracking",
                          "conjugation_clip", "adc_fifo_full", "auto_to_manual", "offset_restart"};
      need.push_back(DAC_FIFO_DEPTH <= 150 ? "dac_fifo_full" : "dac_fifo_capture");
      foreach (need[i]) begin
        int n;
        n = mech.exists(need[i]) ? mech[need[i]] : 0;
        $display("mechanism %-24s %0d", need[i], n);
        check(n > 0, $sformatf("mechanism %s never happened", need[i]));
      end
    end
    $display("frames %0d, DAC updates %0d", frames_sent, ldac_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
