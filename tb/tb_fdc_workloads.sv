// Bandwidth workloads for fdc_top at its default sizes: cancellation of a
// wideband leakage with 20, 40 and 80 MHz of signal bandwidth.
//
// The transmit baseband s(t) is a sum of 16 equal tones with random phases
// spread evenly over the bandwidth B. The three tap channels carry s delayed
// by the tap delay lines (0, 1 and 2 ns); the leakage to be cancelled is two
// paths with other delays and complex gains (a circulator leak at 0.4 ns and
// an antenna reflection at 1.7 ns). As in the end-to-end test, the DAC words
// of each tap scale its signal by (code - 2^15) / 2^15 and the feedback
// channel carries the residual, 1.5 x (leakage - canceller output), plus
// a DC offset per channel. Samples are taken at 40 MHz, so the 80 MHz case
// is aliased, as it is in the hardware. Because the taps cannot reproduce
// the leakage's delays exactly, the residual grows with bandwidth.
//
// For each bandwidth: all taps manual (weights cleared), uncancelled
// residual power measured, then automatic control (instructions 65 and 40)
// with step shift 0 for 300 updates, then shift 2 for 600 and shift 5 for
// 1500 updates to settle (smaller steps, less gradient noise),
// and the residual measured again. Checks: at least 20 dB of cancellation
// for every bandwidth, and no better cancellation at a wider bandwidth than
// at a narrower one (within 1 dB). Every DAC update must take 162 cycles.
module tb_fdc_workloads;
  import fdc_pkg::*;
  logic sclk, pclk, rst_n, ci_clk_en, ci_start, ci_done;
  logic [ADC_CH-1:0] lvds_data;
  logic [7:0] ci_n;
  logic [31:0] ci_dataa, ci_result;
  logic dac_sclk, dac_sdi, dac_sync_n, dac_ldac_n, dac_reset_n;

  fdc_top dut (.*);

  int checks = 0, failures = 0;

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

  // ------------------------------------------------------ signal model
  localparam real PI = 3.14159265358979;
  localparam int  M  = 16;                     // tones
  localparam real TS = 25.0;                   // sample period, ns
  real tap_delay [N_TAPS] = '{0.0, 1.0, 2.0};  // ns
  real leak_delay [2] = '{0.4, 1.7};           // ns
  real leak_re [2] = '{0.45, -0.20};
  real leak_im [2] = '{0.25, 0.30};
  int  dc [ADC_CH] = '{12, -7, 20, 5, -15, 9, 25, -18};
  real freq [M], phase [M];
  real amp = 150.0, gfb = 1.5;
  real e_pow_acc = 0.0;
  int  e_pow_n = 0;
  longint k = 0;

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

  task automatic set_band(real bw_mhz);
    for (int m = 0; m < M; m++) begin
      freq[m]  = (-bw_mhz / 2.0 + (real'(m) + 0.5) * bw_mhz / real'(M)) * 1.0e-3;  // cycles per ns
      phase[m] = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
    end
  endtask

  // s(t) at time t ns
  task automatic sig(real t, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int m = 0; m < M; m++) begin
      re += amp * $cos(2.0 * PI * freq[m] * t + phase[m]);
      im += amp * $sin(2.0 * PI * freq[m] * t + phase[m]);
    end
  endtask

  always @(frame_req) begin
    real t, er, ei, sr, si;
    t = real'(k) * TS;
    er = 0.0; ei = 0.0;
    for (int p = 0; p < 2; p++) begin
      sig(t - leak_delay[p], sr, si);
      er += leak_re[p] * sr - leak_im[p] * si;
      ei += leak_re[p] * si + leak_im[p] * sr;
    end
    for (int n = 0; n < N_TAPS; n++) begin
      real gr, gi;
      sig(t - tap_delay[n], sr, si);
      gr = gain(dac_reg[DAC_ADDR[2*n][2:0]]);
      gi = gain(dac_reg[DAC_ADDR[2*n+1][2:0]]);
      er -= gr * sr - gi * si;
      ei -= gr * si + gi * sr;
      frame_in[2*n]   = adc(sr + dc[2*n]);
      frame_in[2*n+1] = adc(si + dc[2*n+1]);
    end
    er *= gfb; ei *= gfb;
    frame_in[FB_I_CH] = adc(er + dc[FB_I_CH]);
    frame_in[FB_Q_CH] = adc(ei + dc[FB_Q_CH]);
    e_pow_acc += er * er + ei * ei;
    e_pow_n++;
    k++;
  end

  // update period: 162 system clock cycles between LDAC_N pulses
  int cyc = 0, last_ldac = -1, bad_period = 0, periods = 0;
  always @(posedge pclk) cyc++;
  always @(negedge dac_ldac_n) begin
    if (last_ldac >= 0) begin
      periods++;
      if (cyc - last_ldac != 162) bad_period++;
    end
    last_ldac = cyc;
  end

  // ---------------------------------------------------------- helpers
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

  task automatic measure(int n, output real p);
    e_pow_acc = 0.0; e_pow_n = 0;
    wait (e_pow_n >= n);
    p = e_pow_acc / real'(e_pow_n);
  endtask

  task automatic set_steps(int s);
    logic [31:0] r;
    for (int t = 0; t < N_TAPS; t++) ci(CI_SET_STEP, {22'(0), 2'(t), 3'(0), 5'(s)}, r);
  endtask

  initial begin
    #(64'd80_000_000 * 1ns);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real bw [3] = '{20.0, 40.0, 80.0};
  real canc [3];

  initial begin
    logic [31:0] r;
    real p_off, p_on;
    ci_clk_en = 0; ci_start = 0; ci_n = 0; ci_dataa = 0;
    for (int c = 0; c < ADC_CH; c++) frame_in[c] = '0;
    set_band(bw[0]);
    rst_n = 0;
    #200;
    @(negedge pclk) rst_n = 1;
    do begin
      repeat (256) @(posedge pclk);
      ci(CI_READ_STATUS, 0, r);
    end while (!r[9]);

    for (int b = 0; b < 3; b++) begin
      ci(CI_ALL_MANUAL, 0, r);
      set_steps(0);
      set_band(bw[b]);
      updates(3);
      measure(4096, p_off);
      ci(CI_DAC_FIFO_FLUSH, 0, r);
      ci(CI_ALL_AUTO, 0, r);
      updates(300);
      set_steps(2);
      updates(600);
      set_steps(5);
      updates(1500);
      measure(16384, p_on);
      canc[b] = 10.0 * $log10(p_off / p_on);
      $display("bandwidth %0.0f MHz: residual %0.1f -> %0.2f, cancellation %0.1f dB",
               bw[b], p_off, p_on, canc[b]);
      check(canc[b] >= 20.0, $sformatf("at least 20 dB at %0.0f MHz", bw[b]));
      ci(CI_DAC_FIFO_COUNT, 0, r);
      check(r >= 2400, "DAC capture follows the convergence");
    end
    check(canc[1] <= canc[0] + 1.0 && canc[2] <= canc[1] + 1.0,
          "cancellation does not improve with bandwidth");
    check(periods > 0 && bad_period == 0, $sformatf("%0d of %0d updates not 162 cycles", bad_period, periods));
    check(bad_frames == 0, "well-formed DAC frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
