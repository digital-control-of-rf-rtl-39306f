// Self-checking test of offset_remove with 2^4-sample averaging: channels
// carry random signals around different DC offsets. Until the first estimate
// the data must pass unchanged; afterwards the estimate must equal the
// floor of the mean of the first 16 samples and the output must be the
// input minus that estimate, clipped to 12 bits (clipping is provoked on
// channels with extreme offsets). A restart must produce a new estimate.
module tb_offset_remove;
  localparam int CH = 8, L = 4, N = 1 << L;
  int checks = 0, failures = 0, clips = 0;
  logic clk = 0, rst_n = 0, restart = 0, offset_valid;
  logic [CH-1:0][11:0] data_in, data_out, offset;
  int dc [CH];
  int sum [CH];
  int est [CH];
  int cnt;
  bit have;

  offset_remove #(.CH(CH), .BITS(12), .LOG2_N(L)) dut (.clk, .rst_n, .restart, .data_in, .data_out, .offset, .offset_valid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(int v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return v;
  endfunction

  task automatic new_dc();
    for (int c = 0; c < CH; c++) dc[c] = int'($urandom_range(0, 200)) - 100;
    dc[6] = 1500;   // large offsets so that the subtraction clips
    dc[7] = -1500;
  endtask

  initial begin
    int prev_in [CH];
    new_dc();
    data_in = '0;
    for (int c = 0; c < CH; c++) begin sum[c] = 0; est[c] = 0; prev_in[c] = 0; end
    cnt = 0; have = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int exp_out;
      // restart half way
      restart = (n == 300);
      if (n == 300) new_dc();
      for (int c = 0; c < CH; c++) begin
        int v;
        if (c >= 6) v = clip(dc[c] + int'($urandom_range(0, 7000)) - 3500);  // wide swing
        else        v = clip(dc[c] + int'($urandom_range(0, 1200)) - 600);
        data_in[c] = 12'(v);
      end
      @(posedge clk); #1;
      // reference: output of the sample presented in this cycle
      for (int c = 0; c < CH; c++) begin
        exp_out = clip(int'(signed'(data_in[c])) - (have ? est[c] : 0));
        if (exp_out != int'(signed'(data_in[c])) - (have ? est[c] : 0)) clips++;
        checks++;
        if (int'(signed'(data_out[c])) != exp_out) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d c=%0d out=%0d exp=%0d", n, c, signed'(data_out[c]), exp_out);
        end
      end
      // reference estimator
      if (restart) begin
        cnt = 0;
        for (int c = 0; c < CH; c++) sum[c] = 0;
      end else if (cnt < N) begin
        for (int c = 0; c < CH; c++) sum[c] += int'(signed'(data_in[c]));
        cnt++;
        if (cnt == N) begin
          have = 1;
          for (int c = 0; c < CH; c++) est[c] = sum[c] >>> L;
        end
      end
      checks++;
      if (offset_valid != have) begin failures++; $display("FAIL valid n=%0d", n); end
      if (have) for (int c = 0; c < CH; c++) begin
        checks++;
        if (int'(signed'(offset[c])) != est[c]) begin
          failures++;
          if (failures < 10) $display("FAIL offset c=%0d got %0d exp %0d", c, signed'(offset[c]), est[c]);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (clips == 0) begin failures++; $display("FAIL clipping never exercised"); end
    $display("clipped outputs: %0d", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
