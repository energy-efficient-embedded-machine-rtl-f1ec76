// tb_fir_transposed: self-checking test of the transposed-form FIR filter.
//
// Two filters run side by side on the same samples: the default one
// (Approx-BW multipliers, 8 inexact columns) and one with exact multipliers.
// The exact one is compared with the direct convolution
// y(n) = sum_k H[k] x(n-15+k); the approximate one with the same convolution
// using a column-rule model of the approximate product. Both are checked on
// every clock, one new sample per clock (full rate), with idle clocks
// (x_valid low) in between that must not advance the filter. An impulse
// checks that the response reproduces the coefficients in order. A noisy
// 100 Hz tone measures the signal-to-noise ratio of the approximate output
// against the exact one, which must stay above 20 dB.
module tb_fir_transposed;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int H [16] = '{0, -1, -1, 4, 0, -12, 11, 63, 63, 11, -12, 0, 4, -1, -1, 0};

  logic rst_n, x_valid;
  logic signed [7:0]  x;
  logic signed [15:0] y_apx, y_ex;

  fir_transposed                 u_apx (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x), .y(y_apx));
  fir_transposed #(.APPROX_K(0)) u_ex  (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x), .y(y_ex));

  // Approximate product: inexact column rules for K = 8 on 8-bit magnitudes.
  function automatic int amul(int xs, int hs);
    int m, n, lo, hi, ones;
    bit c, c_up;
    m = (xs < 0) ? -xs : xs;
    n = (hs < 0) ? -hs : hs;
    lo = 0; hi = 0; c = 0; c_up = 0;
    for (int j = 7; j >= 0; j--) begin
      ones = 0;
      for (int i = 0; i <= j; i++) ones += ((m >> i) & 1) & ((n >> (j - i)) & 1);
      if (c || ones >= 2) begin lo |= 1 << j; c = 1; end
      else if (ones == 1) lo |= 1 << j;
      if (j == 7) c_up = c;
    end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (i + j >= 8 && ((m >> i) & 1) && ((n >> j) & 1)) hi += 1 << (i + j);
    hi += int'(c_up) << 8;
    return ((xs < 0) != (hs < 0)) ? -(hi + lo) : (hi + lo);
  endfunction

  int hist [16];   // hist[0] = newest sample
  int nsamp;

  task automatic check_out();
    int ye, ya;
    ye = 0; ya = 0;
    for (int k = 0; k < 16; k++) begin
      // tap k multiplies the sample taken 15-k samples before the current one
      ye += H[k] * hist[15 - k];
      ya += amul(hist[15 - k], H[k]);
    end
    checks += 2;
    if (y_ex !== 16'(ye)) begin
      failures++;
      if (failures < 10) $display("FAIL exact n=%0d got=%0d exp=%0d", nsamp, y_ex, 16'(ye));
    end
    if (y_apx !== 16'(ya)) begin
      failures++;
      if (failures < 10) $display("FAIL approx n=%0d got=%0d exp=%0d", nsamp, y_apx, 16'(ya));
    end
  endtask

  task automatic push(int v);
    x = 8'(v); x_valid = 1;
    for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    #1 check_out();
    @(posedge clk); #1;
    nsamp++;
  endtask

  initial begin
    rst_n = 0; x_valid = 0; x = 0; nsamp = 0;
    for (int k = 0; k < 16; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // impulse: exact output must replay H[15], H[14], ... H[0] scaled by 1
    push(1);
    for (int n = 1; n < 16; n++) begin
      x = 8'(0); x_valid = 1;
      for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = 0;
      #1;
      checks++;
      if (y_ex !== 16'(H[15 - n])) begin
        failures++; $display("FAIL impulse n=%0d got=%0d exp=%0d", n, y_ex, H[15 - n]);
      end
      check_out();
      @(posedge clk); #1;
    end
    // random samples at full rate, with idle gaps
    for (int t = 0; t < 3000; t++) begin
      if (t % 97 == 50) begin
        x_valid = 0; x = 8'($urandom);
        repeat (3) @(posedge clk);
        #1;
      end
      push(int'($signed(8'($urandom))));
    end
    // sinusoid in the pass band at full scale
    for (int t = 0; t < 400; t++)
      push(int'(100.0 * $sin(2.0 * 3.14159265 * 300.0 * t / 3100.0)));
    // quality of the approximate filter on a noisy 100 Hz stimulus (the
    // shaker frequency of the tactile set-up): SNR of the approximate output
    // taking the exact filter's output as the reference
    begin
      real sig = 0.0, err = 0.0, snr;
      for (int t = 0; t < 1000; t++) begin
        push(int'(90.0 * $sin(2.0 * 3.14159265 * 100.0 * t / 3100.0)) + int'($urandom % 31) - 15);
        sig += real'(y_ex) * real'(y_ex);
        err += real'(y_apx - y_ex) * real'(y_apx - y_ex);
      end
      snr = 10.0 * $log10(sig / err);
      $display("SNR of the approximate filter against the exact one: %0.2f dB", snr);
      checks++;
      if (snr < 20.0) begin failures++; $display("FAIL SNR %0.2f dB below 20 dB", snr); end
    end
    $display("samples=%0d time=%0t", nsamp, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
