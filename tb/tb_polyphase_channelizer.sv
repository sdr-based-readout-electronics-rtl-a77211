// tb_polyphase_channelizer: loads a 521-tap Blackman-windowed sinc prototype
// (cut-off f_s/64, zero-padded to 576 = 18 x 32) and checks the complete
// 32-band filter bank against the floating-point definition
//   Y_k[m] = (1/32) sum_n h[n] x[32m+31-n] exp(+j 2 pi k n / 32)
// within 4 LSB, for random input and then for a tone at the centre of
// sub-band 5. For the tone it also checks that sub-band 5 carries it at
// about unity gain and every other sub-band is over 60 dB below it. Checks
// that each sub-band appears once per 32 outputs and that every frame but the
// last two (still inside the reorder buffer and the FFT) has come out.
module tb_polyphase_channelizer;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 18, L = 521, NC = M * TAPS;
  localparam int FR = 70, FR_NOISE = 30, TONE_K = 5;
  localparam real PI = 3.14159265358979;

  logic                     clk = 1'b0;
  logic                     rst = 1'b1;
  logic                     cfg_we = 1'b0;
  logic [15:0]              cfg_addr = '0;
  logic signed [COEF_W-1:0] cfg_data = '0;
  logic                     in_valid = 1'b0;
  cplx_t                    in_data = '0;
  logic                     out_valid;
  logic [4:0]               out_chan;
  cplx_t                    out_data;
  int checks = 0, failures = 0;

  polyphase_channelizer dut (.*);

  always #1 clk = ~clk;

  int    h [NC];
  cplx_t x [FR * M];
  int    nout = 0;
  real   maxerr = 0.0, tone_mag = 0.0, leak_mag = 0.0;
  bit    seen [M];

  always @(posedge clk) begin
    if (!rst && out_valid && nout < (FR - 2) * M) begin
      int m, k, idx;
      real er, ei, d, mag;
      m = nout / M;
      k = out_chan;
      if (nout % M == 0) for (int i = 0; i < M; i++) seen[i] = 0;
      checks++;
      if (seen[k]) begin
        failures++;
        $display("sub-band %0d twice in frame %0d", k, m);
      end
      seen[k] = 1;
      er = 0.0;
      ei = 0.0;
      for (int n = 0; n < NC; n++) begin
        idx = m * M + M - 1 - n;
        if (idx >= 0 && h[n] != 0) begin
          real ang, hv;
          ang = 2.0 * PI * k * n / M;
          hv  = h[n] / 131072.0;
          er += hv * (x[idx].re * $cos(ang) - x[idx].im * $sin(ang));
          ei += hv * (x[idx].re * $sin(ang) + x[idx].im * $cos(ang));
        end
      end
      er /= M;
      ei /= M;
      d = (out_data.re > er) ? out_data.re - er : er - out_data.re;
      if (out_data.im - ei > d) d = out_data.im - ei;
      if (ei - out_data.im > d) d = ei - out_data.im;
      if (d > maxerr) maxerr = d;
      checks++;
      if (d > 4.0) begin
        failures++;
        if (failures < 10) $display("m=%0d k=%0d got %0d,%0d exp %f,%f", m, k, out_data.re, out_data.im, er, ei);
      end
      if (m >= FR_NOISE + TAPS + 1) begin
        mag = $sqrt(1.0 * out_data.re * out_data.re + 1.0 * out_data.im * out_data.im);
        if (k == TONE_K) tone_mag = mag;
        else if (mag > leak_mag) leak_mag = mag;
      end
      nout++;
    end
  end

  initial begin
    for (int n = 0; n < NC; n++) begin
      real t, w, s;
      if (n < L) begin
        t = n - (L - 1) / 2.0;
        w = 0.42 - 0.5 * $cos(2.0 * PI * n / (L - 1)) + 0.08 * $cos(4.0 * PI * n / (L - 1));
        s = (t == 0.0) ? 1.0 : $sin(PI * t / M) / (PI * t / M);
        h[n] = $rtoi(0.999 * 131071.0 * w * s);
      end else h[n] = 0;
    end
    for (int i = 0; i < FR * M; i++) begin
      if (i < FR_NOISE * M) begin
        x[i].re = 16'($urandom_range(0, 16000)) - 16'sd8000;
        x[i].im = 16'($urandom_range(0, 16000)) - 16'sd8000;
      end else begin
        x[i].re = 16'($rtoi(12000.0 * $cos(2.0 * PI * TONE_K * i / M)));
        x[i].im = 16'($rtoi(12000.0 * $sin(2.0 * PI * TONE_K * i / M)));
      end
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // slot q, tap l holds h[(M-1-q) + l*M]
    for (int l = 0; l < TAPS; l++)
      for (int q = 0; q < M; q++) begin
        @(posedge clk);
        cfg_we   <= 1'b1;
        cfg_addr <= 16'(l * M + q);
        cfg_data <= 18'(h[(M - 1 - q) + l * M]);
      end
    @(posedge clk);
    cfg_we <= 1'b0;
    for (int i = 0; i < FR * M; i++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      in_data  <= x[i];
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks += 3;
    if (nout != (FR - 2) * M) begin
      failures++;
      $display("got %0d sub-band samples, expected %0d", nout, (FR - 2) * M);
    end
    if (tone_mag < 11000.0 || tone_mag > 13000.0) begin
      failures++;
      $display("tone magnitude %f", tone_mag);
    end
    if (leak_mag > tone_mag / 1000.0) begin
      failures++;
      $display("leakage %f", leak_mag);
    end
    $display("max error %f LSB, tone %f, largest leak %f", maxerr, tone_mag, leak_mag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
