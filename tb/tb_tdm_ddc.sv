// tb_tdm_ddc: gives each of the 32 TDM channels (bit-reversed order, as the
// FFT delivers them) its own tone offset and NCO increment, loads a 12-tap
// low-pass with unity DC gain, and
//  - compares every output with a model that mixes with its own quantised
//    cos/sin table and filters exactly (within 2 LSB);
//  - checks that once the filter is full every channel whose NCO matches its
//    tone gives a constant output of the tone's amplitude (within 1.5%), i.e.
//    the tone has been moved to 0 Hz, while channel 7, whose NCO is detuned by
//    3 MHz, is attenuated by the filter.
module tb_tdm_ddc;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 12, NS = 60;
  localparam real PI = 3.14159265358979;
  localparam real A  = 10000.0;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              cfg_coef_we = 1'b0;
  logic              cfg_nco_we = 1'b0;
  logic [15:0]       cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  logic              in_valid = 1'b0;
  logic [4:0]        in_chan = '0;
  cplx_t             in_data = '0;
  logic              out_valid;
  logic [4:0]        out_chan;
  cplx_t             out_data;
  int checks = 0, failures = 0;

  tdm_ddc dut (.*);

  always #1 clk = ~clk;

  int          c [TAPS/2];
  int unsigned inc [M];
  int unsigned acc [M];
  cplx_t       mixed [M][$];
  cplx_t       xin [NS][M];
  int          nout = 0;
  real         maxerr = 0.0;

  function automatic logic signed [15:0] sat16(longint r);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return 16'(r);
  endfunction

  function automatic longint qtab(real v);
    v = v * 131071.0;
    return (v < 0.0) ? longint'($rtoi(v - 0.5)) : longint'($rtoi(v + 0.5));
  endfunction

  // the channel stream: slot s carries channel bitrev(s)
  function automatic int chan_of(int s);
    int r = 0;
    for (int i = 0; i < 5; i++) if (s & (1 << i)) r |= 1 << (4 - i);
    return r;
  endfunction

  int out_cnt [M];

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int k, j;
      longint sr, si;
      real er, ei, d;
      k = out_chan;
      j = out_cnt[k];
      sr = 0;
      si = 0;
      for (int l = 0; l < TAPS / 2; l++) begin
        cplx_t a, b;
        a = (j - l >= 0) ? mixed[k][j - l] : '0;
        b = (j - (TAPS - 1 - l) >= 0) ? mixed[k][j - (TAPS - 1 - l)] : '0;
        sr += longint'(c[l]) * (a.re + b.re);
        si += longint'(c[l]) * (a.im + b.im);
      end
      er = sat16((sr + 65536) >>> 17);
      ei = sat16((si + 65536) >>> 17);
      d = (out_data.re > er) ? out_data.re - er : er - out_data.re;
      if (out_data.im - ei > d) d = out_data.im - ei;
      if (ei - out_data.im > d) d = ei - out_data.im;
      if (d > maxerr) maxerr = d;
      checks++;
      if (d > 2.0) begin
        failures++;
        if (failures < 10) $display("ch %0d j=%0d got %0d,%0d exp %f,%f", k, j, out_data.re, out_data.im, er, ei);
      end
      if (j >= TAPS + 2) begin
        real mag;
        mag = $sqrt(1.0 * out_data.re * out_data.re + 1.0 * out_data.im * out_data.im);
        checks++;
        if (k == 7) begin
          if (mag > 0.5 * A) begin
            failures++;
            $display("detuned channel passes: %f", mag);
          end
        end else if (mag < 0.985 * A || mag > 1.015 * A) begin
          failures++;
          if (failures < 10) $display("ch %0d j=%0d magnitude %f", k, j, mag);
        end
      end
      out_cnt[k]++;
      nout++;
    end
  end

  initial begin
    // 12-tap Hamming-windowed sinc, cut-off 1.5 MHz at 15.625 MS/s, DC gain 1
    real hr [TAPS];
    real hs;
    hs = 0.0;
    for (int l = 0; l < TAPS; l++) begin
      real t;
      t = l - (TAPS - 1) / 2.0;
      hr[l] = (0.54 - 0.46 * $cos(2.0 * PI * l / (TAPS - 1))) * $sin(2.0 * PI * 0.096 * t) / (PI * t);
      hs += hr[l];
    end
    for (int l = 0; l < TAPS / 2; l++) c[l] = $rtoi(hr[l] / hs * 131072.0 + 0.5);
    // channel k: tone at (k - 16) * 0.1 MHz, NCO on the same offset except ch 7
    for (int k = 0; k < M; k++) begin
      real f;
      f = (k - 16) * 0.1 / 15.625;
      inc[k] = int'(longint'(f * 4294967296.0));
      acc[k] = 0;
      out_cnt[k] = 0;
      for (int n = 0; n < NS; n++) begin
        xin[n][k].re = 16'($rtoi(A * $cos(2.0 * PI * f * n + k)));
        xin[n][k].im = 16'($rtoi(A * $sin(2.0 * PI * f * n + k)));
      end
    end
    inc[7] = inc[7] + int'(longint'(3.0 / 15.625 * 4294967296.0));
    // model of the mixer
    for (int n = 0; n < NS; n++)
      for (int k = 0; k < M; k++) begin
        longint cr, sn, pr, pim;
        real ang;
        ang = 2.0 * PI * (acc[k] >> 22) / 1024.0;
        cr  = qtab($cos(ang));
        sn  = -qtab($sin(ang));
        pr  = longint'(xin[n][k].re) * cr - longint'(xin[n][k].im) * sn;
        pim = longint'(xin[n][k].re) * sn + longint'(xin[n][k].im) * cr;
        mixed[k].push_back({sat16((pr + 65536) >>> 17), sat16((pim + 65536) >>> 17)});
        acc[k] = acc[k] + inc[k];
      end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int l = 0; l < TAPS / 2; l++) begin
      @(posedge clk);
      cfg_coef_we <= 1'b1;
      cfg_addr    <= 16'(l);
      cfg_data    <= 32'(c[l]);
    end
    @(posedge clk);
    cfg_coef_we <= 1'b0;
    for (int k = 0; k < M; k++) begin
      @(posedge clk);
      cfg_nco_we <= 1'b1;
      cfg_addr   <= 16'(k);
      cfg_data   <= inc[k];
    end
    @(posedge clk);
    cfg_nco_we <= 1'b0;
    for (int n = 0; n < NS; n++)
      for (int s = 0; s < M; s++) begin
        @(posedge clk);
        in_valid <= 1'b1;
        in_chan  <= 5'(chan_of(s));
        in_data  <= xin[n][chan_of(s)];
        if (n > NS / 2 && $urandom_range(0, 3) == 0) begin
          @(posedge clk);
          in_valid <= 1'b0;
        end
      end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != NS * M) begin
      failures++;
      $display("%0d outputs", nout);
    end
    $display("max error %f LSB", maxerr);
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
