// tb_channel_response: measures the frequency response of one sub-band of the
// channelizer and of the DDC behind it, as a swept-tone measurement on the
// sub-band centred at -125 MHz (sub-band 24 of 32 at 500 MS/s).
//
// The bank is loaded with a 521-tap Kaiser-windowed sinc prototype (beta 9,
// cut-off 7.25 MHz, DC gain 32), zero-padded to 576, which meets a 5.5 MHz
// pass band with at most 0.2 dB loss and over 80 dB attenuation from 10 MHz. Two DDCs listen to the same bank: one
// with its NCO for sub-band 24 at 0 Hz, one at -2 MHz; both use a 12-tap
// Blackman-windowed sinc with 1.16 MHz cut-off. For each tone frequency the
// testbench waits until the filters are full and takes the largest output
// magnitude of sub-band 24 over 8 frames. Every measured point must match the
// response computed from the loaded, quantised coefficients:
//   |Y| = A/32 |sum_n h[n] exp(-j 2 pi (f - f_24) n)|,
//   |Z| = |Y| |sum_l g[l] exp(-j 2 pi v l)|, v = 32 (f - f_24) - f_nco
// within 0.2 dB in the pass band and 4 LSB (plus NCO spurs) elsewhere. It
// also checks the measured sub-band loss within +-5.5 MHz (<= 0.25 dB) and
// attenuation at |f| >= 10 MHz (>= 80 dB), and prints the DDC response at
// 1 MHz.
module tb_channel_response;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 18, L = 521, NC = M * TAPS, K = 24;
  localparam real PI = 3.14159265358979;
  localparam real FS = 500.0;
  localparam real A  = 16000.0;
  localparam int  NF = 24;
  localparam real FC_MHZ = 7.25;
  localparam real BETA = 9.0;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              pfb_we = 1'b0, coef_we = 1'b0;
  logic              nco_we [2] = '{1'b0, 1'b0};
  logic [15:0]       cfg_addr = '0;
  logic [31:0]       cfg_data = '0;
  logic              in_valid = 1'b0;
  cplx_t             in_data = '0;
  logic              ch_v;
  logic [4:0]        ch_k;
  cplx_t             ch_d;
  logic              dd_v [2];
  logic [4:0]        dd_k [2];
  cplx_t             dd_d [2];
  int checks = 0, failures = 0;

  polyphase_channelizer u_chan (
    .clk, .rst, .cfg_we(pfb_we), .cfg_addr, .cfg_data(cfg_data[COEF_W-1:0]),
    .in_valid, .in_data, .out_valid(ch_v), .out_chan(ch_k), .out_data(ch_d)
  );

  for (genvar d = 0; d < 2; d++) begin : g_ddc
    tdm_ddc u_ddc (
      .clk, .rst, .cfg_coef_we(coef_we), .cfg_nco_we(nco_we[d]), .cfg_addr, .cfg_data,
      .in_valid(ch_v), .in_chan(ch_k), .in_data(ch_d),
      .out_valid(dd_v[d]), .out_chan(dd_k[d]), .out_data(dd_d[d])
    );
  end

  always #1 clk = ~clk;

  int  hq [NC];
  int  gq [12];
  real f_nco [2] = '{0.0, -2.0};
  real meas [3];
  bit  measuring = 0;

  always @(posedge clk) begin
    if (measuring) begin
      real mg;
      if (ch_v && ch_k == 5'(K)) begin
        mg = $sqrt(1.0 * ch_d.re * ch_d.re + 1.0 * ch_d.im * ch_d.im);
        if (mg > meas[0]) meas[0] = mg;
      end
      for (int d = 0; d < 2; d++)
        if (dd_v[d] && dd_k[d] == 5'(K)) begin
          mg = $sqrt(1.0 * dd_d[d].re * dd_d[d].re + 1.0 * dd_d[d].im * dd_d[d].im);
          if (mg > meas[1 + d]) meas[1 + d] = mg;
        end
    end
  end

  function automatic real bessel_i0(real x);
    real s = 1.0, t = 1.0;
    for (int k = 1; k < 40; k++) begin
      t = t * (x / (2.0 * k)) * (x / (2.0 * k));
      s += t;
    end
    return s;
  endfunction

  // |sum_n c[n] exp(-j 2 pi v n)| for the channelizer prototype
  function automatic real resp_h(real v);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NC; n++) begin
      re += hq[n] / 131072.0 * $cos(2.0 * PI * v * n);
      im -= hq[n] / 131072.0 * $sin(2.0 * PI * v * n);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real resp_g(real v);
    real re = 0.0, im = 0.0;
    for (int l = 0; l < 12; l++) begin
      re += gq[l] / 131072.0 * $cos(2.0 * PI * v * l);
      im -= gq[l] / 131072.0 * $sin(2.0 * PI * v * l);
    end
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real db(real x, real ref_v);
    return 20.0 * $log10((x < 1.0e-3 ? 1.0e-3 : x) / ref_v);
  endfunction

  task automatic wr(input int what, input int a, input int d);
    @(posedge clk);
    pfb_we    <= (what == 0);
    coef_we   <= (what == 1);
    nco_we[0] <= (what == 2);
    nco_we[1] <= (what == 3);
    cfg_addr  <= 16'(a);
    cfg_data  <= 32'(d);
    @(posedge clk);
    pfb_we    <= 1'b0;
    coef_we   <= 1'b0;
    nco_we[0] <= 1'b0;
    nco_we[1] <= 1'b0;
  endtask

  real offs [NF] = '{0.0, 2.0, -2.0, 4.0, -4.0, 5.5, -5.5, 7.0, -7.0, 10.0, -10.0, 12.0, -12.0,
                     15.0, 20.0, -30.0, 50.0, 100.0, 0.5, 1.0, -1.0, -1.5, -2.5, -3.0};

  initial begin
    real gs, fc, worst_pb, worst_sb, fk;
    real ddc_pb [2];
    longint n_smp;
    fc = FC_MHZ / FS;
    for (int n = 0; n < NC; n++) begin
      real t, w, s;
      if (n < L) begin
        t = n - (L - 1) / 2.0;
        w = bessel_i0(BETA * $sqrt(1.0 - (2.0 * n / (L - 1) - 1.0) ** 2)) / bessel_i0(BETA);
        s = (t == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * t) / (PI * t);
        hq[n] = $rtoi(M * s * w * 131072.0 + (s * w >= 0.0 ? 0.5 : -0.5));
        if (hq[n] > 131071) hq[n] = 131071;
      end else hq[n] = 0;
    end
    gs = 0.0;
    for (int l = 0; l < 12; l++) begin
      real t;
      t = l - 5.5;
      gs += (0.42 - 0.5 * $cos(2.0 * PI * l / 11) + 0.08 * $cos(4.0 * PI * l / 11)) * $sin(2.0 * PI * 0.074 * t) / (PI * t);
    end
    for (int l = 0; l < 12; l++) begin
      real t;
      t = l - 5.5;
      gq[l] = $rtoi((0.42 - 0.5 * $cos(2.0 * PI * l / 11) + 0.08 * $cos(4.0 * PI * l / 11)) *
                    $sin(2.0 * PI * 0.074 * t) / (PI * t) / gs * 131072.0 + 0.5);
    end
    for (int l = 0; l < 6; l++) gq[11 - l] = gq[l];
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int l = 0; l < TAPS; l++)
      for (int q = 0; q < M; q++) wr(0, l * M + q, hq[(M - 1 - q) + l * M]);
    for (int l = 0; l < 6; l++) wr(1, l, gq[l]);
    wr(2, K, 0);
    wr(3, K, int'(longint'(-2.0 / 15.625 * 4294967296.0)));

    fk = (K - M) * FS / M;   // -125 MHz
    worst_pb = 0.0;
    worst_sb = -200.0;
    ddc_pb = '{0.0, 0.0};
    n_smp = 0;
    for (int i = 0; i < NF; i++) begin
      real f, v, ey, ez [2];
      f = fk + offs[i];
      // fill the filters, then measure
      for (int fr = 0; fr < TAPS + 12 + 4 + 8; fr++) begin
        if (fr == TAPS + 12 + 4) begin
          meas = '{0.0, 0.0, 0.0};
          measuring = 1;
        end
        for (int s = 0; s < M; s++) begin
          @(posedge clk);
          in_valid   <= 1'b1;
          in_data.re <= 16'($rtoi(A * $cos(2.0 * PI * f / FS * n_smp)));
          in_data.im <= 16'($rtoi(A * $sin(2.0 * PI * f / FS * n_smp)));
          n_smp++;
        end
      end
      @(posedge clk);
      measuring = 0;
      v = (f - fk) / FS;
      ey = A / M * resp_h(v);
      for (int d = 0; d < 2; d++) ez[d] = ey * resp_g(M * v - f_nco[d] / 15.625);
      for (int j = 0; j < 3; j++) begin
        real e, tol;
        e = (j == 0) ? ey : ez[j - 1];
        // NCO phase truncation adds spurs about 60 dB below the sub-band signal
        tol = (e > 0.5 * A) ? e * 0.023 : 0.01 * e + 4.0 + ((j > 0) ? 0.002 * ey : 0.0);
        checks++;
        if (meas[j] > e + tol || meas[j] < e - tol) begin
          failures++;
          $display("offset %f MHz output %0d: measured %f expected %f", offs[i], j, meas[j], e);
        end
      end
      $display("offset %7.2f MHz: sub-band %7.2f dB, DDC@0 %7.2f dB, DDC@-2MHz %7.2f dB", offs[i],
               db(meas[0], A), db(meas[1], A), db(meas[2], A));
      if (offs[i] >= -5.5 && offs[i] <= 5.5 && db(meas[0], A) < worst_pb) worst_pb = db(meas[0], A);
      if ((offs[i] >= 10.0 || offs[i] <= -10.0) && db(meas[0], A) > worst_sb) worst_sb = db(meas[0], A);
      if (offs[i] == 1.0 || offs[i] == -1.0) ddc_pb[0] = db(meas[1], A);
    end
    in_valid <= 1'b0;
    $display("sub-band: worst pass band (|f| <= 5.5 MHz) %f dB, worst stop band (|f| >= 10 MHz) %f dB", worst_pb, worst_sb);
    $display("DDC at 0 Hz mixing: %f dB at 1 MHz", ddc_pb[0]);
    checks += 2;
    if (worst_pb < -0.25) failures++;
    if (worst_sb > -80.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
