// tb_echo_readout_top: end-to-end loop-back test of the full readout at its
// default size (5 ADC/DAC pairs, 10 bands, 20 channelizers and DDCs, 640
// sub-bands), with the converters replaced by wires: each DAC's two samples
// per clock are fed back as the two 500 MS/s bands of the same ADC (even
// samples -> band 0, odd samples -> band 1).
//
// Every comb generator plays a 1024-clock period that holds, for band b of
// DAC a, two tones on the 500/1024 MHz grid:
//   T1 at k1*15.625 + 1.953125 MHz, k1 = 3 + a + 8b  (plain sub-band k1)
//   T2 at (k2 + 1/2)*15.625 MHz,    k2 = 12 + a + 8b (mixed sub-band k2+1)
// The filters are loaded by broadcast writes, the NCO of plain sub-band k1 of
// each chain by an addressed write (offset 1.953125 MHz = 2^29). After the
// filters have filled, it checks for every chain that T1 appears at 0 Hz in
// plain sub-band k1 and T2 in mixed sub-band k2+1 with the tone amplitude
// (within 3%), that T2 is suppressed in the plain sub-bands beside it (the
// blind interval), and that an empty sub-band stays silent. It counts how
// often each mechanism happened: comb period wrap-arounds, broadcast and
// addressed configuration writes, tones recovered by the plain and by the
// mixed channelizers, blind intervals covered, sub-band frames delivered.
module tb_echo_readout_top;
  import echo_pkg::*;
  localparam int N_ADC = 5;
  localparam int M = 32, TAPS = 18, L = 521, NC = M * TAPS;
  localparam int P = 1024;           // comb period in clocks
  localparam int RUN = 64 * M;       // clocks of loop-back streaming
  localparam real PI = 3.14159265358979;
  localparam real A  = 8000.0;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  cfg_t       cfg = '0;
  logic       adc_valid [N_ADC][2];
  cplx_t      adc_data  [N_ADC][2];
  cplx_t      dac_data  [N_ADC][2];
  logic       ch_valid  [N_ADC][2][2];
  logic [4:0] ch_chan   [N_ADC][2][2];
  cplx_t      ch_data   [N_ADC][2][2];
  int checks = 0, failures = 0;

  echo_readout_top dut (.*);

  always #1 clk = ~clk;

  // loop-back wiring
  logic loop_on = 1'b0;
  always_comb begin
    for (int a = 0; a < N_ADC; a++)
      for (int b = 0; b < 2; b++) begin
        adc_valid[a][b] = loop_on;
        adc_data[a][b]  = dac_data[a][b];
      end
  end

  // mechanism counters
  int n_bcast = 0, n_addr = 0, n_wrap = 0, n_plain = 0, n_mixed = 0, n_blind = 0;
  int n_frames [N_ADC][2][2];
  int nout [N_ADC][2][2];
  real mag_min [N_ADC][2][2][M], mag_max [N_ADC][2][2][M];
  cplx_t first_pair [N_ADC];
  int    clk_cnt = 0;

  function automatic int k1_of(int a, int b); return 3 + a + 8 * b; endfunction
  function automatic int k2_of(int a, int b); return 12 + a + 8 * b; endfunction

  always @(posedge clk) begin
    if (loop_on) begin
      clk_cnt++;
      // a wrap-around: the DAC repeats its first pair one period later
      for (int a = 0; a < N_ADC; a++) begin
        if (clk_cnt == 1) first_pair[a] = dac_data[a][0];
        else if ((clk_cnt - 1) % P == 0) begin
          checks++;
          if (dac_data[a][0] == first_pair[a]) n_wrap++;
          else begin
            failures++;
            $display("DAC %0d does not repeat after one period", a);
          end
        end
      end
    end
    for (int a = 0; a < N_ADC; a++)
      for (int b = 0; b < 2; b++)
        for (int v = 0; v < 2; v++)
          if (ch_valid[a][b][v]) begin
            int k;
            real mag;
            k = ch_chan[a][b][v];
            nout[a][b][v]++;
            if (nout[a][b][v] % M == 0) n_frames[a][b][v]++;
            if (nout[a][b][v] > (TAPS + 12 + 4) * M) begin
              mag = $sqrt(1.0 * ch_data[a][b][v].re * ch_data[a][b][v].re +
                          1.0 * ch_data[a][b][v].im * ch_data[a][b][v].im);
              if (mag < mag_min[a][b][v][k]) mag_min[a][b][v][k] = mag;
              if (mag > mag_max[a][b][v][k]) mag_max[a][b][v][k] = mag;
            end
          end
  end

  task automatic wr(input logic bc, input int target, input cfg_unit_e unit, input int addr,
                    input logic [31:0] d);
    @(posedge clk);
    cfg.we   <= 1'b1;
    cfg.addr <= {bc, 5'(target), unit, 16'(addr)};
    cfg.data <= d;
    if (bc) n_bcast++;
    else n_addr++;
  endtask

  function automatic bit in_range(int a, int b, int v, int k, real lo, real hi, string what);
    checks++;
    if (mag_min[a][b][v][k] < lo || mag_max[a][b][v][k] > hi) begin
      failures++;
      $display("%s: adc %0d band %0d variant %0d ch %0d magnitude %f..%f", what, a, b, v, k,
               mag_min[a][b][v][k], mag_max[a][b][v][k]);
      return 0;
    end
    return 1;
  endfunction

  initial begin
    real hp [NC];
    real hd [12];
    real hs;
    for (int a = 0; a < N_ADC; a++)
      for (int b = 0; b < 2; b++)
        for (int v = 0; v < 2; v++) begin
          n_frames[a][b][v] = 0;
          nout[a][b][v] = 0;
          for (int k = 0; k < M; k++) begin
            mag_min[a][b][v][k] = 1.0e9;
            mag_max[a][b][v][k] = 0.0;
          end
        end
    for (int n = 0; n < NC; n++) begin
      real t;
      t = n - (L - 1) / 2.0;
      hp[n] = (n >= L) ? 0.0 : (0.42 - 0.5 * $cos(2.0 * PI * n / (L - 1)) + 0.08 * $cos(4.0 * PI * n / (L - 1))) *
                               ((t == 0.0) ? 1.0 : $sin(PI * t / M) / (PI * t / M));
    end
    hs = 0.0;
    for (int l = 0; l < 12; l++) begin
      real t;
      t = l - 5.5;
      hd[l] = (0.54 - 0.46 * $cos(2.0 * PI * l / 11)) * $sin(2.0 * PI * 0.096 * t) / (PI * t);
      hs += hd[l];
    end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // filters: one broadcast write per coefficient reaches all 20 chains
    for (int l = 0; l < TAPS; l++)
      for (int q = 0; q < M; q++)
        wr(1'b1, 0, UNIT_PFB_COEF, l * M + q, 32'($rtoi(0.999 * 131071.0 * hp[(M - 1 - q) + l * M])));
    for (int l = 0; l < 6; l++)
      wr(1'b1, 0, UNIT_DDC_COEF, l, 32'($rtoi(hd[l] / hs * 131072.0 + 0.5)));
    // NCO of plain sub-band k1 in every chain
    for (int a = 0; a < N_ADC; a++)
      for (int b = 0; b < 2; b++)
        wr(1'b0, 4 * a + 2 * b, UNIT_DDC_NCO, k1_of(a, b), 32'h2000_0000);
    // comb of every DAC: even samples band 0, odd samples band 1
    for (int a = 0; a < N_ADC; a++)
      for (int i = 0; i < 2 * P; i++) begin
        int b, n;
        real p1, p2;
        cplx_t s;
        b = i % 2;
        n = i / 2;
        p1 = 2.0 * PI * (k1_of(a, b) * 32 + 4) * n / P;
        p2 = 2.0 * PI * (k2_of(a, b) * 32 + 16) * n / P;
        s.re = 16'($rtoi(A * $cos(p1) + A * $cos(p2)));
        s.im = 16'($rtoi(A * $sin(p1) + A * $sin(p2)));
        wr(1'b0, a, UNIT_COMB, i, s);
      end
    wr(1'b1, 0, UNIT_COMB, 16'h8000, 32'(P - 1));
    wr(1'b1, 0, UNIT_COMB, 16'h8001, 32'd1);
    @(posedge clk);
    cfg.we <= 1'b0;
    // the first pair leaves two clocks after the enable write
    repeat (2) @(posedge clk);
    loop_on <= 1'b1;
    repeat (RUN) @(posedge clk);
    loop_on <= 1'b0;
    repeat (20) @(posedge clk);

    for (int a = 0; a < N_ADC; a++)
      for (int b = 0; b < 2; b++) begin
        int k1, k2;
        k1 = k1_of(a, b);
        k2 = k2_of(a, b);
        if (in_range(a, b, 0, k1, 0.97 * A, 1.03 * A, "T1 in plain sub-band")) n_plain++;
        if (in_range(a, b, 1, k2 + 1, 0.97 * A, 1.03 * A, "T2 in mixed sub-band")) n_mixed++;
        if (in_range(a, b, 0, k2, 0.0, 0.5 * A, "T2 beside plain sub-band") &&
            in_range(a, b, 0, k2 + 1, 0.0, 0.5 * A, "T2 beside plain sub-band")) n_blind++;
        void'(in_range(a, b, 0, 30, 0.0, 0.01 * A, "empty plain sub-band"));
        void'(in_range(a, b, 1, 30, 0.0, 0.01 * A, "empty mixed sub-band"));
        for (int v = 0; v < 2; v++) begin
          checks++;
          if (n_frames[a][b][v] < RUN / M - 2) begin
            failures++;
            $display("adc %0d band %0d variant %0d: %0d frames", a, b, v, n_frames[a][b][v]);
          end
        end
      end

    $display("mechanisms: broadcast writes %0d, addressed writes %0d, comb wrap-arounds %0d,",
             n_bcast, n_addr, n_wrap);
    $display("  tones via plain channelizer %0d, via mixed channelizer %0d, blind intervals covered %0d, frames chain0 %0d",
             n_plain, n_mixed, n_blind, n_frames[0][0][0]);
    checks += 6;
    if (n_bcast == 0) failures++;
    if (n_addr == 0) failures++;
    if (n_wrap == 0) failures++;
    if (n_plain != 2 * N_ADC) failures++;
    if (n_mixed != 2 * N_ADC) failures++;
    if (n_blind != 2 * N_ADC) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
