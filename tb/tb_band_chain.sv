// tb_band_chain: one 400 MHz band through duplicator, both channelizers and
// both DDCs, configured over the shared write bus (broadcast for the filter
// coefficients, per variant for the NCOs). The input holds two tones:
//   T1 at 5 x 15.625 + 2 MHz: inside sub-band 5 of the plain (delayed) copy;
//   T2 at 10.5 x 15.625 MHz: on the edge between plain sub-bands 10 and 11,
//      where the critically sampled bank is blind, and at the centre of
//      sub-band 11 of the mixed copy.
// The NCO of plain channel 5 is set to +2 MHz. Checks, once all filters are
// full: plain ch 5 and mixed ch 11 each give a constant output at the tone
// amplitude (within 3%); plain ch 10 and 11 show T2 attenuated by at least
// 6 dB (the blind interval the mixed copy covers); an empty sub-band stays
// below 1% of the amplitude. Checks the sub-band order of every output
// sample (bit-reversed) and that each variant emits one sample
// per input sample, i.e. 32 sub-bands at 1/32 of the input rate.
module tb_band_chain;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 18, L = 521, NC = M * TAPS;
  localparam int FR = 50;
  localparam real PI = 3.14159265358979;
  localparam real A  = 8000.0;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  cfg_t       cfg = '0;
  logic       in_valid = 1'b0;
  cplx_t      in_data = '0;
  logic       out_valid [2];
  logic [4:0] out_chan  [2];
  cplx_t      out_data  [2];
  int checks = 0, failures = 0;

  band_chain dut (.*);

  always #1 clk = ~clk;

  int  nin = 0, nout [2] = '{0, 0};
  real mag_min [2][M], mag_max [2][M];

  always @(posedge clk) begin
    if (!rst && in_valid) nin++;
    for (int v = 0; v < 2; v++)
      if (!rst && out_valid[v]) begin
        real mag;
        int  pos, br;
        // sub-bands leave in bit-reversed order, 0, 16, 8, 24, ...
        pos = nout[v] % M;
        br  = 0;
        for (int i = 0; i < 5; i++) if (pos & (1 << i)) br |= 1 << (4 - i);
        checks++;
        if (out_chan[v] != 5'(br)) begin
          failures++;
          if (failures < 10) $display("variant %0d: sub-band %0d at position %0d", v, out_chan[v], pos);
        end
        nout[v]++;
        if (nout[v] > (TAPS + 12 + 4) * M) begin
          mag = $sqrt(1.0 * out_data[v].re * out_data[v].re + 1.0 * out_data[v].im * out_data[v].im);
          if (mag < mag_min[v][out_chan[v]]) mag_min[v][out_chan[v]] = mag;
          if (mag > mag_max[v][out_chan[v]]) mag_max[v][out_chan[v]] = mag;
        end
      end
  end

  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(posedge clk);
    cfg.we   <= 1'b1;
    cfg.addr <= a;
    cfg.data <= d;
    @(posedge clk);
    cfg.we <= 1'b0;
  endtask

  task automatic expect_range(input int v, input int k, input real lo, input real hi, input string what);
    checks++;
    if (mag_min[v][k] < lo || mag_max[v][k] > hi) begin
      failures++;
      $display("%s: variant %0d ch %0d magnitude %f..%f, expected %f..%f", what, v, k,
               mag_min[v][k], mag_max[v][k], lo, hi);
    end
  endtask

  initial begin
    real hp [NC];
    real hd [12];
    real hs;
    for (int v = 0; v < 2; v++)
      for (int k = 0; k < M; k++) begin
        mag_min[v][k] = 1.0e9;
        mag_max[v][k] = 0.0;
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
    for (int l = 0; l < TAPS; l++)
      for (int q = 0; q < M; q++)
        wr({1'b1, 5'd0, UNIT_PFB_COEF, 16'(l * M + q)}, 32'($rtoi(0.999 * 131071.0 * hp[(M - 1 - q) + l * M])));
    for (int l = 0; l < 6; l++)
      wr({1'b1, 5'd0, UNIT_DDC_COEF, 16'(l)}, 32'($rtoi(hd[l] / hs * 131072.0 + 0.5)));
    wr({1'b0, 5'd0, UNIT_DDC_NCO, 16'd5}, 32'($rtoi(2.0 / 15.625 * 4294967296.0)));
    for (int i = 0; i < FR * M; i++) begin
      real p1, p2;
      p1 = 2.0 * PI * (5.0 * 15.625 + 2.0) / 500.0 * i;
      p2 = 2.0 * PI * (10.5 * 15.625) / 500.0 * i;
      @(posedge clk);
      in_valid   <= 1'b1;
      in_data.re <= 16'($rtoi(A * $cos(p1) + A * $cos(p2)));
      in_data.im <= 16'($rtoi(A * $sin(p1) + A * $sin(p2)));
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    expect_range(0, 5, 0.97 * A, 1.03 * A, "T1 in plain sub-band");
    expect_range(1, 11, 0.97 * A, 1.03 * A, "T2 in mixed sub-band");
    expect_range(0, 10, 0.0, 0.5 * A, "T2 on plain band edge");
    expect_range(0, 11, 0.0, 0.5 * A, "T2 on plain band edge");
    expect_range(0, 20, 0.0, 0.01 * A, "empty plain sub-band");
    expect_range(1, 20, 0.0, 0.01 * A, "empty mixed sub-band");
    for (int v = 0; v < 2; v++) begin
      checks++;
      // every frame but the last two (held in reorder buffer and FFT) has left
      if (nout[v] < nin - 2 * M || nout[v] >= nin - M) begin
        failures++;
        $display("variant %0d: %0d outputs for %0d inputs", v, nout[v], nin);
      end
    end
    $display("plain ch5 %f..%f, mixed ch11 %f..%f, plain ch10 %f, ch11 %f",
             mag_min[0][5], mag_max[0][5], mag_min[1][11], mag_max[1][11], mag_max[0][10], mag_max[0][11]);
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
