// tdm_sym_fir: symmetric TAPS-coefficient (default 12) low-pass FIR of the DDC,
// shared in time by the M TDM sub-band channels.
//
// Every delay element is M samples long, so the sample M clocks back belongs to
// the same channel; each channel is filtered independently as long as the
// channels arrive in a fixed order repeating every M valid samples. Because
// the impulse response is symmetric, h[l] = h[TAPS-1-l], the two samples that
// share a coefficient are added first and only TAPS/2 complex-by-real products
// are formed:
//   y[n] = sum_{l=0}^{TAPS/2-1} c[l] * (x[n-l*M] + x[n-(TAPS-1-l)*M])
// Coefficients are Q1.(COEF_W-1), written at cfg_addr l, reset to zero. The
// symmetric 12-coefficient TDM filter follows the published design; the widths, the
// pre-adder and the rounding are this design's own.
//
// Interface: one sample per clock when in_valid is high, in_chan travels with
// it. Latency: 3 clocks. The filter does not decimate.
module tdm_sym_fir
  import echo_pkg::*;
#(
  parameter int M    = N_SUB,
  parameter int TAPS = 12
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [15:0]              cfg_addr,
  input  logic signed [COEF_W-1:0] cfg_data,
  input  logic                     in_valid,
  input  logic [$clog2(M)-1:0]     in_chan,
  input  cplx_t                    in_data,
  output logic                     out_valid,
  output logic [$clog2(M)-1:0]     out_chan,
  output cplx_t                    out_data
);
  localparam int SW = $clog2(M);
  localparam int H  = TAPS / 2;
  localparam int AW = SAMPLE_W + 1 + COEF_W + $clog2(H) + 1;

  logic signed [COEF_W-1:0] coef [H];
  cplx_t                    line [TAPS-1][M];
  cplx_t                    tap  [TAPS];

  logic                     v1, v2, v3;
  logic [SW-1:0]            ch1, ch2, ch3;
  logic signed [SAMPLE_W:0] pre_r [H];
  logic signed [SAMPLE_W:0] pre_i [H];
  logic signed [SAMPLE_W+COEF_W:0] pr2 [H];
  logic signed [SAMPLE_W+COEF_W:0] pi2 [H];
  cplx_t                    y3;

  initial assert (TAPS % 2 == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < H; l++) coef[l] <= '0;
    end else if (cfg_we && cfg_addr < 16'(H)) begin
      coef[int'(cfg_addr)] <= cfg_data;
    end
  end

  always_comb begin
    tap[0] = in_data;
    for (int l = 1; l < TAPS; l++) tap[l] = line[l-1][M-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      for (int l = 0; l < TAPS - 1; l++)
        for (int i = 0; i < M; i++) line[l][i] <= '0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      if (in_valid) begin
        for (int l = 0; l < TAPS - 1; l++) begin
          line[l][0] <= (l == 0) ? in_data : line[l-1][M-1];
          for (int i = 1; i < M; i++) line[l][i] <= line[l][i-1];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    logic signed [AW-1:0] sr, si;
    ch1 <= in_chan;
    for (int l = 0; l < H; l++) begin
      pre_r[l] <= (SAMPLE_W+1)'(tap[l].re) + (SAMPLE_W+1)'(tap[TAPS-1-l].re);
      pre_i[l] <= (SAMPLE_W+1)'(tap[l].im) + (SAMPLE_W+1)'(tap[TAPS-1-l].im);
    end
    ch2 <= ch1;
    for (int l = 0; l < H; l++) begin
      pr2[l] <= pre_r[l] * coef[l];
      pi2[l] <= pre_i[l] * coef[l];
    end
    sr = '0;
    si = '0;
    for (int l = 0; l < H; l++) begin
      sr += AW'(pr2[l]);
      si += AW'(pi2[l]);
    end
    ch3   <= ch2;
    y3.re <= rnd_sat(64'(sr), COEF_W - 1);
    y3.im <= rnd_sat(64'(si), COEF_W - 1);
  end

  assign out_valid = v3;
  assign out_chan  = ch3;
  assign out_data  = y3;
endmodule
