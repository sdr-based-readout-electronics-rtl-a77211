// pfb_tdm_fir: polyphase filter of the channelizer, built as one TAPS-tap FIR
// whose delay elements are M samples long and whose coefficient set is cycled
// with the TDM slot.
//
// Input sample n has slot q = n mod M. Its output is
//   u[n] = sum_{l=0}^{TAPS-1} c[l][q] * x[n - l*M]
// so each of the M slots runs its own TAPS-tap branch filter of the polyphase
// decomposition, interleaved in time. With a prototype low-pass h of length
// M*TAPS the processor loads c[l][q] = h[(M-1-q) + l*M]; the 521-tap prototype
// of the published design is padded with zeros to 576 = 18*32. Coefficients are
// Q1.(COEF_W-1) and are written through the cfg port at address l*M + q; they
// reset to zero. The result is rounded by COEF_W-1 bits and saturated.
// The 18-tap TDM structure with cycled coefficients follows the published design; widths,
// rounding and the configuration port are this design's own.
//
// Interface: one complex sample per clock when in_valid is high; the delay
// line advances only on valid samples. out_slot gives q. Latency: 3 clocks.
module pfb_tdm_fir
  import echo_pkg::*;
#(
  parameter int M    = N_SUB,  // decimation / number of slots
  parameter int TAPS = 18      // taps per branch
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [15:0]              cfg_addr,
  input  logic signed [COEF_W-1:0] cfg_data,
  input  logic                     in_valid,
  input  cplx_t                    in_data,
  output logic                     out_valid,
  output logic [$clog2(M)-1:0]     out_slot,
  output cplx_t                    out_data
);
  localparam int SW = $clog2(M);
  localparam int AW = SAMPLE_W + COEF_W + $clog2(TAPS) + 1;

  logic signed [COEF_W-1:0] coef [TAPS][M];
  cplx_t                    line [TAPS-1][M];
  logic [SW-1:0]            slot;

  // stage 1: tap samples and their coefficients
  logic                     v1;
  logic [SW-1:0]            q1;
  cplx_t                    tap1 [TAPS];
  logic signed [COEF_W-1:0] c1 [TAPS];
  // stage 2: products
  logic                     v2;
  logic [SW-1:0]            q2;
  logic signed [SAMPLE_W+COEF_W-1:0] pr2 [TAPS];
  logic signed [SAMPLE_W+COEF_W-1:0] pi2 [TAPS];
  // stage 3: sums
  logic                     v3;
  logic [SW-1:0]            q3;
  cplx_t                    y3;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int l = 0; l < TAPS; l++)
        for (int q = 0; q < M; q++) coef[l][q] <= '0;
    end else if (cfg_we && cfg_addr < 16'(TAPS * M)) begin
      coef[int'(cfg_addr) / M][int'(cfg_addr) % M] <= cfg_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
      v1   <= 1'b0;
      v2   <= 1'b0;
      v3   <= 1'b0;
      for (int l = 0; l < TAPS - 1; l++)
        for (int i = 0; i < M; i++) line[l][i] <= '0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      if (in_valid) begin
        slot <= (slot == SW'(M - 1)) ? '0 : slot + 1'b1;
        for (int l = 0; l < TAPS - 1; l++) begin
          line[l][0] <= (l == 0) ? in_data : line[l-1][M-1];
          for (int i = 1; i < M; i++) line[l][i] <= line[l][i-1];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    q1 <= slot;
    for (int l = 0; l < TAPS; l++) begin
      tap1[l] <= (l == 0) ? in_data : line[l-1][M-1];
      c1[l]   <= coef[l][slot];
    end
    q2 <= q1;
    for (int l = 0; l < TAPS; l++) begin
      pr2[l] <= tap1[l].re * c1[l];
      pi2[l] <= tap1[l].im * c1[l];
    end
  end

  always_ff @(posedge clk) begin
    logic signed [AW-1:0] sr, si;
    sr = '0;
    si = '0;
    for (int l = 0; l < TAPS; l++) begin
      sr += AW'(pr2[l]);
      si += AW'(pi2[l]);
    end
    q3    <= q2;
    y3.re <= rnd_sat(64'(sr), COEF_W - 1);
    y3.im <= rnd_sat(64'(si), COEF_W - 1);
  end

  assign out_valid = v3;
  assign out_slot  = q3;
  assign out_data  = y3;
endmodule
