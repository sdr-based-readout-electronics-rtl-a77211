// band_duplicator: makes the two copies of one 400 MHz band that feed the two
// polyphase channelizers of a band.
//
// The mixed copy is the input multiplied by exp(+j*2*pi*n/MIX_N) with n the
// running sample count, which shifts the spectrum up by f_m = f_s/MIX_N. With
// MIX_N = 2*32 this is half a sub-band spacing (7.8125 MHz at 500 MS/s), so the
// 32 sub-bands of the mixed copy lie between those of the plain copy and cover
// the transition bands that one critically sampled channelizer leaves blind.
// The delayed copy is the input delayed by the mixer's pipeline depth, so both
// copies leave on the same clock edge and the two channelizers stay aligned.
// Duplicating the band, delaying one copy and shifting the other follow the
// published design; the half-spacing shift follows its band-overlap diagram, and the
// rotation table, rounding and latency are this design's own.
//
// Interface: one complex sample per clock when in_valid is high. Both outputs
// share out_valid. Latency: LAT = 3 clocks. The sample counter restarts at 0 on
// reset, so the mixer phase of the first sample after reset is zero.
module band_duplicator
  import echo_pkg::*;
#(
  parameter int MIX_N = 2 * N_SUB   // f_m = f_s / MIX_N
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_delayed,
  output cplx_t out_mixed
);
  localparam int LAT = 3;
  localparam int PW  = $clog2(MIX_N);

  typedef logic signed [COEF_W-1:0] tab_t [MIX_N];

  function automatic tab_t mk_cos();
    tab_t t;
    for (int k = 0; k < MIX_N; k++) t[k] = q_cos(k, MIX_N);
    return t;
  endfunction

  function automatic tab_t mk_sin();
    tab_t t;
    for (int k = 0; k < MIX_N; k++) t[k] = q_sin(k, MIX_N);
    return t;
  endfunction

  localparam tab_t COS_TAB = mk_cos();
  localparam tab_t SIN_TAB = mk_sin();

  logic [PW-1:0] phase;
  // stage 1: sample and rotation factor
  logic                     v1;
  cplx_t                    x1;
  logic signed [COEF_W-1:0] c1, s1;
  // stage 2: partial products
  logic                     v2;
  cplx_t                    x2;
  logic signed [SAMPLE_W+COEF_W-1:0] p_rc, p_is, p_rs, p_ic;
  // stage 3: outputs
  cplx_t                    mix3, dly3;
  logic                     v3;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      v1    <= 1'b0;
      v2    <= 1'b0;
      v3    <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      if (in_valid) phase <= (phase == PW'(MIX_N - 1)) ? '0 : phase + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    x1   <= in_data;
    c1   <= COS_TAB[phase];
    s1   <= SIN_TAB[phase];
    x2   <= x1;
    p_rc <= x1.re * c1;
    p_is <= x1.im * s1;
    p_rs <= x1.re * s1;
    p_ic <= x1.im * c1;
    mix3.re <= rnd_sat(64'(p_rc) - 64'(p_is), COEF_W - 1);
    mix3.im <= rnd_sat(64'(p_rs) + 64'(p_ic), COEF_W - 1);
    dly3 <= x2;
  end

  assign out_valid   = v3;
  assign out_mixed   = mix3;
  assign out_delayed = dly3;

  initial assert (LAT == 3);
endmodule
