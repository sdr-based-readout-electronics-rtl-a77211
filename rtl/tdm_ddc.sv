// tdm_ddc: digital down conversion of the M (default 32) TDM sub-band channels
// that leave one polyphase channelizer.
//
// Each sub-band holds one or two resonator tones. For every channel k a
// numerically controlled oscillator (phase accumulator acc[k], increment
// inc[k]) gives the phase of the sample, the sample is multiplied by
// exp(-j*phase) so that the chosen tone moves to 0 Hz, and the symmetric
// tdm_sym_fir low-pass keeps its 1 MHz signal band. The increment is the tone
// offset in the sub-band: inc = round(f_off / f_sub * 2^PHASE_W), with
// f_sub = 15.625 MHz and signed f_off. The NCO phase is truncated to LUT_AW bits
// and looks up cos/sin tables computed at elaboration:
//   COS[i] = round(cos(2*pi*i/2^LUT_AW) * (2^(COEF_W-1)-1)), SIN likewise.
// Mixing and filtering 32 TDM channels in one structure follows the published design;
// the NCO sizes, the table, the rounding and the configuration port are this
// design's own. The DDC does not decimate.
//
// Interface: in_chan is the sub-band number of each valid sample (any order
// that repeats every M samples, e.g. the FFT's bit-reversed order). cfg_nco_we
// writes inc[cfg_addr] = cfg_data; cfg_coef_we writes FIR coefficient
// cfg_addr. Increments and phases reset to zero. Latency: 3 clocks of mixer
// plus 3 of filter.
module tdm_ddc
  import echo_pkg::*;
#(
  parameter int M       = N_SUB,
  parameter int TAPS    = 12,
  parameter int PHASE_W = 32,
  parameter int LUT_AW  = 10
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cfg_coef_we,
  input  logic                 cfg_nco_we,
  input  logic [15:0]          cfg_addr,
  input  logic [CFG_DW-1:0]    cfg_data,
  input  logic                 in_valid,
  input  logic [$clog2(M)-1:0] in_chan,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] out_chan,
  output cplx_t                out_data
);
  localparam int SW = $clog2(M);
  localparam int LN = 2 ** LUT_AW;

  typedef logic signed [COEF_W-1:0] lut_t [LN];

  function automatic lut_t mk_cos();
    lut_t t;
    for (int i = 0; i < LN; i++) t[i] = q_cos(i, LN);
    return t;
  endfunction

  function automatic lut_t mk_sin();
    lut_t t;
    for (int i = 0; i < LN; i++) t[i] = q_sin(i, LN);
    return t;
  endfunction

  localparam lut_t COS_LUT = mk_cos();
  localparam lut_t SIN_LUT = mk_sin();

  logic [PHASE_W-1:0] acc [M];
  logic [PHASE_W-1:0] inc [M];

  logic                     v1, v2, v3;
  logic [SW-1:0]            ch1, ch2, ch3;
  cplx_t                    x1, x2, y3;
  logic [LUT_AW-1:0]        ph1;
  logic signed [COEF_W-1:0] c2, s2;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < M; k++) inc[k] <= '0;
    end else if (cfg_nco_we && cfg_addr < 16'(M)) begin
      inc[int'(cfg_addr)] <= PHASE_W'(cfg_data);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
      for (int k = 0; k < M; k++) acc[k] <= '0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
      if (in_valid) acc[in_chan] <= acc[in_chan] + inc[in_chan];
    end
  end

  always_ff @(posedge clk) begin
    ch1 <= in_chan;
    x1  <= in_data;
    ph1 <= acc[in_chan][PHASE_W-1 -: LUT_AW];
    ch2 <= ch1;
    x2  <= x1;
    c2  <= COS_LUT[ph1];
    s2  <= -SIN_LUT[ph1];
    ch3 <= ch2;
    y3  <= cmul_q(x2, c2, s2);
  end

  tdm_sym_fir #(.M(M), .TAPS(TAPS)) u_fir (
    .clk, .rst,
    .cfg_we(cfg_coef_we), .cfg_addr, .cfg_data(cfg_data[COEF_W-1:0]),
    .in_valid(v3), .in_chan(ch3), .in_data(y3),
    .out_valid, .out_chan, .out_data
  );
endmodule
