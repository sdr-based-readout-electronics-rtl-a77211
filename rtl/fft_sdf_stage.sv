// fft_sdf_stage: one radix-2 single-path delay-feedback (SDF) butterfly stage
// of a decimation-in-frequency pipelined FFT.
//
// Within every block of 2*D input samples the first D samples are pushed into a
// D-deep feedback delay line. While the second D samples arrive, each one (b)
// meets its partner from D samples earlier (a): (a+b)/2 leaves at once and
// (a-b)/2 goes back into the delay line. During the first half of the next
// block those differences leave, multiplied by the twiddle exp(-j*2*pi*j/(2D))
// for position j. Each butterfly halves its result so that the full FFT cannot
// overflow. Interface: one sample per clock when in_valid is high; the stage
// advances only on valid samples. Output is registered: it appears one clock
// after the input that releases it, and the stream lags the input by D valid
// samples. The first D valid outputs after reset are suppressed.
module fft_sdf_stage
  import echo_pkg::*;
#(
  parameter int D = 16   // feedback delay, N/2 for the first stage
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int CW = (D == 1) ? 1 : $clog2(2 * D);

  typedef logic signed [COEF_W-1:0] tw_t [D];

  function automatic tw_t mk_cos();
    tw_t t;
    for (int j = 0; j < D; j++) t[j] = q_cos(j, 2 * D);
    return t;
  endfunction

  function automatic tw_t mk_nsin();
    tw_t t;
    for (int j = 0; j < D; j++) t[j] = -q_sin(j, 2 * D);
    return t;
  endfunction

  localparam tw_t TW_C = mk_cos();
  localparam tw_t TW_S = mk_nsin();

  cplx_t          fifo [D];
  logic [CW-1:0]  cnt;
  logic           primed;
  logic           second;   // in the second half of a 2D block
  logic [CW-1:0]  jpos;
  cplx_t          a, b, sum_h, dif_h;
  logic signed [SAMPLE_W:0] sr, si, dr, di;

  always_comb begin
    second = cnt >= CW'(D);
    jpos   = second ? cnt - CW'(D) : cnt;
    a      = fifo[D-1];
    b      = in_data;
    sr     = (SAMPLE_W+1)'(a.re) + (SAMPLE_W+1)'(b.re);
    si     = (SAMPLE_W+1)'(a.im) + (SAMPLE_W+1)'(b.im);
    dr     = (SAMPLE_W+1)'(a.re) - (SAMPLE_W+1)'(b.re);
    di     = (SAMPLE_W+1)'(a.im) - (SAMPLE_W+1)'(b.im);
    sum_h.re = rnd_sat(64'(sr), 1);
    sum_h.im = rnd_sat(64'(si), 1);
    dif_h.re = rnd_sat(64'(dr), 1);
    dif_h.im = rnd_sat(64'(di), 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (second || primed);
      if (in_valid) begin
        cnt <= (D == 1) ? ~cnt : cnt + 1'b1;
        if (second) primed <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      fifo[0] <= second ? dif_h : in_data;
      for (int i = 1; i < D; i++) fifo[i] <= fifo[i-1];
      out_data <= second ? sum_h : cmul_q(a, TW_C[int'(jpos)], TW_S[int'(jpos)]);
    end
  end
endmodule
