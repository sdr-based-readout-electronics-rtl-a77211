// fft32_sdf: N-point (default 32) pipelined radix-2 SDF FFT of the polyphase
// channelizer.
//
// log2(N) fft_sdf_stage instances with delays N/2, N/4, ..., 1 process a
// continuous stream of N-sample frames in natural order and compute
//   X[k] = (1/N) * sum_r x[r] * exp(-j*2*pi*r*k/N)
// (the 1/N comes from halving in every butterfly). Results leave in
// bit-reversed order; out_idx carries k. A pipelined FFT core of 32 points
// follows the published design; the SDF architecture, scaling and rounding are this
// design's own. Each butterfly halves, so no stage overflows as long as every
// input sample has a complex magnitude of at most full scale (2^15-1); a value
// in a corner of the I/Q square (both parts near full scale) can saturate
// after a twiddle rotation.
//
// Interface: one sample per clock when in_valid is high; frames start at the
// first valid sample after reset. Throughput is one sample per clock. Because
// each stage holds back D samples until more input arrives, frame m is
// complete at the output only after N-1 samples of frame m+1 have entered:
// the stream lags the input by N-1 valid samples plus log2(N) clocks.
module fft32_sdf
  import echo_pkg::*;
#(
  parameter int N = N_SUB
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output cplx_t                out_data
);
  localparam int S = $clog2(N);

  logic  v [S+1];
  cplx_t d [S+1];
  logic [S-1:0] ocnt;

  assign v[0] = in_valid;
  assign d[0] = in_data;

  for (genvar s = 0; s < S; s++) begin : g_stage
    fft_sdf_stage #(.D(N >> (s + 1))) u_stage (
      .clk, .rst,
      .in_valid (v[s]),   .in_data (d[s]),
      .out_valid(v[s+1]), .out_data(d[s+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) ocnt <= '0;
    else if (v[S]) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < S; i++) out_idx[i] = ocnt[S-1-i];
  end

  assign out_valid = v[S];
  assign out_data  = d[S];
endmodule
