// polyphase_channelizer: critically sampled M-band (default 32) polyphase
// filter bank that splits a 500 MS/s complex band into M sub-bands of
// f_s/M = 15.625 MHz, delivered time-division multiplexed on one stream.
//
// Chain: pfb_tdm_fir (TAPS-tap TDM FIR with cycled coefficient sets) ->
// tdm_reorder_buffer (branch order to FFT input order) -> fft32_sdf. With the
// coefficient layout described in pfb_tdm_fir, frame m (input samples
// x[mM .. mM+M-1]) yields for every sub-band k
//   Y_k[m] = (1/M) * sum_n h[n] * x[mM+M-1-n] * exp(+j*2*pi*k*n/M)
// i.e. the input shifted down by k*f_s/M and low-pass filtered by h, so
// sub-band k is centred on +k*f_s/M (k >= M/2 are the negative frequencies).
// The FIR + reorder buffer + 32-point FFT structure follows the published design; the
// read order, the 1/M scaling and the stream interface are this design's own.
//
// Interface: one complex sample per clock when in_valid is high; frames start
// with the first valid sample after reset. Output: out_valid with out_chan = k
// in bit-reversed order (0, 16, 8, 24, ...), one sub-band sample per clock on
// average, i.e. the same 1/M decimation as the published design.
module polyphase_channelizer
  import echo_pkg::*;
#(
  parameter int M    = N_SUB,
  parameter int TAPS = 18
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     cfg_we,
  input  logic [15:0]              cfg_addr,
  input  logic signed [COEF_W-1:0] cfg_data,
  input  logic                     in_valid,
  input  cplx_t                    in_data,
  output logic                     out_valid,
  output logic [$clog2(M)-1:0]     out_chan,
  output cplx_t                    out_data
);
  localparam int SW = $clog2(M);

  logic          fir_v, ro_v;
  logic [SW-1:0] fir_q, ro_idx;
  cplx_t         fir_d, ro_d;

  pfb_tdm_fir #(.M(M), .TAPS(TAPS)) u_fir (
    .clk, .rst, .cfg_we, .cfg_addr, .cfg_data,
    .in_valid, .in_data,
    .out_valid(fir_v), .out_slot(fir_q), .out_data(fir_d)
  );

  tdm_reorder_buffer #(.M(M)) u_reorder (
    .clk, .rst,
    .in_valid(fir_v), .in_slot(fir_q), .in_data(fir_d),
    .out_valid(ro_v), .out_idx(ro_idx), .out_data(ro_d)
  );

  fft32_sdf #(.N(M)) u_fft (
    .clk, .rst,
    .in_valid(ro_v), .in_data(ro_d),
    .out_valid, .out_idx(out_chan), .out_data
  );

  // The FFT counts its own frames; the reorder buffer must hand it whole ones.
  logic [SW-1:0] ro_expect;
  always_ff @(posedge clk) begin
    if (rst) ro_expect <= '0;
    else if (ro_v) ro_expect <= ro_expect + 1'b1;
  end
  assert property (@(posedge clk) disable iff (rst) ro_v |-> ro_idx == ro_expect);
endmodule
