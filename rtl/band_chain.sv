// band_chain: the FPGA processing of one 400 MHz band that one on-chip DDC of
// an ADC delivers (one of the two bands per ADC).
//
// band_duplicator makes a delayed and a frequency-shifted copy of the band;
// each copy goes through its own 32-band polyphase_channelizer and its own
// 32-channel tdm_ddc. Variant 0 (delayed) has sub-bands centred on k*f_s/32,
// variant 1 (mixed) has them centred on (k - 1/2)*f_s/32 of the original band,
// so the two overlap and every tone lies inside the pass band of one of them.
// One chain yields 2 x 32 = 64 sub-bands; the two chains of an ADC yield the
// 128 of the published ECHO design. This structure follows the published design.
//
// Configuration: the chain decodes the shared write bus. A write addresses it
// when addr[23] (broadcast) is set or addr[22:18] equals CHAIN0 (variant 0) or
// CHAIN0+1 (variant 1); addr[17:16] selects the unit (echo_pkg::cfg_unit_e) and
// addr[15:0] the word in it. Latency: 3 (duplicator) + 3 (FIR) + 1 + 32
// (reorder) + log2(32) and a further 31 samples (FFT) + 6 (DDC) clocks.
module band_chain
  import echo_pkg::*;
#(
  parameter int CHAIN0 = 0   // chain number of variant 0; variant 1 is CHAIN0+1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  cfg_t                     cfg,
  input  logic                     in_valid,
  input  cplx_t                    in_data,
  output logic                     out_valid [2],
  output logic [$clog2(N_SUB)-1:0] out_chan  [2],
  output cplx_t                    out_data  [2]
);
  localparam int SW = $clog2(N_SUB);

  logic  dup_v;
  cplx_t dup_d [2];

  band_duplicator u_dup (
    .clk, .rst,
    .in_valid, .in_data,
    .out_valid(dup_v), .out_delayed(dup_d[0]), .out_mixed(dup_d[1])
  );

  for (genvar v = 0; v < 2; v++) begin : g_var
    logic          sel;
    logic          ch_v;
    logic [SW-1:0] ch_k;
    cplx_t         ch_d;

    assign sel = cfg.we && (cfg.addr[23] || cfg.addr[22:18] == 5'(CHAIN0 + v));

    polyphase_channelizer u_chan (
      .clk, .rst,
      .cfg_we  (sel && cfg.addr[17:16] == UNIT_PFB_COEF),
      .cfg_addr(cfg.addr[15:0]),
      .cfg_data(cfg.data[COEF_W-1:0]),
      .in_valid(dup_v), .in_data(dup_d[v]),
      .out_valid(ch_v), .out_chan(ch_k), .out_data(ch_d)
    );

    tdm_ddc u_ddc (
      .clk, .rst,
      .cfg_coef_we(sel && cfg.addr[17:16] == UNIT_DDC_COEF),
      .cfg_nco_we (sel && cfg.addr[17:16] == UNIT_DDC_NCO),
      .cfg_addr   (cfg.addr[15:0]),
      .cfg_data   (cfg.data),
      .in_valid(ch_v), .in_chan(ch_k), .in_data(ch_d),
      .out_valid(out_valid[v]), .out_chan(out_chan[v]), .out_data(out_data[v])
    );
  end
endmodule
