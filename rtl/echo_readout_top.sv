// echo_readout_top: FPGA signal processing of the ECHO software-defined radio
// readout for microwave SQUID multiplexed metallic magnetic calorimeters.
//
// Transmit side: one comb_generator per DAC (N_ADC = 5 I&Q DAC/ADC pairs, one
// per 800 MHz sub-band of the 4-8 GHz range) plays the tone comb, two complex
// samples per clock for a 1 GS/s DAC. Receive side: each AD9680 ADC splits its
// 800 MHz band with two on-chip DDCs into two 400 MHz bands that arrive at
// 500 MS/s, one complex sample per clock each. Every band goes through a
// band_chain (duplicate, 2 x 32-band polyphase channelizer, 2 x 32-channel
// DDC). Per ADC that is 4 channelizers and 4 DDCs giving 128 sub-band
// channels, 640 for the full system, each at 15.625 MS/s.
//
// Ports: adc_* are indexed [adc][band]; ch_* are indexed [adc][band][variant]
// with ch_chan the sub-band number (bit-reversed order on the stream). The
// chain number used by the configuration bus is 4*adc + 2*band + variant; a
// comb generator is addressed by its adc number (see echo_pkg::cfg_t). The
// converters, JESD204B links, processor and DMA engine are outside this
// module. Single clock domain (500 MHz in the published design), synchronous reset.
module echo_readout_top
  import echo_pkg::*;
#(
  parameter int N_ADC = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  cfg_t                     cfg,
  input  logic                     adc_valid [N_ADC][2],
  input  cplx_t                    adc_data  [N_ADC][2],
  output cplx_t                    dac_data  [N_ADC][2],
  output logic                     ch_valid  [N_ADC][2][2],
  output logic [$clog2(N_SUB)-1:0] ch_chan   [N_ADC][2][2],
  output cplx_t                    ch_data   [N_ADC][2][2]
);
  for (genvar a = 0; a < N_ADC; a++) begin : g_adc
    comb_generator u_comb (
      .clk, .rst,
      .cfg_we  (cfg.we && cfg.addr[17:16] == UNIT_COMB &&
                (cfg.addr[23] || cfg.addr[22:18] == 5'(a))),
      .cfg_addr(cfg.addr[15:0]),
      .cfg_data(cfg.data),
      .dac_data(dac_data[a])
    );

    for (genvar b = 0; b < 2; b++) begin : g_band
      band_chain #(.CHAIN0(4 * a + 2 * b)) u_chain (
        .clk, .rst, .cfg,
        .in_valid (adc_valid[a][b]),
        .in_data  (adc_data[a][b]),
        .out_valid(ch_valid[a][b]),
        .out_chan (ch_chan[a][b]),
        .out_data (ch_data[a][b])
      );
    end
  end
endmodule
