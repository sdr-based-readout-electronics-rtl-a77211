// comb_generator: produces the frequency comb that one AD9144 I&Q DAC pair
// sends to the RF mixer board.
//
// The comb is periodic, so it is generated by cyclic playback of one period
// that the processor computes (the sum of all tones of the band) and writes
// into a sample memory. The DAC runs at 1 GS/s and the FPGA at 500 MHz, so two
// consecutive complex samples leave per clock: dac_data[0] is the earlier one.
// The memory is split into an even and an odd bank of DEPTH/2 words each. A
// period of L samples (L even, L <= DEPTH) repeats every L/2 clocks; with
// DEPTH = 8192 a period can place tones on a 1 GS/s / 8192 = 122 kHz grid.
// That the FPGA generates the comb for the DAC is the published design's; the playback
// scheme and its depth are this design's own.
//
// Configuration: cfg_we with cfg_addr < DEPTH writes sample cfg_addr
// ({im, re} in cfg_data); cfg_addr = 0x8000 writes the period L/2 - 1 in
// sample pairs and restarts the playback; cfg_addr = 0x8001 writes bit 0 as
// the enable. Disabled, the outputs are zero. Output latency: 1 clock.
module comb_generator
  import echo_pkg::*;
#(
  parameter int DEPTH = 8192
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cfg_we,
  input  logic [15:0]       cfg_addr,
  input  logic [CFG_DW-1:0] cfg_data,
  output cplx_t             dac_data [2]
);
  localparam int HW = $clog2(DEPTH / 2);

  cplx_t         mem_e [DEPTH/2];
  cplx_t         mem_o [DEPTH/2];
  logic [HW-1:0] last;      // index of the last sample pair of the period
  logic [HW-1:0] rd;
  logic          enable;
  logic          en_q;
  cplx_t         de, dq;

  always_ff @(posedge clk) begin
    if (cfg_we && int'(cfg_addr) < DEPTH) begin
      if (cfg_addr[0]) mem_o[cfg_addr[HW:1]] <= cfg_data;
      else             mem_e[cfg_addr[HW:1]] <= cfg_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      last   <= HW'(DEPTH / 2 - 1);
      rd     <= '0;
      enable <= 1'b0;
      en_q   <= 1'b0;
    end else begin
      en_q <= enable;
      if (cfg_we && cfg_addr == 16'h8000) begin
        last <= cfg_data[HW-1:0];
        rd   <= '0;
      end else if (cfg_we && cfg_addr == 16'h8001) begin
        enable <= cfg_data[0];
        rd     <= '0;
      end else if (enable) begin
        rd <= (rd == last) ? '0 : rd + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    de <= mem_e[rd];
    dq <= mem_o[rd];
  end

  assign dac_data[0] = en_q ? de : '0;
  assign dac_data[1] = en_q ? dq : '0;
endmodule
