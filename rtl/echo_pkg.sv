// echo_pkg: types, sizes and fixed-point helpers shared by the ECHO readout
// channelization chain.
//
// Every sample on the FPGA side is a complex pair of signed SAMPLE_W-bit
// integers (I in .re, Q in .im). Filter coefficients and sine/cosine tables are
// signed COEF_W-bit numbers with COEF_W-1 fraction bits (1.0 is 2^(COEF_W-1)-1),
// so a product is brought back to sample scale by a rounded right shift of
// COEF_W-1 bits followed by saturation. The 32-band channelizer (N_SUB) and
// the 500 MHz single-sample-per-clock streaming follow the published design; the
// 16/18-bit widths and the configuration bus are this design's own choices.
package echo_pkg;

  parameter int SAMPLE_W = 16;   // I and Q width of every stream
  parameter int COEF_W   = 18;   // coefficient / twiddle width, Q1.(COEF_W-1)
  parameter int N_SUB    = 32;   // sub-bands per polyphase channelizer
  parameter int CFG_AW   = 24;   // configuration address width
  parameter int CFG_DW   = 32;   // configuration data width

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_t;

  // One configuration write from the processor side. Address map (top level):
  //   [23]    broadcast to every chain / comb generator
  //   [22:18] target: chain number (4*adc + 2*band + variant) or DAC number
  //   [17:16] unit, see cfg_unit_e
  //   [15:0]  address inside the unit
  typedef struct packed {
    logic              we;
    logic [CFG_AW-1:0] addr;
    logic [CFG_DW-1:0] data;
  } cfg_t;

  typedef enum logic [1:0] {
    UNIT_PFB_COEF = 2'd0,  // polyphase FIR coefficient, local addr = tap*32 + slot
    UNIT_DDC_COEF = 2'd1,  // DDC FIR coefficient, local addr 0..5
    UNIT_DDC_NCO  = 2'd2,  // DDC NCO phase increment, local addr = sub-band
    UNIT_COMB     = 2'd3   // comb sample (local addr < 0x8000) or comb length
  } cfg_unit_e;

  // Round half up after an arithmetic right shift by sh, then saturate to
  // SAMPLE_W bits.
  function automatic logic signed [SAMPLE_W-1:0] rnd_sat(input logic signed [63:0] v,
                                                         input int unsigned sh);
    logic signed [63:0] r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 64'sd0 + (2 ** (SAMPLE_W - 1) - 1)) return SAMPLE_W'(2 ** (SAMPLE_W - 1) - 1);
    if (r < -(64'sd1 <<< (SAMPLE_W - 1)))       return SAMPLE_W'(-(64'sd1 <<< (SAMPLE_W - 1)));
    return r[SAMPLE_W-1:0];
  endfunction

  // Value of cos / sin(2*pi*k/n) in Q1.(COEF_W-1), rounded to nearest.
  function automatic logic signed [COEF_W-1:0] q_cos(input int k, input int n);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * k / n) * (2.0 ** (COEF_W - 1) - 1.0);
    return COEF_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  function automatic logic signed [COEF_W-1:0] q_sin(input int k, input int n);
    real v;
    v = $sin(2.0 * 3.14159265358979323846 * k / n) * (2.0 ** (COEF_W - 1) - 1.0);
    return COEF_W'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  // Complex product a * (c + j s) with c, s in Q1.(COEF_W-1), rounded.
  function automatic cplx_t cmul_q(input cplx_t a, input logic signed [COEF_W-1:0] c,
                                   input logic signed [COEF_W-1:0] s);
    logic signed [63:0] pr, pi;
    cplx_t y;
    pr = 64'(a.re) * 64'(c) - 64'(a.im) * 64'(s);
    pi = 64'(a.re) * 64'(s) + 64'(a.im) * 64'(c);
    y.re = rnd_sat(pr, COEF_W - 1);
    y.im = rnd_sat(pi, COEF_W - 1);
    return y;
  endfunction

endpackage
