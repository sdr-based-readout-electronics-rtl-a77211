// tb_tdm_sym_fir: loads 6 random coefficients, streams random samples of 32
// TDM channels in bit-reversed channel order with random pauses, and compares
// every output exactly with
//   y[n] = round(sum_l c[l] (x[n-32l] + x[n-32(11-l)]) / 2^17), saturated,
// and its channel tag and the 3-clock latency.
module tb_tdm_sym_fir;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 12;

  logic                     clk = 1'b0;
  logic                     rst = 1'b1;
  logic                     cfg_we = 1'b0;
  logic [15:0]              cfg_addr = '0;
  logic signed [COEF_W-1:0] cfg_data = '0;
  logic                     in_valid = 1'b0;
  logic [4:0]               in_chan = '0;
  cplx_t                    in_data = '0;
  logic                     out_valid;
  logic [4:0]               out_chan;
  cplx_t                    out_data;
  int checks = 0, failures = 0, cycle = 0;

  tdm_sym_fir dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int    c [TAPS/2];
  cplx_t hist[$];
  logic [4:0] ch_hist[$];
  int    t_q[$];
  int    nchk = 0;

  function automatic logic signed [15:0] ref_sat(longint v);
    longint r;
    r = (v + (64'sd1 <<< 16)) >>> 17;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return 16'(r);
  endfunction

  function automatic cplx_t hx(int i);
    return (i >= 0) ? hist[i] : '0;
  endfunction

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      hist.push_back(in_data);
      ch_hist.push_back(in_chan);
      t_q.push_back(cycle);
    end
    if (!rst && out_valid) begin
      longint sr, si;
      int n, t;
      n = nchk;
      t = t_q.pop_front();
      sr = 0;
      si = 0;
      for (int l = 0; l < TAPS / 2; l++) begin
        sr += longint'(c[l]) * (hx(n - l * M).re + hx(n - (TAPS - 1 - l) * M).re);
        si += longint'(c[l]) * (hx(n - l * M).im + hx(n - (TAPS - 1 - l) * M).im);
      end
      checks += 3;
      if (out_data.re != ref_sat(sr) || out_data.im != ref_sat(si)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d,%0d exp %0d,%0d", n, out_data.re, out_data.im, ref_sat(sr), ref_sat(si));
      end
      if (out_chan != ch_hist[n]) failures++;
      if (cycle - t != 3) failures++;
      nchk++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int l = 0; l < TAPS / 2; l++) begin
      c[l] = $signed(18'($urandom)) / 4;
      @(posedge clk);
      cfg_we   <= 1'b1;
      cfg_addr <= 16'(l);
      cfg_data <= 18'(c[l]);
    end
    @(posedge clk);
    cfg_we <= 1'b0;
    for (int i = 0; i < 1500; i++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      in_chan  <= {<<{5'(i % M)}};
      in_data  <= (i % 400 < 64) ? {16'sh7fff, 16'sh8000} : {16'($urandom), 16'($urandom)};
      if (i > 700 && $urandom_range(0, 2) == 0) begin
        @(posedge clk);
        in_valid <= 1'b0;
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (nchk != 1500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
