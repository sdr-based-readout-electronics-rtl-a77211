// tb_pfb_tdm_fir: loads random coefficients into all 18 x 32 sets, streams
// random samples with random pauses and compares every output with the exact
// integer result of u[n] = sum_l c[l][n mod 32] * x[n - 32 l], rounded by 17
// bits and saturated. Checks the slot number and the 3-clock latency.
module tb_pfb_tdm_fir;
  import echo_pkg::*;
  localparam int M = 32, TAPS = 18;

  logic                     clk = 1'b0;
  logic                     rst = 1'b1;
  logic                     cfg_we = 1'b0;
  logic [15:0]              cfg_addr = '0;
  logic signed [COEF_W-1:0] cfg_data = '0;
  logic                     in_valid = 1'b0;
  cplx_t                    in_data = '0;
  logic                     out_valid;
  logic [4:0]               out_slot;
  cplx_t                    out_data;
  int checks = 0, failures = 0, cycle = 0;

  pfb_tdm_fir dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int    c [TAPS][M];
  cplx_t hist [$];     // all valid inputs since reset
  int    exp_q[$];     // index of input awaiting output
  int    t_q[$];

  function automatic logic signed [15:0] ref_sat(longint v);
    longint r;
    r = (v + (64'sd1 <<< 16)) >>> 17;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return 16'(r);
  endfunction

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      hist.push_back(in_data);
      exp_q.push_back(hist.size());
      t_q.push_back(cycle);
    end
    if (!rst && out_valid) begin
      int n, t, q;
      longint sr, si;
      n = exp_q.pop_front() - 1;
      t = t_q.pop_front();
      q = n % M;
      sr = 0;
      si = 0;
      for (int l = 0; l < TAPS; l++) begin
        if (n - l * M >= 0) begin
          sr += longint'(c[l][q]) * hist[n - l * M].re;
          si += longint'(c[l][q]) * hist[n - l * M].im;
        end
      end
      checks += 3;
      if (out_data.re != ref_sat(sr) || out_data.im != ref_sat(si)) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d,%0d exp %0d,%0d", n, out_data.re, out_data.im, ref_sat(sr), ref_sat(si));
      end
      if (out_slot != 5'(q)) failures++;
      if (cycle - t != 3) failures++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int l = 0; l < TAPS; l++)
      for (int q = 0; q < M; q++) begin
        c[l][q] = $signed(18'($urandom)) / 16;
        @(posedge clk);
        cfg_we   <= 1'b1;
        cfg_addr <= 16'(l * M + q);
        cfg_data <= 18'(c[l][q]);
      end
    @(posedge clk);
    cfg_we <= 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      in_valid   <= (i % 500 < 250) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_data.re <= (i % 700 < 20) ? 16'sh7fff : 16'($urandom);
      in_data.im <= (i % 700 < 20) ? 16'sh8000 : 16'($urandom);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
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
