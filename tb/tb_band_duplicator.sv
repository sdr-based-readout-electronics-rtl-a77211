// tb_band_duplicator: checks the delayed copy sample for sample and the mixed
// copy against x[n]*exp(+j*2*pi*n/64) computed in floating point (within one
// LSB), with random input and random pauses of in_valid. Also checks the
// 3-clock latency of both copies.
module tb_band_duplicator;
  import echo_pkg::*;

  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  in_valid = 1'b0;
  cplx_t in_data = '0;
  logic  out_valid;
  cplx_t out_delayed, out_mixed;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  band_duplicator dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cplx_t x_q[$];
  int    n_q[$];
  int    t_q[$];
  int    n_in = 0;

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      x_q.push_back(in_data);
      n_q.push_back(n_in);
      t_q.push_back(cycle);
      n_in <= n_in + 1;
    end
    if (!rst && out_valid) begin
      cplx_t x;
      int n, t;
      real er, ei;
      if (x_q.size() == 0) begin
        failures++;
        $display("output without input");
      end else begin
        x = x_q.pop_front();
        n = n_q.pop_front();
        t = t_q.pop_front();
        er = x.re * $cos(3.14159265358979 * n / 32.0) - x.im * $sin(3.14159265358979 * n / 32.0);
        ei = x.re * $sin(3.14159265358979 * n / 32.0) + x.im * $cos(3.14159265358979 * n / 32.0);
        if (er > 32767.0) er = 32767.0;
        if (er < -32768.0) er = -32768.0;
        if (ei > 32767.0) ei = 32767.0;
        if (ei < -32768.0) ei = -32768.0;
        checks += 3;
        if (out_delayed != x) begin
          failures++;
          $display("delayed mismatch n=%0d", n);
        end
        if ((out_mixed.re - er) > 1.01 || (er - out_mixed.re) > 1.01 ||
            (out_mixed.im - ei) > 1.01 || (ei - out_mixed.im) > 1.01) begin
          failures++;
          $display("mixed mismatch n=%0d got %0d,%0d exp %f,%f", n, out_mixed.re, out_mixed.im, er, ei);
        end
        if (cycle - t != 3) begin
          failures++;
          $display("latency %0d", cycle - t);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      in_valid   <= ($urandom_range(0, 3) != 0);
      in_data.re <= 16'($urandom);
      in_data.im <= 16'($urandom);
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (6) @(posedge clk);
    checks++;
    if (x_q.size() != 0 || n_in < 300) begin
      failures++;
      $display("outputs missing: %0d pending", x_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
