// tb_fft32_sdf: streams 40 frames of 32 samples (random within the full-scale
// circle, a single tone, an impulse and full-scale DC) back to back and with pauses, and compares
// every output with X[k] = (1/32) * sum_r x[r] exp(-j 2 pi r k / 32) computed
// in floating point (within 3 LSB). Checks the bit-reversed out_idx order and
// a throughput of one result per input sample.
module tb_fft32_sdf;
  import echo_pkg::*;
  localparam int N = 32;
  localparam int FR = 40;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  cplx_t      in_data = '0;
  logic       out_valid;
  logic [4:0] out_idx;
  cplx_t      out_data;
  int checks = 0, failures = 0, cycle = 0;

  fft32_sdf dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cplx_t xin [FR][N];
  int    nout = 0;
  real   maxerr = 0.0;

  function automatic int bitrev5(int v);
    int r = 0;
    for (int i = 0; i < 5; i++) if (v & (1 << i)) r |= 1 << (4 - i);
    return r;
  endfunction

  always @(posedge clk) begin
    if (!rst && out_valid && nout < FR * N) begin
      int f, pos, k;
      real er, ei, d;
      f   = nout / N;
      pos = nout % N;
      k   = bitrev5(pos);
      checks += 2;
      if (out_idx != 5'(k)) failures++;
      er = 0.0;
      ei = 0.0;
      for (int r = 0; r < N; r++) begin
        real ang;
        ang = -2.0 * 3.14159265358979 * r * k / N;
        er += xin[f][r].re * $cos(ang) - xin[f][r].im * $sin(ang);
        ei += xin[f][r].re * $sin(ang) + xin[f][r].im * $cos(ang);
      end
      er /= N;
      ei /= N;
      d = (out_data.re - er) < 0 ? er - out_data.re : out_data.re - er;
      if ((out_data.im - ei) > d) d = out_data.im - ei;
      if ((ei - out_data.im) > d) d = ei - out_data.im;
      if (d > maxerr) maxerr = d;
      if (d > 3.0) begin
        failures++;
        if (failures < 10) $display("frame %0d k=%0d got %0d,%0d exp %f,%f", f, k, out_data.re, out_data.im, er, ei);
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < N; r++) begin
        case (f % 5)
          0: xin[f][r] = {16'($urandom_range(0, 46340)) - 16'sd23170, 16'($urandom_range(0, 46340)) - 16'sd23170};
          1: begin
            xin[f][r].re = 16'($rtoi(20000.0 * $cos(2.0 * 3.14159265358979 * 3 * r / N)));
            xin[f][r].im = 16'($rtoi(20000.0 * $sin(2.0 * 3.14159265358979 * 3 * r / N)));
          end
          2: xin[f][r] = (r == f % N) ? {16'sd30000, -16'sd12345} : '0;
          3: xin[f][r] = {16'sh7fff, 16'sh8000};
          default: xin[f][r] = {16'($urandom) >>> 4, 16'($urandom) >>> 4};
        endcase
      end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < FR + 1; f++)
      for (int r = 0; r < N; r++) begin
        @(posedge clk);
        in_valid <= 1'b1;
        in_data  <= (f < FR) ? xin[f][r] : '0;
        if (f > FR / 2 && $urandom_range(0, 3) == 0) begin
          @(posedge clk);
          in_valid <= 1'b0;
        end
      end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout < FR * N) begin
      failures++;
      $display("only %0d outputs", nout);
    end
    $display("max error %f LSB", maxerr);
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
