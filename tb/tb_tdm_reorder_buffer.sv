// tb_tdm_reorder_buffer: writes frames of random samples (some back to back,
// some with pauses) and checks that each frame leaves as slot 31, 0, 1, ..., 30
// with out_idx counting 0..31, starting two clocks after its last slot went
// in and taking exactly 32 clocks.
module tb_tdm_reorder_buffer;
  import echo_pkg::*;
  localparam int M = 32;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       in_valid = 1'b0;
  logic [4:0] in_slot = '0;
  cplx_t      in_data = '0;
  logic       out_valid;
  logic [4:0] out_idx;
  cplx_t      out_data;
  int checks = 0, failures = 0, cycle = 0;

  tdm_reorder_buffer dut (.*);

  always #1 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  cplx_t frame [M];
  cplx_t exp_q[$];
  int    tfirst_q[$];
  int    oi = 0, tstart = 0, frames_out = 0;

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      frame[in_slot] = in_data;
      if (in_slot == 5'(M - 1)) begin
        for (int r = 0; r < M; r++) exp_q.push_back(frame[(r + M - 1) % M]);
        tfirst_q.push_back(cycle + 2);
      end
    end
    if (!rst && out_valid) begin
      cplx_t e;
      checks += 2;
      e = exp_q.pop_front();
      if (out_data != e) begin
        failures++;
        if (failures < 10) $display("data mismatch at idx %0d", out_idx);
      end
      if (out_idx != 5'(oi)) failures++;
      if (oi == 0) begin
        checks++;
        tstart = tfirst_q.pop_front();
        if (cycle != tstart) begin
          failures++;
          $display("frame starts at %0d, expected %0d", cycle, tstart);
        end
      end else if (cycle != tstart + oi) begin
        failures++;
        $display("frame not contiguous");
      end
      oi = (oi + 1) % M;
      if (oi == 0) frames_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 40; f++) begin
      for (int q = 0; q < M; q++) begin
        @(posedge clk);
        in_valid <= 1'b1;
        in_slot  <= 5'(q);
        in_data  <= {16'($urandom), 16'($urandom)};
        if (f % 3 == 2 && $urandom_range(0, 3) == 0) begin
          @(posedge clk);
          in_valid <= 1'b0;
        end
      end
    end
    @(posedge clk);
    in_valid <= 1'b0;
    repeat (40) @(posedge clk);
    checks++;
    if (frames_out != 40 || exp_q.size() != 0) begin
      failures++;
      $display("frames out %0d", frames_out);
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
