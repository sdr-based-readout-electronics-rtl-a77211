// tb_comb_generator: writes a comb period of random samples, sets a period of
// L = 2*(last+1) samples, enables playback and checks that the two DAC words
// per clock follow the period cyclically (several wrap-arounds, two different
// periods), that a disabled generator outputs zero and that samples beyond
// the period are never played.
module tb_comb_generator;
  import echo_pkg::*;
  localparam int DEPTH = 8192;

  logic              clk = 1'b0;
  logic              rst = 1'b1;
  logic              cfg_we = 1'b0;
  logic [15:0]       cfg_addr = '0;
  logic [CFG_DW-1:0] cfg_data = '0;
  cplx_t             dac_data [2];
  int checks = 0, failures = 0;

  comb_generator dut (.*);

  always #1 clk = ~clk;

  logic [31:0] wave [DEPTH];

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(posedge clk);
    cfg_we   <= 1'b1;
    cfg_addr <= a;
    cfg_data <= d;
    @(posedge clk);
    cfg_we <= 1'b0;
  endtask

  task automatic play_check(input int pairs, input int clocks);
    wr(16'h8000, 32'(pairs - 1));
    wr(16'h8001, 32'd1);
    // the first pair is on the outputs after the second clock edge following
    // the enable write; outputs are sampled between edges
    @(posedge clk);
    for (int i = 0; i < clocks; i++) begin
      int p;
      @(negedge clk);
      p = i % pairs;
      checks += 2;
      if (dac_data[0] != wave[2 * p] || dac_data[1] != wave[2 * p + 1]) begin
        failures++;
        if (failures < 10) $display("clock %0d pair %0d: got %h %h exp %h %h", i, p, dac_data[0], dac_data[1], wave[2 * p], wave[2 * p + 1]);
      end
    end
    wr(16'h8001, 32'd0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    checks++;
    if (dac_data[0] != '0 || dac_data[1] != '0) failures++;
    for (int i = 0; i < 1200; i++) begin
      wave[i] = $urandom;
      wr(16'(i), wave[i]);
    end
    play_check(100, 450);
    play_check(37, 200);
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (dac_data[0] != '0 || dac_data[1] != '0) begin
      failures++;
      $display("disabled generator not silent");
    end
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
