// tdm_reorder_buffer: ping-pong buffer between the polyphase TDM FIR and the
// FFT that puts the M branch outputs of one frame into FFT input order.
//
// The FIR delivers one frame as slots q = 0..M-1. Polyphase branch p is slot
// M-1-q, and for the channelizer to pick sub-band k at +k*f_s/M the FFT input
// r must hold branch (M-r) mod M. Together: FFT input r reads slot
// (r-1) mod M, i.e. slot M-1 first, then slots 0..M-2. A frame is written into
// one bank while the other bank, holding the previous frame, is read out one
// word per clock. Reordering the TDM samples in a buffer before the FFT follows
// the published design; the bank scheme and the read order derived above are this
// design's own.
//
// Interface: in_slot must count 0..M-1 with the valid input samples. A frame
// starts leaving on the clock after its last slot is written and takes M
// clocks; out_idx gives r. The input may pause, but frames may not arrive
// faster than one sample per clock (the read of a frame always ends before the
// next frame is complete).
module tdm_reorder_buffer
  import echo_pkg::*;
#(
  parameter int M = N_SUB
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [$clog2(M)-1:0] in_slot,
  input  cplx_t                in_data,
  output logic                 out_valid,
  output logic [$clog2(M)-1:0] out_idx,
  output cplx_t                out_data
);
  localparam int SW = $clog2(M);

  cplx_t         mem [2][M];
  logic          wbank;      // bank being written
  logic          rbank;      // bank being read
  logic          reading;
  logic [SW-1:0] ridx;

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][in_slot] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      reading   <= 1'b0;
      ridx      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= reading;
      out_idx   <= ridx;
      if (reading) begin
        ridx <= (ridx == SW'(M - 1)) ? '0 : ridx + 1'b1;
        if (ridx == SW'(M - 1)) reading <= 1'b0;
      end
      if (in_valid && in_slot == SW'(M - 1)) begin
        wbank   <= ~wbank;
        rbank   <= wbank;
        reading <= 1'b1;
        ridx    <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    out_data <= mem[rbank][(ridx == '0) ? SW'(M - 1) : ridx - 1'b1];
  end

  // A new frame must not complete while the previous one is still being read.
  assert property (@(posedge clk) disable iff (rst)
                   (in_valid && in_slot == SW'(M - 1)) |-> (!reading || ridx == SW'(M - 1)));
endmodule
