// sra2d_dwt -- 1-D DWT data format converter (1,4)->(2,2)[8] with 2-D SRA.
//
// What it does
//   Reorganises the output of one wavelet-filter stage for the next stage.
//   Two blocks of eight samples, w0..w7 of the first and w0'..w7' of the
//   second, arrive four per cycle: {w0..w3}, {w4..w7}, {w0'..w3'}, {w4'..w7'}.
//   They leave four per cycle as sample pairs of both blocks side by side:
//   {w0 w1 w0' w1'}, {w2 w3 w2' w3'}, {w4 w5 w4' w5'}, {w6 w7 w6' w7'}.
//   Latency is two cycles.
//
// How it works
//   Eight registers with per-register input multiplexers and independent
//   write enables; output lanes 2 and 3 can bypass input lanes 0 and 1
//   (w0', w1' and no register write). Fourteen register writes per
//   iteration of four cycles. Registers 3/5 and 4/6 swap roles every
//   iteration, so the allocation period is eight cycles. All of this is the
//   2-D SRA allocation for this benchmark; schedule and control come from
//   sra_dfc_core.
//
// Interface and timing
//   in_valid advances one cycle (low = stall); outputs are combinational.
//   iter_last marks the fourth input cycle of a block pair. Synchronous
//   active-low reset; the first cycle after reset carries w0..w3.

module sra2d_dwt #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [4],
  output logic         out_valid,
  output logic [W-1:0] out_data [4],
  output logic         iter_last
);

  // output position j carries input word OPERM[j] (w0..w7 = 0..7, w0'..w7' = 8..15)
  localparam logic [16*16-1:0] OPERM = {
    16'd15, 16'd14, 16'd7, 16'd6,
    16'd13, 16'd12, 16'd5, 16'd4,
    16'd11, 16'd10, 16'd3, 16'd2,
    16'd9,  16'd8,  16'd1, 16'd0};

  sra_dfc_core #(
    .W     (W),
    .LANES (4),
    .CI    (4),
    .OPERM (OPERM)
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (in_data),
    .out_valid (out_valid),
    .out_data  (out_data),
    .iter_last (iter_last)
  );

endmodule
