// sra2d_zigzag -- 4x4 zigzag scanner with 2-D static register allocation.
//
// What it does
//   A 4x4 block of transform coefficients d1..d16 arrives row by row, four
//   per cycle. It leaves four per cycle in zigzag order, from the DC term to
//   the highest spatial frequency:
//   d1 d2 d5 d9 | d6 d3 d4 d7 | d10 d13 d14 d11 | d8 d12 d15 d16.
//   Latency is two cycles; blocks follow each other without gaps.
//
// How it works
//   Eight registers with per-register input multiplexers and independent
//   write enables; output lane 3 bypasses input lane 0 for d9. Fifteen
//   register writes per block. The allocation repeats every block (single
//   iteration, four cycles), so the register map never rotates. Register
//   count, schedule and write count are the 2-D SRA allocation of this
//   benchmark; schedule and control come from sra_dfc_core.
//
// Interface and timing
//   in_valid advances one cycle (low = stall); outputs are combinational.
//   iter_last marks the last row of a block. Synchronous active-low reset;
//   the first cycle after reset carries d1..d4.

module sra2d_zigzag #(
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

  // output position j carries input word OPERM[j] (d1..d16 = 0..15)
  localparam logic [16*16-1:0] OPERM = {
    16'd15, 16'd14, 16'd11, 16'd7,
    16'd10, 16'd13, 16'd12, 16'd9,
    16'd6,  16'd3,  16'd2,  16'd5,
    16'd8,  16'd4,  16'd1,  16'd0};

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
