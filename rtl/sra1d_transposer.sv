// sra1d_transposer -- NxN matrix transposer with 1-D static register allocation.
//
// What it does
//   Takes an NxN matrix row by row, one word per cycle, and returns it column
//   by column, one word per cycle, with no gap between matrices. The first
//   output word leaves (N-1)^2 cycles after the first input word.
//
// How it works
//   (N-1)^2 registers, all fed from the single input port, each with its own
//   write enable, and one output multiplexer that can also pass the input
//   straight through (element a(N,1) leaves in the cycle it arrives). A word
//   is written once and never moves: after the first fill, every new word
//   goes into the register that is read out in the same cycle. One iteration
//   (one matrix) is N^2 cycles; the register assignment of iteration k is
//   the first one rotated k-1 steps inside register groups, so it repeats
//   after 2(N-1) iterations (2N^2(N-1) cycles). Exactly N^2-1 register writes
//   happen per matrix. Register count, write count, latency and period
//   follow the 1-D SRA method; the schedule and control are generated by
//   sra_dfc_core from the transpose order.
//
// Interface and timing
//   in_valid advances one cycle (low = stall). out_valid/out_data are
//   combinational in the same cycle. iter_last marks the last input word of
//   a matrix. Synchronous active-low reset; the first word after reset is
//   a(1,1) of the first matrix.

module sra1d_transposer #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         iter_last
);

  // output position j = c*N + r carries input word r*N + c
  function automatic logic [N*N*16-1:0] transpose_order();
    logic [N*N*16-1:0] p;
    for (int unsigned j = 0; j < N*N; j++)
      p[16*j +: 16] = 16'((j % N) * N + j / N);
    return p;
  endfunction

  logic [W-1:0] din  [1];
  logic [W-1:0] dout [1];

  assign din[0]   = in_data;
  assign out_data = dout[0];

  sra_dfc_core #(
    .W     (W),
    .LANES (1),
    .CI    (N*N),
    .OPERM (transpose_order())
  ) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_data   (din),
    .out_valid (out_valid),
    .out_data  (dout),
    .iter_last (iter_last)
  );

endmodule
