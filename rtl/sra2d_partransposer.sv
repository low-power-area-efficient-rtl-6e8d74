// sra2d_partransposer -- NxN par-transposer with 2-D static register allocation.
//
// What it does
//   Takes an NxN matrix one row per cycle (N words in parallel) and returns
//   it one column per cycle (N words in parallel), with no gap between
//   matrices. Column 1 of a matrix leaves in the cycle its last row arrives.
//
// How it works
//   N(N-1) registers. Each register loads from one of the N input lanes
//   through an input multiplexer and keeps its word until it is read;
//   each output lane is a multiplexer over the registers plus input lane 0
//   (element a(N,1) is bypassed). Iteration = N cycles, period = 2N cycles:
//   in the second iteration some words trade registers in pairs and the
//   third iteration repeats the first. Per matrix N^2-1 register writes
//   happen. Register count, iteration and period follow the 2-D SRA method;
//   schedule and control come from sra_dfc_core.
//
// Interface and timing
//   in_data[l] is column l+1 of the current row; out_data[m] is row m+1 of
//   the current output column. in_valid advances one cycle (low = stall);
//   outputs are combinational. Synchronous active-low reset; the first row
//   after reset is row 1 of the first matrix.

module sra2d_partransposer #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [N],
  output logic         out_valid,
  output logic [W-1:0] out_data [N],
  output logic         iter_last
);

  function automatic logic [N*N*16-1:0] transpose_order();
    logic [N*N*16-1:0] p;
    for (int unsigned j = 0; j < N*N; j++)
      p[16*j +: 16] = 16'((j % N) * N + j / N);
    return p;
  endfunction

  sra_dfc_core #(
    .W     (W),
    .LANES (N),
    .CI    (N),
    .OPERM (transpose_order())
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
