// sra_wimax_interleaver -- IEEE 802.16 (WiMAX) bit interleaver built as a
// 2-D static-register-allocation converter of one-bit registers.
//
// What it does
//   Applies the two-stage WiMAX interleaver permutation to each OFDM symbol
//   of NCBPS coded bits. NBPSC bits enter per cycle in natural order and
//   NBPSC bits leave per cycle in interleaved order, symbol after symbol
//   without gaps:
//     first stage  i = (NCBPS/16)*(k mod 16) + floor(k/16)
//     second stage j = s*floor(i/s) + (i + NCBPS - floor(16*i/NCBPS)) mod s,
//                  s = max(NBPSC/2, 1)
//   where k is the input position and j the output position of a bit.
//
// How it works
//   Instead of filling a whole symbol into memory and reading it back, each
//   bit is kept in a one-bit register only for its lifetime. The first output
//   leaves LAT cycles after the first input, the smallest causal latency:
//   38 cycles for QPSK (NBPSC=2, NCBPS=96) and 42 for 16-QAM (NBPSC=4,
//   NCBPS=192), against 48 for a full-symbol memory. The register count is
//   LAT*NBPSC: 76 and 168 bits instead of 96 and 192. Schedule, register
//   bank and control are generated by sra_dfc_core from the permutation.
//   The permutation, latencies and register counts follow the SRA
//   interleaver; individual write enables per register and one output
//   multiplexer per lane (rather than banks sharing write signals and
//   two-level output multiplexers) are this design's simplification. So is
//   the control: the general allocation rules are used, and for this
//   permutation they rename registers from one symbol to the next, so the
//   pointer table of the core moves at every symbol boundary, where a
//   single-iteration schedule would keep one assignment for all symbols.
//
// Interface and timing
//   in_data[l] is bit k = cycle*NBPSC + l of the current symbol; out_data[m]
//   is output bit j = cycle*NBPSC + m. in_valid advances one cycle (low =
//   stall); outputs are combinational. Synchronous active-low reset; the
//   first cycle after reset carries bits 0..NBPSC-1 of the first symbol.

module sra_wimax_interleaver #(
  parameter int unsigned NBPSC = 4,
  parameter int unsigned NCBPS = 192
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [0:0] in_data  [NBPSC],
  output logic       out_valid,
  output logic [0:0] out_data [NBPSC],
  output logic       iter_last
);

  localparam int unsigned S = (NBPSC / 2 > 1) ? NBPSC / 2 : 1;

  // output position j carries input bit k
  function automatic logic [NCBPS*16-1:0] interleave_order();
    logic [NCBPS*16-1:0] p;
    for (int unsigned k = 0; k < NCBPS; k++) begin
      int unsigned i, j;
      i = (NCBPS / 16) * (k % 16) + k / 16;
      j = S * (i / S) + (i + NCBPS - (16 * i) / NCBPS) % S;
      p[16*j +: 16] = 16'(k);
    end
    return p;
  endfunction

  sra_dfc_core #(
    .W     (1),
    .LANES (NBPSC),
    .CI    (NCBPS / NBPSC),
    .OPERM (interleave_order())
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
