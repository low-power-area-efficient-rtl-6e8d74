// sra_dfc_top -- the static-register-allocation converter family, side by side.
//
// What it does
//   Places one instance of every converter built with static register
//   allocation, each at its default size, under a common clock and reset:
//     t1_*   16x16 transposer, 1 word/cycle, 1-D SRA   (sra1d_transposer)
//     iir_*  folded IIR y(n)=a*y(n-3)+b*y(n-5)+x(n)    (sra1d_iir)
//     dwt_*  1-D DWT converter (1,4)->(2,2)[8], 2-D SRA (sra2d_dwt)
//     zz_*   4x4 zigzag scanner, 2-D SRA               (sra2d_zigzag)
//     pt_*   4x4 par-transposer, 2-D SRA               (sra2d_partransposer)
//     il16_* WiMAX interleaver, 16-QAM (4 bits/cycle)  (sra_wimax_interleaver)
//     ilq_*  WiMAX interleaver, QPSK (2 bits/cycle)    (sra_wimax_interleaver)
//   The converters are independent benchmarks of one allocation method; no
//   signal passes between them. The blocks of a WiMAX transmitter around the
//   interleavers (encoder, serial-to-parallel, mapper) are outside this
//   design: the interleaver ports are brought out instead.
//
// Interface and timing
//   Each converter keeps its own handshake (see the module headers): the
//   stream converters advance on *_in_valid and answer combinationally in
//   the same cycle; the IIR filter takes a sample when iir_in_valid and
//   iir_in_ready are both high and answers one cycle later. rst_n is
//   synchronous and active low for all of them.

module sra_dfc_top (
  input  logic               clk,
  input  logic               rst_n,
  // 16x16 transposer
  input  logic               t1_in_valid,
  input  logic [15:0]        t1_in_data,
  output logic               t1_out_valid,
  output logic [15:0]        t1_out_data,
  output logic               t1_iter_last,
  // folded IIR filter
  input  logic signed [15:0] iir_coef_a,
  input  logic signed [15:0] iir_coef_b,
  input  logic               iir_in_valid,
  output logic               iir_in_ready,
  input  logic signed [15:0] iir_in_x,
  output logic               iir_out_valid,
  output logic signed [15:0] iir_out_y,
  // 1-D DWT converter
  input  logic               dwt_in_valid,
  input  logic [15:0]        dwt_in_data  [4],
  output logic               dwt_out_valid,
  output logic [15:0]        dwt_out_data [4],
  output logic               dwt_iter_last,
  // zigzag scanner
  input  logic               zz_in_valid,
  input  logic [15:0]        zz_in_data  [4],
  output logic               zz_out_valid,
  output logic [15:0]        zz_out_data [4],
  output logic               zz_iter_last,
  // 4x4 par-transposer
  input  logic               pt_in_valid,
  input  logic [15:0]        pt_in_data  [4],
  output logic               pt_out_valid,
  output logic [15:0]        pt_out_data [4],
  output logic               pt_iter_last,
  // WiMAX interleaver, 16-QAM
  input  logic               il16_in_valid,
  input  logic [0:0]         il16_in_data  [4],
  output logic               il16_out_valid,
  output logic [0:0]         il16_out_data [4],
  output logic               il16_iter_last,
  // WiMAX interleaver, QPSK
  input  logic               ilq_in_valid,
  input  logic [0:0]         ilq_in_data  [2],
  output logic               ilq_out_valid,
  output logic [0:0]         ilq_out_data [2],
  output logic               ilq_iter_last
);

  sra1d_transposer u_t1 (
    .clk, .rst_n, .in_valid(t1_in_valid), .in_data(t1_in_data),
    .out_valid(t1_out_valid), .out_data(t1_out_data), .iter_last(t1_iter_last));

  sra1d_iir u_iir (
    .clk, .rst_n, .coef_a(iir_coef_a), .coef_b(iir_coef_b),
    .in_valid(iir_in_valid), .in_ready(iir_in_ready), .in_x(iir_in_x),
    .out_valid(iir_out_valid), .out_y(iir_out_y));

  sra2d_dwt u_dwt (
    .clk, .rst_n, .in_valid(dwt_in_valid), .in_data(dwt_in_data),
    .out_valid(dwt_out_valid), .out_data(dwt_out_data), .iter_last(dwt_iter_last));

  sra2d_zigzag u_zz (
    .clk, .rst_n, .in_valid(zz_in_valid), .in_data(zz_in_data),
    .out_valid(zz_out_valid), .out_data(zz_out_data), .iter_last(zz_iter_last));

  sra2d_partransposer u_pt (
    .clk, .rst_n, .in_valid(pt_in_valid), .in_data(pt_in_data),
    .out_valid(pt_out_valid), .out_data(pt_out_data), .iter_last(pt_iter_last));

  sra_wimax_interleaver u_il16 (
    .clk, .rst_n, .in_valid(il16_in_valid), .in_data(il16_in_data),
    .out_valid(il16_out_valid), .out_data(il16_out_data), .iter_last(il16_iter_last));

  sra_wimax_interleaver #(.NBPSC(2), .NCBPS(96)) u_ilq (
    .clk, .rst_n, .in_valid(ilq_in_valid), .in_data(ilq_in_data),
    .out_valid(ilq_out_valid), .out_data(ilq_out_data), .iter_last(ilq_iter_last));

endmodule
