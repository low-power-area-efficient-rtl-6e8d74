// tb_sra_dfc_schedule -- watches the register schedule inside the full-size top.
//
// The top is instantiated with every parameter at its default and its
// stream converters are driven with random words and random stalls (the
// IIR filter stays idle; its schedule is checked by tb_sra1d_iir). Instead
// of the data, this testbench looks inside each converter's control:
//   * rot_monitor follows the pointer table (logical -> physical register).
//     The 16x16 transposer must rotate it at every matrix and return to the
//     identity after 2(N-1) = 30 matrices, the par-transposer and the DWT
//     converter after 2 blocks; the zigzag table must never move; the
//     interleaver tables are reported.
//   * write_counter counts register writes (transitions) per block from the
//     write codes: N^2-1 = 255 for the 16x16 transposer, 14 for the DWT
//     converter, 15 for the zigzag scanner and the 4x4 par-transposer; the
//     interleaver counts are reported.
// Each count that never reaches its minimum is a failure. A watchdog ends a
// hung run.

module tb_sra_dfc_schedule;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               t1_in_valid, t1_out_valid, t1_iter_last;
  logic [15:0]        t1_in_data, t1_out_data;
  logic signed [15:0] iir_coef_a = 16'sd0, iir_coef_b = 16'sd0, iir_in_x = 16'sd0, iir_out_y;
  logic               iir_in_valid = 1'b0, iir_in_ready, iir_out_valid;
  logic               dwt_in_valid, dwt_out_valid, dwt_iter_last;
  logic [15:0]        dwt_in_data [4], dwt_out_data [4];
  logic               zz_in_valid, zz_out_valid, zz_iter_last;
  logic [15:0]        zz_in_data [4], zz_out_data [4];
  logic               pt_in_valid, pt_out_valid, pt_iter_last;
  logic [15:0]        pt_in_data [4], pt_out_data [4];
  logic               il16_in_valid, il16_out_valid, il16_iter_last;
  logic [0:0]         il16_in_data [4], il16_out_data [4];
  logic               ilq_in_valid, ilq_out_valid, ilq_iter_last;
  logic [0:0]         ilq_in_data [2], ilq_out_data [2];

  sra_dfc_top dut (.*);

  logic [15:0] t1_din [1];
  assign t1_in_data = t1_din[0];

  bit d_t1, d_dwt, d_zz, d_pt, d_il16, d_ilq;
  int s_t1, s_dwt, s_zz, s_pt, s_il16, s_ilq;
  stream_driver #(.W(16), .LANES(1), .TARGET(31*256)) drv_t1
    (.clk, .rst_n, .in_valid(t1_in_valid), .in_data(t1_din), .done(d_t1), .stalls(s_t1));
  stream_driver #(.W(16), .LANES(4), .TARGET(40)) drv_dwt
    (.clk, .rst_n, .in_valid(dwt_in_valid), .in_data(dwt_in_data), .done(d_dwt), .stalls(s_dwt));
  stream_driver #(.W(16), .LANES(4), .TARGET(40)) drv_zz
    (.clk, .rst_n, .in_valid(zz_in_valid), .in_data(zz_in_data), .done(d_zz), .stalls(s_zz));
  stream_driver #(.W(16), .LANES(4), .TARGET(40)) drv_pt
    (.clk, .rst_n, .in_valid(pt_in_valid), .in_data(pt_in_data), .done(d_pt), .stalls(s_pt));
  stream_driver #(.W(1), .LANES(4), .TARGET(10*48)) drv_il16
    (.clk, .rst_n, .in_valid(il16_in_valid), .in_data(il16_in_data), .done(d_il16), .stalls(s_il16));
  stream_driver #(.W(1), .LANES(2), .TARGET(10*48)) drv_ilq
    (.clk, .rst_n, .in_valid(ilq_in_valid), .in_data(ilq_in_data), .done(d_ilq), .stalls(s_ilq));

  // ---------------------------------------- pointer-table rotation monitors
  // table sizes: registers D*LANES, entries of $clog2(registers) bits
  int rp_t1, rp_pt, rp_dwt, rp_zz, rp_il16, rp_ilq;
  int rc_t1, rr_t1, rc_pt, rr_pt, rc_dwt, rr_dwt, rc_zz, rr_zz, rc_il16, rr_il16, rc_ilq, rr_ilq;
  rot_monitor #(.N(225), .RW(8)) rm_t1   (.clk, .rst_n, .map(dut.u_t1.u_core.map),   .changes(rc_t1),   .returns(rr_t1), .period(rp_t1));
  rot_monitor #(.N(12),  .RW(4)) rm_pt   (.clk, .rst_n, .map(dut.u_pt.u_core.map),   .changes(rc_pt),   .returns(rr_pt), .period(rp_pt));
  rot_monitor #(.N(8),   .RW(3)) rm_dwt  (.clk, .rst_n, .map(dut.u_dwt.u_core.map),  .changes(rc_dwt),  .returns(rr_dwt), .period(rp_dwt));
  rot_monitor #(.N(8),   .RW(3)) rm_zz   (.clk, .rst_n, .map(dut.u_zz.u_core.map),   .changes(rc_zz),   .returns(rr_zz), .period(rp_zz));
  rot_monitor #(.N(168), .RW(8)) rm_il16 (.clk, .rst_n, .map(dut.u_il16.u_core.map), .changes(rc_il16), .returns(rr_il16), .period(rp_il16));
  rot_monitor #(.N(76),  .RW(7)) rm_ilq  (.clk, .rst_n, .map(dut.u_ilq.u_core.map),  .changes(rc_ilq),  .returns(rr_ilq), .period(rp_ilq));

  // ------------------------------------- register writes (transitions) per block
  // expected: N^2-1 for the 16x16 transposer, 14 for the DWT converter,
  // 15 for the zigzag scanner and the 4x4 par-transposer; the interleaver
  // counts are reported only. Write codes are $clog2(registers + lanes + 1) wide.
  int wb_t1, wx_t1, wf_t1, wb_dwt, wx_dwt, wf_dwt, wb_zz, wx_zz, wf_zz, wb_pt, wx_pt, wf_pt;
  int wb_il16, wx_il16, wf_il16, wb_ilq, wx_ilq, wf_ilq;
  write_counter #(.LANES(1), .NREG(225), .RW(8), .EXP(255)) wc_t1
    (.clk, .rst_n, .in_valid(t1_in_valid), .iter_last(t1_iter_last), .wcode(dut.u_t1.u_core.wcode),
     .blocks(wb_t1), .bad_blocks(wx_t1), .first_count(wf_t1));
  write_counter #(.LANES(4), .NREG(8), .RW(4), .EXP(14)) wc_dwt
    (.clk, .rst_n, .in_valid(dwt_in_valid), .iter_last(dwt_iter_last), .wcode(dut.u_dwt.u_core.wcode),
     .blocks(wb_dwt), .bad_blocks(wx_dwt), .first_count(wf_dwt));
  write_counter #(.LANES(4), .NREG(8), .RW(4), .EXP(15)) wc_zz
    (.clk, .rst_n, .in_valid(zz_in_valid), .iter_last(zz_iter_last), .wcode(dut.u_zz.u_core.wcode),
     .blocks(wb_zz), .bad_blocks(wx_zz), .first_count(wf_zz));
  write_counter #(.LANES(4), .NREG(12), .RW(5), .EXP(15)) wc_pt
    (.clk, .rst_n, .in_valid(pt_in_valid), .iter_last(pt_iter_last), .wcode(dut.u_pt.u_core.wcode),
     .blocks(wb_pt), .bad_blocks(wx_pt), .first_count(wf_pt));
  write_counter #(.LANES(4), .NREG(168), .RW(8)) wc_il16
    (.clk, .rst_n, .in_valid(il16_in_valid), .iter_last(il16_iter_last), .wcode(dut.u_il16.u_core.wcode),
     .blocks(wb_il16), .bad_blocks(wx_il16), .first_count(wf_il16));
  write_counter #(.LANES(2), .NREG(76), .RW(7)) wc_ilq
    (.clk, .rst_n, .in_valid(ilq_in_valid), .iter_last(ilq_iter_last), .wcode(dut.u_ilq.u_core.wcode),
     .blocks(wb_ilq), .bad_blocks(wx_ilq), .first_count(wf_ilq));

  task automatic need(string what, int count, int least);
    checks++;
    if (count < least) begin
      failures++;
      $display("FAIL %s happened %0d times, at least %0d expected", what, count, least);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d_t1 && d_dwt && d_zz && d_pt && d_il16 && d_ilq);
    repeat (3) @(posedge clk);
    $display("pointer-table rotations / completed periods: transposer %0d/%0d, par-transposer %0d/%0d, DWT %0d/%0d, zigzag %0d/%0d, 16-QAM %0d/%0d, QPSK %0d/%0d",
             rc_t1, rr_t1, rc_pt, rr_pt, rc_dwt, rr_dwt, rc_zz, rr_zz, rc_il16, rr_il16, rc_ilq, rr_ilq);
    // one rotation per matrix; back to the start after 2(N-1) = 30 matrices
    need("transposer rotation", rc_t1, 30);
    need("transposer full period", rr_t1, 1);
    need("par-transposer rotation", rc_pt, 2);
    need("par-transposer full period", rr_pt, 1);
    need("DWT converter rotation", rc_dwt, 2);
    need("DWT converter full period", rr_dwt, 1);
    $display("allocation periods in blocks: transposer %0d, par-transposer %0d, DWT %0d",
             rp_t1, rp_pt, rp_dwt);
    checks++;
    if (rp_t1 != 30 || rp_pt != 2 || rp_dwt != 2) begin
      failures++;
      $display("FAIL allocation periods, expected 30, 2 and 2 blocks");
    end
    // zigzag allocation repeats every block: the table never moves
    checks++;
    if (rc_zz != 0) begin
      failures++;
      $display("FAIL zigzag pointer table moved %0d times", rc_zz);
    end
    $display("register writes per block: transposer %0d, DWT %0d, zigzag %0d, par-transposer %0d, 16-QAM %0d, QPSK %0d",
             wf_t1, wf_dwt, wf_zz, wf_pt, wf_il16, wf_ilq);
    checks += wb_t1 + wb_dwt + wb_zz + wb_pt;
    failures += wx_t1 + wx_dwt + wx_zz + wx_pt;
    need("transposer block with counted writes", wb_t1, 31);
    need("DWT block with counted writes", wb_dwt, 10);
    need("zigzag block with counted writes", wb_zz, 10);
    need("par-transposer block with counted writes", wb_pt, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
