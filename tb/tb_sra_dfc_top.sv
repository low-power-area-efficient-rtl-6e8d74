// tb_sra_dfc_top -- end-to-end test of the whole converter family at full size.
//
// The top is instantiated with every parameter at its default. All seven
// converters run at once from one reset, each with random data and random
// stall cycles:
//   * 16x16 transposer: one full allocation period (30 matrices) plus one
//     more matrix;
//   * folded IIR filter: random samples offered every cycle, half of them
//     refused while the filter is busy, every y(n) compared with a
//     reference recursion;
//   * DWT converter, zigzag scanner, 4x4 par-transposer: 60 iterations each;
//   * WiMAX interleaver in 16-QAM and in QPSK mode: 20 OFDM symbols each.
// Stream outputs are compared by dfc_scoreboard against reference orders
// written here from the definitions of the conversions (transpose, zigzag
// walk, DWT pairing, the two interleaver equations), latencies included.
// The testbench works from the top's ports only. It counts each mechanism:
// stalls, bypassed words, iterations (every iteration boundary renames the
// registers, so blocks after the first check the rotation), a complete
// allocation period of the transposer, refused IIR offers, and words through
// each interleaver mode. The rotating pointer tables and the register write
// counts are watched from inside by tb_sra_dfc_schedule. A mechanism that never
// happened counts as a failure. A watchdog ends a hung run.

module tb_sra_dfc_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ references
  function automatic logic [4095:0] tperm(int n);
    logic [4095:0] p = '0;
    for (int r = 0; r < n; r++)
      for (int col = 0; col < n; col++)
        p[16*(col*n + r) +: 16] = 16'(r*n + col);
    return p;
  endfunction

  function automatic logic [255:0] dwt_perm();
    logic [255:0] p;
    for (int k = 0; k < 4; k++) begin
      p[16*(4*k+0) +: 16] = 16'(2*k);
      p[16*(4*k+1) +: 16] = 16'(2*k + 1);
      p[16*(4*k+2) +: 16] = 16'(8 + 2*k);
      p[16*(4*k+3) +: 16] = 16'(8 + 2*k + 1);
    end
    return p;
  endfunction

  function automatic logic [255:0] zz_perm();
    logic [255:0] p;
    int j = 0;
    for (int s = 0; s <= 6; s++)
      for (int t = 0; t <= s; t++) begin
        int r, c;
        r = (s % 2 == 0) ? s - t : t;
        c = s - r;
        if (r < 4 && c < 4) begin
          p[16*j +: 16] = 16'(4*r + c);
          j++;
        end
      end
    return p;
  endfunction

  function automatic logic [4095:0] il_perm(int ncbps, int nbpsc);
    logic [4095:0] p = '0;
    int s;
    s = (nbpsc / 2 > 1) ? nbpsc / 2 : 1;
    for (int k = 0; k < ncbps; k++) begin
      int i1, j1;
      i1 = (ncbps / 16) * (k % 16) + (k / 16);
      j1 = s * (i1 / s) + ((i1 + ncbps - (16 * i1) / ncbps) % s);
      p[16*j1 +: 16] = 16'(k);
    end
    return p;
  endfunction

  localparam logic [4095:0] P_T1   = tperm(16);
  localparam logic [255:0]  P_PT   = 256'(tperm(4));
  localparam logic [255:0]  P_DWT  = dwt_perm();
  localparam logic [255:0]  P_ZZ   = zz_perm();
  localparam logic [3071:0] P_IL16 = 3072'(il_perm(192, 4));
  localparam logic [1535:0] P_ILQ  = 1536'(il_perm(96, 2));

  // ----------------------------------------------------------- top signals
  logic               t1_in_valid, t1_out_valid, t1_iter_last;
  logic [15:0]        t1_in_data, t1_out_data;
  logic signed [15:0] iir_coef_a, iir_coef_b, iir_in_x, iir_out_y;
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

  // the transposer has scalar ports; the driver and checker use 1-lane arrays
  logic [15:0] t1_din [1], t1_dout [1];
  assign t1_in_data = t1_din[0];
  assign t1_dout[0] = t1_out_data;

  // ------------------------------------------------ drivers and checkers
  typedef struct {int chk, fail, byp, itr, wrd, stl;} sb_t;
  sb_t st1, sdwt, szz, spt, sil16, silq;
  bit d_t1, d_dwt, d_zz, d_pt, d_il16, d_ilq;

  // 16x16 transposer: 30 matrices = one period, plus one matrix
  stream_driver #(.W(16), .LANES(1), .TARGET(31*256 + 225)) drv_t1
    (.clk, .rst_n, .in_valid(t1_in_valid), .in_data(t1_din), .done(d_t1), .stalls(st1.stl));
  dfc_scoreboard #(.W(16), .LANES(1), .CI(256), .LAT(225), .PERM(P_T1)) sb_t1
    (.clk, .rst_n, .in_valid(t1_in_valid), .in_data(t1_din), .out_valid(t1_out_valid),
     .out_data(t1_dout), .iter_last(t1_iter_last),
     .checks(st1.chk), .failures(st1.fail), .bypasses(st1.byp), .iters(st1.itr), .words(st1.wrd));

  stream_driver #(.W(16), .LANES(4), .TARGET(240)) drv_dwt
    (.clk, .rst_n, .in_valid(dwt_in_valid), .in_data(dwt_in_data), .done(d_dwt), .stalls(sdwt.stl));
  dfc_scoreboard #(.W(16), .LANES(4), .CI(4), .LAT(2), .PERM(P_DWT)) sb_dwt
    (.clk, .rst_n, .in_valid(dwt_in_valid), .in_data(dwt_in_data), .out_valid(dwt_out_valid),
     .out_data(dwt_out_data), .iter_last(dwt_iter_last),
     .checks(sdwt.chk), .failures(sdwt.fail), .bypasses(sdwt.byp), .iters(sdwt.itr), .words(sdwt.wrd));

  stream_driver #(.W(16), .LANES(4), .TARGET(240)) drv_zz
    (.clk, .rst_n, .in_valid(zz_in_valid), .in_data(zz_in_data), .done(d_zz), .stalls(szz.stl));
  dfc_scoreboard #(.W(16), .LANES(4), .CI(4), .LAT(2), .PERM(P_ZZ)) sb_zz
    (.clk, .rst_n, .in_valid(zz_in_valid), .in_data(zz_in_data), .out_valid(zz_out_valid),
     .out_data(zz_out_data), .iter_last(zz_iter_last),
     .checks(szz.chk), .failures(szz.fail), .bypasses(szz.byp), .iters(szz.itr), .words(szz.wrd));

  stream_driver #(.W(16), .LANES(4), .TARGET(240)) drv_pt
    (.clk, .rst_n, .in_valid(pt_in_valid), .in_data(pt_in_data), .done(d_pt), .stalls(spt.stl));
  dfc_scoreboard #(.W(16), .LANES(4), .CI(4), .LAT(3), .PERM(P_PT)) sb_pt
    (.clk, .rst_n, .in_valid(pt_in_valid), .in_data(pt_in_data), .out_valid(pt_out_valid),
     .out_data(pt_out_data), .iter_last(pt_iter_last),
     .checks(spt.chk), .failures(spt.fail), .bypasses(spt.byp), .iters(spt.itr), .words(spt.wrd));

  stream_driver #(.W(1), .LANES(4), .TARGET(20*48)) drv_il16
    (.clk, .rst_n, .in_valid(il16_in_valid), .in_data(il16_in_data), .done(d_il16), .stalls(sil16.stl));
  dfc_scoreboard #(.W(1), .LANES(4), .CI(48), .LAT(42), .PERM(P_IL16)) sb_il16
    (.clk, .rst_n, .in_valid(il16_in_valid), .in_data(il16_in_data), .out_valid(il16_out_valid),
     .out_data(il16_out_data), .iter_last(il16_iter_last),
     .checks(sil16.chk), .failures(sil16.fail), .bypasses(sil16.byp), .iters(sil16.itr), .words(sil16.wrd));

  stream_driver #(.W(1), .LANES(2), .TARGET(20*48)) drv_ilq
    (.clk, .rst_n, .in_valid(ilq_in_valid), .in_data(ilq_in_data), .done(d_ilq), .stalls(silq.stl));
  dfc_scoreboard #(.W(1), .LANES(2), .CI(48), .LAT(38), .PERM(P_ILQ)) sb_ilq
    (.clk, .rst_n, .in_valid(ilq_in_valid), .in_data(ilq_in_data), .out_valid(ilq_out_valid),
     .out_data(ilq_out_data), .iter_last(ilq_iter_last),
     .checks(silq.chk), .failures(silq.fail), .bypasses(silq.byp), .iters(silq.itr), .words(silq.wrd));

  // ------------------------------------------------------------ IIR filter
  int iir_samples = 0, iir_refused = 0;
  bit iir_took = 1'b0, d_iir = 1'b0;
  logic signed [15:0] yref [$];
  logic signed [15:0] xq [$];

  function automatic logic signed [15:0] fx(logic signed [15:0] c, logic signed [15:0] v);
    logic signed [31:0] p;
    p = c * v;
    return 16'(p >>> 14);
  endfunction

  function automatic logic signed [15:0] yat(int back);
    if (yref.size() < back) return 16'sd0;
    return yref[yref.size() - back];
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (iir_out_valid !== iir_took) begin
        failures++;
        $display("FAIL iir out_valid=%0d, expected %0d", iir_out_valid, iir_took);
      end
      if (iir_out_valid && iir_took) begin
        logic signed [15:0] e;
        e = fx(iir_coef_a, yat(3)) + fx(iir_coef_b, yat(5)) + xq.pop_front();
        checks++;
        if (iir_out_y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL iir y(%0d) = %0d, expected %0d", yref.size(), iir_out_y, e);
        end
        yref.push_back(e);
      end
      if (!iir_took) begin
        checks++;
        if (iir_in_ready !== 1'b1) begin
          failures++;
          $display("FAIL iir in_ready low while idle");
        end
      end
      if (iir_in_valid && iir_in_ready) begin
        xq.push_back(iir_in_x);
        iir_samples++;
        iir_took = 1'b1;
      end else begin
        if (iir_in_valid && !iir_in_ready) iir_refused++;
        iir_took = 1'b0;
      end
    end
  end

  initial begin
    iir_coef_a = 16'sd8192;     // 0.5
    iir_coef_b = -16'sd4096;    // -0.25
    iir_in_x   = '0;
    @(posedge rst_n);
    while (iir_samples < 500) begin
      @(posedge clk); #1;
      iir_in_valid = ($urandom_range(0, 7) != 0);
      iir_in_x     = 16'($signed($urandom_range(0, 8191)) - 4096);
    end
    @(posedge clk); #1;
    iir_in_valid = 1'b0;
    d_iir = 1'b1;
  end

  // ------------------------------------------------------------ bookkeeping
  task automatic need(string what, int count, int least);
    checks++;
    if (count < least) begin
      failures++;
      $display("FAIL %s happened %0d times, at least %0d expected", what, count, least);
    end
  endtask

  task automatic report(string name, sb_t s);
    checks   += s.chk;
    failures += s.fail;
    $display("%-22s %6d words checked, %4d iterations, %5d bypasses, %4d stall cycles",
             name, s.wrd, s.itr, s.byp, s.stl);
    need({name, " stall"}, s.stl, 1);
    need({name, " bypass"}, s.byp, 1);
    need({name, " iteration"}, s.itr, 2);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d_t1 && d_dwt && d_zz && d_pt && d_il16 && d_ilq && d_iir);
    repeat (3) @(posedge clk);
    report("16x16 transposer", st1);
    report("DWT converter", sdwt);
    report("zigzag scanner", szz);
    report("4x4 par-transposer", spt);
    report("interleaver 16-QAM", sil16);
    report("interleaver QPSK", silq);
    // a full allocation period of the 16x16 transposer is 2(N-1) = 30 matrices
    need("transposer matrix (one period + 1)", st1.itr, 31);
    $display("IIR filter: %0d samples filtered, %0d offers refused while busy", iir_samples, iir_refused);
    need("IIR sample", iir_samples, 500);
    need("IIR busy refusal", iir_refused, 1);
    need("16-QAM symbol", sil16.itr, 20);
    need("QPSK symbol", silq.itr, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
