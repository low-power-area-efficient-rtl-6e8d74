// tb_sra_wimax_interleaver -- self-checking test of the WiMAX interleaver.
//
// Runs the default 16-QAM instance (NBPSC=4, NCBPS=192) and a QPSK instance
// (NBPSC=2, NCBPS=96) for twelve symbols of random bits with random stalls.
// The reference permutation is computed from the two interleaver equations;
// the first output bits must leave exactly 42 (16-QAM) and 38 (QPSK) cycles
// after the first input, as the minimum-latency schedule requires.
module tb_sra_wimax_interleaver;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;
  // WiMAX two-stage interleaver: output position j carries input bit k
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

  // ---- case 0: 16-QAM interleaver
  int chk0, fail0, byp0, itr0, wrd0;
  bit done0 = 1'b0;
  begin : c0
    localparam int L = 4, CI = 48;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(il_perm(192, 4));
    logic         in_valid = 1'b0;
    logic [1-1:0] din  [L];
    logic [1-1:0] dout [L];
    logic         out_valid, iter_last;
    sra_wimax_interleaver  dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(1), .LANES(L), .CI(CI), .LAT(42), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk0), .failures(fail0), .bypasses(byp0), .iters(itr0), .words(wrd0));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 576) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 1'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done0 = 1'b1;
    end
  end

  // ---- case 1: QPSK interleaver
  int chk1, fail1, byp1, itr1, wrd1;
  bit done1 = 1'b0;
  begin : c1
    localparam int L = 2, CI = 48;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(il_perm(96, 2));
    logic         in_valid = 1'b0;
    logic [1-1:0] din  [L];
    logic [1-1:0] dout [L];
    logic         out_valid, iter_last;
    sra_wimax_interleaver #(.NBPSC(2), .NCBPS(96)) dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(1), .LANES(L), .CI(CI), .LAT(38), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk1), .failures(fail1), .bypasses(byp1), .iters(itr1), .words(wrd1));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 576) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 1'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done1 = 1'b1;
    end
  end

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done0 && done1);
    repeat (2) @(posedge clk);
    checks += chk0; failures += fail0;
    checks++;
    if (wrd0 < 192 || byp0 < 1 * (wrd0 / 192) || (byp0 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 16-QAM interleaver: %0d bypasses for %0d words", byp0, wrd0);
    end
    $display("16-QAM interleaver: %0d words checked, %0d iterations, %0d bypasses", wrd0, itr0, byp0);
    checks += chk1; failures += fail1;
    checks++;
    if (wrd1 < 96 || byp1 < 1 * (wrd1 / 96) || (byp1 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL QPSK interleaver: %0d bypasses for %0d words", byp1, wrd1);
    end
    $display("QPSK interleaver: %0d words checked, %0d iterations, %0d bypasses", wrd1, itr1, byp1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
