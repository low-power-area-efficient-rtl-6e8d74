// tb_sra2d_partransposer -- self-checking test of the 2-D SRA NxN par-transposer.
//
// Runs the default 4x4 instance and 3x3, 5x5 and 16x16 instances with random
// words and random stalls for several allocation periods (2N cycles each).
// Every output column is compared with the transpose of the input, the first
// column must leave N-1 cycles after the first row, and a(N,1) must be
// bypassed once per matrix.
module tb_sra2d_partransposer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;
  // transpose order: output position c*n + r carries input word r*n + c
  function automatic logic [4095:0] tperm(int n);
    logic [4095:0] p = '0;
    for (int r = 0; r < n; r++)
      for (int col = 0; col < n; col++)
        p[16*(col*n + r) +: 16] = 16'(r*n + col);
    return p;
  endfunction

  // ---- case 0: 4x4 par-transposer
  int chk0, fail0, byp0, itr0, wrd0;
  bit done0 = 1'b0;
  begin : c0
    localparam int L = 4, CI = 4;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(tperm(4));
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_partransposer  dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(3), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk0), .failures(fail0), .bypasses(byp0), .iters(itr0), .words(wrd0));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 48) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 16'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done0 = 1'b1;
    end
  end

  // ---- case 1: 3x3 par-transposer
  int chk1, fail1, byp1, itr1, wrd1;
  bit done1 = 1'b0;
  begin : c1
    localparam int L = 3, CI = 3;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(tperm(3));
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_partransposer #(.N(3)) dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(2), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk1), .failures(fail1), .bypasses(byp1), .iters(itr1), .words(wrd1));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 36) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 16'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done1 = 1'b1;
    end
  end

  // ---- case 2: 5x5 par-transposer
  int chk2, fail2, byp2, itr2, wrd2;
  bit done2 = 1'b0;
  begin : c2
    localparam int L = 5, CI = 5;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(tperm(5));
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_partransposer #(.N(5)) dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(4), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk2), .failures(fail2), .bypasses(byp2), .iters(itr2), .words(wrd2));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 60) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 16'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done2 = 1'b1;
    end
  end

  // ---- case 3: 16x16 par-transposer
  int chk3, fail3, byp3, itr3, wrd3;
  bit done3 = 1'b0;
  begin : c3
    localparam int L = 16, CI = 16;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(tperm(16));
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_partransposer #(.N(16)) dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(15), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk3), .failures(fail3), .bypasses(byp3), .iters(itr3), .words(wrd3));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 192) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        for (int l = 0; l < L; l++) din[l] = 16'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done3 = 1'b1;
    end
  end

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done0 && done1 && done2 && done3);
    repeat (2) @(posedge clk);
    checks += chk0; failures += fail0;
    checks++;
    if (wrd0 < 16 || byp0 < 1 * (wrd0 / 16) || (byp0 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 4x4 par-transposer: %0d bypasses for %0d words", byp0, wrd0);
    end
    $display("4x4 par-transposer: %0d words checked, %0d iterations, %0d bypasses", wrd0, itr0, byp0);
    checks += chk1; failures += fail1;
    checks++;
    if (wrd1 < 9 || byp1 < 1 * (wrd1 / 9) || (byp1 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 3x3 par-transposer: %0d bypasses for %0d words", byp1, wrd1);
    end
    $display("3x3 par-transposer: %0d words checked, %0d iterations, %0d bypasses", wrd1, itr1, byp1);
    checks += chk2; failures += fail2;
    checks++;
    if (wrd2 < 25 || byp2 < 1 * (wrd2 / 25) || (byp2 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 5x5 par-transposer: %0d bypasses for %0d words", byp2, wrd2);
    end
    $display("5x5 par-transposer: %0d words checked, %0d iterations, %0d bypasses", wrd2, itr2, byp2);
    checks += chk3; failures += fail3;
    checks++;
    if (wrd3 < 256 || byp3 < 1 * (wrd3 / 256) || (byp3 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 16x16 par-transposer: %0d bypasses for %0d words", byp3, wrd3);
    end
    $display("16x16 par-transposer: %0d words checked, %0d iterations, %0d bypasses", wrd3, itr3, byp3);
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
