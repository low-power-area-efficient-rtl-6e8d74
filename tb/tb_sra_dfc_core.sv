// tb_sra_dfc_core -- self-checking test of the generic SRA converter engine.
//
// Two instances: the default one (3x3 transposer, one word per cycle,
// latency 4, four registers) and a two-lane instance that reverses blocks of
// twelve words (latency 5, ten registers). Random words, random stalls,
// several allocation periods each.
module tb_sra_dfc_core;
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
  // reverse order inside each block of 12 words
  function automatic logic [191:0] rev_perm();
    logic [191:0] p;
    for (int j = 0; j < 12; j++) p[16*j +: 16] = 16'(11 - j);
    return p;
  endfunction

  // ---- case 0: core default (3x3 transposer)
  int chk0, fail0, byp0, itr0, wrd0;
  bit done0 = 1'b0;
  begin : c0
    localparam int L = 1, CI = 9;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(tperm(3));
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra_dfc_core  dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(4), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk0), .failures(fail0), .bypasses(byp0), .iters(itr0), .words(wrd0));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 108) begin
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

  // ---- case 1: core 2 lanes, block reversal
  int chk1, fail1, byp1, itr1, wrd1;
  bit done1 = 1'b0;
  begin : c1
    localparam int L = 2, CI = 6;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(rev_perm());
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra_dfc_core #(.W(16), .LANES(2), .CI(6), .OPERM(RP)) dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(5), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk1), .failures(fail1), .bypasses(byp1), .iters(itr1), .words(wrd1));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 72) begin
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

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done0 && done1);
    repeat (2) @(posedge clk);
    checks += chk0; failures += fail0;
    checks++;
    if (wrd0 < 9 || byp0 < 1 * (wrd0 / 9) || (byp0 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL core default (3x3 transposer): %0d bypasses for %0d words", byp0, wrd0);
    end
    $display("core default (3x3 transposer): %0d words checked, %0d iterations, %0d bypasses", wrd0, itr0, byp0);
    checks += chk1; failures += fail1;
    checks++;
    if (wrd1 < 12 || byp1 < 0 * (wrd1 / 12) || (byp1 == 0 && 0 > 0)) begin
      failures++;
      $display("FAIL core 2 lanes, block reversal: %0d bypasses for %0d words", byp1, wrd1);
    end
    $display("core 2 lanes, block reversal: %0d words checked, %0d iterations, %0d bypasses", wrd1, itr1, byp1);
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
