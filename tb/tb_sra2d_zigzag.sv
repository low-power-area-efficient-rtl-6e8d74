// tb_sra2d_zigzag -- self-checking test of the 4x4 zigzag scanner.
//
// Random coefficients with random stalls over 100 blocks. The reference
// zigzag order is generated by walking the anti-diagonals of the block; the
// first group must leave two cycles after the first row, and d9 is bypassed
// once per block.
module tb_sra2d_zigzag;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;
  // zigzag order of a 4x4 block, walking the anti-diagonals back and forth
  function automatic logic [255:0] zz_perm();
    logic [255:0] p;
    int j = 0;
    for (int s = 0; s <= 6; s++)
      for (int t = 0; t <= s; t++) begin
        int r, c;
        r = (s % 2 == 0) ? s - t : t;   // even diagonal goes up, odd goes down
        c = s - r;
        if (r < 4 && c < 4) begin
          p[16*j +: 16] = 16'(4*r + c);
          j++;
        end
      end
    return p;
  endfunction

  // ---- case 0: 4x4 zigzag scanner
  int chk0, fail0, byp0, itr0, wrd0;
  bit done0 = 1'b0;
  begin : c0
    localparam int L = 4, CI = 4;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(zz_perm());
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_zigzag  dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
    dfc_scoreboard #(.W(16), .LANES(L), .CI(CI), .LAT(2), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk0), .failures(fail0), .bypasses(byp0), .iters(itr0), .words(wrd0));
    initial begin
      int sent;
      sent = 0;
      for (int l = 0; l < L; l++) din[l] = '0;
      @(posedge rst_n);
      while (sent < 400) begin
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

  initial begin
    checks = 0; failures = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done0);
    repeat (2) @(posedge clk);
    checks += chk0; failures += fail0;
    checks++;
    if (wrd0 < 16 || byp0 < 1 * (wrd0 / 16) || (byp0 == 0 && 1 > 0)) begin
      failures++;
      $display("FAIL 4x4 zigzag scanner: %0d bypasses for %0d words", byp0, wrd0);
    end
    $display("4x4 zigzag scanner: %0d words checked, %0d iterations, %0d bypasses", wrd0, itr0, byp0);
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
