// tb_sra2d_dwt -- self-checking test of the (1,4)->(2,2)[8] DWT converter.
//
// Random words with random stalls over 100 block pairs (50 allocation
// periods). Each output row must be the sample pairs of both blocks
// (reference order built independently below), the first row must leave two
// cycles after the first input, and two words per block pair are bypassed.
module tb_sra2d_dwt;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks, failures;
  // output row k = {w(2k), w(2k+1), w'(2k), w'(2k+1)}; w0..w7 = 0..7, w'0..w'7 = 8..15
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

  // ---- case 0: 1-D DWT converter
  int chk0, fail0, byp0, itr0, wrd0;
  bit done0 = 1'b0;
  begin : c0
    localparam int L = 4, CI = 4;
    localparam logic [CI*L*16-1:0] RP = (CI*L*16)'(dwt_perm());
    logic         in_valid = 1'b0;
    logic [16-1:0] din  [L];
    logic [16-1:0] dout [L];
    logic         out_valid, iter_last;
    sra2d_dwt  dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last);
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
    if (wrd0 < 16 || byp0 < 2 * (wrd0 / 16) || (byp0 == 0 && 2 > 0)) begin
      failures++;
      $display("FAIL 1-D DWT converter: %0d bypasses for %0d words", byp0, wrd0);
    end
    $display("1-D DWT converter: %0d words checked, %0d iterations, %0d bypasses", wrd0, itr0, byp0);
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
