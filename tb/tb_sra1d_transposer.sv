// tb_sra1d_transposer -- self-checking test of the 1-D SRA NxN transposer.
//
// Four transposers are run side by side: 3x3 and 4x4 (the small benchmarks),
// the default 16x16, all with 16-bit words, and a 4x4 with 8-bit words (the
// 8-bit benchmark width). Each gets random words with random stall cycles for a bit more than one allocation period
// (2N^2(N-1) cycles: 36, 96 and 7680), and a scoreboard compares every
// output with the transpose of the input, checks that the first word leaves
// exactly (N-1)^2 cycles after the first input, and counts bypassed words
// (one per matrix: a(N,1)).

module tb_sra1d_transposer;
  localparam int NUM = 4;
  localparam int NL [NUM] = '{3, 4, 16, 4};
  localparam int WL [NUM] = '{16, 16, 16, 8};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int  chk [NUM], fail [NUM], byp [NUM], itr [NUM], wrd [NUM];
  bit  done [NUM];
  int  checks, failures;

  // transpose order: output position c*N + r carries input word r*N + c
  function automatic logic [4095:0] ref_perm(int n);
    logic [4095:0] p = '0;
    for (int r = 0; r < n; r++)
      for (int col = 0; col < n; col++)
        p[16*(col*n + r) +: 16] = 16'(r*n + col);
    return p;
  endfunction

  for (genvar g = 0; g < NUM; g++) begin : c
    localparam int N = NL[g];
    localparam int W = WL[g];
    localparam logic [N*N*16-1:0] RP = (N*N*16)'(ref_perm(N));

    logic        in_valid = 1'b0;
    logic [W-1:0] din [1];
    logic         out_valid, iter_last;
    logic [W-1:0] dout [1];
    logic [W-1:0] dout_s;

    if (N == 16 && W == 16) begin : dflt
      sra1d_transposer dut (.clk, .rst_n, .in_valid, .in_data(din[0]),
                            .out_valid, .out_data(dout_s), .iter_last);
    end else begin : sized
      sra1d_transposer #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .in_data(din[0]),
                                     .out_valid, .out_data(dout_s), .iter_last);
    end
    assign dout[0] = dout_s;

    dfc_scoreboard #(.W(W), .LANES(1), .CI(N*N), .LAT((N-1)*(N-1)), .PERM(RP))
      sb (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout), .iter_last,
          .checks(chk[g]), .failures(fail[g]), .bypasses(byp[g]), .iters(itr[g]), .words(wrd[g]));

    initial begin
      int sent, total;
      total = (2*N*N*(N-1) + 2*N*N);   // one period plus two matrices
      sent = 0;
      din[0] = '0;
      done[g] = 1'b0;
      @(posedge rst_n);
      while (sent < total) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 7) != 0);
        din[0]   = W'($urandom);
        if (in_valid) sent++;
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    repeat (2) @(posedge clk);
    checks = 0; failures = 0;
    for (int g = 0; g < NUM; g++) begin
      checks += chk[g]; failures += fail[g];
      // one bypass per matrix, and every matrix boundary seen
      checks++;
      if (byp[g] != (wrd[g] - NL[g]) / (NL[g]*NL[g]) + 1) begin
        failures++;
        $display("FAIL N=%0d bypass count %0d for %0d words", NL[g], byp[g], wrd[g]);
      end
      checks++;
      if (itr[g] < 2*(NL[g]-1) + 2) begin
        failures++;
        $display("FAIL N=%0d only %0d iterations", NL[g], itr[g]);
      end
      $display("N=%0d, %0d-bit: %0d words checked, %0d iterations, %0d bypasses", NL[g], WL[g], wrd[g], itr[g], byp[g]);
    end
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
