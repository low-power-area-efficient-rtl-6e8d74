// tb_sra_alloc_tables -- compares generated register schedules with the
// published SRA allocation tables of two small converters.
//
// The allocation inside sra_dfc_core is computed at elaboration from the
// output order alone. This testbench checks that result register by
// register against the allocation tables of the SRA method:
//   * 3x3 transposer, one word per cycle, 4 registers: the register written
//     in each cycle of the first three iterations (the assignment moves one
//     step along R1 -> R2 -> R3 -> R4 -> R1 per iteration);
//   * 4x4 transposer, one word per cycle, 9 registers: the register written
//     in each of the 16 cycles of the first and the second iteration (the
//     second iteration is the first one with each register group rotated);
//   * 4x4 par-transposer, four words per cycle, 12 registers: the registers
//     written by each input lane in the first iteration and in the first
//     cycle of the second one;
//   * 1-D DWT converter, 8 registers: the first iteration and the first two
//     cycles of the second one (registers 3/5 and 4/6 trade places);
//   * zigzag scanner, 8 registers: two blocks, both with the same
//     assignment (single iteration).
// It also checks the allocation periods: 2(N-1) iterations for the 3x3 and
// 4x4 transposers, 2 iterations for the 3x3, 4x4 and 16x16 par-transposers
// and the DWT converter. For the 3x3 par-transposer the only registers
// that trade places between iterations must be R3 and R5.
// Registers are numbered from 1 as in those tables; 0 means the word is
// bypassed and written nowhere. The physical register of a write is read
// from the converter's write code and pointer table on the falling edge of
// each cycle. A watchdog ends a hung run.

module tb_sra_alloc_tables;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // 3x3 transposer, iterations 1 to 3, cycle by cycle
  localparam int S_EXP [27] = '{
    1, 2, 3, 4, 1, 4, 0, 2, 1,
    2, 3, 4, 1, 2, 1, 0, 3, 2,
    3, 4, 1, 2, 3, 2, 0, 4, 3};
  // 4x4 transposer, iterations 1 and 2, cycle by cycle
  localparam int T_EXP [32] = '{
    1, 2, 3, 4, 5, 6, 7, 8, 9, 1, 5, 9, 0, 2, 6, 1,
    2, 3, 7, 5, 6, 4, 8, 9, 1, 2, 6, 1, 0, 3, 4, 2};
  // 4x4 par-transposer, lanes 0..3 of cycles 0..3 of iteration 1, then
  // cycle 0 of iteration 2
  localparam int P_EXP [20] = '{
    1, 2, 3, 4,   5, 6, 7, 8,   9, 10, 11, 12,   0, 1, 5, 9,
    1, 2, 6, 10};

  // 1-D DWT converter, lanes 0..3 of cycles 0..5
  localparam int D_EXP [24] = '{
    1, 2, 3, 4,   5, 6, 7, 8,   0, 0, 1, 2,   1, 2, 3, 4,
    1, 2, 5, 6,   3, 4, 7, 8};
  // zigzag scanner, lanes 0..3 of cycles 0..7
  localparam int Z_EXP [32] = '{
    1, 2, 3, 4,   5, 6, 7, 8,   0, 1, 2, 5,   3, 4, 6, 7,
    1, 2, 3, 4,   5, 6, 7, 8,   0, 1, 2, 5,   3, 4, 6, 7};

  logic        in_valid = 1'b0;
  logic [15:0] s_din = '0, s_dout;
  logic        s_ov, s_il;
  logic [15:0] t_din = '0, t_dout;
  logic        t_ov, t_il;
  logic [15:0] p_din [4], p_dout [4];
  logic        p_ov, p_il;
  logic [15:0] d_dout [4], z_dout [4];
  logic        d_ov, d_il, z_ov, z_il;

  sra1d_transposer #(.N(3)) u_s (.clk, .rst_n, .in_valid, .in_data(s_din),
                                 .out_valid(s_ov), .out_data(s_dout), .iter_last(s_il));
  sra1d_transposer #(.N(4)) u_t (.clk, .rst_n, .in_valid, .in_data(t_din),
                                 .out_valid(t_ov), .out_data(t_dout), .iter_last(t_il));
  sra2d_partransposer u_p (.clk, .rst_n, .in_valid, .in_data(p_din),
                           .out_valid(p_ov), .out_data(p_dout), .iter_last(p_il));

  sra2d_dwt u_d (.clk, .rst_n, .in_valid, .in_data(p_din),
                 .out_valid(d_ov), .out_data(d_dout), .iter_last(d_il));
  sra2d_zigzag u_z (.clk, .rst_n, .in_valid, .in_data(p_din),
                    .out_valid(z_ov), .out_data(z_dout), .iter_last(z_il));

  logic [15:0] p3_din [3], p3_dout [3];
  logic [15:0] p16_din [16], p16_dout [16];
  logic        p3_ov, p3_il, p16_ov, p16_il;
  sra2d_partransposer #(.N(3))  u_p3  (.clk, .rst_n, .in_valid, .in_data(p3_din),
                                       .out_valid(p3_ov), .out_data(p3_dout), .iter_last(p3_il));
  sra2d_partransposer #(.N(16)) u_p16 (.clk, .rst_n, .in_valid, .in_data(p16_din),
                                       .out_valid(p16_ov), .out_data(p16_dout), .iter_last(p16_il));

  // allocation periods, in iterations, from the pointer tables
  int rc [6], rr [6], rp [6];
  rot_monitor #(.N(4),   .RW(2)) rm_s   (.clk, .rst_n, .map(u_s.u_core.map),   .changes(rc[0]), .returns(rr[0]), .period(rp[0]));
  rot_monitor #(.N(9),   .RW(4)) rm_t   (.clk, .rst_n, .map(u_t.u_core.map),   .changes(rc[1]), .returns(rr[1]), .period(rp[1]));
  rot_monitor #(.N(6),   .RW(3)) rm_p3  (.clk, .rst_n, .map(u_p3.u_core.map),  .changes(rc[2]), .returns(rr[2]), .period(rp[2]));
  rot_monitor #(.N(12),  .RW(4)) rm_p   (.clk, .rst_n, .map(u_p.u_core.map),   .changes(rc[3]), .returns(rr[3]), .period(rp[3]));
  rot_monitor #(.N(240), .RW(8)) rm_p16 (.clk, .rst_n, .map(u_p16.u_core.map), .changes(rc[4]), .returns(rr[4]), .period(rp[4]));
  rot_monitor #(.N(8),   .RW(3)) rm_d   (.clk, .rst_n, .map(u_d.u_core.map),   .changes(rc[5]), .returns(rr[5]), .period(rp[5]));
  localparam int P_PERIOD [6] = '{4, 6, 2, 2, 2, 2};
  localparam string P_NAME [6] = '{"3x3 transposer", "4x4 transposer", "3x3 par-transposer",
                                   "4x4 par-transposer", "16x16 par-transposer", "DWT converter"};

  // physical register (from 1) written by a lane, 0 for none
  function automatic int s_reg();
    if (u_s.u_core.wcode[0] >= 3'd4) return 0;
    return int'(u_s.u_core.map[u_s.u_core.wcode[0][1:0]]) + 1;
  endfunction

  function automatic int t_reg();
    if (u_t.u_core.wcode[0] >= 4'd9) return 0;
    return int'(u_t.u_core.map[u_t.u_core.wcode[0][3:0]]) + 1;
  endfunction

  function automatic int p_reg(int l);
    if (u_p.u_core.wcode[l] >= 5'd12) return 0;
    return int'(u_p.u_core.map[u_p.u_core.wcode[l][3:0]]) + 1;
  endfunction

  function automatic int d_reg(int l);
    if (u_d.u_core.wcode[l] >= 4'd8) return 0;
    return int'(u_d.u_core.map[u_d.u_core.wcode[l][2:0]]) + 1;
  endfunction

  function automatic int z_reg(int l);
    if (u_z.u_core.wcode[l] >= 4'd8) return 0;
    return int'(u_z.u_core.map[u_z.u_core.wcode[l][2:0]]) + 1;
  endfunction

  initial begin
    int got;
    for (int l = 0; l < 4; l++) p_din[l] = '0;
    for (int l = 0; l < 3; l++) p3_din[l] = '0;
    for (int l = 0; l < 16; l++) p16_din[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    in_valid = 1'b1;
    for (int c = 0; c < 120; c++) begin
      @(negedge clk);
      // 3x3 par-transposer in its second iteration: R3 and R5 swapped
      if (c == 3) begin
        checks++;
        for (int r = 0; r < 6; r++)
          if (int'(u_p3.u_core.map[r]) != ((r == 2) ? 4 : (r == 4) ? 2 : r)) begin
            failures++;
            $display("FAIL 3x3 par-transposer: logical R%0d is R%0d in iteration 2",
                     r + 1, int'(u_p3.u_core.map[r]) + 1);
          end
      end
      if (c >= 32) continue;
      got = t_reg();
      checks++;
      if (got != T_EXP[c]) begin
        failures++;
        $display("FAIL 4x4 transposer iteration %0d cycle %0d writes R%0d, table says R%0d",
                 c / 16 + 1, c % 16, got, T_EXP[c]);
      end
      if (c < 27) begin
        got = s_reg();
        checks++;
        if (got != S_EXP[c]) begin
          failures++;
          $display("FAIL 3x3 transposer iteration %0d cycle %0d writes R%0d, table says R%0d",
                   c / 9 + 1, c % 9, got, S_EXP[c]);
        end
      end
      for (int l = 0; l < 4; l++) begin
        if (c < 6) begin
          got = d_reg(l);
          checks++;
          if (got != D_EXP[4*c + l]) begin
            failures++;
            $display("FAIL DWT converter cycle %0d lane %0d writes R%0d, table says R%0d",
                     c, l, got, D_EXP[4*c + l]);
          end
        end
        if (c < 8) begin
          got = z_reg(l);
          checks++;
          if (got != Z_EXP[4*c + l]) begin
            failures++;
            $display("FAIL zigzag scanner cycle %0d lane %0d writes R%0d, table says R%0d",
                     c, l, got, Z_EXP[4*c + l]);
          end
        end
      end
      if (c < 5)
        for (int l = 0; l < 4; l++) begin
          got = p_reg(l);
          checks++;
          if (got != P_EXP[4*c + l]) begin
            failures++;
            $display("FAIL par-transposer cycle %0d lane %0d writes R%0d, table says R%0d",
                     c, l, got, P_EXP[4*c + l]);
          end
        end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (rp[k] != P_PERIOD[k]) begin
        failures++;
        $display("FAIL %s: allocation period %0d iterations, expected %0d", P_NAME[k], rp[k], P_PERIOD[k]);
      end
      $display("%s: period %0d iterations", P_NAME[k], rp[k]);
    end
    $display("transposer, par-transposer, DWT converter and zigzag schedules compared with the allocation tables");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
