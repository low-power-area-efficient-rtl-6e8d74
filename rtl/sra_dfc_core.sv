// sra_dfc_core -- static-register-allocation (SRA) data format converter engine.
//
// What it does
//   Reorders a stream of words. Every cycle LANES words enter (input slot
//   x = cycle*LANES + lane of the current iteration) and LANES words leave in
//   the order given by OPERM: output position j carries input slot OPERM[j].
//   One iteration is CI cycles. The first output leaves D cycles after the
//   first input, where D is the smallest latency that keeps the converter
//   causal; D*LANES registers are used, which is the lifetime-analysis minimum.
//
// How it works
//   Static allocation: a word is written into one register and stays there
//   until it is read out; words never move between registers. Every register
//   takes its D input from one of the input lanes and has its own write
//   enable; every output lane is a multiplexer over all registers plus the
//   input lanes (bypass for a word that leaves in the cycle it arrives).
//   The allocation is computed at elaboration by constant functions that run
//   the SRA rules on the output order:
//     * the first D cycles of the first iteration fill registers in ascending
//       order;
//     * afterwards a word goes into a register freed in the same cycle,
//       shorter lifetime to lower register index;
//     * at an iteration boundary a word keeps the register its counterpart of
//       the last iteration used when that register is free; otherwise it
//       takes the remaining freed registers in ascending order.
//   Iteration k therefore uses the first iteration's assignment renamed by a
//   fixed register permutation RHO applied k-1 times (RHO is a product of
//   rotations inside register groups). The control unit holds a pointer table
//   map[r] = RHO^(k-1)(r): the per-cycle write and read codes come from small
//   tables indexed by the cycle within the iteration and are translated
//   through map; at the end of every iteration map[r] <= map[RHO[r]], a fixed
//   wiring permutation that plays the role of rotating the group control
//   bits by one position per iteration.
//   The allocation rules, the register count, the input-driven register bank
//   and the rotating control follow the SRA method; the pointer-table form of
//   the control unit, the stall input and the reset are this design's own.
//
// Interface and timing
//   in_valid high advances the schedule by one cycle: the input words are
//   taken, registers written at the clock edge. With in_valid low nothing
//   changes (stall). out_data is combinational in the same cycle; out_valid
//   is in_valid once the first D cycles after reset have passed. iter_last
//   marks the last cycle of each iteration. rst_n is synchronous, active low.
//   OPERM entries are 16 bits wide, entry j at bits [16*j +: 16].

module sra_dfc_core #(
  parameter int unsigned W     = 16,
  parameter int unsigned LANES = 1,
  parameter int unsigned CI    = 9,
  // default: 3x3 transposer, one word per cycle
  parameter logic [CI*LANES*16-1:0] OPERM =
    {16'd8, 16'd5, 16'd2, 16'd7, 16'd4, 16'd1, 16'd6, 16'd3, 16'd0}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [LANES],
  output logic         out_valid,
  output logic [W-1:0] out_data [LANES],
  output logic         iter_last
);

  localparam int unsigned NS = CI * LANES;   // words per iteration

  function automatic int unsigned operm_at(int unsigned j);
    return int'(OPERM[16*j +: 16]);
  endfunction

  // latency in cycles between input slot 0 and output position 0
  function automatic int unsigned calc_d();
    int unsigned d = 0;
    for (int unsigned j = 0; j < NS; j++) begin
      int unsigned tin = operm_at(j) / LANES;
      int unsigned tq  = j / LANES;
      if (tin > tq && tin - tq > d) d = tin - tq;
    end
    return d;
  endfunction

  localparam int unsigned D    = calc_d();
  localparam int unsigned NREG = (D * LANES > 0) ? D * LANES : 1;
  localparam int unsigned RW   = $clog2(NREG + LANES + 1);   // code width
  localparam int unsigned PW   = (CI > 1) ? $clog2(CI) : 1;
  localparam int unsigned IW   = (NREG > 1) ? $clog2(NREG) : 1;     // register index
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1;   // lane index
  localparam int unsigned TABW = (2 * NS + NREG) * 16;

  // Packed result of the allocation:
  //   entry c*LANES+l          write code of lane l in cycle c (NREG = no write)
  //   entry NS + c*LANES+m     read code of output lane m in cycle c
  //                            (< NREG: logical register, NREG+l: input lane l)
  //   entry 2*NS + r           RHO[r]
  function automatic logic [TABW-1:0] build();
    logic [TABW-1:0] t;
    int outpos [NS];
    int tout   [NS];
    int breg   [NS];
    int rho    [NREG];
    int wr     [NS];
    int rd     [NS];
    int wl     [LANES];   // writers of a cycle (slot numbers)
    int fr     [LANES];   // freed registers of a cycle
    int fm     [LANES];   // output lane that freed each register
    bit used   [LANES];
    bit done   [LANES];
    int nw, nf, tmp, nxt;
    for (int e = 0; e < int'(2*NS + NREG); e++) t[16*e +: 16] = 16'd0;
    for (int j = 0; j < int'(NS); j++) outpos[operm_at(j)] = j;
    for (int x = 0; x < int'(NS); x++) begin
      tout[x] = int'(D) + outpos[x] / int'(LANES);
      breg[x] = -1;
      wr[x]   = int'(NREG);
      rd[x]   = int'(NREG);
    end
    for (int r = 0; r < int'(NREG); r++) rho[r] = r;
    nxt = 0;
    // ---- first iteration
    for (int c = 0; c < int'(CI); c++) begin
      if (c < int'(D)) begin
        for (int l = 0; l < int'(LANES); l++) begin
          breg[c*int'(LANES)+l] = nxt;
          nxt++;
        end
      end else begin
        nf = 0;
        for (int m = 0; m < int'(LANES); m++) begin
          int x;
          x = operm_at((c - int'(D)) * int'(LANES) + m);
          if (x / int'(LANES) == c) rd[c*int'(LANES)+m] = int'(NREG) + x % int'(LANES);
          else begin
            rd[c*int'(LANES)+m] = breg[x];
            fr[nf] = breg[x];
            nf++;
          end
        end
        nw = 0;
        for (int l = 0; l < int'(LANES); l++)
          if (tout[c*int'(LANES)+l] != c) begin
            wl[nw] = c*int'(LANES) + l;
            nw++;
          end
        // writers by lifetime, freed registers ascending
        for (int a = 0; a < nw; a++)
          for (int b = 0; b + 1 < nw - a; b++)
            if (tout[wl[b]] > tout[wl[b+1]]) begin
              tmp = wl[b]; wl[b] = wl[b+1]; wl[b+1] = tmp;
            end
        for (int a = 0; a < nf; a++)
          for (int b = 0; b + 1 < nf - a; b++)
            if (fr[b] > fr[b+1]) begin
              tmp = fr[b]; fr[b] = fr[b+1]; fr[b+1] = tmp;
            end
        for (int a = 0; a < nw; a++) breg[wl[a]] = fr[a];
      end
    end
    // ---- iteration boundary: cycles 0..D-1 read the last iteration's words
    for (int c = 0; c < int'(D); c++) begin
      for (int m = 0; m < int'(LANES); m++) begin
        fr[m]   = breg[operm_at((int'(CI) - int'(D) + c) * int'(LANES) + m)];
        fm[m]   = m;
        used[m] = 1'b0;
        wl[m]   = c*int'(LANES) + m;
        done[m] = 1'b0;
      end
      for (int a = 0; a < int'(LANES); a++)
        for (int b = 0; b + 1 < int'(LANES) - a; b++) begin
          if (tout[wl[b]] > tout[wl[b+1]]) begin
            tmp = wl[b]; wl[b] = wl[b+1]; wl[b+1] = tmp;
          end
          if (fr[b] > fr[b+1]) begin
            tmp = fr[b]; fr[b] = fr[b+1]; fr[b+1] = tmp;
            tmp = fm[b]; fm[b] = fm[b+1]; fm[b+1] = tmp;
          end
        end
      // keep the register of the last iteration when it is freed now
      for (int a = 0; a < int'(LANES); a++)
        for (int f = 0; f < int'(LANES); f++)
          if (!done[a] && !used[f] && fr[f] == breg[wl[a]]) begin
            rho[breg[wl[a]]]      = fr[f];
            rd[c*int'(LANES)+fm[f]] = breg[wl[a]];
            done[a] = 1'b1;
            used[f] = 1'b1;
          end
      // the rest in ascending register order
      for (int a = 0; a < int'(LANES); a++)
        if (!done[a])
          for (int f = 0; f < int'(LANES); f++)
            if (!done[a] && !used[f]) begin
              rho[breg[wl[a]]]        = fr[f];
              rd[c*int'(LANES)+fm[f]] = breg[wl[a]];
              done[a] = 1'b1;
              used[f] = 1'b1;
            end
    end
    for (int x = 0; x < int'(NS); x++)
      if (breg[x] >= 0) wr[x] = breg[x];
    for (int e = 0; e < int'(NS); e++) begin
      t[16*e +: 16]        = 16'(wr[e]);
      t[16*(NS+e) +: 16]   = 16'(rd[e]);
    end
    for (int r = 0; r < int'(NREG); r++) t[16*(2*NS+r) +: 16] = 16'(rho[r]);
    return t;
  endfunction

  localparam logic [TABW-1:0] TAB = build();

  // ---------------------------------------------------------------- control
  logic [PW-1:0] phase;
  logic          primed;          // first D cycles after reset have passed
  logic [IW-1:0] map [NREG];      // logical -> physical register

  wire last = (phase == PW'(CI - 1));
  assign iter_last = in_valid && last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase  <= '0;
      primed <= (D == 0);
      for (int r = 0; r < int'(NREG); r++) map[r] <= IW'(r);
    end else if (in_valid) begin
      phase <= last ? '0 : phase + 1'b1;
      if (phase == PW'(D - 1) || last) primed <= 1'b1;
      if (last)
        for (int r = 0; r < int'(NREG); r++)
          map[r] <= map[TAB[16*(2*NS + r) +: IW]];
    end
  end

  // --------------------------------------------------------------- datapath
  logic [W-1:0]  regs  [NREG];
  logic [RW-1:0] wcode [LANES];
  logic [RW-1:0] rcode [LANES];

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      wcode[l] = TAB[16*(int'(phase)*int'(LANES) + l) +: RW];
      rcode[l] = TAB[16*(int'(NS) + int'(phase)*int'(LANES) + l) +: RW];
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int l = 0; l < int'(LANES); l++)
        if (wcode[l] < RW'(NREG)) regs[map[IW'(wcode[l])]] <= in_data[l];
  end

  always_comb begin
    for (int m = 0; m < int'(LANES); m++) begin
      if (rcode[m] < RW'(NREG)) out_data[m] = regs[map[IW'(rcode[m])]];
      else                      out_data[m] = in_data[LW'(rcode[m] - RW'(NREG))];
    end
  end

  assign out_valid = in_valid && (primed || phase >= PW'(D));

  // two lanes never write the same register in one cycle
  always_ff @(posedge clk) begin
    if (rst_n && in_valid)
      for (int a = 0; a < int'(LANES); a++)
        for (int b = a + 1; b < int'(LANES); b++)
          assert (!(wcode[a] < RW'(NREG) && wcode[b] < RW'(NREG) &&
                    map[IW'(wcode[a])] == map[IW'(wcode[b])]))
            else $error("sra_dfc_core: write conflict");
  end

endmodule
