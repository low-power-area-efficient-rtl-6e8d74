// dfc_scoreboard -- reference checker for stream data format converters.
//
// Watches the input and output of a converter that takes LANES words per
// advancing cycle and returns them reordered: output position j of every
// block of CI*LANES words carries input word PERM[j] of the same block. The
// first output must appear exactly LAT advancing cycles after the first
// input and every advancing cycle after that. Everything is sampled on the
// falling clock edge, when the driver's inputs and the converter's
// combinational outputs are settled. Counts checks, failures, bypassed words
// (words that leave in the cycle they arrive) and finished iterations.

module dfc_scoreboard #(
  parameter int unsigned W     = 16,
  parameter int unsigned LANES = 1,
  parameter int unsigned CI    = 9,
  parameter int unsigned LAT   = 4,
  parameter logic [CI*LANES*16-1:0] PERM = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data  [LANES],
  input  logic         out_valid,
  input  logic [W-1:0] out_data [LANES],
  input  logic         iter_last,
  output int           checks,
  output int           failures,
  output int           bypasses,
  output int           iters,
  output int           words
);
  localparam int unsigned NS = CI * LANES;

  logic [W-1:0] mem [int];
  int adv;

  initial begin
    checks = 0; failures = 0; bypasses = 0; iters = 0; words = 0; adv = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      adv = 0;
    end else if (in_valid) begin
      for (int l = 0; l < int'(LANES); l++) mem[adv*int'(LANES) + l] = in_data[l];
      // output valid exactly from the LAT-th advancing cycle on
      checks++;
      if (out_valid !== (adv >= int'(LAT))) begin
        failures++;
        $display("FAIL out_valid=%0d at advancing cycle %0d (latency %0d)", out_valid, adv, LAT);
      end
      if (adv >= int'(LAT)) begin
        for (int m = 0; m < int'(LANES); m++) begin
          int h, blk, j, src;
          h   = (adv - int'(LAT)) * int'(LANES) + m;
          blk = h / int'(NS);
          j   = h % int'(NS);
          src = blk * int'(NS) + int'(PERM[16*j +: 16]);
          if (src / int'(LANES) == adv) bypasses++;
          checks++;
          words++;
          if (out_data[m] !== mem[src]) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d lane %0d: got %h expected %h (input word %0d)",
                       adv, m, out_data[m], mem[src], src);
          end
          if (src >= 0) mem.delete(src);
        end
      end
      // iteration marker on the last cycle of each block
      checks++;
      if (iter_last !== ((adv % int'(CI)) == int'(CI) - 1)) begin
        failures++;
        $display("FAIL iter_last at advancing cycle %0d", adv);
      end
      if (iter_last) iters++;
      adv++;
    end else begin
      checks++;
      if (out_valid !== 1'b0) begin
        failures++;
        $display("FAIL out_valid during stall");
      end
    end
  end
endmodule
