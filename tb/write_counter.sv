// write_counter -- counts register writes (transitions) per block of a
// static-register-allocation converter.
//
// Watches the per-lane write codes of a converter's schedule (a code below
// NREG writes a register, NREG and above means no write) on the falling
// clock edge of every advancing cycle. At each iteration end it closes the
// block's count. When EXP is not negative, every block must have exactly
// EXP writes; a block with a different count is reported and counted in
// bad_blocks. first_count keeps the count of the first block for reports.

module write_counter #(
  parameter int unsigned LANES = 1,
  parameter int unsigned NREG  = 4,
  parameter int unsigned RW    = 3,
  parameter int          EXP   = -1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          iter_last,
  input  logic [RW-1:0] wcode [LANES],
  output int            blocks,
  output int            bad_blocks,
  output int            first_count
);
  int cnt;

  initial begin
    blocks = 0; bad_blocks = 0; first_count = -1; cnt = 0;
  end

  always @(negedge clk) begin
    if (!rst_n) begin
      cnt = 0;
    end else if (in_valid) begin
      for (int l = 0; l < int'(LANES); l++)
        if (wcode[l] < RW'(NREG)) cnt++;
      if (iter_last) begin
        if (blocks == 0) first_count = cnt;
        if (EXP >= 0 && cnt != EXP) begin
          bad_blocks++;
          if (bad_blocks < 5) $display("FAIL block %0d has %0d register writes, expected %0d", blocks, cnt, EXP);
        end
        blocks++;
        cnt = 0;
      end
    end
  end
endmodule
