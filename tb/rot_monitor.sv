// rot_monitor -- watches the register pointer table of a converter's control.
//
// The table map[r] names the physical register that plays logical register
// r in the current iteration. The monitor counts, on the falling clock edge,
// how often the table changed (a rotation at an iteration boundary) and how
// often it came back to the identity after having left it (one full
// allocation period completed). period is the number of changes up to the
// first return, i.e. the allocation period in iterations (0 until then).

module rot_monitor #(
  parameter int unsigned N  = 4,
  parameter int unsigned RW = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] map [N],
  output int            changes,
  output int            returns,
  output int            period
);
  logic [RW-1:0] prev [N];
  bit            away;

  initial begin
    changes = 0;
    returns = 0;
    period  = 0;
    away    = 1'b0;
    for (int r = 0; r < int'(N); r++) prev[r] = RW'(r);
  end

  always @(negedge clk) begin
    if (rst_n) begin
      bit diff, ident;
      diff  = 1'b0;
      ident = 1'b1;
      for (int r = 0; r < int'(N); r++) begin
        if (map[r] !== prev[r]) diff = 1'b1;
        if (map[r] !== RW'(r))  ident = 1'b0;
        prev[r] = map[r];
      end
      if (diff) changes++;
      if (ident && away) begin
        if (returns == 0) period = changes;
        returns++;
      end
      away = !ident;
    end
  end
endmodule
