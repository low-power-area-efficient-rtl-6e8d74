// stream_driver -- random stimulus for a stream data format converter.
//
// After reset is released it offers LANES random words per cycle; in about
// one cycle in STALL_ONE_IN it holds in_valid low instead (a stall). It stops
// after TARGET advancing cycles, raises done and reports how many stall
// cycles it inserted. Inputs change 1 time unit after the rising edge.

module stream_driver #(
  parameter int unsigned W            = 16,
  parameter int unsigned LANES        = 1,
  parameter int unsigned TARGET       = 100,
  parameter int unsigned STALL_ONE_IN = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         in_valid,
  output logic [W-1:0] in_data [LANES],
  output logic         done,
  output int           stalls
);
  initial begin
    int sent;
    sent     = 0;
    stalls   = 0;
    done     = 1'b0;
    in_valid = 1'b0;
    for (int l = 0; l < int'(LANES); l++) in_data[l] = '0;
    @(posedge rst_n);
    while (sent < int'(TARGET)) begin
      @(posedge clk); #1;
      in_valid = ($urandom_range(0, STALL_ONE_IN - 1) != 0);
      for (int l = 0; l < int'(LANES); l++) in_data[l] = W'($urandom);
      if (in_valid) sent++;
      else          stalls++;
    end
    @(posedge clk); #1;
    in_valid = 1'b0;
    done     = 1'b1;
  end
endmodule
