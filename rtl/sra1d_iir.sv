// sra1d_iir -- folded IIR filter y(n) = a*y(n-3) + b*y(n-5) + x(n) whose
// delay line is a statically allocated register file.
//
// What it does
//   Filters a stream of signed samples. One multiplier and one adder are
//   shared over two clock cycles per sample (folding factor 2), so a new
//   sample is accepted every second cycle.
//
// How it works
//   Past outputs are not shifted through a delay line. Each y(n) is written
//   once into register hist[n mod 5] and stays there until its last use as
//   y(n-5), when the same register takes y(n+5). Cycle 0 of a sample forms
//   acc = x(n) + b*y(n-5) (y(n-5) is in the register about to be reused);
//   cycle 1 forms y(n) = acc + a*y(n-3) and writes it. Only one history
//   register is written per sample, which is the point of static allocation.
//   The filter equation and the use of static allocation for its storage
//   follow the SRA method; the folding schedule, the five-register history,
//   the number format and the handshake are this design's own.
//
// Number format
//   Samples are signed W-bit two's complement. Coefficients are signed W-bit
//   with CFRAC fraction bits; each product is shifted right arithmetically by
//   CFRAC and truncated to W bits; sums wrap around.
//
// Interface and timing
//   in_ready is high in cycle 0 of the schedule; a sample is taken when
//   in_valid && in_ready. y(n) is presented combinationally with out_valid
//   in the following cycle. Synchronous active-low reset clears the history
//   (zero initial conditions).

module sra1d_iir #(
  parameter int unsigned W     = 16,
  parameter int unsigned CFRAC = 14
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] coef_a,
  input  logic signed [W-1:0] coef_b,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic signed [W-1:0] in_x,
  output logic                out_valid,
  output logic signed [W-1:0] out_y
);

  localparam int unsigned NHIST = 5;   // y(n-1) .. y(n-5)

  logic                phase;          // 0: first half, 1: second half
  logic [2:0]          wptr;           // register of y(n), holds y(n-5) before
  logic signed [W-1:0] hist [NHIST];
  logic signed [W-1:0] acc;

  logic [2:0]            rptr3;        // register of y(n-3)
  logic signed [W-1:0]   mul_c, mul_d, add_a;
  logic signed [2*W-1:0] prod;
  logic signed [W-1:0]   prod_t, sum;

  always_comb begin
    rptr3  = (wptr >= 3'd3) ? wptr - 3'd3 : wptr + 3'd2;
    mul_c  = phase ? coef_a      : coef_b;
    mul_d  = phase ? hist[rptr3] : hist[wptr];
    prod   = mul_c * mul_d;
    prod_t = W'(prod >>> CFRAC);
    add_a  = phase ? acc : in_x;
    sum    = add_a + prod_t;
  end

  assign in_ready  = !phase;
  assign out_valid = phase;
  assign out_y     = sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= 1'b0;
      wptr  <= '0;
      acc   <= '0;
      for (int i = 0; i < int'(NHIST); i++) hist[i] <= '0;
    end else if (phase) begin
      hist[wptr] <= sum;
      wptr       <= (wptr == 3'(NHIST - 1)) ? '0 : wptr + 3'd1;
      phase      <= 1'b0;
    end else if (in_valid) begin
      acc   <= sum;
      phase <= 1'b1;
    end
  end

endmodule
