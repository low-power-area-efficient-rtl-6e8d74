// tb_sra1d_iir -- self-checking test of the folded IIR filter.
//
// Feeds random samples with random idle cycles under three coefficient sets
// (reset between sets) and compares every y(n) with a reference recursion
// y(n) = a*y(n-3) + b*y(n-5) + x(n) evaluated in the testbench with the same
// fixed-point rules (products shifted right by 14 and truncated to 16 bits,
// sums modulo 2^16). It also checks the folded rate: in_ready only every
// second cycle, and y(n) one cycle after x(n) is taken.

module tb_sra1d_iir;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] coef_a, coef_b, in_x, out_y;
  logic in_valid = 1'b0, in_ready, out_valid;
  int checks = 0, failures = 0, samples = 0, stalls = 0;

  sra1d_iir dut (.clk, .rst_n, .coef_a, .coef_b, .in_valid, .in_ready, .in_x, .out_valid, .out_y);

  logic signed [15:0] yref [$];
  logic signed [15:0] xq [$];
  bit   took;   // a sample was accepted at the last edge

  function automatic logic signed [15:0] fx(logic signed [15:0] c, logic signed [15:0] v);
    logic signed [31:0] p;
    p = c * v;
    return 16'(p >>> 14);
  endfunction

  function automatic logic signed [15:0] yat(int back);
    if (yref.size() < back) return 16'sd0;
    return yref[yref.size() - back];
  endfunction

  // sample on the falling edge: outputs and inputs are settled
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== took) begin
        failures++;
        $display("FAIL out_valid=%0d, expected %0d", out_valid, took);
      end
      if (out_valid && took) begin
        logic signed [15:0] e;
        e = fx(coef_a, yat(3)) + fx(coef_b, yat(5)) + xq.pop_front();
        checks++;
        if (out_y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL y(%0d) = %0d, expected %0d", yref.size(), out_y, e);
        end
        yref.push_back(e);
        checks++;
        if (in_ready !== 1'b0) begin failures++; $display("FAIL ready while busy"); end
      end else if (took) begin
        xq.delete();
      end
      // not busy with an output: the filter must take a sample
      if (!took) begin
        checks++;
        if (in_ready !== 1'b1) begin
          failures++;
          if (failures < 10) $display("FAIL in_ready low while idle");
        end
      end
      if (in_valid && in_ready) begin
        xq.push_back(in_x);
        samples++;
        took = 1'b1;
      end else begin
        if (in_valid && !in_ready) stalls++;
        took = 1'b0;
      end
    end else begin
      took = 1'b0;
    end
  end

  localparam logic signed [15:0] CA [3] = '{16'sd8192, -16'sd6000, 16'sd15000};
  localparam logic signed [15:0] CB [3] = '{-16'sd4096, 16'sd3000, -16'sd9000};

  initial begin
    in_x = '0;
    for (int set = 0; set < 3; set++) begin
      coef_a = CA[set];
      coef_b = CB[set];
      rst_n = 1'b0;
      yref.delete();
      xq.delete();
      repeat (3) @(posedge clk);
      #1 rst_n = 1'b1;
      repeat (400) begin
        @(posedge clk); #1;
        in_valid = ($urandom_range(0, 3) != 0);
        in_x     = 16'($signed($urandom_range(0, 8191)) - 4096);
      end
      @(posedge clk); #1;
      in_valid = 1'b0;
      repeat (3) @(posedge clk);
    end
    checks++;
    if (samples < 300 || stalls == 0) begin
      failures++;
      $display("FAIL only %0d samples, %0d refused offers", samples, stalls);
    end
    $display("%0d samples filtered, %0d offers refused while busy", samples, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
