// Self-checking testbench of fir_filter.
//
// Drives a random input stream with random gaps in x_valid into a filter with
// the default impulse response and into one with an overridden response, and
// compares every output with a reference convolution kept in the testbench
// (sum of coefficient times delayed input, modulo 256). Also checks that an
// output appears exactly one cycle after its input (y_valid) and that reset
// clears the delay line.
module tb_fir_filter;
  import ft_pkg::*;

  localparam logic [3:0][7:0] C_ALT = {8'd7, 8'd0, 8'd5, 8'd9};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic [7:0] x = '0;
  logic [7:0] y_a, y_b;
  logic yv_a, yv_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fir_filter dut_a (.clk, .rst_n, .x_valid, .x, .y(y_a), .y_valid(yv_a));
  fir_filter #(.COEF(C_ALT)) dut_b (.clk, .rst_n, .x_valid, .x, .y(y_b), .y_valid(yv_b));

  // reference history, newest first
  int hist [4];
  int exp_a, exp_b;
  logic exp_valid;

  function automatic int ref_out(logic [3:0][7:0] c);
    int s = 0;
    for (int k = 0; k < 4; k++) s += int'(c[k]) * hist[k];
    return s & 255;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    exp_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // check what the previous edge produced
      if (yv_a !== exp_valid || yv_b !== exp_valid) begin
        failures++;
        $display("FAIL n=%0d y_valid=%b expected %b", n, yv_a, exp_valid);
      end
      checks++;
      if (exp_valid) begin
        checks += 2;
        if (y_a !== exp_a[7:0]) begin failures++; $display("FAIL n=%0d y_a=%0d exp %0d", n, y_a, exp_a); end
        if (y_b !== exp_b[7:0]) begin failures++; $display("FAIL n=%0d y_b=%0d exp %0d", n, y_b, exp_b); end
      end
      // drive a new input
      x_valid = ($urandom_range(0, 3) != 0);
      x = 8'($urandom);
      if (n == 200) begin
        // reset in the middle: history cleared
        rst_n = 1'b0;
        @(negedge clk);
        rst_n = 1'b1;
        foreach (hist[k]) hist[k] = 0;
        exp_valid = 1'b0;
        x_valid = 1'b1;
      end
      exp_valid = x_valid;
      if (x_valid) begin
        for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x);
        exp_a = ref_out(H1);
        exp_b = ref_out(C_ALT);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
