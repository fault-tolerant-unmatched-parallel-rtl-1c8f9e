// Self-checking testbench of sample_packer (4 filters, 8 samples of 8 bits,
// 32-bit words).
//
// Sends blocks of random samples with random gaps in in_valid and random ECS
// flags. One cycle after the eighth sample out_valid must pulse once, word
// 2f of filter f must hold samples 0..3 (sample 0 in the low byte) and word
// 2f+1 samples 4..7, and ecs_flags must hold the eight flags. out_valid must
// stay low at every other time.
module tb_sample_packer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_err = 1'b0;
  logic [3:0][7:0] samp = '0;
  logic out_valid;
  logic [7:0][31:0] words;
  logic [7:0] ecs_flags;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_packer dut (.clk, .rst_n, .in_valid, .samp, .in_err, .out_valid, .words, .ecs_flags);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] s [4][8];
    logic [7:0] fl;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < 200; b++) begin
      for (int k = 0; k < 8; k++) begin
        // random idle cycles
        while ($urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
          checks++;
          if (out_valid && k != 0) begin failures++; $display("FAIL out_valid during block"); end
        end
        in_valid = 1'b1;
        for (int f = 0; f < 4; f++) begin s[f][k] = 8'($urandom); samp[f] = s[f][k]; end
        fl[k] = ($urandom_range(0, 3) == 0);
        in_err = fl[k];
        @(negedge clk);
        checks++;
        if (k == 7) begin
          if (!out_valid) begin failures++; $display("FAIL no out_valid after block %0d", b); end
          for (int f = 0; f < 4; f++) begin
            checks += 2;
            if (words[2*f] !== {s[f][3], s[f][2], s[f][1], s[f][0]}) begin
              failures++; $display("FAIL block %0d filter %0d word 0 = %h", b, f, words[2*f]);
            end
            if (words[2*f+1] !== {s[f][7], s[f][6], s[f][5], s[f][4]}) begin
              failures++; $display("FAIL block %0d filter %0d word 1 = %h", b, f, words[2*f+1]);
            end
          end
          checks++;
          if (ecs_flags !== fl) begin failures++; $display("FAIL flags %b exp %b", ecs_flags, fl); end
        end else if (out_valid && k != 0) begin
          failures++; $display("FAIL early out_valid");
        end
      end
    end
    in_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than a cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
