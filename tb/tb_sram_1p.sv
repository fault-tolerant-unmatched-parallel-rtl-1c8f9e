// Self-checking testbench of sram_1p (DEPTH 16, 12-bit words).
//
// Random writes, asynchronous reads and upsets are applied against a shadow
// array kept in the testbench; every read must match it. A write and an upset
// to the same word in one cycle must give the written data with the upset.
module tb_sram_1p;
  localparam int W = 12, DEPTH = 16, AW = 4;

  logic clk = 1'b0;
  logic we = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] addr = '0, upset_addr = '0;
  logic [W-1:0] wdata = '0, upset_mask = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sram_1p #(.W(W), .DEPTH(DEPTH)) dut (.clk, .we, .addr, .wdata, .rdata, .upset_en, .upset_addr, .upset_mask);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; addr = AW'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check a read of a random word (asynchronous)
      we = 1'b0; upset_en = 1'b0;
      addr = AW'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL read a=%0d %h exp %h", addr, rdata, shadow[addr]); end
      // next edge: maybe write, maybe upset (possibly the same word)
      we = ($urandom_range(0, 2) == 0);
      wdata = W'($urandom);
      upset_en = ($urandom_range(0, 2) == 0);
      upset_addr = (n % 4 == 0) ? addr : AW'($urandom);
      upset_mask = W'($urandom_range(1, (1 << W) - 1));
      @(posedge clk);
      #1;
      if (we) shadow[addr] = wdata;
      if (upset_en) shadow[upset_addr] = shadow[upset_addr] ^ upset_mask;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
