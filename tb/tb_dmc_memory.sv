// Self-checking testbench of dmc_memory (DEPTH 8).
//
// Writes random words, injects soft errors into the stored information and
// check bits through the upset ports, reads back and compares with the
// written words. Error patterns: none, any pattern inside one 4-bit symbol,
// two symbols whose columns differ in parity (covers a burst across two
// neighbouring symbols, up to 8 flipped cells), check bits only. Each read
// must return the written word one cycle after re, with err set exactly when
// cells were flipped. Every word is rewritten before it is upset, so upsets
// do not pile up beyond one pattern per word. Reads and writes are interleaved, so the shared encoder
// switches role from cycle to cycle.
module tb_dmc_memory;
  import ft_pkg::*;
  localparam int DEPTH = 8, AW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] addr = '0, upset_addr = '0;
  logic [31:0] wdata = '0, rdata, upset_info_mask = '0;
  logic [35:0] upset_red_mask = '0;
  logic rvalid, err;
  logic [7:0] sym_err;
  logic [31:0] shadow [DEPTH];
  logic        dirty [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dmc_memory #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .we, .re, .addr, .wdata, .rdata, .rvalid, .err,
                                   .sym_err, .upset_en, .upset_addr, .upset_info_mask, .upset_red_mask);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_write(int a, logic [31:0] w);
    @(negedge clk);
    we = 1'b1; re = 1'b0; addr = AW'(a); wdata = w;
    shadow[a] = w; dirty[a] = 1'b0;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic do_upset(int a, logic [31:0] dm, logic [35:0] rm);
    @(negedge clk);
    upset_en = 1'b1; upset_addr = AW'(a); upset_info_mask = dm; upset_red_mask = rm;
    dirty[a] = (dm != 0) || (rm != 0);
    @(negedge clk);
    upset_en = 1'b0;
  endtask

  task automatic do_read(int a);
    @(negedge clk);
    re = 1'b1; addr = AW'(a);
    @(negedge clk);
    re = 1'b0;
    checks += 3;
    if (!rvalid) begin failures++; $display("FAIL rvalid not one cycle after re"); end
    if (rdata !== shadow[a]) begin failures++; $display("FAIL a=%0d rdata=%h exp %h", a, rdata, shadow[a]); end
    if (err !== dirty[a]) begin failures++; $display("FAIL a=%0d err=%b exp %b", a, err, dirty[a]); end
    @(negedge clk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL rvalid stays high"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) do_write(a, $urandom);
    for (int n = 0; n < 1500; n++) begin
      int a, s1, s2;
      logic [31:0] dm;
      logic [35:0] rm;
      a = $urandom_range(0, DEPTH - 1);
      dm = '0; rm = '0;
      case (n % 5)
        0: ;
        1, 2: begin
          s1 = $urandom_range(0, 7);
          dm = 32'($urandom_range(1, 15)) << (4 * s1);
        end
        3: begin
          s1 = $urandom_range(0, 7);
          do s2 = $urandom_range(0, 7); while ((s1 % 2) == (s2 % 2));
          dm = (32'($urandom_range(1, 15)) << (4 * s1)) | (32'($urandom_range(1, 15)) << (4 * s2));
        end
        default: rm = ($urandom_range(0, 1) == 0) ? {20'($urandom_range(1, 20'hFFFFF)), 16'h0}
                                                  : {20'h0, 16'($urandom_range(1, 16'hFFFF))};
      endcase
      do_write(a, $urandom);
      do_upset(a, dm, rm);
      do_read(a);
      // a different word stays intact
      do_read((a + 1) % DEPTH);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
