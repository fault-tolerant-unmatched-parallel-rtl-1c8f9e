// Testbench of ft_filter_bank_top with DEPTH = 4 blocks per memory.
//
// Streams 6 blocks of random input (without filter faults, no idle cycles)
// so that the write address wraps, checks wr_addr for every block, then reads
// all four addresses back: they must hold blocks 4, 5, 2 and 3 as computed by
// a reference convolution. Before reading, address 2 gets a 4-bit upset in
// every memory; only reads of address 2 may report mem_err. Counts the
// address wrap and the corrected reads; either missing is a failure.
module tb_ft_filter_bank_top_depth;
  import ft_pkg::*;

  localparam int DEPTH = 4, NBLK = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic [7:0] x = '0;
  logic [5:0][7:0] flt_fault = '0;
  logic y_valid, ecs_err, blk_valid, rd_ready, rd_en = 1'b0, rd_valid;
  logic [3:0][7:0] y_corr;
  ecs_loc_e ecs_loc;
  logic [3:0] ecs_filt_err;
  logic [7:0] ecs_z1, ecs_z2, blk_ecs_flags, mem_err;
  logic [1:0] wr_addr, rd_addr = '0, upset_addr = '0;
  logic [3:0][7:0][7:0] rd_samp;
  logic [7:0][7:0] mem_sym_err;
  logic [7:0] upset_en = '0;
  logic [7:0][31:0] upset_info_mask = '0;
  logic [7:0][35:0] upset_red_mask = '0;

  int checks = 0, failures = 0, n_wrap = 0, n_fixed = 0;

  always #5 clk = ~clk;

  ft_filter_bank_top #(.DEPTH(DEPTH)) dut (.*);

  int hist [4];
  localparam coef_t HREF [4] = '{H1, H2, H3, H4};
  logic [7:0] stored [DEPTH][4][8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < 8; k++) begin
        x_valid = 1'b1;
        x = 8'($urandom);
        for (int t = 3; t > 0; t--) hist[t] = hist[t-1];
        hist[0] = int'(x);
        for (int f = 0; f < 4; f++) begin
          int s;
          s = 0;
          for (int t = 0; t < 4; t++) s += int'(HREF[f][t]) * hist[t];
          stored[b % DEPTH][f][k] = 8'(s);
        end
        @(negedge clk);
      end
      x_valid = 1'b0;
      @(negedge clk);
      check(blk_valid, "block valid");
      check(int'(wr_addr) == b % DEPTH, $sformatf("wr_addr of block %0d", b));
      if (b > 0 && wr_addr == 0) n_wrap++;
    end
    @(negedge clk);
    // upset address 2 in every memory
    upset_en = '1;
    upset_addr = 2'd2;
    for (int m = 0; m < 8; m++) upset_info_mask[m] = 32'hF << (4 * (m % 8));
    @(negedge clk);
    upset_en = '0;
    for (int a = 0; a < DEPTH; a++) begin
      rd_en = 1'b1;
      rd_addr = 2'(a);
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_valid, "read valid");
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < 8; k++)
          check(rd_samp[f][k] == stored[a][f][k], $sformatf("addr %0d filter %0d sample %0d", a, f, k));
      check(mem_err == ((a == 2) ? 8'hFF : 8'h00), $sformatf("mem_err at addr %0d", a));
      if (a == 2 && mem_err == 8'hFF) n_fixed++;
    end
    check(n_wrap > 0, "write address wrapped");
    check(n_fixed > 0, "upsets at one address corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
