// End-to-end testbench of ft_filter_bank_top at its default parameters.
//
// A random input stream (with idle cycles) runs through the whole bank for
// NBLK blocks of 8 samples. A reference model in the testbench convolves the
// input with h1..h4. Faults are injected as in the case study:
//   - a single faulty filter (any of h1..h4, or a redundant one) on chosen
//     samples: the ECS must flag it, name it and the corrected samples must
//     equal the reference
//   - two faulty filters on one sample: flagged, passed on uncorrected
//   - soft errors in the stored words after each block write: a 4-bit upset
//     in memory y11, an 8-bit burst over two symbols in memory y42, check-bit
//     upsets in memory y21; the read-back samples must equal what was
//     written and mem_err must name exactly the upset memories
//   - a read requested in the cycle of a block write must be held off
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_ft_filter_bank_top;
  import ft_pkg::*;

  localparam int NBLK = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid = 1'b0;
  logic [7:0] x = '0;
  logic [5:0][7:0] flt_fault = '0;
  logic y_valid, ecs_err, blk_valid, rd_ready, rd_en = 1'b0, rd_valid;
  logic [3:0][7:0] y_corr;
  ecs_loc_e ecs_loc;
  logic [3:0] ecs_filt_err;
  logic [7:0] ecs_z1, ecs_z2, blk_ecs_flags, mem_err;
  logic [0:0] wr_addr, rd_addr = '0, upset_addr = '0;
  logic [3:0][7:0][7:0] rd_samp;
  logic [7:0][7:0] mem_sym_err;
  logic [7:0] upset_en = '0;
  logic [7:0][31:0] upset_info_mask = '0;
  logic [7:0][35:0] upset_red_mask = '0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fix [4];
  int n_r5 = 0, n_r6 = 0, n_uncorr = 0, n_clean = 0;
  int n_mem_fix = 0, n_mem_chk = 0, n_rd_held = 0, n_idle = 0;

  always #5 clk = ~clk;

  ft_filter_bank_top dut (.*);

  // reference filters
  int hist [4];
  localparam coef_t HREF [4] = '{H1, H2, H3, H4};
  function automatic logic [7:0] ref_y(int f);
    int s = 0;
    for (int k = 0; k < 4; k++) s += int'(HREF[f][k]) * hist[k];
    return 8'(s);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_blk [4][8];
    logic [7:0] exp_flags;
    foreach (n_fix[i]) n_fix[i] = 0;
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int b = 0; b < NBLK; b++) begin
      int scen;
      scen = b % 4;
      exp_flags = '0;
      for (int k = 0; k < 8; k++) begin
        logic [3:0][7:0] yref;
        logic [5:0][7:0] m;
        ecs_loc_e exp_loc;
        // idle cycles between samples
        while ($urandom_range(0, 3) == 0) begin
          x_valid = 1'b0; n_idle++;
          @(negedge clk);
        end
        x_valid = 1'b1;
        x = 8'($urandom);
        for (int t = 3; t > 0; t--) hist[t] = hist[t-1];
        hist[0] = int'(x);
        for (int f = 0; f < 4; f++) yref[f] = ref_y(f);
        @(negedge clk);
        x_valid = 1'b0;
        check(y_valid, "y_valid one cycle after x_valid");
        // choose the fault of this sample
        m = '0;
        exp_loc = ECS_OK;
        case (scen)
          1: if (k == 0) begin m[0] = 8'b0000_1111; exp_loc = ECS_F1; end
          2: if (k == 3) begin m[1] = 8'($urandom_range(1, 255)); exp_loc = ECS_F2; end
             else if (k == 5) begin m[2] = 8'($urandom_range(1, 255)); exp_loc = ECS_F3; end
             else if (k == 6) begin m[4] = 8'($urandom_range(1, 255)); exp_loc = ECS_R5; end
          3: if (k == 7) begin m[3] = 8'($urandom_range(1, 255)); exp_loc = ECS_F4; end
             else if (k == 1) begin m[5] = 8'($urandom_range(1, 255)); exp_loc = ECS_R6; end
             else if (k == 4) begin m[0] = 8'h01; m[1] = 8'h01; exp_loc = ECS_UNCORR; end
          default: ;
        endcase
        flt_fault = m;
        #1;
        // additive errors that are multiples of 64 cannot always be placed
        for (int f = 0; f < 4; f++)
          if (m[f] != 0 && (8'((yref[f] ^ m[f]) - yref[f]) % 64) == 0) exp_loc = ECS_UNCORR;
        if (m[4] != 0 && (8'((ref_y(0) + ref_y(1) + ref_y(2) + ref_y(3)) ^ m[4])
                          - 8'(ref_y(0) + ref_y(1) + ref_y(2) + ref_y(3))) % 64 == 0)
          exp_loc = ECS_UNCORR;
        // the double error: e1 == e2 leaves no single explanation, else it
        // looks like a filter-6 error; either way the originals pass through
        if (m[0] != 0 && m[1] != 0)
          exp_loc = (yref[0][0] == yref[1][0]) ? ECS_UNCORR : ECS_R6;
        check(ecs_loc == exp_loc, $sformatf("ECS locate blk %0d smp %0d: %s exp %s", b, k, ecs_loc.name(), exp_loc.name()));
        check(ecs_err == (m != 0), "ECS detect");
        for (int f = 0; f < 4; f++) begin
          logic [7:0] e;
          e = yref[f] ^ m[f];
          if (exp_loc inside {ECS_F1, ECS_F2, ECS_F3, ECS_F4}) e = yref[f];
          check(y_corr[f] == e, $sformatf("corrected sample f%0d blk %0d smp %0d", f + 1, b, k));
          exp_blk[f][k] = e;
        end
        exp_flags[k] = (m != 0);
        case (ecs_loc)
          ECS_OK:     n_clean++;
          ECS_F1:     n_fix[0]++;
          ECS_F2:     n_fix[1]++;
          ECS_F3:     n_fix[2]++;
          ECS_F4:     n_fix[3]++;
          ECS_R5:     n_r5++;
          ECS_R6:     n_r6++;
          default:    n_uncorr++;
        endcase
        @(negedge clk);
        flt_fault = '0;
        // the packer presents the block one cycle after the eighth sample
        if (k == 7) begin
          check(blk_valid, "block written after eighth sample");
          check(blk_ecs_flags == exp_flags, "per-sample ECS flags");
          // a read requested now collides with the write and is held off
          check(!rd_ready, "rd_ready low during block write");
          rd_en = 1'b1;
          if (!rd_ready) n_rd_held++;
          @(negedge clk);
          rd_en = 1'b0;
          check(!rd_valid, "held-off read returns nothing");
        end else begin
          check(!blk_valid, "no block before the eighth sample");
        end
      end

      // soft errors in the stored block
      upset_en = '0; upset_info_mask = '0; upset_red_mask = '0;
      if (b % 3 == 1) begin
        upset_en[0] = 1'b1; upset_info_mask[0] = 32'h0000_000F;    // symbol 0 of y11
        upset_en[7] = 1'b1; upset_info_mask[7] = 32'h0000_0FF0;    // symbols 1, 2 of y42
      end else if (b % 3 == 2) begin
        upset_en[2] = 1'b1; upset_red_mask[2] = {20'h00401, 16'h8000}; // check bits of y21
      end
      if (upset_en != 0) begin
        @(negedge clk);
        upset_en = '0;
      end

      // read back
      rd_en = 1'b1;
      check(rd_ready, "rd_ready when idle");
      @(negedge clk);
      rd_en = 1'b0;
      check(rd_valid, "rd_valid one cycle after rd_en");
      for (int f = 0; f < 4; f++)
        for (int k = 0; k < 8; k++)
          check(rd_samp[f][k] == exp_blk[f][k], $sformatf("read back f%0d sample %0d", f + 1, k));
      if (b % 3 == 1) begin
        check(mem_err == 8'b1000_0001, "mem_err names y11 and y42");
        check(mem_sym_err[0] == 8'b0000_0001 && mem_sym_err[7] == 8'b0000_0110, "located symbols");
        n_mem_fix += 2;
      end else if (b % 3 == 2) begin
        check(mem_err == 8'b0000_0100 && mem_sym_err[2] == 0, "check-bit upset reported, data untouched");
        n_mem_chk++;
      end else begin
        check(mem_err == 0, "clean memories");
      end
    end

    // every mechanism must have happened
    foreach (n_fix[i]) check(n_fix[i] > 0, $sformatf("filter %0d corrected at least once", i + 1));
    check(n_r5 > 0, "redundant filter 5 fault seen");
    check(n_r6 > 0, "redundant filter 6 fault seen");
    check(n_uncorr > 0, "uncorrectable sample seen");
    check(n_clean > 0, "clean samples seen");
    check(n_mem_fix > 0, "memory upsets corrected");
    check(n_mem_chk > 0, "check-bit upsets reported");
    check(n_rd_held > 0, "read held off by a write");
    check(n_idle > 0, "idle input cycles");
    $display("mechanisms: fix f1..f4 = %0d %0d %0d %0d, r5 %0d, r6 %0d, uncorr %0d, clean %0d, mem fixed %0d, mem check-bit %0d, read held %0d, idle %0d",
             n_fix[0], n_fix[1], n_fix[2], n_fix[3], n_r5, n_r6, n_uncorr, n_clean, n_mem_fix, n_mem_chk, n_rd_held, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
