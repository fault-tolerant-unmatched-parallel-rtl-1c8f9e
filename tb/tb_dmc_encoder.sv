// Self-checking testbench of dmc_encoder (32-bit word, 2 x 4 symbols of 4
// bits). The expected check bits are written out equation by equation:
//   H[4:0]   = D[3:0]   + D[11:8]     H[9:5]   = D[7:4]   + D[15:12]
//   H[14:10] = D[19:16] + D[27:24]    H[19:15] = D[23:20] + D[31:28]
//   V[j]     = D[j] ^ D[j+16]
// and compared for corner words and random words; U must equal D.
module tb_dmc_encoder;
  logic [31:0] d, u;
  logic [19:0] h;
  logic [15:0] v;
  int checks = 0, failures = 0;

  dmc_encoder dut (.d, .h, .v, .u);

  function automatic logic [19:0] ref_h(logic [31:0] w);
    logic [19:0] r;
    r[4:0]   = 5'(w[3:0])   + 5'(w[11:8]);
    r[9:5]   = 5'(w[7:4])   + 5'(w[15:12]);
    r[14:10] = 5'(w[19:16]) + 5'(w[27:24]);
    r[19:15] = 5'(w[23:20]) + 5'(w[31:28]);
    return r;
  endfunction

  task automatic apply(logic [31:0] w);
    d = w;
    #1;
    checks += 3;
    if (h !== ref_h(w)) begin failures++; $display("FAIL H d=%h h=%h exp %h", w, h, ref_h(w)); end
    if (v !== (w[15:0] ^ w[31:16])) begin failures++; $display("FAIL V d=%h v=%h", w, v); end
    if (u !== w) begin failures++; $display("FAIL U d=%h", w); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'h0000_0000);
    apply(32'hFFFF_FFFF);
    apply(32'h0000_0F0F);   // H[4:0] = 30
    apply(32'h8765_4321);
    for (int n = 0; n < 2000; n++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
