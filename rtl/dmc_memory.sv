// 32-bit memory protected by the decimal matrix code (DMC), with the
// encoder reuse technique (ERT).
//
// Structure: one dmc_encoder, an information SRAM (N data bits per word), a
// redundancy SRAM (HW+VW check bits per word) and a dmc_decoder. The encoder
// is shared between writing and reading, selected by en, which is driven by
// the write and read strobes:
//   en = 1 (write):  encoder input is wdata; H and V go to the redundancy SRAM
//   en = 0 (read):   encoder input is the stored data D'; its H' and V' go to
//                    the decoder, which subtracts/XORs the stored H and V,
//                    locates the erroneous symbols and corrects them
// so no second encoder is needed for the syndrome.
//
// Interface: one operation per cycle, we and re must not both be high. A
// write stores wdata at addr on the clock edge. A read with re high at addr
// returns the corrected word on rdata in the next cycle, with rvalid, err
// (some syndrome bit non-zero) and sym_err (symbols that were corrected).
// The upset ports flip stored cells to model soft errors in either SRAM.
// The raw syndromes (dH, S) stay internal; err and sym_err summarise them.
//
// The ERT sharing, the code and the decoder follow the DMC description; the
// handshake, the one-cycle read latency and the depth are this design's
// choices (the case study stores one word per memory, hence DEPTH = 1).
module dmc_memory
  import ft_pkg::*;
#(
  parameter int DEPTH = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic              re,
  input  logic [AW-1:0]     addr,
  input  logic [DMC_N-1:0]  wdata,
  output logic [DMC_N-1:0]  rdata,
  output logic              rvalid,
  output logic              err,
  output logic [DMC_K1*DMC_K2-1:0] sym_err,
  // soft-error injection
  input  logic              upset_en,
  input  logic [AW-1:0]     upset_addr,
  input  logic [DMC_N-1:0]  upset_info_mask,
  input  logic [DMC_RW-1:0] upset_red_mask
);

  logic              en;
  logic [DMC_N-1:0]  info_rd, enc_in, enc_u;
  logic [DMC_RW-1:0] red_rd;
  logic [DMC_HW-1:0] enc_h, dec_dh;
  logic [DMC_VW-1:0] enc_v, dec_s;
  logic [DMC_N-1:0]  dec_d;
  logic [DMC_K1*DMC_K2-1:0] dec_sym;
  logic              dec_err;

  // En: encoding on write, syndrome computation otherwise
  assign en     = we;
  assign enc_in = en ? wdata : info_rd;

  dmc_encoder u_enc (
    .d (enc_in),
    .h (enc_h),
    .v (enc_v),
    .u (enc_u)
  );

  sram_1p #(.W(DMC_N), .DEPTH(DEPTH)) u_info (
    .clk        (clk),
    .we         (we),
    .addr       (addr),
    .wdata      (enc_u),
    .rdata      (info_rd),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_info_mask)
  );

  sram_1p #(.W(DMC_RW), .DEPTH(DEPTH)) u_red (
    .clk        (clk),
    .we         (we),
    .addr       (addr),
    .wdata      ({enc_h, enc_v}),
    .rdata      (red_rd),
    .upset_en   (upset_en),
    .upset_addr (upset_addr),
    .upset_mask (upset_red_mask)
  );

  dmc_decoder u_dec (
    .d_rd    (info_rd),
    .h_st    (red_rd[DMC_RW-1 -: DMC_HW]),
    .v_st    (red_rd[DMC_VW-1:0]),
    .h_new   (enc_h),
    .v_new   (enc_v),
    .d_corr  (dec_d),
    .dh      (dec_dh),
    .s       (dec_s),
    .sym_err (dec_sym),
    .err     (dec_err)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdata   <= '0;
      rvalid  <= 1'b0;
      err     <= 1'b0;
      sym_err <= '0;
    end else begin
      rvalid <= re && !we;
      if (re && !we) begin
        rdata   <= dec_d;
        err     <= dec_err;
        sym_err <= dec_sym;
      end
    end
  end

  // The shared encoder serves either the write or the read in a cycle
  a_one_op : assert property (@(posedge clk) disable iff (!rst_n) !(we && re))
    else $error("dmc_memory: write and read in the same cycle");

endmodule
