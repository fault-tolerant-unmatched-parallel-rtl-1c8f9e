// Fault tolerant bank of four unmatched parallel filters whose corrected
// outputs are stored in DMC protected memories.
//
// Datapath:
//   x -> four FIR filters h1..h4 (different impulse responses, same input)
//     -> two redundant FIR filters h5 = h1+h2+h3+h4, h6 = h1+2h2+3h3+4h4
//   the six outputs (each can be corrupted through flt_fault, an XOR mask
//   that models a faulty filter) -> ecs_corrector: detects and corrects a
//   single faulty filter per output sample
//   -> sample_packer: 8 samples of 8 bits per filter = 64 bits, cut into two
//   32-bit words -> eight dmc_memory instances, memory f*2+w holding word w of
//   filter f (y11, y12, y21, ..., y42)
//   -> read back: each memory corrects multiple cell upsets with the DMC and
//   reports whether it saw an error (mem_err).
//
// Timing: a sample x taken with x_valid gives the six filter outputs and the
// ECS result one cycle later (y_valid, y_corr, ecs_err, ecs_loc,
// ecs_filt_err and the two syndromes ecs_z1, ecs_z2). After the
// eighth sample of a block the packer presents the block (blk_valid,
// blk_ecs_flags: which of the 8 samples the ECS found in error) and in that
// same cycle all eight memories write it at address wr_addr; wr_addr then
// advances (modulo DEPTH). A read (rd_en, rd_addr) reads all eight memories
// and returns the corrected samples one cycle later with rd_valid. Reads are
// only accepted when rd_ready is high; the cycle of a block write is not.
// upset_* flips stored information and check bits of any memory.
//
// The structure (4 + 2 filters, ECS single fault correction, 8 memories of 32
// bits with DMC and encoder reuse) follows the case study. The filter taps,
// the modulo-256 arithmetic, the handshakes, the fault ports and the memory
// depth are this design's choices.
module ft_filter_bank_top
  import ft_pkg::*;
#(
  parameter int DEPTH = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // filter input
  input  logic                               x_valid,
  input  logic [DW-1:0]                      x,
  // filter fault injection: XOR masks on the outputs of h1..h4, h5, h6
  input  logic [NFILT+NRED-1:0][DW-1:0]      flt_fault,
  // per-sample ECS result
  output logic                               y_valid,
  output logic [NFILT-1:0][DW-1:0]           y_corr,
  output logic                               ecs_err,
  output ecs_loc_e                           ecs_loc,
  output logic [NFILT-1:0]                   ecs_filt_err,
  output logic [DW-1:0]                      ecs_z1,
  output logic [DW-1:0]                      ecs_z2,
  // block written to the memories
  output logic                               blk_valid,
  output logic [NSAMP-1:0]                   blk_ecs_flags,
  output logic [AW-1:0]                      wr_addr,
  // read back
  output logic                               rd_ready,
  input  logic                               rd_en,
  input  logic [AW-1:0]                      rd_addr,
  output logic                               rd_valid,
  output logic [NFILT-1:0][NSAMP-1:0][DW-1:0] rd_samp,
  output logic [NMEM-1:0]                    mem_err,
  output logic [NMEM-1:0][DMC_K1*DMC_K2-1:0] mem_sym_err,
  // memory soft-error injection
  input  logic [NMEM-1:0]                    upset_en,
  input  logic [AW-1:0]                      upset_addr,
  input  logic [NMEM-1:0][DMC_N-1:0]         upset_info_mask,
  input  logic [NMEM-1:0][DMC_RW-1:0]        upset_red_mask
);

  localparam coef_t COEFS [NFILT+NRED] = '{H1, H2, H3, H4, H5, H6};

  logic [NFILT+NRED-1:0][DW-1:0] y_raw, y_flt;
  logic [NFILT+NRED-1:0]         y_vld;

  // ---------------------------------------------------------------- filters
  for (genvar i = 0; i < NFILT + NRED; i++) begin : g_filt
    fir_filter #(.DW(DW), .TAPS(TAPS), .COEF(COEFS[i])) u_fir (
      .clk     (clk),
      .rst_n   (rst_n),
      .x_valid (x_valid),
      .x       (x),
      .y       (y_raw[i]),
      .y_valid (y_vld[i])
    );
    assign y_flt[i] = y_raw[i] ^ flt_fault[i];
  end

  assign y_valid = y_vld[0];

  // -------------------------------------------------------------------- ECS
  ecs_corrector #(.DW(DW)) u_ecs (
    .y        (y_flt[NFILT-1:0]),
    .r5       (y_flt[NFILT]),
    .r6       (y_flt[NFILT+1]),
    .y_corr   (y_corr),
    .z1       (ecs_z1),
    .z2       (ecs_z2),
    .err      (ecs_err),
    .filt_err (ecs_filt_err),
    .loc      (ecs_loc)
  );

  // ------------------------------------------------------------------ packer
  logic [NMEM-1:0][DMC_N-1:0] words;

  sample_packer u_pack (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (y_valid),
    .samp      (y_corr),
    .in_err    (ecs_err),
    .out_valid (blk_valid),
    .words     (words),
    .ecs_flags (blk_ecs_flags)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)         wr_addr <= '0;
    else if (blk_valid) wr_addr <= (int'(wr_addr) == DEPTH - 1) ? '0 : wr_addr + 1'b1;
  end

  // --------------------------------------------------------------- memories
  logic                   mem_re;
  logic [AW-1:0]          mem_addr;
  logic [NMEM-1:0]        mem_rvalid;
  logic [NMEM-1:0][DMC_N-1:0] mem_rdata;

  assign rd_ready = !blk_valid;
  assign mem_re   = rd_en && rd_ready;
  assign mem_addr = blk_valid ? wr_addr : rd_addr;

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    dmc_memory #(.DEPTH(DEPTH)) u_mem (
      .clk             (clk),
      .rst_n           (rst_n),
      .we              (blk_valid),
      .re              (mem_re),
      .addr            (mem_addr),
      .wdata           (words[m]),
      .rdata           (mem_rdata[m]),
      .rvalid          (mem_rvalid[m]),
      .err             (mem_err[m]),
      .sym_err         (mem_sym_err[m]),
      .upset_en        (upset_en[m]),
      .upset_addr      (upset_addr),
      .upset_info_mask (upset_info_mask[m]),
      .upset_red_mask  (upset_red_mask[m])
    );
  end

  assign rd_valid = mem_rvalid[0];

  // All filters and all memories run in lock step
  a_filters_in_step : assert property (@(posedge clk) disable iff (!rst_n)
                                       (y_vld == '0) || (y_vld == '1))
    else $error("ft_filter_bank_top: filter outputs out of step");
  a_memories_in_step : assert property (@(posedge clk) disable iff (!rst_n)
                                        (mem_rvalid == '0) || (mem_rvalid == '1))
    else $error("ft_filter_bank_top: memory reads out of step");

  // Unpack: memory f*WPF+w, bits [j*DW +: DW] = sample w*(DMC_N/DW)+j of f
  localparam int SPW = DMC_N / DW;
  for (genvar f = 0; f < NFILT; f++) begin : g_unpack_f
    for (genvar k = 0; k < NSAMP; k++) begin : g_unpack_k
      assign rd_samp[f][k] = mem_rdata[f*WORDS_PER_FILT + k/SPW][(k%SPW)*DW +: DW];
    end
  end

endmodule
