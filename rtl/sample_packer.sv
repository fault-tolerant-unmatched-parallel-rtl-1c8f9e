// Packs the corrected output samples of the filter bank into DMC words.
//
// Each valid cycle brings one corrected sample of every filter. The k-th
// sample (k = 0..NSAMP-1) of filter f is placed at bits [k*DW +: DW] of that
// filter's NSAMP*DW-bit block, so for the default sizes the first four
// samples form the first 32-bit word (memory y_f1) and the last four the
// second word (memory y_f2). Word w of filter f leaves on words[f*WPF + w].
// The ECS error flag of each sample is collected alongside in ecs_flags[k].
//
// Interface: in_valid qualifies samp/in_err. When the NSAMP-th sample of a
// block has been taken, out_valid is high for one cycle (the cycle after that
// sample) with the complete block on words and ecs_flags; the next block
// starts with the next valid sample. Reset restarts the sample count.
//
// The split of the 64 bits of a filter into two 32-bit words follows the case
// study; the sample order inside a word is this design's choice.
module sample_packer
  import ft_pkg::*;
#(
  parameter int NF  = ft_pkg::NFILT,
  parameter int NS  = ft_pkg::NSAMP,
  parameter int SW  = ft_pkg::DW,
  parameter int WW  = ft_pkg::DMC_N,
  localparam int WPF = (NS * SW) / WW,
  localparam int CW  = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [NF-1:0][SW-1:0]    samp,
  input  logic                     in_err,
  output logic                     out_valid,
  output logic [NF*WPF-1:0][WW-1:0] words,
  output logic [NS-1:0]            ecs_flags
);

  logic [NF-1:0][NS*SW-1:0] blk, blk_next;
  logic [NS-1:0]            flags, flags_next;
  logic [CW-1:0]            cnt;

  // The block including the sample arriving in this cycle
  always_comb begin
    blk_next   = blk;
    flags_next = flags;
    for (int f = 0; f < NF; f++) blk_next[f][int'(cnt)*SW +: SW] = samp[f];
    flags_next[cnt] = in_err;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      blk       <= '0;
      flags     <= '0;
      out_valid <= 1'b0;
      words     <= '0;
      ecs_flags <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        blk   <= blk_next;
        flags <= flags_next;
        if (int'(cnt) == NS - 1) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          ecs_flags <= flags_next;
          for (int f = 0; f < NF; f++)
            for (int w = 0; w < WPF; w++)
              words[f*WPF + w] <= blk_next[f][w*WW +: WW];
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (NS * SW == WPF * WW)
      else $error("sample_packer: a filter block must fill whole words");
  end

endmodule
