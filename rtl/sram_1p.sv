// Single-port storage array used for the information bits and for the
// redundancy (check) bits of a DMC protected memory.
//
// DEPTH words of W bits. A write (we high) stores wdata at addr on the clock
// edge. The read is asynchronous: rdata always shows the word at addr, so the
// DMC decoder can correct it in the same cycle. The upset port models soft
// errors: on a clock edge with upset_en high, the stored word at upset_addr
// is XORed with upset_mask (a multiple cell upset is a mask with several
// ones). A write and an upset to the same word in one cycle give the written
// data with the upset applied.
//
// The cells are not reset; a word must be written before it is read. The
// document only names the two SRAMs; the port list, the asynchronous read and
// the upset port are this design's choices.
module sram_1p #(
  parameter int W     = 32,
  parameter int DEPTH = 1,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int a = 0; a < DEPTH; a++) begin
      if (we && addr == AW'(a)) begin
        mem[a] <= wdata ^ ((upset_en && upset_addr == AW'(a)) ? upset_mask : '0);
      end else if (upset_en && upset_addr == AW'(a)) begin
        mem[a] <= mem[a] ^ upset_mask;
      end
    end
  end

  assign rdata = (int'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
