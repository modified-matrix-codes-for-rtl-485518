// ecc_memory - word-addressed codeword storage of the protected memory.
//
// DEPTH words of W bits. One synchronous write port and one synchronous read
// port (read data appears in the cycle after re, held until the next read).
// An upset port XORs a mask into a stored word in one cycle; it stands in for
// radiation-induced bit flips so that errors can be placed in stored
// codewords. When a write and an upset hit the same word in the same cycle,
// the write wins. Depth, port structure and the upset port are this design's
// choices; the method only names a memory of words 0..n-1. The array has no
// reset; rdata resets to zero. Assertions check that every address used is
// inside the array (relevant when DEPTH is not a power of two).
module ecc_memory #(
  parameter int unsigned W     = 20,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [W-1:0]  upset_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset_en && !(we && waddr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (we)
      mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end

  a_waddr: assert property (@(posedge clk) we       |-> (32'(waddr) < DEPTH));
  a_raddr: assert property (@(posedge clk) re       |-> (32'(raddr) < DEPTH));
  a_uaddr: assert property (@(posedge clk) upset_en |-> (32'(upset_addr) < DEPTH));

endmodule
