// sbox_ram: one Blowfish S-box, an 8-bit to 32-bit lookup table.
//
// 256 words of 32 bits with an asynchronous read port (the lookup inside the
// round function F) and a synchronous write port used while the key is being
// expanded: the S-box first receives its fixed initial contents and is then
// overwritten, two words per key-expansion encryption. Writes take effect at
// the rising clock edge; a read in the same cycle sees the old word. No reset:
// the contents are always written before they are used.
//
// The paper gives the 8-to-32-bit lookup; the asynchronous read and the
// single write port are this design's choice.
module sbox_ram
  import blowfish_pkg::*;
(
  input  logic       clk,
  input  logic       we,
  input  logic [7:0] waddr,
  input  word_t      wdata,
  input  logic [7:0] raddr,
  output word_t      rdata
);
  word_t mem [SBOX_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
