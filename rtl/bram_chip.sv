// bram_chip: one dual-port block RAM chip of the packet buffer.
//
// 96 words of 16 bits (192 bytes) hold three 64-byte packet regions: Tx0 at
// word 0, Tx1 at word 32, host at word 64. Port A belongs to the writer (a
// receiver or the host From machine): it writes when a_we is high and always
// returns the word at a_addr one clock later, which is used only to watch
// what was stored. Port B belongs to the reader (a transmitter or the host To
// machine): it is read-only, and when b_en is high its output register loads
// the word at b_addr, so the word appears one clock after the address. With
// b_en low the output holds, which lets a reader pause. Sizes and port roles
// follow the document; the read enable on port B is this design's choice.
module bram_chip
  import nic_pkg::*;
#(
  parameter int unsigned WORDS = CHIP_WORDS
) (
  input  logic  clk,
  // port A: read/write, writer side
  input  logic  a_we,
  input  addr_t a_addr,
  input  word_t a_wdata,
  output word_t a_rdata,
  // port B: read only, reader side
  input  logic  b_en,
  input  addr_t b_addr,
  output word_t b_rdata
);

  localparam int unsigned IW = $clog2(WORDS);

  word_t mem [WORDS];
  logic  a_ok, b_ok;

  assign a_ok = a_addr < ADDR_W'(WORDS);
  assign b_ok = b_addr < ADDR_W'(WORDS);

  always_ff @(posedge clk) begin
    if (a_we && a_ok) mem[a_addr[IW-1:0]] <= a_wdata;
    a_rdata <= a_ok ? mem[a_addr[IW-1:0]] : '0;
  end

  always_ff @(posedge clk) begin
    if (b_en) b_rdata <= b_ok ? mem[b_addr[IW-1:0]] : '0;
  end

endmodule
