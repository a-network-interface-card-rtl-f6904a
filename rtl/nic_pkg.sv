// nic_pkg: constants and types shared by the NIC blocks.
//
// The NIC moves 16-bit words (two bytes per 156.25 MHz clock). Each of the
// three dual-port RAM chips holds 96 words split into three 32-word (64-byte)
// regions, one per destination: Tx0 at word 0, Tx1 at word 32 and the local
// host at word 64. Chips are named by a one-hot 3-bit identity, which is what
// the chip-identity queues carry. Node addresses are one-hot bytes, one bit per
// node of an eight-node network; the default masks are those of node 0
// (Tx0 reaches nodes 1-3, Tx1 reaches nodes 4-7). All of these numbers follow
// the document; the enum encodings are this design's own choice.
package nic_pkg;

  localparam int unsigned DATA_W     = 16;  // bits per word on every bus
  localparam int unsigned ADDR_W     = 8;   // RAM address bus width
  localparam int unsigned NUM_CHIPS  = 3;   // RAM chips, one per writer
  localparam int unsigned PKT_WORDS  = 32;  // 64-byte packet = 32 words
  localparam int unsigned CHIP_WORDS = 96;  // 192 bytes per chip

  typedef logic [DATA_W-1:0]    word_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [NUM_CHIPS-1:0] chip_id_t;  // one-hot, 0 = none
  typedef logic [7:0]           node_mask_t; // one bit per node

  // Start address of each destination region inside a chip.
  localparam addr_t BASE_TX0  = 8'd0;
  localparam addr_t BASE_TX1  = 8'd32;
  localparam addr_t BASE_HOST = 8'd64;

  // Destination of a packet as decided from its first byte.
  typedef enum logic [1:0] {
    DEST_TX0  = 2'd0,
    DEST_TX1  = 2'd1,
    DEST_HOST = 2'd2
  } dest_e;

  // Masks of node 0 of the eight-node network.
  localparam node_mask_t TX0_MASK_DEFAULT = 8'b0000_1110;
  localparam node_mask_t TX1_MASK_DEFAULT = 8'b1111_0000;

  function automatic addr_t dest_base(dest_e d);
    case (d)
      DEST_TX0: return BASE_TX0;
      DEST_TX1: return BASE_TX1;
      default:  return BASE_HOST;
    endcase
  endfunction

endpackage
