// route_mask: routing decision of the NIC.
//
// The first byte of every packet is the destination node address, one bit per
// node. It is ANDed with the Tx0 mask and the Tx1 mask of this node; a
// non-zero result on Tx0 sends the packet to transmitter 0, otherwise a
// non-zero result on Tx1 sends it to transmitter 1, otherwise the packet is
// for the local host. The priority (Tx0 before Tx1) and the three region base
// addresses follow the document; the module is purely combinational and the
// writers register its result in their ANALYZE state.
module route_mask
  import nic_pkg::*;
(
  input  node_mask_t dest_addr,  // first byte of the packet
  input  node_mask_t tx0_mask,   // nodes reached through transmitter 0
  input  node_mask_t tx1_mask,   // nodes reached through transmitter 1
  output dest_e      dest,       // chosen destination
  output addr_t      base        // start address of its RAM region
);

  always_comb begin
    if ((dest_addr & tx0_mask) != '0)      dest = DEST_TX0;
    else if ((dest_addr & tx1_mask) != '0) dest = DEST_TX1;
    else                                   dest = DEST_HOST;
    base = dest_base(dest);
  end

endmodule
