// receive_sm: the receive state machine, two independent writer machines
// (write_ctrl) running in parallel, one for each receiver.
//
// Each channel watches its receiver's LocalLink-style output, routes every
// packet on its first byte against this node's Tx0/Tx1 masks, claims a free
// RAM chip, streams the packet into the region of its destination and tells
// the destination's queue which chip it used. Chips are handed out so that
// two writers never share one: receiver 0 sees the chips held by every writer
// (`busy_ext` brings in the host From side); receiver 1 also sees what
// receiver 0 claims in the same clock; `claim` gives both claims to the host
// side, which comes last. rx_flag is high while either channel is handling a
// packet. Behaviour follows the document's receive machine; the in-clock
// claim order is this design's choice.
module receive_sm
  import nic_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  word_t      rx0_dat,
  input  logic       rx0_sof_n,
  input  logic       rx0_eof_n,
  input  logic       rx0_src_rdy_n,
  input  word_t      rx1_dat,
  input  logic       rx1_sof_n,
  input  logic       rx1_eof_n,
  input  logic       rx1_src_rdy_n,
  input  node_mask_t tx0_mask,
  input  node_mask_t tx1_mask,
  input  chip_id_t   busy_ext,   // chips held by the other writers
  output chip_id_t   claim,      // chips claimed this clock by either channel
  output chip_id_t   rx0_cs,
  output addr_t      rx0_add,
  output logic       rx0_we,
  output logic       rx0_push,
  output dest_e      rx0_push_dest,
  output chip_id_t   rx1_cs,
  output addr_t      rx1_add,
  output logic       rx1_we,
  output logic       rx1_push,
  output dest_e      rx1_push_dest,
  output logic       rx_flag,
  output logic [1:0] stalled
);

  chip_id_t claim0, claim1;
  logic     flag0, flag1;

  write_ctrl #(.FIXED_LEN(1'b0)) u_rx0 (
    .clk, .rst,
    .dat(rx0_dat), .sof_n(rx0_sof_n), .eof_n(rx0_eof_n), .src_rdy_n(rx0_src_rdy_n),
    .tx0_mask, .tx1_mask,
    .busy(busy_ext | rx0_cs | rx1_cs),
    .claim(claim0),
    .cs(rx0_cs), .addr(rx0_add), .we(rx0_we),
    .push(rx0_push), .push_dest(rx0_push_dest),
    .flag(flag0), .stalled(stalled[0])
  );

  write_ctrl #(.FIXED_LEN(1'b0)) u_rx1 (
    .clk, .rst,
    .dat(rx1_dat), .sof_n(rx1_sof_n), .eof_n(rx1_eof_n), .src_rdy_n(rx1_src_rdy_n),
    .tx0_mask, .tx1_mask,
    .busy(busy_ext | rx0_cs | rx1_cs | claim0),
    .claim(claim1),
    .cs(rx1_cs), .addr(rx1_add), .we(rx1_we),
    .push(rx1_push), .push_dest(rx1_push_dest),
    .flag(flag1), .stalled(stalled[1])
  );

  assign claim   = claim0 | claim1;
  assign rx_flag = flag0 | flag1;

endmodule
