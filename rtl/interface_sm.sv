// interface_sm: the host interface state machine, a pair of independent
// machines so that the host can send and receive at the same time.
//
// "From" (host to network) is a writer machine (write_ctrl) that routes a
// host packet exactly like a receiver does, against the same Tx0/Tx1 masks,
// claims a RAM chip not held by either receiver (`busy_ext`, `claim_ext`) and
// stores it; a host packet is always 32 words and its end is found by
// counting, not by an end-of-frame flag. "To" (network to host) is a reader
// machine (read_ctrl) on the host region (words 64-95): it takes chip
// identities from the host queue and streams each packet to the host, waiting
// for chips whose read port a transmitter holds or claims (`bus_ext`). The
// document leaves the host-side protocol open; this design uses the same
// LocalLink-style signals as the Aurora ports.
module interface_sm
  import nic_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  node_mask_t tx0_mask,
  input  node_mask_t tx1_mask,
  // From side: host to network
  input  word_t      f_dat,
  input  logic       f_sof_n,
  input  logic       f_src_rdy_n,
  input  chip_id_t   busy_ext,    // chips held by the receivers
  input  chip_id_t   claim_ext,   // chips claimed by the receivers this clock
  output chip_id_t   f_cs,
  output addr_t      f_add,
  output logic       f_we,
  output logic       f_push,
  output dest_e      f_push_dest,
  output logic       f_flag,
  // To side: network to host
  input  chip_id_t   t_new_bus,
  output logic       t_pop,
  input  chip_id_t   bus_ext,     // read ports held or claimed by transmitters
  output chip_id_t   t_bus,
  output addr_t      t_add,
  output logic       t_ren,
  input  word_t      t_rdata,
  output word_t      t_dat,
  output logic       t_sof_n,
  output logic       t_eof_n,
  output logic       t_src_rdy_n,
  input  logic       t_dst_rdy_n,
  output logic       no_t
);


  write_ctrl #(.FIXED_LEN(1'b1)) u_from (
    .clk, .rst,
    .dat(f_dat), .sof_n(f_sof_n), .eof_n(1'b1), .src_rdy_n(f_src_rdy_n),
    .tx0_mask, .tx1_mask,
    .busy(busy_ext | claim_ext | f_cs),
    .claim(),
    .cs(f_cs), .addr(f_add), .we(f_we),
    .push(f_push), .push_dest(f_push_dest),
    .flag(f_flag), .stalled()
  );

  read_ctrl #(.BASE(BASE_HOST)) u_to (
    .clk, .rst,
    .new_bus(t_new_bus), .pop(t_pop),
    .bus_status(bus_ext), .claim(),
    .bus(t_bus), .raddr(t_add), .ren(t_ren), .rdata(t_rdata),
    .dat(t_dat), .sof_n(t_sof_n), .eof_n(t_eof_n),
    .src_rdy_n(t_src_rdy_n), .dst_rdy_n(t_dst_rdy_n),
    .no_tx(no_t)
  );

endmodule
