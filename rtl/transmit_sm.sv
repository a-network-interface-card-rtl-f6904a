// transmit_sm: the transmit state machine, two independent reader machines
// (read_ctrl) running in parallel, one per transmitter.
//
// Transmitter 0 reads the Tx0 region (words 0-31) and transmitter 1 the Tx1
// region (words 32-63) of whichever chip its queue names. A chip's read port
// serves one reader at a time: transmitter 0 waits only for chips held by
// transmitter 1 or the host To side (`bus_ext`); transmitter 1 also waits for
// what transmitter 0 claims in the same clock; `claim` passes both claims on
// to the host To side. Each transmitter pauses its address counter while its
// sink (the Aurora LocalLink port) holds dst_rdy_n high for clock correction.
// Behaviour follows the document's transmit machine; the in-clock claim order
// is this design's choice.
module transmit_sm
  import nic_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  chip_id_t tx0_new_bus,
  output logic     tx0_pop,
  input  chip_id_t tx1_new_bus,
  output logic     tx1_pop,
  input  chip_id_t bus_ext,     // chips whose read port the host side holds
  output chip_id_t claim,
  output chip_id_t tx0_bus,
  output addr_t    tx0_add,
  output logic     tx0_ren,
  input  word_t    tx0_rdata,
  output chip_id_t tx1_bus,
  output addr_t    tx1_add,
  output logic     tx1_ren,
  input  word_t    tx1_rdata,
  output word_t    tx0_dat,
  output logic     tx0_sof_n,
  output logic     tx0_eof_n,
  output logic     tx0_src_rdy_n,
  input  logic     tx0_dst_rdy_n,
  output word_t    tx1_dat,
  output logic     tx1_sof_n,
  output logic     tx1_eof_n,
  output logic     tx1_src_rdy_n,
  input  logic     tx1_dst_rdy_n,
  output logic     no_tx0,
  output logic     no_tx1
);

  chip_id_t claim0, claim1;

  read_ctrl #(.BASE(BASE_TX0)) u_tx0 (
    .clk, .rst,
    .new_bus(tx0_new_bus), .pop(tx0_pop),
    .bus_status(bus_ext | tx1_bus), .claim(claim0),
    .bus(tx0_bus), .raddr(tx0_add), .ren(tx0_ren), .rdata(tx0_rdata),
    .dat(tx0_dat), .sof_n(tx0_sof_n), .eof_n(tx0_eof_n),
    .src_rdy_n(tx0_src_rdy_n), .dst_rdy_n(tx0_dst_rdy_n),
    .no_tx(no_tx0)
  );

  read_ctrl #(.BASE(BASE_TX1)) u_tx1 (
    .clk, .rst,
    .new_bus(tx1_new_bus), .pop(tx1_pop),
    .bus_status(bus_ext | tx0_bus | claim0), .claim(claim1),
    .bus(tx1_bus), .raddr(tx1_add), .ren(tx1_ren), .rdata(tx1_rdata),
    .dat(tx1_dat), .sof_n(tx1_sof_n), .eof_n(tx1_eof_n),
    .src_rdy_n(tx1_src_rdy_n), .dst_rdy_n(tx1_dst_rdy_n),
    .no_tx(no_tx1)
  );

  assign claim = claim0 | claim1;

endmodule
