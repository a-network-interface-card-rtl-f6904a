// nic_top: network interface card for a node of a two-transmitter,
// two-receiver optical network (for example an eight-node ShuffleNet).
//
// Packets arrive on two receivers and from the host, and leave on two
// transmitters and to the host. Nothing is routed by a central switch: each
// packet's first byte (one-hot destination node) is compared with two masks
// held by this node, and the packet is stored in the RAM region of the
// transmitter (or the host) that leads towards its destination.
//
// Structure (all blocks run on one clock, 156.25 MHz in the intended FPGA):
//   receive_sm    two writer machines, one per receiver
//   interface_sm  host From writer and host To reader
//   wr_bus_switch two data registers per writer, then chip-select steering
//                 onto the three RAM write ports
//   bram_chip x3  96 x 16-bit dual-port RAM, regions Tx0 / Tx1 / host
//   cs_queue  x3  chip identities waiting for Tx0, Tx1 and the host
//   rd_bus_switch chip-select steering of the RAM read ports to the readers
//   transmit_sm   two reader machines, one per transmitter
// There are three writers and three chips and a writer holds one chip at a
// time, so a writer always finds a free chip. A packet's chip identity is
// queued as soon as its first word is written, and the reader starts while
// the rest is still arriving (cut-through through the dual-port RAM).
//
// Timing at the defaults, no stalls: a packet whose start of frame reaches a
// receiver in clock 0 is written from clock 2 and leaves the transmitter with
// sof_n low in clock 6. The reader then reads each word three clocks after it
// was written, so a receiver may pause (clock correction) for at most two
// clocks in total within a packet that is being forwarded; a pause of three
// clocks lets the transmitter read a word not yet written. A chip's region is reused by the
// next packet for the same destination without checking that the previous one
// was sent; the queues hold three entries, one per chip.
//
// All ports use LocalLink-style active-low framing (sof_n, eof_n, src_rdy_n,
// dst_rdy_n) as on the Aurora core that carries the receivers and
// transmitters. ram_echo is the read-back of each chip's write port, useful
// only for watching what was stored. q_dropped flags an identity lost to a
// full queue (Tx0, Tx1, host).
module nic_top
  import nic_pkg::*;
#(
  parameter node_mask_t TX0_MASK = TX0_MASK_DEFAULT,
  parameter node_mask_t TX1_MASK = TX1_MASK_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  // receivers (from the Aurora LocalLink receive ports)
  input  word_t       rx0_dat,
  input  logic        rx0_sof_n,
  input  logic        rx0_eof_n,
  input  logic        rx0_src_rdy_n,
  input  word_t       rx1_dat,
  input  logic        rx1_sof_n,
  input  logic        rx1_eof_n,
  input  logic        rx1_src_rdy_n,
  // transmitters (to the Aurora LocalLink transmit ports)
  output word_t       tx0_dat,
  output logic        tx0_sof_n,
  output logic        tx0_eof_n,
  output logic        tx0_src_rdy_n,
  input  logic        tx0_dst_rdy_n,
  output word_t       tx1_dat,
  output logic        tx1_sof_n,
  output logic        tx1_eof_n,
  output logic        tx1_src_rdy_n,
  input  logic        tx1_dst_rdy_n,
  // host From side (host to network), 32-word packets
  input  word_t       f_dat,
  input  logic        f_sof_n,
  input  logic        f_src_rdy_n,
  // host To side (network to host)
  output word_t       t_dat,
  output logic        t_sof_n,
  output logic        t_eof_n,
  output logic        t_src_rdy_n,
  input  logic        t_dst_rdy_n,
  // status
  output logic        rx_flag,
  output logic [1:0]  rx_stalled,   // receiver channel in its STALL state
  output logic        f_flag,       // host From side busy with a packet
  output logic        no_tx0,
  output logic        no_tx1,
  output logic        no_t,
  output logic [2:0]  q_dropped,
  output word_t [NUM_CHIPS-1:0] ram_echo
);

  localparam int unsigned NUM_WR = 3;  // rx0, rx1, host From
  localparam int unsigned NUM_RD = 3;  // tx0, tx1, host To

  // ---------------- writers ----------------
  chip_id_t rx0_cs, rx1_cs, f_cs, rx_claim;
  addr_t    rx0_add, rx1_add, f_add;
  logic     rx0_we, rx1_we, f_we;
  logic     rx0_push, rx1_push, f_push;
  dest_e    rx0_push_dest, rx1_push_dest, f_push_dest;

  receive_sm u_receive (
    .clk, .rst,
    .rx0_dat, .rx0_sof_n, .rx0_eof_n, .rx0_src_rdy_n,
    .rx1_dat, .rx1_sof_n, .rx1_eof_n, .rx1_src_rdy_n,
    .tx0_mask(TX0_MASK), .tx1_mask(TX1_MASK),
    .busy_ext(f_cs), .claim(rx_claim),
    .rx0_cs, .rx0_add, .rx0_we, .rx0_push, .rx0_push_dest,
    .rx1_cs, .rx1_add, .rx1_we, .rx1_push, .rx1_push_dest,
    .rx_flag, .stalled(rx_stalled)
  );

  // ---------------- readers ----------------
  chip_id_t q_head [3];
  logic     q_pop  [3];
  chip_id_t tx0_bus, tx1_bus, t_bus, tx_claim;
  addr_t    tx0_add, tx1_add, t_add;
  logic     tx0_ren, tx1_ren, t_ren;
  word_t    [NUM_RD-1:0] rd_data;

  interface_sm u_interface (
    .clk, .rst,
    .tx0_mask(TX0_MASK), .tx1_mask(TX1_MASK),
    .f_dat, .f_sof_n, .f_src_rdy_n,
    .busy_ext(rx0_cs | rx1_cs), .claim_ext(rx_claim),
    .f_cs, .f_add, .f_we, .f_push, .f_push_dest, .f_flag,
    .t_new_bus(q_head[DEST_HOST]), .t_pop(q_pop[DEST_HOST]),
    .bus_ext(tx0_bus | tx1_bus | tx_claim),
    .t_bus, .t_add, .t_ren, .t_rdata(rd_data[2]),
    .t_dat, .t_sof_n, .t_eof_n, .t_src_rdy_n, .t_dst_rdy_n,
    .no_t
  );

  transmit_sm u_transmit (
    .clk, .rst,
    .tx0_new_bus(q_head[DEST_TX0]), .tx0_pop(q_pop[DEST_TX0]),
    .tx1_new_bus(q_head[DEST_TX1]), .tx1_pop(q_pop[DEST_TX1]),
    .bus_ext(t_bus), .claim(tx_claim),
    .tx0_bus, .tx0_add, .tx0_ren, .tx0_rdata(rd_data[0]),
    .tx1_bus, .tx1_add, .tx1_ren, .tx1_rdata(rd_data[1]),
    .tx0_dat, .tx0_sof_n, .tx0_eof_n, .tx0_src_rdy_n, .tx0_dst_rdy_n,
    .tx1_dat, .tx1_sof_n, .tx1_eof_n, .tx1_src_rdy_n, .tx1_dst_rdy_n,
    .no_tx0, .no_tx1
  );

  // ---------------- chip identity queues ----------------
  chip_id_t [NUM_WR-1:0] push_id;
  assign push_id = {f_cs, rx1_cs, rx0_cs};

  for (genvar d = 0; d < 3; d++) begin : g_queue
    logic [NUM_WR-1:0] push;
    assign push = {f_push   && f_push_dest   == dest_e'(d),
                   rx1_push && rx1_push_dest == dest_e'(d),
                   rx0_push && rx0_push_dest == dest_e'(d)};
    cs_queue #(.DEPTH(NUM_CHIPS), .NUM_WR(NUM_WR)) u_q (
      .clk, .rst, .push, .push_id, .pop(q_pop[d]),
      .head(q_head[d]), .count(), .dropped(q_dropped[d])
    );
  end

  // ---------------- memory ----------------
  logic  [NUM_CHIPS-1:0] ram_we, ram_en;
  addr_t [NUM_CHIPS-1:0] ram_waddr, ram_raddr;
  word_t [NUM_CHIPS-1:0] ram_wdata, ram_rdata;

  wr_bus_switch #(.NUM_WR(NUM_WR)) u_wr_switch (
    .clk, .rst,
    .wr_dat ({f_dat,  rx1_dat, rx0_dat}),
    .wr_cs  ({f_cs,   rx1_cs,  rx0_cs}),
    .wr_addr({f_add,  rx1_add, rx0_add}),
    .wr_we  ({f_we,   rx1_we,  rx0_we}),
    .ram_we, .ram_addr(ram_waddr), .ram_wdata
  );

  for (genvar c = 0; c < NUM_CHIPS; c++) begin : g_ram
    bram_chip #(.WORDS(CHIP_WORDS)) u_ram (
      .clk,
      .a_we(ram_we[c]), .a_addr(ram_waddr[c]), .a_wdata(ram_wdata[c]),
      .a_rdata(ram_echo[c]),
      .b_en(ram_en[c]), .b_addr(ram_raddr[c]), .b_rdata(ram_rdata[c])
    );
  end

  rd_bus_switch #(.NUM_RD(NUM_RD)) u_rd_switch (
    .clk, .rst,
    .rd_bus ({t_bus, tx1_bus, tx0_bus}),
    .rd_addr({t_add, tx1_add, tx0_add}),
    .rd_en  ({t_ren, tx1_ren, tx0_ren}),
    .rd_data,
    .ram_en, .ram_addr(ram_raddr), .ram_rdata
  );

endmodule
