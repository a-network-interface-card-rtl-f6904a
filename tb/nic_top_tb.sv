// nic_top_tb: end-to-end test of the NIC at its default parameters (node 0's
// masks: Tx0 reaches nodes 1-3, Tx1 reaches nodes 4-7, node 0 is the host).
//
// Three sources (receiver 0, receiver 1, host From) send 32-word packets whose
// first byte is a one-hot destination node; three sinks (transmitter 0,
// transmitter 1, host To) collect what leaves. Every packet carries a unique
// id in its second word and a body computed from the id, so the sinks check
// each packet against the sent copy: right output, all 32 words intact, sof_n
// on the first word only and eof_n on the last word only. The expected output
// is worked out here from the masks, not taken from the design.
//
// Phases: a single packet (latency check: sof at the transmitter six clocks
// after sof at the receiver), three sources to three different outputs at
// once, two receivers to one transmitter at once (queueing), back-to-back
// packets that make a transmitter wait for a chip another reader holds,
// receiver pauses (STALL state) and sink pauses (clock correction on the
// transmit side), and a random phase. Each mechanism is counted and a
// mechanism that never happened is a failure.
`timescale 1ns/1ps
module nic_top_tb;
  import nic_pkg::*;

  localparam int NW = 32;      // words per packet
  localparam int LATENCY = 6;  // receiver sof to transmitter sof, in clocks

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #3.2 clk = ~clk;      // 156.25 MHz

  // sources: 0 = rx0, 1 = rx1, 2 = host From
  word_t s_dat      [3];
  logic  s_sof_n    [3];
  logic  s_eof_n    [3];
  logic  s_src_rdy_n[3];
  // sinks: 0 = tx0, 1 = tx1, 2 = host To
  word_t o_dat      [3];
  logic  o_sof_n    [3];
  logic  o_eof_n    [3];
  logic  o_src_rdy_n[3];
  logic  o_dst_rdy_n[3];

  logic rx_flag, no_tx0, no_tx1, no_t, f_flag;
  logic [1:0] rx_stalled;
  logic [2:0] q_dropped;
  word_t [NUM_CHIPS-1:0] ram_echo;

  nic_top dut (
    .clk, .rst,
    .rx0_dat(s_dat[0]), .rx0_sof_n(s_sof_n[0]), .rx0_eof_n(s_eof_n[0]), .rx0_src_rdy_n(s_src_rdy_n[0]),
    .rx1_dat(s_dat[1]), .rx1_sof_n(s_sof_n[1]), .rx1_eof_n(s_eof_n[1]), .rx1_src_rdy_n(s_src_rdy_n[1]),
    .tx0_dat(o_dat[0]), .tx0_sof_n(o_sof_n[0]), .tx0_eof_n(o_eof_n[0]), .tx0_src_rdy_n(o_src_rdy_n[0]),
    .tx0_dst_rdy_n(o_dst_rdy_n[0]),
    .tx1_dat(o_dat[1]), .tx1_sof_n(o_sof_n[1]), .tx1_eof_n(o_eof_n[1]), .tx1_src_rdy_n(o_src_rdy_n[1]),
    .tx1_dst_rdy_n(o_dst_rdy_n[1]),
    .f_dat(s_dat[2]), .f_sof_n(s_sof_n[2]), .f_src_rdy_n(s_src_rdy_n[2]),
    .t_dat(o_dat[2]), .t_sof_n(o_sof_n[2]), .t_eof_n(o_eof_n[2]), .t_src_rdy_n(o_src_rdy_n[2]),
    .t_dst_rdy_n(o_dst_rdy_n[2]),
    .rx_flag, .rx_stalled, .f_flag, .no_tx0, .no_tx1, .no_t, .q_dropped, .ram_echo
  );

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic int route(input logic [7:0] dest);
    if ((dest & 8'b0000_1110) != 0) return 0;
    if ((dest & 8'b1111_0000) != 0) return 1;
    return 2;
  endfunction

  function automatic word_t body(input logic [7:0] id, input int k);
    return word_t'((int'(id) * 40503 + k * 15467) ^ (k << 9));
  endfunction

  // per packet id: destination output, sent source, state
  int   exp_port [256];
  bit   in_use   [256];
  bit   got      [256];
  int   sof_cyc  [256];
  logic [7:0] next_id = 8'd1;
  int   outstanding [3] = '{0, 0, 0};
  int   sent = 0, received = 0;

  // mechanism counters
  int n_out[3] = '{0, 0, 0};
  int n_rx_stall = 0, n_tx_pause = 0, n_queued = 0, n_bus_wait = 0;
  int n_cut_through = 0, n_chip2 = 0, n_parallel = 0, n_latency_checked = 0;

  bit src_busy [3] = '{0, 0, 0};
  int cur_id   [3];

  // ---------------- sources ----------------
  task automatic send(input int p, input logic [7:0] dest, input int pause_at = -1,
                      input int pause_len = 0);
    logic [7:0] id;
    id = next_id;
    next_id = (next_id == 8'd255) ? 8'd1 : next_id + 1'b1;
    exp_port[id] = route(dest);
    in_use[id]   = 1'b1;
    got[id]      = 1'b0;
    outstanding[route(dest)]++;
    sent++;
    src_busy[p] = 1'b1;
    cur_id[p]   = id;
    for (int k = 0; k < NW; k++) begin
      if (k == pause_at) begin
        for (int j = 0; j < pause_len; j++) begin
          s_src_rdy_n[p] <= 1'b1;
          s_sof_n[p]     <= 1'b1;
          s_eof_n[p]     <= 1'b1;
          @(posedge clk);
        end
      end
      s_src_rdy_n[p] <= 1'b0;
      s_sof_n[p]     <= (k == 0) ? 1'b0 : 1'b1;
      s_eof_n[p]     <= (k == NW - 1) ? 1'b0 : 1'b1;
      s_dat[p]       <= (k == 0) ? {dest, 8'h00} : (k == 1) ? {8'h00, id} : body(id, k);
      @(posedge clk);
    end
    s_src_rdy_n[p] <= 1'b1;
    s_sof_n[p]     <= 1'b1;
    s_eof_n[p]     <= 1'b1;
    s_dat[p]       <= '0;
    @(posedge clk);
    src_busy[p] = 1'b0;
    // writers need two idle clocks between frames; four are left here
    repeat (3) @(posedge clk);
  endtask

  // ---------------- sinks ----------------
  bit   pause_en [3] = '{0, 0, 0};
  int   pause_left [3] = '{0, 0, 0};
  int   widx  [3] = '{0, 0, 0};
  logic [7:0] rid [3];
  logic [7:0] rdest [3];

  always @(posedge clk) begin
    for (int p = 0; p < 3; p++) begin
      if (rst) begin
        o_dst_rdy_n[p] <= 1'b0;
      end else if (pause_left[p] > 0) begin
        pause_left[p]--;
        o_dst_rdy_n[p] <= (pause_left[p] > 0);
      end else if (pause_en[p] && !o_src_rdy_n[p] && ($urandom % 6) == 0) begin
        pause_left[p] = 1 + int'($urandom % 3);
        o_dst_rdy_n[p] <= 1'b1;
      end else begin
        o_dst_rdy_n[p] <= 1'b0;
      end
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < 3; p++) begin
        if (!o_src_rdy_n[p] && o_dst_rdy_n[p]) n_tx_pause++;
        if (!o_src_rdy_n[p] && !o_dst_rdy_n[p]) begin
          // one word accepted
          if (widx[p] == 0) begin
            check(!o_sof_n[p], $sformatf("port %0d: first word without sof", p));
            rdest[p] = o_dat[p][15:8];
          end else begin
            check(o_sof_n[p], $sformatf("port %0d: sof on word %0d", p, widx[p]));
          end
          if (widx[p] == 1) begin
            rid[p] = o_dat[p][7:0];
            check(in_use[rid[p]] && !got[rid[p]], $sformatf("port %0d: unknown or repeated id %0d", p, rid[p]));
            check(exp_port[rid[p]] == p, $sformatf("id %0d left on port %0d, expected %0d", rid[p], p, exp_port[rid[p]]));
            check(route(rdest[p]) == p, $sformatf("port %0d: destination byte %b routed wrongly", p, rdest[p]));
            for (int s = 0; s < 2; s++)
              if (src_busy[s] && cur_id[s] == int'(rid[p])) n_cut_through++;
          end
          if (widx[p] >= 2)
            check(o_dat[p] == body(rid[p], widx[p]),
                  $sformatf("port %0d id %0d word %0d: %h expected %h", p, rid[p], widx[p],
                            o_dat[p], body(rid[p], widx[p])));
          check(o_eof_n[p] == (widx[p] != NW - 1), $sformatf("port %0d: eof_n wrong on word %0d", p, widx[p]));
          if (widx[p] == NW - 1) begin
            got[rid[p]]    = 1'b1;
            in_use[rid[p]] = 1'b0;
            outstanding[p]--;
            received++;
            n_out[p]++;
            widx[p] = 0;
          end else begin
            widx[p]++;
          end
        end
      end
      // observe the mechanisms
      if (rx_stalled != 2'b00) n_rx_stall++;
      if ((dut.g_queue[0].u_q.count != 0 && !no_tx0) ||
          (dut.g_queue[1].u_q.count != 0 && !no_tx1) ||
          (dut.g_queue[2].u_q.count != 0 && !no_t)) n_queued++;
      if ((int'(dut.u_transmit.u_tx0.state) == 1 && dut.u_transmit.u_tx0.claim == 0) ||
          (int'(dut.u_transmit.u_tx1.state) == 1 && dut.u_transmit.u_tx1.claim == 0) ||
          (int'(dut.u_interface.u_to.state) == 1 && dut.u_interface.u_to.claim == 0)) n_bus_wait++;
      if (dut.rx0_cs[2] || dut.rx1_cs[2] || dut.f_cs[2]) n_chip2++;
      if ($countones({dut.rx0_we, dut.rx1_we, dut.f_we}) == 3) n_parallel++;
      check(q_dropped == 3'b000, "chip identity dropped by a full queue");
    end
  end

  // latency: receiver 0 sof to first word on any output
  int lat_start = -1, lat_end = -1;
  always @(posedge clk) begin
    if (!rst && !s_sof_n[0] && !s_src_rdy_n[0] && lat_start < 0) lat_start = int'(cyc);
    if (!rst && lat_start >= 0 && lat_end < 0 && !o_src_rdy_n[0] && !o_sof_n[0]) lat_end = int'(cyc);
  end

  task automatic wait_drained();
    int t = 0;
    while ((outstanding[0] + outstanding[1] + outstanding[2]) != 0 && t < 20000) begin
      @(posedge clk);
      t++;
    end
    check(t < 20000, "outputs did not drain");
  endtask

  task automatic rand_src(input int p, input int npkt);
    for (int n = 0; n < npkt; n++) begin
      logic [7:0] d;
      int t;
      d = 8'b1 << ($urandom % 8);
      t = 0;
      while (outstanding[route(d)] != 0 && t < 5000) begin
        @(posedge clk);
        t++;
      end
      if ($urandom % 3 == 0 && p != 2) send(p, d, 1 + int'($urandom % 28), 1 + int'($urandom % 2));
      else send(p, d);
      repeat ($urandom % 4) @(posedge clk);
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    for (int p = 0; p < 3; p++) begin
      s_dat[p] = '0; s_sof_n[p] = 1'b1; s_eof_n[p] = 1'b1; s_src_rdy_n[p] = 1'b1;
    end
    for (int i = 0; i < 256; i++) begin
      exp_port[i] = -1; in_use[i] = 1'b0; got[i] = 1'b0;
    end
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);

    // 1. one packet, receiver 0 to node 2 (Tx0), no pauses: latency
    send(0, 8'b0000_0100);
    wait_drained();
    check(lat_end - lat_start == LATENCY,
          $sformatf("latency %0d clocks, expected %0d", lat_end - lat_start, LATENCY));
    n_latency_checked++;

    // 2. three sources to three outputs at once
    fork
      send(0, 8'b0010_0000);   // node 5 -> Tx1
      send(1, 8'b0000_0001);   // node 0 -> host
      send(2, 8'b0000_1000);   // node 3 -> Tx0
    join
    wait_drained();

    // 3. both receivers to Tx0 at once: one waits in the queue
    fork
      send(0, 8'b0000_0010);
      send(1, 8'b0000_1000);
    join
    wait_drained();

    // 4. back to back on receiver 0: Tx0 then Tx1 packet reuse chip 0, so
    //    Tx1 waits for Tx0 to release its read port (Tx0 sink pauses too)
    pause_en[0] = 1'b1;
    send(0, 8'b0000_0100);
    send(0, 8'b1000_0000);
    wait_drained();
    pause_en[0] = 1'b0;

    // 5. receiver pauses (clock correction) and host From to host To
    fork
      send(0, 8'b0001_0000, 10, 2);
      send(1, 8'b0000_0010, 20, 1);
      send(2, 8'b0000_0001);
    join
    wait_drained();

    // 6. random traffic; a destination gets a new packet only when the
    //    previous ones have left, and every sink pauses at random
    pause_en[0] = 1'b1; pause_en[1] = 1'b1; pause_en[2] = 1'b1;
    fork
      rand_src(0, 12);
      rand_src(1, 12);
      rand_src(2, 12);
    join
    wait_drained();

    // final accounting
    check(received == sent, $sformatf("sent %0d packets, received %0d", sent, received));
    for (int i = 0; i < 256; i++) check(!in_use[i], $sformatf("packet %0d never left", i));
    $display("mechanisms: tx0=%0d tx1=%0d host=%0d rx_stall=%0d tx_pause=%0d queued=%0d bus_wait=%0d cut_through=%0d chip2=%0d parallel=%0d latency=%0d",
             n_out[0], n_out[1], n_out[2], n_rx_stall, n_tx_pause, n_queued, n_bus_wait,
             n_cut_through, n_chip2, n_parallel, lat_end - lat_start);
    check(n_out[0] > 0, "no packet routed to Tx0");
    check(n_out[1] > 0, "no packet routed to Tx1");
    check(n_out[2] > 0, "no packet routed to the host");
    check(n_rx_stall > 0, "receiver STALL state never entered");
    check(n_tx_pause > 0, "transmit clock-correction pause never happened");
    check(n_queued > 0, "no packet ever waited in a queue");
    check(n_bus_wait > 0, "no reader ever waited for a read port");
    check(n_cut_through > 0, "no packet left before it was fully received");
    check(n_chip2 > 0, "RAM chip 2 never used");
    check(n_parallel > 0, "three writers never wrote in the same clock");
    check(n_latency_checked > 0, "latency never measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
