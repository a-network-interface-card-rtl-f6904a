// shufflenet_tb: eight NICs wired as the eight-node ShuffleNet they were
// designed for, with packets sent host to host across the network.
//
// Topology (node: next node on Tx0, next node on Tx1):
//   0: 1,7   1: 0,2   2: 3,5   3: 0,2   4: 3,5   5: 6,4   6: 1,7   7: 6,4
// Every node has exactly two incoming links; a node's receiver 0 is fed by the
// lower-numbered of its two upstream nodes. Each node's masks send a
// destination out of the transmitter that lies on a shortest path to it
// (ties: destinations 0-3 on Tx0, 4-7 on Tx1); node 0's pair is the NIC's
// default pair. The tables below were worked out by a breadth-first search of
// this graph and are checked here for consistency at time zero.
//
// Every packet enters at a host From port and carries {destination, source}
// in word 0, a unique id in word 1 and a body computed from the id. The
// checker at each host To port requires: the packet is for this node, every
// word is intact, sof_n/eof_n on the first/last word, the packet arrives once,
// and it crossed exactly as many links as the shortest path (links are
// counted by watching every transmitter). The 0 -> 5 route is checked to go
// through nodes 7 and 4.
//
// Phase 1 sends each of the 64 source/destination pairs alone. Phase 2 sends
// rounds of one packet from every node at the same time and waits for each
// round to drain. A round's destinations are a random permutation whose
// routes share no link, so every transmitter and host port carries at most one
// packet per round: the NIC reuses a chip's region for the next packet to the
// same output without checking that the previous one has left, so heavier
// contention on one output can overwrite a waiting packet. Transmitters are
// never paused here: a pause on one link reaches the next node as a receiver
// pause, and the NIC tolerates at most two clocks of those per forwarded
// packet.
`timescale 1ns/1ps
module shufflenet_tb;
  import nic_pkg::*;

  localparam int N  = 8;
  localparam int NW = 32;
  localparam int ROUNDS = 40;

  localparam int         NEXT  [N][2] = '{'{1,7}, '{0,2}, '{3,5}, '{0,2},
                                          '{3,5}, '{6,4}, '{1,7}, '{6,4}};
  // receiver of the next node that a transmitter drives
  localparam int         RXIDX [N][2] = '{'{0,0}, '{0,0}, '{0,0}, '{1,1},
                                          '{1,1}, '{1,1}, '{1,1}, '{0,0}};
  localparam node_mask_t M0 [N] = '{8'b0000_1110, 8'b1000_0001, 8'b0000_1011, 8'b1000_0011,
                                    8'b0000_1111, 8'b1100_0111, 8'b0000_1111, 8'b0100_0111};
  localparam node_mask_t M1 [N] = '{8'b1111_0000, 8'b0111_1100, 8'b1111_0000, 8'b0111_0100,
                                    8'b1110_0000, 8'b0001_1000, 8'b1011_0000, 8'b0011_1000};
  localparam int         DIST [N][N] = '{
    '{0,1,2,3,2,3,2,1}, '{1,0,1,2,3,2,3,2}, '{2,3,0,1,2,1,2,3}, '{1,2,1,0,3,2,3,2},
    '{2,3,2,1,0,1,2,3}, '{3,2,3,2,1,0,1,2}, '{2,1,2,3,2,3,0,1}, '{3,2,3,2,1,2,1,0}};

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #3.2 clk = ~clk;

  // links: tx[n][p] drives rx[NEXT[n][p]][RXIDX[n][p]]
  word_t tx_dat [N][2];
  logic  tx_sof_n [N][2], tx_eof_n [N][2], tx_src_rdy_n [N][2];
  word_t rx_dat [N][2];
  logic  rx_sof_n [N][2], rx_eof_n [N][2], rx_src_rdy_n [N][2];
  // host ports
  word_t f_dat [N];
  logic  f_sof_n [N], f_src_rdy_n [N];
  word_t t_dat [N];
  logic  t_sof_n [N], t_eof_n [N], t_src_rdy_n [N];
  logic  [2:0] q_dropped [N];

  for (genvar n = 0; n < N; n++) begin : g_node
    for (genvar p = 0; p < 2; p++) begin : g_link
      assign rx_dat      [NEXT[n][p]][RXIDX[n][p]] = tx_dat[n][p];
      assign rx_sof_n    [NEXT[n][p]][RXIDX[n][p]] = tx_sof_n[n][p];
      assign rx_eof_n    [NEXT[n][p]][RXIDX[n][p]] = tx_eof_n[n][p];
      assign rx_src_rdy_n[NEXT[n][p]][RXIDX[n][p]] = tx_src_rdy_n[n][p];
    end
    nic_top #(.TX0_MASK(M0[n]), .TX1_MASK(M1[n])) u_nic (
      .clk, .rst,
      .rx0_dat(rx_dat[n][0]), .rx0_sof_n(rx_sof_n[n][0]), .rx0_eof_n(rx_eof_n[n][0]),
      .rx0_src_rdy_n(rx_src_rdy_n[n][0]),
      .rx1_dat(rx_dat[n][1]), .rx1_sof_n(rx_sof_n[n][1]), .rx1_eof_n(rx_eof_n[n][1]),
      .rx1_src_rdy_n(rx_src_rdy_n[n][1]),
      .tx0_dat(tx_dat[n][0]), .tx0_sof_n(tx_sof_n[n][0]), .tx0_eof_n(tx_eof_n[n][0]),
      .tx0_src_rdy_n(tx_src_rdy_n[n][0]), .tx0_dst_rdy_n(1'b0),
      .tx1_dat(tx_dat[n][1]), .tx1_sof_n(tx_sof_n[n][1]), .tx1_eof_n(tx_eof_n[n][1]),
      .tx1_src_rdy_n(tx_src_rdy_n[n][1]), .tx1_dst_rdy_n(1'b0),
      .f_dat(f_dat[n]), .f_sof_n(f_sof_n[n]), .f_src_rdy_n(f_src_rdy_n[n]),
      .t_dat(t_dat[n]), .t_sof_n(t_sof_n[n]), .t_eof_n(t_eof_n[n]),
      .t_src_rdy_n(t_src_rdy_n[n]), .t_dst_rdy_n(1'b0),
      .rx_flag(), .rx_stalled(), .f_flag(), .no_tx0(), .no_tx1(), .no_t(),
      .q_dropped(q_dropped[n]), .ram_echo()
    );
  end

  int checks = 0;
  int failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t: %s", $time, msg);
    end
  endtask

  // ---------------- packets ----------------
  localparam int MAXID = 1024;
  int pk_src [MAXID];
  int pk_dst [MAXID];
  int hops [MAXID];
  int delivered [MAXID];
  logic [N-1:0] via [MAXID];
  int next_id = 1;
  int outstanding = 0;
  int total_hops = 0;
  int max_hops_seen = 0;

  function automatic word_t body(input int id, input int k);
    return word_t'((id * 16'h9e37) ^ (k * 16'h0b5d) ^ 16'h3c3c);
  endfunction

  function automatic word_t pkt_word(input int id, input int k);
    if (k == 0) return {8'(1 << pk_dst[id]), 8'(1 << pk_src[id])};
    if (k == 1) return word_t'(id);
    return body(id, k);
  endfunction

  task automatic send(input int s, input int d);
    int id;
    id = next_id++;
    pk_src[id] = s;
    pk_dst[id] = d;
    hops[id] = 0;
    delivered[id] = 0;
    via[id] = '0;
    outstanding++;
    for (int k = 0; k < NW; k++) begin
      f_dat[s]       <= pkt_word(id, k);
      f_sof_n[s]     <= (k != 0);
      f_src_rdy_n[s] <= 1'b0;
      @(posedge clk);
    end
    f_sof_n[s]     <= 1'b1;
    f_src_rdy_n[s] <= 1'b1;
    f_dat[s]       <= '0;
    repeat (4) @(posedge clk);
  endtask

  // ---------------- link monitors: count the links each packet crosses ----------------
  int lk_idx [N][2];
  always @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < N; n++) begin
        for (int p = 0; p < 2; p++) begin
          if (!tx_src_rdy_n[n][p]) begin
            if (!tx_sof_n[n][p]) lk_idx[n][p] = 0;
            if (lk_idx[n][p] == 1 && tx_dat[n][p] > 0 && tx_dat[n][p] < MAXID) begin
              hops[tx_dat[n][p]]++;
              via[tx_dat[n][p]][n] = 1'b1;
            end
            lk_idx[n][p]++;
          end
        end
      end
    end
  end

  // ---------------- host To checkers ----------------
  int t_idx [N];
  int t_id [N];
  always @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < N; n++) begin
        if (!t_src_rdy_n[n]) begin
          if (!t_sof_n[n]) t_idx[n] = 0;
          check((t_sof_n[n] == 1'b0) == (t_idx[n] == 0),
                $sformatf("node %0d: sof_n wrong at word %0d", n, t_idx[n]));
          check((t_eof_n[n] == 1'b0) == (t_idx[n] == NW - 1),
                $sformatf("node %0d: eof_n wrong at word %0d", n, t_idx[n]));
          if (t_idx[n] == 0)
            check(t_dat[n][15:8] == 8'(1 << n),
                  $sformatf("node %0d got a packet for mask %b", n, t_dat[n][15:8]));
          if (t_idx[n] == 1) begin
            t_id[n] = int'(t_dat[n]);
            check(t_id[n] > 0 && t_id[n] < next_id,
                  $sformatf("node %0d: unknown packet id %0d", n, t_id[n]));
          end
          if (t_idx[n] >= 2 && t_id[n] > 0 && t_id[n] < next_id)
            check(t_dat[n] == body(t_id[n], t_idx[n]),
                  $sformatf("node %0d id %0d word %0d: %h expected %h", n, t_id[n],
                            t_idx[n], t_dat[n], body(t_id[n], t_idx[n])));
          if (t_idx[n] == NW - 1 && t_id[n] > 0 && t_id[n] < next_id) begin
            check(pk_dst[t_id[n]] == n, $sformatf("id %0d delivered to node %0d", t_id[n], n));
            check(delivered[t_id[n]] == 0, $sformatf("id %0d delivered twice", t_id[n]));
            check(hops[t_id[n]] == DIST[pk_src[t_id[n]]][n],
                  $sformatf("id %0d %0d->%0d crossed %0d links, shortest path %0d", t_id[n],
                            pk_src[t_id[n]], n, hops[t_id[n]], DIST[pk_src[t_id[n]]][n]));
            if (pk_src[t_id[n]] == 0 && n == 5)
              check(via[t_id[n]] == 8'b1001_0001,
                    $sformatf("0->5 went through nodes %b, expected 0, 7, 4", via[t_id[n]]));
            delivered[t_id[n]]++;
            total_hops += hops[t_id[n]];
            if (hops[t_id[n]] > max_hops_seen) max_hops_seen = hops[t_id[n]];
            outstanding--;
          end
          t_idx[n]++;
        end
      end
    end
  end

  always @(posedge clk)
    if (!rst)
      for (int n = 0; n < N; n++)
        if (q_dropped[n] != 0) check(1'b0, $sformatf("node %0d dropped a queue entry", n));

  task automatic wait_drained(input int limit);
    int t;
    t = 0;
    while (outstanding != 0 && t < limit) begin
      @(posedge clk);
      t++;
    end
    check(outstanding == 0, $sformatf("%0d packets not delivered", outstanding));
    outstanding = 0;
  endtask

  // ---------------- stimulus ----------------
  int dst_of [N];
  int tries = 0;

  // next node from n towards d by the masks, or -1 when n is d
  function automatic int hop(input int n, input int d);
    if (M0[n][d]) return NEXT[n][0];
    if (M1[n][d]) return NEXT[n][1];
    return -1;
  endfunction

  // a random permutation of destinations whose routes use every link at most once
  task automatic pick_round();
    bit ok;
    int used [N][2];
    int cur, nxt, j, tmp;
    do begin
      tries++;
      for (int n = 0; n < N; n++) dst_of[n] = n;
      for (int n = N - 1; n > 0; n--) begin
        j = $urandom_range(n);
        tmp = dst_of[n]; dst_of[n] = dst_of[j]; dst_of[j] = tmp;
      end
      for (int n = 0; n < N; n++) begin used[n][0] = 0; used[n][1] = 0; end
      ok = 1'b1;
      for (int n = 0; n < N; n++) begin
        cur = n;
        for (int h = 0; h < 4 && cur != dst_of[n]; h++) begin
          nxt = hop(cur, dst_of[n]);
          if (nxt == NEXT[cur][0]) used[cur][0]++; else used[cur][1]++;
          cur = nxt;
        end
      end
      for (int n = 0; n < N; n++) if (used[n][0] > 1 || used[n][1] > 1) ok = 1'b0;
    end while (!ok);
  endtask
  int sent_p1 = 0;
  int sent_p2 = 0;

  initial begin
    // the link tables must give every receiver exactly one driver
    for (int j = 0; j < N; j++) begin
      for (int r = 0; r < 2; r++) begin
        int drivers;
        drivers = 0;
        for (int n = 0; n < N; n++)
          for (int p = 0; p < 2; p++)
            if (NEXT[n][p] == j && RXIDX[n][p] == r) drivers++;
        check(drivers == 1, $sformatf("node %0d receiver %0d has %0d drivers", j, r, drivers));
      end
      check((M0[j] & M1[j]) == 0 && (M0[j] | M1[j]) == ~8'(1 << j),
            $sformatf("node %0d masks do not split the other nodes", j));
    end

    for (int n = 0; n < N; n++) begin
      f_dat[n] = '0;
      f_sof_n[n] = 1'b1;
      f_src_rdy_n[n] = 1'b1;
    end
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);

    // phase 1: every pair alone
    for (int s = 0; s < N; s++) begin
      for (int d = 0; d < N; d++) begin
        send(s, d);
        sent_p1++;
        wait_drained(2000);
      end
    end

    // phase 2: all nodes send at once, link-disjoint random permutations
    for (int r = 0; r < ROUNDS; r++) begin
      pick_round();
      fork
        send(0, dst_of[0]); send(1, dst_of[1]); send(2, dst_of[2]); send(3, dst_of[3]);
        send(4, dst_of[4]); send(5, dst_of[5]); send(6, dst_of[6]); send(7, dst_of[7]);
      join
      sent_p2 += N;
      wait_drained(4000);
    end

    check(max_hops_seen == 3, $sformatf("longest route seen %0d links, expected 3", max_hops_seen));
    $display("shufflenet: %0d single packets, %0d concurrent packets, %0d links crossed",
             sent_p1, sent_p2, total_hops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
