// transmit_sm_tb: both transmitters read from a RAM model of three chips kept
// here, fed by their own identity queues, while the host side holds chips at
// random (bus_ext) and both sinks pause at random for clock correction.
// Queues are filled so that the two transmitters often want the same chip.
// Checked: each transmitter sends its packets in queue order with the words
// of its own region (Tx0: 0-31, Tx1: 32-63), framing, the two never hold one
// chip together nor take one the host holds, waiting for a held chip happens,
// and with nothing in the way both send one word per clock in parallel.
module transmit_sm_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  chip_id_t new_bus [2], bus [2], bus_ext, claim;
  logic pop [2], ren [2], sof_n [2], eof_n [2], src_rdy_n [2], dst_rdy_n [2], no_tx [2];
  addr_t add [2];
  word_t rdata [2], dat [2];

  transmit_sm dut (
    .clk, .rst,
    .tx0_new_bus(new_bus[0]), .tx0_pop(pop[0]), .tx1_new_bus(new_bus[1]), .tx1_pop(pop[1]),
    .bus_ext, .claim,
    .tx0_bus(bus[0]), .tx0_add(add[0]), .tx0_ren(ren[0]), .tx0_rdata(rdata[0]),
    .tx1_bus(bus[1]), .tx1_add(add[1]), .tx1_ren(ren[1]), .tx1_rdata(rdata[1]),
    .tx0_dat(dat[0]), .tx0_sof_n(sof_n[0]), .tx0_eof_n(eof_n[0]), .tx0_src_rdy_n(src_rdy_n[0]),
    .tx0_dst_rdy_n(dst_rdy_n[0]),
    .tx1_dat(dat[1]), .tx1_sof_n(sof_n[1]), .tx1_eof_n(eof_n[1]), .tx1_src_rdy_n(src_rdy_n[1]),
    .tx1_dst_rdy_n(dst_rdy_n[1]),
    .no_tx0(no_tx[0]), .no_tx1(no_tx[1]));

  word_t mem [3][96];
  chip_id_t q [2][$];
  chip_id_t cur [2];
  int widx [2] = '{0, 0}, pkts [2] = '{0, 0}, pushed [2] = '{0, 0};
  int checks = 0, failures = 0, n_wait = 0, n_both = 0;
  bit quiet = 0;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  function automatic int idx(input chip_id_t c);
    return c[0] ? 0 : c[1] ? 1 : 2;
  endfunction

  always @(posedge clk)
    for (int t = 0; t < 2; t++)
      if (ren[t] && bus[t] != 0) rdata[t] <= mem[idx(bus[t])][add[t]];

  always_comb for (int t = 0; t < 2; t++) new_bus[t] = (q[t].size() > 0) ? q[t][0] : 3'b000;

  always @(posedge clk) begin
    if (rst) begin
      dst_rdy_n[0] <= 0; dst_rdy_n[1] <= 0; bus_ext <= 0;
    end else begin
      chk((bus[0] & bus[1]) == 0, "both transmitters on one chip");
      chk((claim & bus_ext) == 0, "claimed a chip the host holds");
      if ((int'(dut.u_tx0.state) == 1 && dut.u_tx0.claim == 0) ||
          (int'(dut.u_tx1.state) == 1 && dut.u_tx1.claim == 0)) n_wait++;
      if (!src_rdy_n[0] && !src_rdy_n[1] && !dst_rdy_n[0] && !dst_rdy_n[1]) n_both++;
      for (int t = 0; t < 2; t++) begin
        if (pop[t]) cur[t] = q[t].pop_front();
        if (!src_rdy_n[t] && !dst_rdy_n[t]) begin
          chk(dat[t] == mem[idx(cur[t])][32 * t + widx[t]],
              $sformatf("tx%0d word %0d: %h expected %h", t, widx[t], dat[t], mem[idx(cur[t])][32 * t + widx[t]]));
          chk(sof_n[t] == (widx[t] != 0) && eof_n[t] == (widx[t] != 31), $sformatf("tx%0d framing", t));
          if (widx[t] == 31) begin widx[t] = 0; pkts[t]++; end else widx[t]++;
        end
        dst_rdy_n[t] <= quiet ? 1'b0 : (($urandom % 6) == 0);
      end
      bus_ext <= quiet ? 3'b000 : (($urandom % 3 == 0) ? 3'b001 << ($urandom % 3) : 3'b000);
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) for (int a = 0; a < 96; a++) mem[c][a] = word_t'($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // quiet: two different chips, both transmitters run in parallel
    quiet = 1;
    q[0].push_back(3'b001); q[1].push_back(3'b010); pushed = '{1, 1};
    repeat (45) @(posedge clk);
    chk(n_both >= 30, $sformatf("parallel transfer only %0d clocks", n_both));
    quiet = 0;
    for (int n = 0; n < 30; n++) begin
      chip_id_t c;
      c = 3'b001 << ($urandom % 3);
      // same chip for both transmitters most of the time
      if (q[0].size() < 3) begin q[0].push_back(c); pushed[0]++; end
      if (q[1].size() < 3) begin q[1].push_back(($urandom % 4 == 0) ? 3'b001 << ($urandom % 3) : c); pushed[1]++; end
      repeat ($urandom % 60) @(posedge clk);
    end
    while (q[0].size() + q[1].size() > 0 || !no_tx[0] || !no_tx[1]) @(posedge clk);
    repeat (5) @(posedge clk);
    for (int t = 0; t < 2; t++) chk(pkts[t] == pushed[t], $sformatf("tx%0d sent %0d of %0d", t, pkts[t], pushed[t]));
    chk(n_wait > 0, "no transmitter ever waited for a chip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
