// read_ctrl_tb: one reader machine on the Tx1 region (words 32-63) with a RAM
// model of three chips kept here. Chip identities are queued at random, other
// readers hold chips at random (bus_status) and the sink pauses at random
// (dst_rdy_n). Checked: every packet leaves in queue order with the 32 words
// stored at 32..63 of its chip, sof_n only on the first and eof_n only on the
// last word, a chip is never taken while another reader holds it, the
// address holds during a pause, the chip is released after each packet, and
// with no waiting the first word leaves three clocks after the identity
// reaches the queue head and one word leaves every clock after that.
module read_ctrl_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  chip_id_t new_bus, bus_status, claim, bus;
  logic pop, ren, sof_n, eof_n, src_rdy_n, dst_rdy_n, no_tx;
  addr_t raddr;
  word_t rdata, dat;

  read_ctrl #(.BASE(BASE_TX1)) dut (
    .clk, .rst, .new_bus, .pop, .bus_status, .claim, .bus, .raddr, .ren, .rdata,
    .dat, .sof_n, .eof_n, .src_rdy_n, .dst_rdy_n, .no_tx);

  word_t mem [3][96];
  chip_id_t q[$];
  chip_id_t cur;
  int widx = 0, pkts = 0, n_wait = 0, n_pause = 0, n_fast = 0;
  int head_cyc = -1, cyc = 0;
  bit quiet = 0;
  int checks = 0, failures = 0;
  int pushed = 0;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, m); end
  endtask

  function automatic int idx(input chip_id_t c);
    return c[0] ? 0 : c[1] ? 1 : 2;
  endfunction

  // RAM model: registered read with enable
  always @(posedge clk) begin
    if (ren && bus != 0) rdata <= mem[idx(bus)][raddr];
  end

  assign new_bus = (q.size() > 0) ? q[0] : 3'b000;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst) begin
      dst_rdy_n <= 0;
      bus_status <= 0;
    end else begin
      if (pop) begin
        chk(q.size() > 0, "pop from an empty queue");
        cur = q.pop_front();
        head_cyc = cyc;
      end
      // a chip is never taken while another reader holds it
      if (claim != 0) chk((claim & bus_status) == 0, "took a busy chip");
      if (int'(dut.state) == 1 && claim == 0) n_wait++;
      if (!src_rdy_n && dst_rdy_n) n_pause++;
      if (!src_rdy_n && !dst_rdy_n) begin
        chk(bus == cur, "reading the wrong chip");
        chk(dat == mem[idx(cur)][32 + widx], $sformatf("word %0d: %h expected %h", widx, dat, mem[idx(cur)][32 + widx]));
        chk(sof_n == (widx != 0), "sof_n framing");
        chk(eof_n == (widx != 31), "eof_n framing");
        if (widx == 0 && quiet) begin
          chk(cyc - head_cyc == 3, $sformatf("first word %0d clocks after the queue head, expected 3", cyc - head_cyc));
          n_fast++;
        end
        if (widx == 31) begin widx = 0; pkts++; end else widx++;
      end
      if (no_tx) chk(bus == 0 && src_rdy_n, "idle but still holding a chip or sending");
      // random environment
      dst_rdy_n  <= quiet ? 1'b0 : (($urandom % 5) == 0);
      bus_status <= quiet ? 3'b000 : 3'($urandom) & 3'($urandom);
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) for (int a = 0; a < 96; a++) mem[c][a] = word_t'($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    // quiet phase: no waiting, no pauses, one packet at a time
    quiet = 1;
    for (int n = 0; n < 3; n++) begin
      @(posedge clk);
      q.push_back(3'b001 << n);
      pushed++;
      repeat (40) @(posedge clk);
    end
    quiet = 0;
    for (int n = 0; n < 30; n++) begin
      @(posedge clk);
      if (q.size() < 3) begin q.push_back(3'b001 << ($urandom % 3)); pushed++; end
      repeat ($urandom % 50) @(posedge clk);
    end
    while (q.size() > 0 || !no_tx) @(posedge clk);
    repeat (5) @(posedge clk);
    chk(pkts == pushed && pushed > 10, $sformatf("%0d packets left, %0d queued", pkts, pushed));
    chk(n_fast == 3, "no-wait latency not measured");
    chk(n_wait > 0 && n_pause > 0, "busy chip wait or sink pause never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
