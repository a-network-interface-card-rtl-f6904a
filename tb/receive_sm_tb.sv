// receive_sm_tb: both receivers send at the same time, round after round,
// while the host side holds a random chip (busy_ext). Checked: receiver 0
// takes the lowest free chip and receiver 1 the next one (never the same chip,
// never the host's), each packet's identity is pushed once with the
// destination worked out here from node 0's masks, the writes go to
// consecutive addresses from the region base and number the packet's words,
// pauses put the channel in STALL, and rx_flag is high exactly while a channel
// is busy.
module receive_sm_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t dat [2];
  logic  sof_n [2], eof_n [2], src_rdy_n [2];
  chip_id_t busy_ext, claim, cs [2];
  addr_t add [2];
  logic  we [2], push [2], rx_flag;
  dest_e push_dest [2];
  logic [1:0] stalled;

  receive_sm dut (
    .clk, .rst,
    .rx0_dat(dat[0]), .rx0_sof_n(sof_n[0]), .rx0_eof_n(eof_n[0]), .rx0_src_rdy_n(src_rdy_n[0]),
    .rx1_dat(dat[1]), .rx1_sof_n(sof_n[1]), .rx1_eof_n(eof_n[1]), .rx1_src_rdy_n(src_rdy_n[1]),
    .tx0_mask(8'b0000_1110), .tx1_mask(8'b1111_0000),
    .busy_ext, .claim,
    .rx0_cs(cs[0]), .rx0_add(add[0]), .rx0_we(we[0]), .rx0_push(push[0]), .rx0_push_dest(push_dest[0]),
    .rx1_cs(cs[1]), .rx1_add(add[1]), .rx1_we(we[1]), .rx1_push(push[1]), .rx1_push_dest(push_dest[1]),
    .rx_flag, .stalled);

  int checks = 0, failures = 0, n_stall = 0;
  int exp_dest [2], nwr [2], npush [2], len [2];
  chip_id_t exp_cs [2];

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  function automatic int route(input logic [7:0] d);
    if ((d & 8'h0E) != 0) return 0;
    if ((d & 8'hF0) != 0) return 1;
    return 2;
  endfunction

  task automatic send(input int u, input logic [7:0] d, input int n, input int pause_at);
    for (int i = 0; i < n; i++) begin
      if (i == pause_at) begin
        src_rdy_n[u] <= 1; sof_n[u] <= 1; eof_n[u] <= 1;
        repeat (2) @(posedge clk);
      end
      src_rdy_n[u] <= 0;
      sof_n[u] <= (i == 0) ? 0 : 1;
      eof_n[u] <= (i == n - 1) ? 0 : 1;
      dat[u]   <= (i == 0) ? {d, 8'h00} : word_t'($urandom);
      @(posedge clk);
    end
    src_rdy_n[u] <= 1; sof_n[u] <= 1; eof_n[u] <= 1;
    @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      chk((cs[0] & cs[1]) == 0, "both receivers on one chip");
      chk(((cs[0] | cs[1]) & busy_ext) == 0, "receiver on the host's chip");
      chk(rx_flag == (int'(dut.u_rx0.state) != 0 || int'(dut.u_rx1.state) != 0), "rx_flag");
      if (stalled != 0) n_stall++;
      for (int u = 0; u < 2; u++) begin
        if (push[u]) begin
          npush[u]++;
          chk(int'(push_dest[u]) == exp_dest[u], $sformatf("rx%0d push dest %0d expected %0d", u, push_dest[u], exp_dest[u]));
          chk(cs[u] == exp_cs[u], $sformatf("rx%0d chip %b expected %b", u, cs[u], exp_cs[u]));
        end
        if (we[u]) begin
          chk(int'(add[u]) == 32 * exp_dest[u] + nwr[u], $sformatf("rx%0d address %0d", u, add[u]));
          nwr[u]++;
        end
      end
    end
  end

  initial begin
    for (int u = 0; u < 2; u++) begin dat[u] = 0; sof_n[u] = 1; eof_n[u] = 1; src_rdy_n[u] = 1; end
    busy_ext = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int r = 0; r < 40; r++) begin
      logic [7:0] d0, d1;
      chip_id_t free;
      busy_ext = ($urandom % 4 == 0) ? 3'b000 : 3'b001 << ($urandom % 3);
      free = ~busy_ext;
      exp_cs[0] = free[0] ? 3'b001 : free[1] ? 3'b010 : 3'b100;
      free = free & ~exp_cs[0];
      exp_cs[1] = free[0] ? 3'b001 : free[1] ? 3'b010 : 3'b100;
      d0 = 8'b1 << ($urandom % 8);
      d1 = 8'b1 << ($urandom % 8);
      exp_dest[0] = route(d0); exp_dest[1] = route(d1);
      len[0] = 2 + int'($urandom % 31); len[1] = 2 + int'($urandom % 31);
      nwr = '{0, 0}; npush = '{0, 0};
      fork
        send(0, d0, len[0], (r % 3 == 0) ? len[0] / 2 : -1);
        send(1, d1, len[1], (r % 4 == 1) ? len[1] / 2 : -1);
      join
      repeat (4) @(posedge clk);
      for (int u = 0; u < 2; u++) begin
        chk(npush[u] == 1, $sformatf("rx%0d pushed %0d times", u, npush[u]));
        chk(nwr[u] == len[u], $sformatf("rx%0d wrote %0d words of %0d", u, nwr[u], len[u]));
      end
      chk(!rx_flag && cs[0] == 0 && cs[1] == 0, "not idle after the round");
    end
    chk(n_stall > 0, "STALL never entered");
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
