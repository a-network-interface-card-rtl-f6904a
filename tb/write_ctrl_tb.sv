// write_ctrl_tb: two writer machines, one ending packets on eof_n (receiver)
// and one ending them after 32 words (host From side). Packets with random
// destinations, random pauses and random busy chips are sent; the test
// predicts, for every clock, whether a write must happen and at which address:
// word k accepted at clock t is written at clock t+2 at region base + k. It
// also checks the chip chosen (lowest chip not busy), the queue push with its
// destination, the STALL state during pauses, the 32-word length guard and
// the return to IDLE.
module write_ctrl_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t    dat [2];
  logic     sof_n [2], eof_n [2], src_rdy_n [2];
  chip_id_t busy [2], claim [2], cs [2];
  addr_t    addr [2];
  logic     we [2], push [2], flag [2], stalled [2];
  dest_e    push_dest [2];

  write_ctrl #(.FIXED_LEN(1'b0)) u_eof (
    .clk, .rst, .dat(dat[0]), .sof_n(sof_n[0]), .eof_n(eof_n[0]), .src_rdy_n(src_rdy_n[0]),
    .tx0_mask(8'b0000_1110), .tx1_mask(8'b1111_0000), .busy(busy[0]), .claim(claim[0]),
    .cs(cs[0]), .addr(addr[0]), .we(we[0]), .push(push[0]), .push_dest(push_dest[0]),
    .flag(flag[0]), .stalled(stalled[0]));
  write_ctrl #(.FIXED_LEN(1'b1)) u_fix (
    .clk, .rst, .dat(dat[1]), .sof_n(sof_n[1]), .eof_n(eof_n[1]), .src_rdy_n(src_rdy_n[1]),
    .tx0_mask(8'b0000_1110), .tx1_mask(8'b1111_0000), .busy(busy[1]), .claim(claim[1]),
    .cs(cs[1]), .addr(addr[1]), .we(we[1]), .push(push[1]), .push_dest(push_dest[1]),
    .flag(flag[1]), .stalled(stalled[1]));

  int checks = 0, failures = 0, n_stall = 0, n_guard = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected writes per clock, per DUT
  int       exp_addr [2][int];
  int       exp_push [2][int];
  int       exp_dest [2];
  chip_id_t exp_cs   [2];
  int       idle_at  [2];

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, m); end
  endtask

  function automatic int route(input logic [7:0] d);
    if ((d & 8'h0E) != 0) return 0;
    if ((d & 8'hF0) != 0) return 1;
    return 2;
  endfunction

  task automatic send(input int u, input int nwords, input int pause_at, input int pause_len);
    logic [7:0] d;
    int base, k;
    chip_id_t b;
    d = 8'b1 << ($urandom % 8);
    base = 32 * route(d);
    // at least one chip must be free
    do b = 3'($urandom); while (b == 3'b111);
    busy[u] <= b;
    exp_cs[u] = (!b[0]) ? 3'b001 : (!b[1]) ? 3'b010 : 3'b100;
    exp_dest[u] = route(d);
    k = 0;
    for (int i = 0; i < nwords; i++) begin
      if (i == pause_at)
        repeat (pause_len) begin
          src_rdy_n[u] <= 1; sof_n[u] <= 1; eof_n[u] <= 1;
          @(posedge clk);
        end
      src_rdy_n[u] <= 0;
      sof_n[u] <= (i == 0) ? 0 : 1;
      eof_n[u] <= (u == 0 && i == nwords - 1) ? 0 : 1;
      dat[u]   <= (i == 0) ? {d, 8'h00} : word_t'($urandom);
      // the word is sampled at the next edge, clock cyc+1, written at cyc+3
      if (i == 0) exp_push[u][cyc + 3] = 1;
      if (k < 32) exp_addr[u][cyc + 3] = base + k;
      else n_guard++;
      k++;
      @(posedge clk);
    end
    src_rdy_n[u] <= 1; sof_n[u] <= 1; eof_n[u] <= 1;
    idle_at[u] = cyc + 3;
    repeat (4) @(posedge clk);
    chk(!flag[u] && cs[u] == 0 && addr[u] == 0, $sformatf("dut %0d not back in IDLE", u));
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      for (int u = 0; u < 2; u++) begin
        if (exp_addr[u].exists(cyc)) begin
          chk(we[u] && int'(addr[u]) == exp_addr[u][cyc],
              $sformatf("dut %0d: write we=%b addr=%0d expected addr %0d", u, we[u], addr[u], exp_addr[u][cyc]));
          chk(cs[u] == exp_cs[u], $sformatf("dut %0d: chip %b expected %b", u, cs[u], exp_cs[u]));
        end else begin
          chk(!we[u], $sformatf("dut %0d: unexpected write at addr %0d", u, addr[u]));
        end
        if (exp_push[u].exists(cyc))
          chk(push[u] && int'(push_dest[u]) == exp_dest[u],
              $sformatf("dut %0d: push %b dest %0d expected %0d", u, push[u], push_dest[u], exp_dest[u]));
        else
          chk(!push[u], $sformatf("dut %0d: unexpected push", u));
        if (stalled[u]) n_stall++;
      end
    end
  end

  initial begin
    for (int u = 0; u < 2; u++) begin
      dat[u] = 0; sof_n[u] = 1; eof_n[u] = 1; src_rdy_n[u] = 1; busy[u] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    fork
      begin
        for (int n = 0; n < 40; n++) begin
          int len;
          len = (n % 10 == 9) ? 40 : 2 + int'($urandom % 31);
          send(0, len, ($urandom % 2) ? int'($urandom % len) : -1, 1 + int'($urandom % 4));
        end
      end
      begin
        for (int n = 0; n < 40; n++)
          send(1, 32, ($urandom % 2) ? int'($urandom % 32) : -1, 1 + int'($urandom % 4));
      end
    join
    chk(n_stall > 0, "STALL state never entered");
    chk(n_guard > 0, "length guard never exercised");
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
