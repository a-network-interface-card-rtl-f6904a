// interface_sm_tb: the host interface pair. The From side receives 32-word
// host packets (no end-of-frame flag) with random destinations and random
// pauses while the receivers hold a random chip; the test checks the chosen
// chip, the pushed destination (node 0's masks, worked out here) and that
// exactly 32 writes go to consecutive addresses from the region base. The To
// side reads the host region (words 64-95) of chips named by its queue from a
// RAM model kept here, with the transmitters holding chips and the host
// pausing at random; every word and the framing are checked. Both sides run
// at the same time.
module interface_sm_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  word_t f_dat, t_rdata, t_dat;
  logic f_sof_n, f_src_rdy_n, f_we, f_push, f_flag;
  chip_id_t busy_ext, claim_ext, f_cs, t_new_bus, bus_ext, t_bus;
  addr_t f_add, t_add;
  dest_e f_push_dest;
  logic t_pop, t_ren, t_sof_n, t_eof_n, t_src_rdy_n, t_dst_rdy_n, no_t;

  interface_sm dut (
    .clk, .rst, .tx0_mask(8'b0000_1110), .tx1_mask(8'b1111_0000),
    .f_dat, .f_sof_n, .f_src_rdy_n, .busy_ext, .claim_ext,
    .f_cs, .f_add, .f_we, .f_push, .f_push_dest, .f_flag,
    .t_new_bus, .t_pop, .bus_ext, .t_bus, .t_add, .t_ren, .t_rdata,
    .t_dat, .t_sof_n, .t_eof_n, .t_src_rdy_n, .t_dst_rdy_n, .no_t);

  int checks = 0, failures = 0;
  int exp_dest, nwr, npush, f_pkts = 0;
  chip_id_t exp_cs;
  word_t mem [3][96];
  chip_id_t q[$];
  chip_id_t cur;
  int widx = 0, t_pkts = 0, pushed = 0;

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, m); end
  endtask

  function automatic int route(input logic [7:0] d);
    if ((d & 8'h0E) != 0) return 0;
    if ((d & 8'hF0) != 0) return 1;
    return 2;
  endfunction

  function automatic int idx(input chip_id_t c);
    return c[0] ? 0 : c[1] ? 1 : 2;
  endfunction

  // From side
  task automatic send_host(input logic [7:0] d, input int pause_at);
    for (int i = 0; i < 32; i++) begin
      if (i == pause_at) begin
        f_src_rdy_n <= 1; f_sof_n <= 1;
        repeat (2) @(posedge clk);
      end
      f_src_rdy_n <= 0;
      f_sof_n <= (i == 0) ? 0 : 1;
      f_dat   <= (i == 0) ? {d, 8'h00} : word_t'($urandom);
      @(posedge clk);
    end
    f_src_rdy_n <= 1; f_sof_n <= 1;
    repeat (4) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (f_push) begin
        npush++;
        chk(int'(f_push_dest) == exp_dest, $sformatf("From dest %0d expected %0d", f_push_dest, exp_dest));
        chk(f_cs == exp_cs, $sformatf("From chip %b expected %b", f_cs, exp_cs));
      end
      if (f_we) begin
        chk(int'(f_add) == 32 * exp_dest + nwr, $sformatf("From address %0d", f_add));
        nwr++;
      end
    end
  end

  // To side
  always @(posedge clk) if (t_ren && t_bus != 0) t_rdata <= mem[idx(t_bus)][t_add];
  assign t_new_bus = (q.size() > 0) ? q[0] : 3'b000;

  always @(posedge clk) begin
    if (rst) begin
      t_dst_rdy_n <= 0; bus_ext <= 0;
    end else begin
      if (t_pop) cur = q.pop_front();
      chk((dut.u_to.claim & bus_ext) == 0, "To side took a held chip");
      if (!t_src_rdy_n && !t_dst_rdy_n) begin
        chk(t_dat == mem[idx(cur)][64 + widx], $sformatf("To word %0d: %h expected %h", widx, t_dat, mem[idx(cur)][64 + widx]));
        chk(t_sof_n == (widx != 0) && t_eof_n == (widx != 31), "To framing");
        if (widx == 31) begin widx = 0; t_pkts++; end else widx++;
      end
      t_dst_rdy_n <= ($urandom % 5) == 0;
      bus_ext <= ($urandom % 3 == 0) ? 3'b001 << ($urandom % 3) : 3'b000;
    end
  end

  initial begin
    for (int c = 0; c < 3; c++) for (int a = 0; a < 96; a++) mem[c][a] = word_t'($urandom);
    f_dat = 0; f_sof_n = 1; f_src_rdy_n = 1; busy_ext = 0; claim_ext = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    fork
      begin
        for (int n = 0; n < 30; n++) begin
          logic [7:0] d;
          d = 8'b1 << ($urandom % 8);
          exp_dest = route(d);
          busy_ext  = ($urandom % 2) ? 3'b001 << ($urandom % 3) : 3'b000;
          claim_ext = ($urandom % 2) ? 3'b001 << ($urandom % 3) & ~busy_ext : 3'b000;
          exp_cs = !(busy_ext[0] | claim_ext[0]) ? 3'b001 : !(busy_ext[1] | claim_ext[1]) ? 3'b010 : 3'b100;
          nwr = 0; npush = 0;
          send_host(d, (n % 3 == 0) ? int'($urandom % 32) : -1);
          chk(npush == 1 && nwr == 32, $sformatf("From: %0d pushes, %0d writes", npush, nwr));
          chk(!f_flag && f_cs == 0, "From not idle after the packet");
          f_pkts++;
        end
      end
      begin
        for (int n = 0; n < 20; n++) begin
          if (q.size() < 3) begin q.push_back(3'b001 << ($urandom % 3)); pushed++; end
          repeat ($urandom % 60) @(posedge clk);
        end
        while (q.size() > 0 || !no_t) @(posedge clk);
      end
    join
    repeat (5) @(posedge clk);
    chk(t_pkts == pushed && pushed > 5, $sformatf("To sent %0d of %0d", t_pkts, pushed));
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
