// wr_bus_switch_tb: random data from three writers, random exclusive chip
// selects. Each RAM port must carry the selected writer's address and write
// enable of this clock and that writer's data from two clocks earlier; an
// unselected port must be idle.
module wr_bus_switch_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  word_t [2:0] wr_dat;
  chip_id_t [2:0] wr_cs;
  addr_t [2:0] wr_addr;
  logic [2:0] wr_we;
  logic [2:0] ram_we;
  addr_t [2:0] ram_addr;
  word_t [2:0] ram_wdata;
  word_t [2:0] d1, d2;
  int checks = 0, failures = 0;

  wr_bus_switch dut (.clk, .rst, .wr_dat, .wr_cs, .wr_addr, .wr_we, .ram_we, .ram_addr, .ram_wdata);

  initial begin
    wr_dat = 0; wr_cs = 0; wr_addr = 0; wr_we = 0; d1 = 0; d2 = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int perm [3];
      @(negedge clk);
      // random assignment of chips to writers, some writers without a chip
      perm = '{0, 1, 2};
      perm.shuffle();
      for (int w = 0; w < 3; w++) begin
        wr_dat[w]  = word_t'($urandom);
        wr_addr[w] = addr_t'($urandom);
        wr_we[w]   = 1'($urandom);
        wr_cs[w]   = ($urandom % 4 == 0) ? 3'b000 : (3'b001 << perm[w]);
      end
      #1;
      for (int c = 0; c < 3; c++) begin
        logic ewe; addr_t ea; word_t ed;
        ewe = 0; ea = 0; ed = 0;
        for (int w = 0; w < 3; w++)
          if (wr_cs[w][c]) begin ewe = wr_we[w]; ea = wr_addr[w]; ed = d2[w]; end
        checks++;
        if (ram_we[c] != ewe || ram_addr[c] != ea || ram_wdata[c] != ed) begin
          failures++;
          $display("FAIL chip %0d: we %b addr %0d data %h expected %b %0d %h",
                   c, ram_we[c], ram_addr[c], ram_wdata[c], ewe, ea, ed);
        end
      end
      @(posedge clk);
      d2 = d1; d1 = wr_dat;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
