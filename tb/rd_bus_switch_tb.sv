// rd_bus_switch_tb: random exclusive chip selects for three readers. Each RAM
// read port must carry its reader's address and enable, each reader must get
// its chip's output word, and idle ports and readers must see zeros.
module rd_bus_switch_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  chip_id_t [2:0] rd_bus;
  addr_t [2:0] rd_addr;
  logic [2:0] rd_en;
  word_t [2:0] rd_data;
  logic [2:0] ram_en;
  addr_t [2:0] ram_addr;
  word_t [2:0] ram_rdata;
  int checks = 0, failures = 0;

  rd_bus_switch dut (.clk, .rst, .rd_bus, .rd_addr, .rd_en, .rd_data, .ram_en, .ram_addr, .ram_rdata);

  initial begin
    rd_bus = 0; rd_addr = 0; rd_en = 0; ram_rdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int perm [3];
      @(negedge clk);
      perm = '{0, 1, 2};
      perm.shuffle();
      for (int r = 0; r < 3; r++) begin
        rd_addr[r]   = addr_t'($urandom);
        rd_en[r]     = 1'($urandom);
        rd_bus[r]    = ($urandom % 4 == 0) ? 3'b000 : (3'b001 << perm[r]);
        ram_rdata[r] = word_t'($urandom);
      end
      #1;
      for (int c = 0; c < 3; c++) begin
        logic ee; addr_t ea;
        ee = 0; ea = 0;
        for (int r = 0; r < 3; r++) if (rd_bus[r][c]) begin ee = rd_en[r]; ea = rd_addr[r]; end
        checks++;
        if (ram_en[c] != ee || ram_addr[c] != ea) begin
          failures++; $display("FAIL chip %0d: en %b addr %0d expected %b %0d", c, ram_en[c], ram_addr[c], ee, ea);
        end
      end
      for (int r = 0; r < 3; r++) begin
        word_t ed;
        ed = (rd_bus[r] == 0) ? 16'h0 : ram_rdata[perm[r]];
        checks++;
        if (rd_data[r] != ed) begin
          failures++; $display("FAIL reader %0d: %h expected %h", r, rd_data[r], ed);
        end
      end
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
