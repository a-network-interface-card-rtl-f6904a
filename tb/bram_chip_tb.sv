// bram_chip_tb: random writes and reads on both ports of one RAM chip,
// checked against an array kept here. Port A returns the addressed word one
// clock later (old contents when writing the same address); port B returns it
// one clock after b_en and holds its output while b_en is low.
module bram_chip_tb;
  import nic_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_we = 0, b_en = 0;
  addr_t a_addr = 0, b_addr = 0;
  word_t a_wdata = 0, a_rdata, b_rdata;
  word_t model [96];
  word_t exp_a, exp_b;
  int checks = 0, failures = 0;

  bram_chip dut (.clk, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_addr, .b_rdata);

  initial begin
    // fill every word once
    for (int i = 0; i < 96; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 8'(i); a_wdata = word_t'($urandom); model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    exp_b = b_rdata;  // port B has not been read yet: its output holds
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a_we    = ($urandom % 2) == 1;
      a_addr  = 8'($urandom % 96);
      a_wdata = word_t'($urandom);
      b_en    = ($urandom % 4) != 0;
      b_addr  = 8'($urandom % 96);
      exp_a   = model[a_addr];
      if (b_en) exp_b = (a_we && a_addr == b_addr) ? b_rdata : model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_wdata;
      @(negedge clk);
      checks++;
      if (a_rdata != exp_a) begin failures++; $display("FAIL port A @%0d: %h expected %h", a_addr, a_rdata, exp_a); end
      if (!(b_en && a_we && a_addr == b_addr)) begin
        checks++;
        if (b_rdata != exp_b) begin failures++; $display("FAIL port B @%0d: %h expected %h", b_addr, b_rdata, exp_b); end
      end else exp_b = b_rdata;
      a_we = 0;  // idle for the clock before the next access
      b_en = 0;
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
