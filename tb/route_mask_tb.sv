// route_mask_tb: exhaustive check of the routing decision. Every destination
// byte is tried with node 0's masks and with random mask pairs; the expected
// destination and region base are worked out here (Tx0 first, then Tx1, else
// host; bases 0, 32, 64).
module route_mask_tb;
  import nic_pkg::*;
  node_mask_t dest_addr, m0, m1;
  dest_e dest;
  addr_t base;
  int checks = 0, failures = 0;

  route_mask dut (.dest_addr, .tx0_mask(m0), .tx1_mask(m1), .dest, .base);

  task automatic one();
    int    e;
    addr_t eb;
    #1;
    if ((dest_addr & m0) != 0)      e = 0;
    else if ((dest_addr & m1) != 0) e = 1;
    else                            e = 2;
    eb = (e == 0) ? 8'd0 : (e == 1) ? 8'd32 : 8'd64;
    checks++;
    if (int'(dest) != e || base != eb) begin
      failures++;
      $display("FAIL dest_addr=%b m0=%b m1=%b: got %0d/%0d expected %0d/%0d",
               dest_addr, m0, m1, dest, base, e, eb);
    end
  endtask

  initial begin
    m0 = 8'b0000_1110; m1 = 8'b1111_0000;
    for (int a = 0; a < 256; a++) begin dest_addr = 8'(a); one(); end
    for (int n = 0; n < 2000; n++) begin
      m0 = 8'($urandom); m1 = 8'($urandom); dest_addr = 8'($urandom);
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
