// cs_queue_tb: random pushes from three writers and random pops, compared
// with a reference queue kept here: writer order within a clock, head zero
// when empty, count, and dropping of pushes that find the queue full.
module cs_queue_tb;
  import nic_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [2:0] push;
  chip_id_t [2:0] push_id;
  logic pop;
  chip_id_t head;
  logic [1:0] count;
  logic dropped;
  chip_id_t model[$];
  bit exp_drop;
  int checks = 0, failures = 0, n_drop = 0, n_multi = 0;

  cs_queue dut (.clk, .rst, .push, .push_id, .pop, .head, .count, .dropped);

  task automatic chk(input bit ok, input string m);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    push = 0; push_id = 0; pop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      chk(head == ((model.size() > 0) ? model[0] : 3'b000), $sformatf("head %b", head));
      chk(int'(count) == model.size(), $sformatf("count %0d expected %0d", count, model.size()));
      push = 3'($urandom) & (($urandom % 3 == 0) ? 3'b111 : 3'b001);
      for (int w = 0; w < 3; w++) push_id[w] = 3'b001 << ($urandom % 3);
      pop = ($urandom % 2) == 1;
      if ($countones(push) > 1) n_multi++;
      // reference
      if (pop && model.size() > 0) void'(model.pop_front());
      exp_drop = 0;
      for (int w = 0; w < 3; w++)
        if (push[w]) begin
          if (model.size() < 3) model.push_back(push_id[w]);
          else exp_drop = 1;
        end
      @(negedge clk);
      chk(dropped == exp_drop, "dropped flag");
      if (exp_drop) n_drop++;
      push = 0; pop = 0;
    end
    chk(n_drop > 0 && n_multi > 0, "full queue or simultaneous pushes never seen");
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
