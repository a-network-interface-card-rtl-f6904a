// wr_bus_switch: write-side bus switch between the three writers (receiver 0,
// receiver 1, host From side) and the three RAM chips.
//
// Each writer's 16-bit data passes two registers (reset, always enabled), which
// gives its state machine the two clocks it needs to route the packet before
// the first word reaches the RAM. Each writer's one-hot chip select then
// connects its delayed data, its address and its write enable to exactly one
// RAM write port. The document builds this with active-low tri-state buffers
// (inverted chip selects) on shared buses; here the same selection is an
// AND-OR multiplexer, which is what such buses become inside today's FPGAs.
// At most one writer may select a chip; an assertion checks this. An
// unselected RAM port sees zeros and no write.
module wr_bus_switch
  import nic_pkg::*;
#(
  parameter int unsigned NUM_WR = 3
) (
  input  logic     clk,
  input  logic     rst,
  input  word_t    [NUM_WR-1:0]    wr_dat,   // raw data from each writer's port
  input  chip_id_t [NUM_WR-1:0]    wr_cs,
  input  addr_t    [NUM_WR-1:0]    wr_addr,
  input  logic     [NUM_WR-1:0]    wr_we,
  output logic     [NUM_CHIPS-1:0] ram_we,
  output addr_t    [NUM_CHIPS-1:0] ram_addr,
  output word_t    [NUM_CHIPS-1:0] ram_wdata
);

  word_t [NUM_WR-1:0] dat_r1, dat_r2;

  always_ff @(posedge clk) begin
    if (rst) begin
      dat_r1 <= '0;
      dat_r2 <= '0;
    end else begin
      dat_r1 <= wr_dat;
      dat_r2 <= dat_r1;
    end
  end

  always_comb begin
    ram_we    = '0;
    ram_addr  = '0;
    ram_wdata = '0;
    for (int c = 0; c < NUM_CHIPS; c++) begin
      for (int w = 0; w < NUM_WR; w++) begin
        if (wr_cs[w][c]) begin
          ram_we[c]    = ram_we[c]    | wr_we[w];
          ram_addr[c]  = ram_addr[c]  | wr_addr[w];
          ram_wdata[c] = ram_wdata[c] | dat_r2[w];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < NUM_CHIPS; c++) begin
        automatic int n = 0;
        for (int w = 0; w < NUM_WR; w++) n += int'(wr_cs[w][c]);
        assert (n <= 1) else $error("wr_bus_switch: chip %0d selected by %0d writers", c, n);
      end
    end
  end

endmodule
