// rd_bus_switch: read-side bus switch between the three RAM chips and the
// three readers (transmitter 0, transmitter 1, host To side).
//
// Each reader's one-hot chip select (its "bus") connects its read address and
// read enable to one RAM read port, and that port's output word back to the
// reader. The steering is purely combinational (the RAM read port supplies the
// register); the clock and reset serve only the exclusivity check. The
// document describes the same steering with tri-state buses; here it is an
// AND-OR multiplexer. At most one reader may select a chip; an assertion
// checks this. A reader that selects no chip receives zeros.
module rd_bus_switch
  import nic_pkg::*;
#(
  parameter int unsigned NUM_RD = 3
) (
  input  logic                     clk,     // used only by the check below
  input  logic                     rst,
  input  chip_id_t [NUM_RD-1:0]    rd_bus,
  input  addr_t    [NUM_RD-1:0]    rd_addr,
  input  logic     [NUM_RD-1:0]    rd_en,
  output word_t    [NUM_RD-1:0]    rd_data,
  output logic     [NUM_CHIPS-1:0] ram_en,
  output addr_t    [NUM_CHIPS-1:0] ram_addr,
  input  word_t    [NUM_CHIPS-1:0] ram_rdata
);

  always_comb begin
    ram_en   = '0;
    ram_addr = '0;
    rd_data  = '0;
    for (int c = 0; c < NUM_CHIPS; c++) begin
      for (int r = 0; r < NUM_RD; r++) begin
        if (rd_bus[r][c]) begin
          ram_en[c]   = ram_en[c]   | rd_en[r];
          ram_addr[c] = ram_addr[c] | rd_addr[r];
          rd_data[r]  = rd_data[r]  | ram_rdata[c];
        end
      end
    end
  end

  // one reader per chip
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < NUM_CHIPS; c++) begin
        automatic int n = 0;
        for (int r = 0; r < NUM_RD; r++) n += int'(rd_bus[r][c]);
        assert (n <= 1) else $error("rd_bus_switch: chip %0d selected by %0d readers", c, n);
      end
    end
  end

endmodule
