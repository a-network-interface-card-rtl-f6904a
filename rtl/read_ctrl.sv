// read_ctrl: one reader state machine of the NIC (a transmitter or the host
// "To" side).
//
// The reader owns one destination region (start address BASE: 0 for Tx0, 32
// for Tx1, 64 for the host). Its queue presents the one-hot identity of the
// next chip that holds a packet for it (zero when empty). States, as in the
// document:
//   IDLE  - no chip held, output idle; a non-zero identity at the queue head
//           is taken (pop) and the machine moves on.
//   SETUP - waits while another reader holds that chip's read port.
//   START - takes the chip (bus) and reads the first word at BASE.
//   ON    - one word leaves per clock; the address counter is gated by the
//           sink's dst_rdy_n, so during clock correction the address and the
//           output word hold. After the word at BASE+31 has been accepted the
//           machine leaves.
//   END   - releases the chip; back to IDLE one clock later.
// The RAM read port is registered, so a word appears one clock after its
// address. The LocalLink-style outputs are registered to line up with it:
// sof_n and src_rdy_n go low with the first word, eof_n goes low with the
// 32nd word, and a word is transferred on every clock where src_rdy_n and
// dst_rdy_n are both low.
//
// Follows the document: the five states, fixed 32-word packets, the terminal
// address BASE+31, the counter gated by clock correction. This design's own
// choices: eof_n is given with the last word (LocalLink) rather than in END,
// and the queue is popped on leaving IDLE. SETUP is left only when the chip
// becomes free; the original also allowed leaving it when a newer packet
// arrived for this output, which is not done here because the packet already
// taken from the queue would then never be sent.
module read_ctrl
  import nic_pkg::*;
#(
  parameter addr_t BASE = BASE_TX0
) (
  input  logic     clk,
  input  logic     rst,
  // queue head: one-hot chip identity, zero when the queue is empty
  input  chip_id_t new_bus,
  output logic     pop,
  // chips whose read port is held or being claimed by other readers
  input  chip_id_t bus_status,
  output chip_id_t claim,
  // read side of the selected chip
  output chip_id_t bus,
  output addr_t    raddr,
  output logic     ren,
  input  word_t    rdata,
  // LocalLink-style output, active low
  output word_t    dat,
  output logic     sof_n,
  output logic     eof_n,
  output logic     src_rdy_n,
  input  logic     dst_rdy_n,
  // 1 while idle
  output logic     no_tx
);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_START, S_ON, S_END} state_e;
  state_e state;

  chip_id_t next_bus;
  logic [$clog2(PKT_WORDS)-1:0] idx;  // index of the word on dat
  logic xfer, last;

  assign xfer = (state == S_ON) && !dst_rdy_n;
  assign last = (idx == ($bits(idx))'(PKT_WORDS - 1));

  assign pop   = (state == S_IDLE) && (new_bus != '0);
  assign claim = (state == S_SETUP && (next_bus & bus_status) == '0) ? next_bus : '0;
  assign no_tx = (state == S_IDLE);

  always_comb begin
    ren   = 1'b0;
    raddr = BASE;
    if (state == S_START) begin
      ren   = 1'b1;
      raddr = BASE;
    end else if (xfer && !last) begin
      ren   = 1'b1;
      raddr = BASE + addr_t'(idx) + 1'b1;
    end
  end

  assign dat = (state == S_ON) ? rdata : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      next_bus  <= '0;
      bus       <= '0;
      idx       <= '0;
      sof_n     <= 1'b1;
      eof_n     <= 1'b1;
      src_rdy_n <= 1'b1;
    end else begin
      unique case (state)
        S_IDLE: begin
          bus       <= '0;
          idx       <= '0;
          sof_n     <= 1'b1;
          eof_n     <= 1'b1;
          src_rdy_n <= 1'b1;
          if (new_bus != '0) begin
            next_bus <= new_bus;
            state    <= S_SETUP;
          end
        end
        S_SETUP: begin
          if (claim != '0) begin
            bus   <= next_bus;
            state <= S_START;
          end
        end
        S_START: begin
          sof_n     <= 1'b0;
          src_rdy_n <= 1'b0;
          eof_n     <= (PKT_WORDS == 1) ? 1'b0 : 1'b1;
          idx       <= '0;
          state     <= S_ON;
        end
        S_ON: begin
          if (xfer) begin
            sof_n <= 1'b1;
            if (last) begin
              src_rdy_n <= 1'b1;
              eof_n     <= 1'b1;
              state     <= S_END;
            end else begin
              idx   <= idx + 1'b1;
              eof_n <= (idx == ($bits(idx))'(PKT_WORDS - 2)) ? 1'b0 : 1'b1;
            end
          end
        end
        S_END: begin
          bus   <= '0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
