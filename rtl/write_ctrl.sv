// write_ctrl: one writer state machine of the NIC (a receiver or the host
// "From" side).
//
// A packet arrives as 16-bit words on a LocalLink-style port with active-low
// sof_n / eof_n / src_rdy_n; the first byte (dat[15:8] of the first word) is
// the destination node address. The machine has the four states of the
// document:
//   IDLE    - address at zero, no chip held; waits for start of frame and
//             captures the destination byte.
//   ANALYZE - routes the packet (route_mask), claims the first RAM chip that
//             no other writer holds (chip 0, then 1, then 2) and loads the
//             start address of the destination region (0, 32 or 64).
//   ON      - writes one word per clock and increments the address.
//   STALL   - entered when the source pauses (clock correction): the address
//             is held until words flow again.
// The data words reach the RAM through two registers in the write bus switch,
// so the machine delays the valid and end-of-frame flags by the same two
// clocks (DATA_DELAY) and the first word is written two clocks after it
// arrived, in the first ON cycle. Because the end of frame is handled on the
// delayed flags, the last word is always written before the chip is released.
// In that first ON cycle `push` asks the queue of the chosen destination to
// append the chip identity, so a reader can start while the packet is still
// being stored.
//
// With FIXED_LEN = 0 (receivers) the packet ends with eof_n; with
// FIXED_LEN = 1 (host From side) it ends after PKT_WORDS words and eof_n is
// ignored, as the document ends the From machine on a terminal address.
// Words beyond PKT_WORDS are not written, so a long frame cannot run into the
// next region. A new frame may start once the machine is back in IDLE, three
// clocks after the last word (two idle clocks between frames).
//
// Follows the document: states, masks, chip priority, region bases, the
// two-register data delay. This design's own choices: the delayed flags used
// to end the packet, the length guard, the byte order inside a word.
module write_ctrl
  import nic_pkg::*;
#(
  parameter bit          FIXED_LEN  = 1'b0,
  parameter int unsigned DATA_DELAY = 2
) (
  input  logic       clk,
  input  logic       rst,
  // LocalLink-style input, active low
  input  word_t      dat,
  input  logic       sof_n,
  input  logic       eof_n,
  input  logic       src_rdy_n,
  // routing masks of this node
  input  node_mask_t tx0_mask,
  input  node_mask_t tx1_mask,
  // chips already held or being claimed by other writers
  input  chip_id_t   busy,
  // chip claimed in this cycle (ANALYZE only), for the other writers
  output chip_id_t   claim,
  // write side of the selected chip
  output chip_id_t   cs,
  output addr_t      addr,
  output logic       we,
  // chip identity for the destination queue
  output logic       push,
  output dest_e      push_dest,
  // busy with a packet
  output logic       flag,
  // state for observation: 1 while in STALL
  output logic       stalled
);

  typedef enum logic [1:0] {S_IDLE, S_ANALYZE, S_ON, S_STALL} state_e;
  state_e state;

  node_mask_t dest_q;
  dest_e      route_dest;
  addr_t      route_base;
  logic [$clog2(PKT_WORDS+1)-1:0] count;

  // flags aligned with the data leaving the bus switch registers
  logic [DATA_DELAY-1:0] v_pipe, e_pipe;
  logic v_d, e_d, last_word;

  route_mask u_route (
    .dest_addr(dest_q), .tx0_mask(tx0_mask), .tx1_mask(tx1_mask),
    .dest(route_dest), .base(route_base)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v_pipe <= '0;
      e_pipe <= '0;
    end else begin
      v_pipe <= {v_pipe[DATA_DELAY-2:0], ~src_rdy_n};
      e_pipe <= {e_pipe[DATA_DELAY-2:0], ~src_rdy_n & ~eof_n};
    end
  end
  assign v_d = v_pipe[DATA_DELAY-1];
  assign e_d = e_pipe[DATA_DELAY-1];

  assign last_word = FIXED_LEN ? (count == ($bits(count))'(PKT_WORDS - 1)) : e_d;

  // first free chip, lowest index first
  always_comb begin
    claim = '0;
    if (state == S_ANALYZE) begin
      if      (!busy[0]) claim = 3'b001;
      else if (!busy[1]) claim = 3'b010;
      else if (!busy[2]) claim = 3'b100;
    end
  end

  assign we      = (state == S_ON || state == S_STALL) && v_d
                   && count < ($bits(count))'(PKT_WORDS);
  assign flag    = (state != S_IDLE);
  assign stalled = (state == S_STALL);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      dest_q    <= '0;
      cs        <= '0;
      addr      <= '0;
      count     <= '0;
      push      <= 1'b0;
      push_dest <= DEST_HOST;
    end else begin
      push <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cs    <= '0;
          addr  <= '0;
          count <= '0;
          if (!sof_n && !src_rdy_n) begin
            dest_q <= dat[15:8];
            state  <= S_ANALYZE;
          end
        end
        S_ANALYZE: begin
          cs        <= claim;
          addr      <= route_base;
          push      <= (claim != '0);
          push_dest <= route_dest;
          state     <= (claim != '0) ? S_ON : S_IDLE;
        end
        S_ON, S_STALL: begin
          if (v_d) begin
            if (count < ($bits(count))'(PKT_WORDS)) begin
              addr  <= addr + 1'b1;
              count <= count + 1'b1;
            end
            state <= last_word ? S_IDLE : S_ON;
          end else begin
            state <= S_STALL;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
