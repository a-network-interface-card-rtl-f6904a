// cs_queue: queue of chip identities for one destination (Tx0, Tx1 or host).
//
// When a writer starts storing a packet in a RAM chip, it appends that chip's
// one-hot identity to the queue of the packet's destination; the reader of
// that destination takes identities from the head in arrival order. Up to
// NUM_WR writers may append in the same clock; they are entered in writer
// order (receiver 0, receiver 1, host). `head` shows the oldest identity, or
// zero when the queue is empty, which is exactly the "new bus" value the
// reader waits on. A pop and pushes may happen in the same clock. An append to
// a full queue is dropped and reported on `dropped` for one clock.
//
// The document gives the queue's function and its all-zero empty value; the
// depth (DEPTH, default 3 = one entry per chip) and the overflow behaviour are
// this design's own choices.
module cs_queue
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH  = NUM_CHIPS,
  parameter int unsigned NUM_WR = 3
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     [NUM_WR-1:0] push,
  input  chip_id_t [NUM_WR-1:0] push_id,
  input  logic     pop,
  output chip_id_t head,
  output logic     [$clog2(DEPTH+1)-1:0] count,
  output logic     dropped
);

  typedef logic [$clog2(DEPTH+1)-1:0] cnt_t;

  chip_id_t entries [DEPTH];
  chip_id_t nxt     [DEPTH];
  cnt_t     n, nxt_n;
  logic     drop;

  assign head  = (n != '0) ? entries[0] : '0;
  assign count = n;

  always_comb begin
    // remove the head first, then append in writer order
    for (int i = 0; i < DEPTH; i++) begin
      if (pop && n != '0) nxt[i] = (i + 1 < DEPTH) ? entries[i+1] : '0;
      else                nxt[i] = entries[i];
    end
    nxt_n = (pop && n != '0) ? n - 1'b1 : n;
    drop  = 1'b0;
    for (int w = 0; w < NUM_WR; w++) begin
      if (push[w]) begin
        if (nxt_n < cnt_t'(DEPTH)) begin
          nxt[nxt_n] = push_id[w];
          nxt_n      = nxt_n + 1'b1;
        end else begin
          drop = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n       <= '0;
      dropped <= 1'b0;
      for (int i = 0; i < DEPTH; i++) entries[i] <= '0;
    end else begin
      n       <= nxt_n;
      dropped <= drop;
      for (int i = 0; i < DEPTH; i++) entries[i] <= nxt[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int w = 0; w < NUM_WR; w++)
        if (push[w]) assert ($onehot(push_id[w]))
          else $error("cs_queue: pushed identity %b is not one-hot", push_id[w]);
    end
  end

endmodule
