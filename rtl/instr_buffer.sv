// instr_buffer: the decode-stage instruction buffer, three 16-bit slots (48 bits) ib1, ib2, ib3.
//
// The fetch unit delivers up to two Thumb halfwords per cycle while the decoder normally takes
// one, so the buffer holds a third slot to keep at least two instructions in hand: that lets a
// Ts instruction in ib2 be seen, and consumed, in the same cycle as the Thumb instruction in ib1.
// Slots are kept packed towards ib1 in program order. Each slot records its halfword, byte
// address and thread, so that instructions of the old and the new thread can share the buffer
// across a thread switch.
//
// Each cycle, in this order: entries of thread `flush_tid` are removed when `flush` is set
// (a branch of that thread was taken), the `pop` oldest remaining entries leave (0..2), and
// `push_n` new entries (0..2) are appended from `push[0]`, `push[1]`. The caller must not
// overfill the buffer: `free` tells how many slots are empty now.
// The size (48 bits) follows the document; the flush rule is this design's own.
module instr_buffer
  import mt_thumb_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,     // synchronous, active low
  input  logic         flush,
  input  tid_t         flush_tid,
  input  logic [1:0]   pop,
  input  logic [1:0]   push_n,
  input  ib_entry_t    push [2],
  output ib_entry_t    slot [3],
  output logic [1:0]   free
);

  localparam int unsigned DEPTH = 3;

  ib_entry_t q [DEPTH];
  ib_entry_t nxt [DEPTH+2];
  logic [2:0] cnt;

  always_comb begin
    logic [2:0] n;
    logic [1:0] skip;
    n    = '0;
    skip = '0;
    for (int i = 0; i < DEPTH + 2; i++) nxt[i] = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (q[i].valid && !(flush && q[i].tid == flush_tid)) begin
        if (skip < pop) begin
          skip = skip + 2'd1;
        end else begin
          nxt[n] = q[i];
          n = n + 3'd1;
        end
      end
    end
    for (int j = 0; j < 2; j++) begin
      if (2'(j) < push_n) begin
        nxt[n] = push[j];
        nxt[n].valid = 1'b1;
        n = n + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) q[i] <= nxt[i];
    end
  end

  always_comb begin
    cnt = '0;
    for (int i = 0; i < DEPTH; i++) cnt = cnt + {2'd0, q[i].valid};
    free = 2'(3'(DEPTH) - cnt);
  end

  assign slot = q;

  // Nothing may be pushed beyond the third slot, and nothing popped that is not there.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !nxt[DEPTH].valid)
    else $error("instr_buffer overflow");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) flush || {1'b0, pop} <= cnt)
    else $error("instr_buffer underflow");

endmodule
