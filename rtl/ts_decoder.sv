// ts_decoder: recognises the thread-switch (Ts) instruction in the decode-stage buffer.
//
// A Ts instruction is placed one instruction ahead of the Thumb instruction in front of the
// instruction at which the thread should give up the pipeline, so it normally sits in buffer
// slot ib2 while the Thumb instruction in front of it is decoded from ib1. The Ts decoder looks
// at ib2 in that same cycle and, when it holds a Ts of the same thread, consumes it together with
// ib1: the Ts costs no decode cycle. It then raises `switch_valid` for one cycle so that the
// fetch unit takes the next fetch from another thread. The old thread is allowed exactly two more
// instructions after the Ts (the second one is the instruction "inclined to switch"); its resume
// address, `switch_cut`, is therefore the Ts address plus 6 bytes, and anything of the old thread
// at or beyond that address that has already been fetched is dropped.
//
// The document requires that a Ts is never first in a sequence and that two Ts are never
// adjacent, so the paired case is the normal one. If a Ts nevertheless reaches ib1 (for
// instance after a branch or when the buffer ran short), this design consumes it on its own in
// that cycle, issuing no Thumb instruction; the switch point is the same.
//
// Purely combinational. `advance` is the decode stage's permission to consume this cycle.
module ts_decoder
  import mt_thumb_pkg::*;
(
  input  ib_entry_t  ib1,
  input  ib_entry_t  ib2,
  input  logic       advance,
  output logic       thumb_valid,   // ib1 holds a Thumb instruction to decode this cycle
  output logic       ts_paired,     // ib2 is a Ts decoded together with ib1
  output logic       ts_alone,      // ib1 is a Ts decoded on its own
  output logic [1:0] consume,       // halfwords leaving the buffer this cycle
  output logic       switch_valid,
  output tid_t       switch_tid,
  output addr_t      switch_cut
);

  logic ib1_ts, ib2_ts;

  always_comb begin
    ib1_ts      = ib1.valid && is_ts(ib1.hw);
    ib2_ts      = ib2.valid && is_ts(ib2.hw);
    thumb_valid = ib1.valid && !ib1_ts;
    ts_paired   = thumb_valid && ib2_ts && (ib2.tid == ib1.tid);
    ts_alone    = ib1_ts;

    consume      = 2'd0;
    switch_valid = 1'b0;
    switch_tid   = ib1.tid;
    switch_cut   = ib1.addr + addr_t'(6);
    if (advance) begin
      if (ts_paired) begin
        consume      = 2'd2;
        switch_valid = 1'b1;
        switch_tid   = ib2.tid;
        switch_cut   = ib2.addr + addr_t'(6);
      end else if (ib1.valid) begin
        consume      = 2'd1;
        switch_valid = ts_alone;
      end
    end
  end

endmodule
