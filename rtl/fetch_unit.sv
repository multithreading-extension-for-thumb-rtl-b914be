// fetch_unit: instruction fetch for NUM_THREADS hardware threads running Thumb code.
//
// Each thread has its own program counter; one thread at a time owns the fetch port. Every
// cycle the owner's 32-bit aligned word is read, which holds two consecutive Thumb instructions
// (one if the PC points at the upper halfword), and both are handed to the decode-stage
// instruction buffer if it has room for all of them this cycle; otherwise the fetch is retried.
// The instruction memory is read combinationally in the same cycle (`imem_addr` -> `imem_rdata`),
// so an instruction fetched in cycle F is in the buffer, and decoded, in cycle F+1.
//
// Thread switch: `switch_valid` comes from the Ts decoder in the decode stage. In that cycle the
// old thread may still fetch, but only halfwords below `switch_cut` (the address of the third
// instruction after the Ts); a later one fetched in the same word is abandoned. From the next
// cycle on the fetch port belongs to the next thread in round-robin order, which continues from
// its own saved PC. The old thread's PC stays where its fetch stopped.
//
// Branch redirect: `redirect_valid` sets the PC of thread `redirect_tid` to `redirect_pc`; if
// that thread owns the fetch port, this cycle's fetch is discarded. Ownership does not change.
//
// What follows the document: two instructions per fetch, switch in the cycle after the Ts is
// decoded, abandoning the old-thread instruction fetched together with the switching one.
// This design's own choices: the round-robin thread order, the all-or-nothing buffer handshake,
// the start address of each thread (BOOT_PC + t * BOOT_STRIDE) and the redirect port.
// Reset is synchronous and active low.
module fetch_unit
  import mt_thumb_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 2,
  parameter addr_t       BOOT_PC     = 32'h0000_0000,
  parameter addr_t       BOOT_STRIDE = 32'h0000_1000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output addr_t       imem_addr,
  input  logic [31:0] imem_rdata,
  // decode-stage instruction buffer
  input  logic [1:0]  buf_space,     // slots that will be free at the end of this cycle
  output logic [1:0]  push_n,
  output ib_entry_t   push [2],
  // thread switch from the Ts decoder
  input  logic        switch_valid,
  input  tid_t        switch_tid,
  input  addr_t       switch_cut,
  // branch redirect from the execute stage
  input  logic        redirect_valid,
  input  tid_t        redirect_tid,
  input  addr_t       redirect_pc,
  output tid_t        fetch_tid,
  output addr_t       fetch_pc
);

  // index width of the per-thread arrays
  localparam int unsigned TIX = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1;

  addr_t pc [NUM_THREADS];
  tid_t  cur;

  logic  [1:0] avail, n_fetch;
  addr_t limit;
  logic  do_switch, squash;
  tid_t  nxt_tid;

  always_comb begin
    fetch_tid = cur;
    fetch_pc  = pc[cur[TIX-1:0]];
    imem_addr = {fetch_pc[ADDR_W-1:2], 2'b00};
    avail     = fetch_pc[1] ? 2'd1 : 2'd2;
    do_switch = switch_valid && (switch_tid == cur);
    squash    = redirect_valid && (redirect_tid == cur);
    // halfwords of the old thread that may still be fetched in the switching cycle
    limit     = (switch_cut - fetch_pc) >> 1;
    if (do_switch && limit < addr_t'(avail)) avail = limit[1:0];
    n_fetch   = (!squash && avail <= buf_space) ? avail : 2'd0;
    push_n    = n_fetch;

    push[0].valid = 1'b1;
    push[0].tid   = cur;
    push[0].addr  = fetch_pc;
    push[0].hw    = fetch_pc[1] ? imem_rdata[31:16] : imem_rdata[15:0];
    push[1].valid = 1'b1;
    push[1].tid   = cur;
    push[1].addr  = fetch_pc + addr_t'(2);
    push[1].hw    = imem_rdata[31:16];

    nxt_tid = (cur == tid_t'(NUM_THREADS - 1)) ? '0 : cur + tid_t'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur <= '0;
      for (int t = 0; t < NUM_THREADS; t++) pc[t] <= BOOT_PC + addr_t'(t) * BOOT_STRIDE;
    end else begin
      if (n_fetch != 2'd0) pc[cur[TIX-1:0]] <= fetch_pc + addr_t'({n_fetch, 1'b0});
      if (redirect_valid) pc[redirect_tid[TIX-1:0]] <= redirect_pc;
      if (do_switch) cur <= nxt_tid;
    end
  end

  a_tid_range: assert property (@(posedge clk) disable iff (!rst_n)
                                !redirect_valid || (int'(redirect_tid) < NUM_THREADS))
    else $error("fetch_unit: redirect to a thread that does not exist");

endmodule
