// decode_stage: the Ts-Thumb decode stage of the multithreaded pipeline.
//
// The stage holds the 48-bit instruction buffer (ib1, ib2, ib3) and two decoders working side
// by side on it:
//   * the Thumb path: ib1 goes through the Thumb decompressor and then the ARM decoder, one
//     Thumb instruction per cycle;
//   * the Ts path: the Ts decoder looks at ib2 in the same cycle and, when it holds a thread
//     switch instruction of the same thread, removes it together with ib1 and signals the fetch
//     unit to switch thread. The Ts therefore never occupies a decode slot and never reaches the
//     ARM decoder, and the Thumb path is not lengthened by it.
// A Ts that reaches ib1 (which well-formed code avoids) is consumed alone, without issuing.
//
// Interface: `push_n`/`push` from the fetch unit; `buf_space` back to it (free slots plus what
// leaves this cycle). The issued instruction (`id_*`) is combinational and valid in the cycle it
// is decoded; `stall` holds the stage, and `redirect_valid` (a taken branch of thread
// `redirect_tid`) removes that thread's buffered instructions and issues nothing that cycle.
// The structure follows the document (its Fig. 2 organisation); stall and redirect handling are
// this design's own.
module decode_stage
  import mt_thumb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  push_n,
  input  ib_entry_t   push [2],
  output logic [1:0]  buf_space,
  input  logic        stall,
  input  logic        redirect_valid,
  input  tid_t        redirect_tid,
  output logic        switch_valid,
  output tid_t        switch_tid,
  output addr_t       switch_cut,
  output logic        id_valid,
  output tid_t        id_tid,
  output addr_t       id_pc,
  output logic [15:0] id_thumb,
  output logic [31:0] id_arm,
  output xlat_t       id_xlat,
  output dec_t        id_dec,
  output logic        id_ts_paired,   // a Ts was removed together with this instruction
  output logic        id_ts_alone     // a lone Ts was removed this cycle (no issue)
);

  ib_entry_t  slot [3];
  logic [1:0] free, consume;
  logic       advance, thumb_valid, ts_paired, ts_alone;

  assign advance = !stall && !redirect_valid;

  instr_buffer u_ib (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (redirect_valid),
    .flush_tid (redirect_tid),
    .pop       (consume),
    .push_n    (push_n),
    .push      (push),
    .slot      (slot),
    .free      (free)
  );

  ts_decoder u_tsd (
    .ib1          (slot[0]),
    .ib2          (slot[1]),
    .advance      (advance),
    .thumb_valid  (thumb_valid),
    .ts_paired    (ts_paired),
    .ts_alone     (ts_alone),
    .consume      (consume),
    .switch_valid (switch_valid),
    .switch_tid   (switch_tid),
    .switch_cut   (switch_cut)
  );

  thumb_decompressor u_dcmp (
    .thumb (slot[0].hw),
    .arm   (id_arm),
    .xlat  (id_xlat)
  );

  arm_decoder u_adec (
    .instr       (id_arm),
    .xlat        (id_xlat),
    .thumb_state (1'b1),
    .dec         (id_dec)
  );

  always_comb begin
    logic [2:0] space;
    space        = {1'b0, free} + {1'b0, consume};
    buf_space    = (space > 3'd3) ? 2'd3 : space[1:0];
    id_valid     = advance && thumb_valid;
    id_tid       = slot[0].tid;
    id_pc        = slot[0].addr;
    id_thumb     = slot[0].hw;
    id_ts_paired = advance && ts_paired;
    id_ts_alone  = advance && ts_alone;
  end

endmodule
