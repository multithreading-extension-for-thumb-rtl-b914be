// mt_thumb_pkg: types and constants shared by the multithreaded Thumb front end.
//
// The front end fetches 16-bit Thumb code for several hardware threads, decodes it through a
// Thumb-to-ARM decompressor and an ARM decoder, and recognises an extra 16-bit "thread switch"
// (Ts) instruction in parallel with the Thumb instruction in front of it. This package holds the
// instruction-buffer entry, the Ts encoding, the side-band information of the decompressor and
// the decoded-instruction bundle handed to the execute stage.
//
// The Ts opcode is this design's choice: it uses the Thumb conditional-branch slot with
// condition 1110, which ARMv4T leaves undefined (0xDExx; the low byte is ignored).
package mt_thumb_pkg;

  // Thread identifiers are carried in a fixed 4-bit field (up to 16 hardware threads).
  localparam int unsigned TID_W   = 4;
  localparam int unsigned ADDR_W  = 32;
  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Thread-switch instruction encoding.
  localparam logic [15:0] TS_MASK  = 16'hFF00;
  localparam logic [15:0] TS_MATCH = 16'hDE00;

  function automatic logic is_ts(input logic [15:0] hw);
    return (hw & TS_MASK) == TS_MATCH;
  endfunction

  // One 16-bit slot of the decode-stage instruction buffer.
  typedef struct packed {
    logic        valid;
    tid_t        tid;
    addr_t       addr;   // byte address of the halfword
    logic [15:0] hw;
  } ib_entry_t;

  // Extra information the decompressor passes along with the ARM word, for the cases where the
  // Thumb instruction has no exact ARM equivalent.
  typedef struct packed {
    logic undef;       // not a valid ARMv4T Thumb instruction
    logic bl_prefix;   // first half of Thumb BL: LR = PC + (offset << 12)
    logic bl_suffix;   // second half of Thumb BL: PC = LR + (offset << 1), LR = return | 1
    logic pc_align;    // PC operand is read word-aligned (LDR Rd,[PC,#] and ADD Rd,PC,#)
  } xlat_t;

  typedef enum logic [3:0] {
    IC_DP    = 4'd0,   // data processing
    IC_MUL   = 4'd1,   // multiply / multiply-accumulate
    IC_SDT   = 4'd2,   // LDR/STR word or byte
    IC_HDT   = 4'd3,   // LDRH/STRH/LDRSB/LDRSH
    IC_BDT   = 4'd4,   // LDM/STM
    IC_BR    = 4'd5,   // B / BL (including both Thumb BL halves)
    IC_BX    = 4'd6,   // branch and exchange
    IC_SWI   = 4'd7,   // software interrupt
    IC_UNDEF = 4'd8    // undefined instruction
  } iclass_e;

  // Decoded instruction, produced by the ARM decoder for the execute stage.
  typedef struct packed {
    iclass_e     iclass;
    logic [3:0]  cond;
    logic [3:0]  alu_op;       // data-processing opcode (bits 24:21)
    logic        set_flags;    // S bit
    logic [3:0]  rn;
    logic [3:0]  rd;
    logic [3:0]  rm;
    logic [3:0]  rs;
    logic        use_rn;
    logic        use_rm;
    logic        use_rs;
    logic        use_rd;       // Rd is read (store data, multiply-accumulate)
    logic        writes_rd;
    logic        op2_imm;      // second operand is the immediate below
    logic [31:0] imm;          // expanded immediate / memory offset
    logic [1:0]  shift_type;
    logic [4:0]  shift_amt;
    logic        shift_by_reg;
    logic        load;
    logic        store;
    logic        byte_acc;
    logic        half_acc;
    logic        signed_acc;
    logic        pre_index;
    logic        up;
    logic        writeback;
    logic [15:0] reglist;
    logic        link;
    logic [31:0] br_offset;    // branch offset in bytes (relative to the read PC)
    logic        bl_prefix;
    logic        bl_suffix;
  } dec_t;

endpackage
