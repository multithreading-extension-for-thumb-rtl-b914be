// arm_decoder: splits a 32-bit ARM (ARMv4T) instruction into the fields the later pipeline
// stages need: instruction class, condition, ALU opcode, register numbers and which of them are
// read or written, the expanded immediate, the shift, the memory-access mode and the branch
// offset.
//
// In the decode stage it sits behind the Thumb decompressor, so a Thumb instruction is decoded
// as its ARM equivalent. With `thumb_state` set, branch offsets are scaled by 2 instead of 4 and
// the two BL halves flagged by the decompressor are decoded as:
//   prefix: LR <- PC + (offset << 12)  (writes R14)
//   suffix: PC <- LR + (offset << 1), LR <- return address  (reads R14, links)
// The document only names this decoder; the field split is the ARMv4T instruction format and
// the output bundle is this design's own. Coprocessor instructions, SWP and long multiplies are
// outside what the Thumb front end produces and decode as undefined.
//
// Purely combinational.
module arm_decoder
  import mt_thumb_pkg::*;
(
  input  logic [31:0] instr,
  input  xlat_t       xlat,
  input  logic        thumb_state,
  output dec_t        dec
);

  logic [31:0] imm_rot;
  logic [4:0]  rot2;

  always_comb begin
    rot2    = {instr[11:8], 1'b0};
    imm_rot = ({24'd0, instr[7:0]} >> rot2) | ({24'd0, instr[7:0]} << (6'd32 - {1'b0, rot2}));

    dec            = '0;
    dec.iclass     = IC_UNDEF;
    dec.cond       = instr[31:28];
    dec.rn         = instr[19:16];
    dec.rd         = instr[15:12];
    dec.rs         = instr[11:8];
    dec.rm         = instr[3:0];
    dec.bl_prefix  = xlat.bl_prefix;
    dec.bl_suffix  = xlat.bl_suffix;

    if (xlat.undef) begin
      dec.iclass = IC_UNDEF;
    end else begin
      unique case (instr[27:25])
        3'b000, 3'b001: begin
          if (instr[27:4] == 24'h12FFF1) begin
            dec.iclass = IC_BX;
            dec.use_rm = 1'b1;
          end else if (!instr[25] && instr[7:4] == 4'b1001 && instr[24:22] == 3'b000) begin
            dec.iclass    = IC_MUL;
            dec.rd        = instr[19:16];
            dec.rn        = instr[15:12];
            dec.set_flags = instr[20];
            dec.use_rn    = instr[21];
            dec.use_rm    = 1'b1;
            dec.use_rs    = 1'b1;
            dec.writes_rd = 1'b1;
          end else if (!instr[25] && instr[7] && instr[4] && instr[6:5] != 2'b00) begin
            dec.iclass     = IC_HDT;
            dec.pre_index  = instr[24];
            dec.up         = instr[23];
            dec.op2_imm    = instr[22];
            dec.writeback  = instr[21] || !instr[24];
            dec.load       = instr[20];
            dec.store      = !instr[20];
            dec.signed_acc = instr[6];
            dec.half_acc   = instr[5];
            dec.byte_acc   = instr[6] && !instr[5];
            dec.imm        = {24'd0, instr[11:8], instr[3:0]};
            dec.use_rn     = 1'b1;
            dec.use_rm     = !instr[22];
            dec.use_rd     = !instr[20];
            dec.writes_rd  = instr[20];
          end else if (!instr[25] && instr[7] && instr[4]) begin
            dec.iclass = IC_UNDEF;   // SWP / long multiply: not produced from Thumb
          end else begin
            dec.iclass    = IC_DP;
            dec.alu_op    = instr[24:21];
            dec.set_flags = instr[20];
            dec.use_rn    = (instr[24:21] != 4'b1101) && (instr[24:21] != 4'b1111);
            dec.writes_rd = (instr[24:23] != 2'b10);
            dec.op2_imm   = instr[25];
            if (instr[25]) begin
              dec.imm = imm_rot;
            end else begin
              dec.use_rm       = 1'b1;
              dec.shift_type   = instr[6:5];
              dec.shift_by_reg = instr[4];
              dec.use_rs       = instr[4];
              dec.shift_amt    = instr[4] ? 5'd0 : instr[11:7];
            end
          end
        end
        3'b010, 3'b011: begin
          if (instr[25] && instr[4]) begin
            dec.iclass = IC_UNDEF;
          end else begin
            dec.iclass     = IC_SDT;
            dec.op2_imm    = !instr[25];
            dec.pre_index  = instr[24];
            dec.up         = instr[23];
            dec.byte_acc   = instr[22];
            dec.writeback  = instr[21] || !instr[24];
            dec.load       = instr[20];
            dec.store      = !instr[20];
            dec.use_rn     = 1'b1;
            dec.use_rd     = !instr[20];
            dec.writes_rd  = instr[20];
            if (instr[25]) begin
              dec.use_rm     = 1'b1;
              dec.shift_amt  = instr[11:7];
              dec.shift_type = instr[6:5];
            end else begin
              dec.imm = {20'd0, instr[11:0]};
            end
          end
        end
        3'b100: begin
          dec.iclass    = IC_BDT;
          dec.pre_index = instr[24];
          dec.up        = instr[23];
          dec.writeback = instr[21];
          dec.load      = instr[20];
          dec.store     = !instr[20];
          dec.use_rn    = 1'b1;
          dec.reglist   = instr[15:0];
        end
        3'b101: begin
          dec.iclass = IC_BR;
          if (!thumb_state) begin
            dec.br_offset = {{6{instr[23]}}, instr[23:0], 2'b00};
            dec.link      = instr[24];
          end else if (xlat.bl_prefix) begin
            dec.br_offset = {instr[19:0], 12'd0};
            dec.rd        = 4'd14;
            dec.writes_rd = 1'b1;
          end else if (xlat.bl_suffix) begin
            dec.br_offset = {20'd0, instr[10:0], 1'b0};
            dec.rn        = 4'd14;
            dec.use_rn    = 1'b1;
            dec.link      = 1'b1;
          end else begin
            dec.br_offset = {{7{instr[23]}}, instr[23:0], 1'b0};
          end
        end
        3'b111: begin
          if (instr[24]) begin
            dec.iclass = IC_SWI;
            dec.imm    = {8'd0, instr[23:0]};
          end
        end
        default: dec.iclass = IC_UNDEF;   // coprocessor space
      endcase
    end
  end

endmodule
