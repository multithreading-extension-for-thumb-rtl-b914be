// thumb_decompressor: expands one 16-bit Thumb (ARMv4T) instruction into the equivalent 32-bit
// ARM instruction, so that a single ARM decoder serves both instruction sets.
//
// How it works: the Thumb format is selected from the top bits, and the ARM word is assembled
// field by field with condition AL (except for the conditional branch). Thumb ALU operations that
// set flags map onto the S forms; shifts map onto MOVS with a shifted operand; PUSH/POP map onto
// STMDB/LDMIA on SP with write-back; SP/PC-relative forms use R13/R15 as base.
// Where ARM has no exact equivalent the ARM word is the nearest form and `xlat` tells the ARM
// decoder how to read it:
//   * branches (B<cond>, B, and both BL halves) carry the sign-extended Thumb offset, in
//     halfwords, in the ARM offset field; the decoder scales it by 2 instead of 4;
//   * LDR Rd,[PC,#] and ADD Rd,PC,# read the PC word-aligned (`pc_align`);
//   * BL is two Thumb instructions; they become two ARM BL words flagged `bl_prefix` and
//     `bl_suffix`;
//   * encodings ARMv4T leaves undefined, including the Ts opcode 0xDExx (which the Ts decoder
//     removes before it gets here), produce the ARM undefined instruction 0xE7F000F0 and
//     `undef`.
// The document names the decompressor and its place in the decode stage; the mapping follows the
// ARMv4T definition of Thumb, and the branch/PC conventions above are this design's own.
//
// Purely combinational.
module thumb_decompressor
  import mt_thumb_pkg::*;
(
  input  logic [15:0] thumb,
  output logic [31:0] arm,
  output xlat_t       xlat
);

  localparam logic [3:0]  AL        = 4'hE;
  localparam logic [31:0] ARM_UNDEF = 32'hE7F0_00F0;

  logic [3:0] rd, rs, rb, ro, rdh, rsh;

  always_comb begin
    rd  = {1'b0, thumb[2:0]};
    rs  = {1'b0, thumb[5:3]};
    rb  = {1'b0, thumb[5:3]};
    ro  = {1'b0, thumb[8:6]};
    rdh = {thumb[7], thumb[2:0]};
    rsh = {thumb[6], thumb[5:3]};
    arm  = ARM_UNDEF;
    xlat = '0;

    unique casez (thumb[15:11])
      // Format 1: LSL/LSR/ASR Rd, Rs, #off5   ->  MOVS Rd, Rs, <shift> #off5
      5'b000_00, 5'b000_01, 5'b000_10:
        arm = {AL, 3'b000, 4'b1101, 1'b1, 4'd0, rd, thumb[10:6], thumb[12:11], 1'b0, rs};
      // Format 2: ADD/SUB Rd, Rs, Rn|#imm3     ->  ADDS/SUBS Rd, Rs, op2
      5'b000_11: begin
        if (thumb[10])
          arm = {AL, 2'b00, 1'b1, (thumb[9] ? 4'b0010 : 4'b0100), 1'b1, rs, rd,
                 4'd0, 5'd0, thumb[8:6]};
        else
          arm = {AL, 2'b00, 1'b0, (thumb[9] ? 4'b0010 : 4'b0100), 1'b1, rs, rd,
                 8'd0, ro};
      end
      // Format 3: MOV/CMP/ADD/SUB Rd, #imm8
      5'b001_??: begin
        unique case (thumb[12:11])
          2'b00: arm = {AL, 3'b001, 4'b1101, 1'b1, 4'd0, 1'b0, thumb[10:8], 4'd0, thumb[7:0]};
          2'b01: arm = {AL, 3'b001, 4'b1010, 1'b1, 1'b0, thumb[10:8], 4'd0, 4'd0, thumb[7:0]};
          2'b10: arm = {AL, 3'b001, 4'b0100, 1'b1, 1'b0, thumb[10:8], 1'b0, thumb[10:8],
                        4'd0, thumb[7:0]};
          default: arm = {AL, 3'b001, 4'b0010, 1'b1, 1'b0, thumb[10:8], 1'b0, thumb[10:8],
                          4'd0, thumb[7:0]};
        endcase
      end
      5'b010_00: begin
        if (!thumb[10]) begin
          // Format 4: ALU operations Rd, Rs
          unique case (thumb[9:6])
            4'h2: arm = {AL, 3'b000, 4'b1101, 1'b1, 4'd0, rd, rs, 1'b0, 2'b00, 1'b1, rd}; // LSL
            4'h3: arm = {AL, 3'b000, 4'b1101, 1'b1, 4'd0, rd, rs, 1'b0, 2'b01, 1'b1, rd}; // LSR
            4'h4: arm = {AL, 3'b000, 4'b1101, 1'b1, 4'd0, rd, rs, 1'b0, 2'b10, 1'b1, rd}; // ASR
            4'h7: arm = {AL, 3'b000, 4'b1101, 1'b1, 4'd0, rd, rs, 1'b0, 2'b11, 1'b1, rd}; // ROR
            4'h8: arm = {AL, 3'b000, 4'b1000, 1'b1, rd, 4'd0, 8'd0, rs};                   // TST
            4'h9: arm = {AL, 3'b001, 4'b0011, 1'b1, rs, rd, 12'd0};                         // NEG
            4'hA: arm = {AL, 3'b000, 4'b1010, 1'b1, rd, 4'd0, 8'd0, rs};                   // CMP
            4'hB: arm = {AL, 3'b000, 4'b1011, 1'b1, rd, 4'd0, 8'd0, rs};                   // CMN
            4'hD: arm = {AL, 6'b000000, 1'b0, 1'b1, rd, 4'd0, rd, 4'b1001, rs};            // MUL
            4'hF: arm = {AL, 3'b000, 4'b1111, 1'b1, 4'd0, rd, 8'd0, rs};                   // MVN
            // AND EOR ADC SBC ORR BIC: same opcode number in ARM, Rd = Rd op Rs
            default: arm = {AL, 3'b000, thumb[9:6], 1'b1, rd, rd, 8'd0, rs};
          endcase
        end else begin
          // Format 5: hi-register ADD/CMP/MOV and BX
          unique case (thumb[9:8])
            2'b00: arm = {AL, 3'b000, 4'b0100, 1'b0, rdh, rdh, 8'd0, rsh};
            2'b01: arm = {AL, 3'b000, 4'b1010, 1'b1, rdh, 4'd0, 8'd0, rsh};
            2'b10: arm = {AL, 3'b000, 4'b1101, 1'b0, 4'd0, rdh, 8'd0, rsh};
            default: begin
              if (!thumb[7]) arm = {AL, 24'h12FFF1, rsh};
              else           xlat.undef = 1'b1;
            end
          endcase
        end
      end
      // Format 6: LDR Rd, [PC, #imm8*4]
      5'b010_01: begin
        arm = {AL, 8'b0101_1001, 4'hF, 1'b0, thumb[10:8], 2'b00, thumb[7:0], 2'b00};
        xlat.pc_align = 1'b1;
      end
      5'b010_1?: begin
        if (!thumb[9])
          // Format 7: LDR/STR{B} Rd, [Rb, Ro]
          arm = {AL, 3'b011, 1'b1, 1'b1, thumb[10], 1'b0, thumb[11], rb, rd, 8'd0, ro};
        else begin
          // Format 8: STRH / LDRH / LDSB / LDSH Rd, [Rb, Ro]
          unique case ({thumb[10], thumb[11]})  // {S, H}
            2'b00: arm = {AL, 3'b000, 4'b1100, 1'b0, rb, rd, 4'd0, 4'b1011, ro};   // STRH
            2'b01: arm = {AL, 3'b000, 4'b1100, 1'b1, rb, rd, 4'd0, 4'b1011, ro};   // LDRH
            2'b10: arm = {AL, 3'b000, 4'b1100, 1'b1, rb, rd, 4'd0, 4'b1101, ro};   // LDRSB
            default: arm = {AL, 3'b000, 4'b1100, 1'b1, rb, rd, 4'd0, 4'b1111, ro}; // LDRSH
          endcase
        end
      end
      // Format 9: LDR/STR{B} Rd, [Rb, #off5]  (word offsets scaled by 4)
      5'b011_??: begin
        if (thumb[12])
          arm = {AL, 3'b010, 1'b1, 1'b1, 1'b1, 1'b0, thumb[11], rb, rd, 7'd0, thumb[10:6]};
        else
          arm = {AL, 3'b010, 1'b1, 1'b1, 1'b0, 1'b0, thumb[11], rb, rd, 5'd0, thumb[10:6],
                 2'b00};
      end
      // Format 10: STRH/LDRH Rd, [Rb, #off5*2]
      5'b100_0?:
        arm = {AL, 3'b000, 4'b1110, thumb[11], rb, rd, 2'b00, thumb[10:9], 4'b1011,
               thumb[8:6], 1'b0};
      // Format 11: LDR/STR Rd, [SP, #imm8*4]
      5'b100_1?:
        arm = {AL, 3'b010, 4'b1100, thumb[11], 4'hD, 1'b0, thumb[10:8], 2'b00, thumb[7:0],
               2'b00};
      // Format 12: ADD Rd, PC|SP, #imm8*4  (imm8 rotated right by 30 = shifted left by 2)
      5'b101_0?: begin
        arm = {AL, 3'b001, 4'b0100, 1'b0, (thumb[11] ? 4'hD : 4'hF), 1'b0, thumb[10:8],
               4'hF, thumb[7:0]};
        xlat.pc_align = !thumb[11];
      end
      5'b101_1?: begin
        if (thumb[11:8] == 4'b0000)
          // Format 13: ADD SP, #+/-imm7*4
          arm = {AL, 3'b001, (thumb[7] ? 4'b0010 : 4'b0100), 1'b0, 4'hD, 4'hD, 4'hF, 1'b0,
                 thumb[6:0]};
        else if (thumb[10:9] == 2'b10)
          // Format 14: PUSH {rlist[,LR]} / POP {rlist[,PC]}
          arm = thumb[11]
              ? {AL, 3'b100, 5'b01011, 4'hD, thumb[8], 7'd0, thumb[7:0]}
              : {AL, 3'b100, 5'b10010, 4'hD, 1'b0, thumb[8], 6'd0, thumb[7:0]};
        else
          xlat.undef = 1'b1;
      end
      // Format 15: STMIA/LDMIA Rb!, {rlist}
      5'b110_0?:
        arm = {AL, 3'b100, 4'b0101, thumb[11], 1'b0, thumb[10:8], 8'd0, thumb[7:0]};
      // Format 16/17: B<cond> / SWI
      5'b110_1?: begin
        if (thumb[11:8] == 4'hF)
          arm = {AL, 4'hF, 16'd0, thumb[7:0]};
        else if (thumb[11:8] == 4'hE)
          xlat.undef = 1'b1;
        else
          arm = {thumb[11:8], 4'b1010, {16{thumb[7]}}, thumb[7:0]};
      end
      // Format 18: B (unconditional)
      5'b111_00:
        arm = {AL, 4'b1010, {13{thumb[10]}}, thumb[10:0]};
      // Format 19: BL, two halves
      5'b111_10: begin
        arm = {AL, 4'b1011, {13{thumb[10]}}, thumb[10:0]};
        xlat.bl_prefix = 1'b1;
      end
      5'b111_11: begin
        arm = {AL, 4'b1011, 13'd0, thumb[10:0]};
        xlat.bl_suffix = 1'b1;
      end
      default: xlat.undef = 1'b1;  // 11101: undefined in ARMv4T
    endcase

    if (xlat.undef) arm = ARM_UNDEF;
  end

endmodule
