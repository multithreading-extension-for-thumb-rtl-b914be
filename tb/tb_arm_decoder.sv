// tb_arm_decoder: checks the decoded fields of ARM instructions, in ARM and in Thumb state.
//
// Each case gives an ARM word (most of them the expansions of Thumb instructions), the side-band
// flags from the decompressor and the state, and compares the class, register numbers, register
// use, immediate and offsets with values worked out by hand from the ARMv4T formats.
module tb_arm_decoder;
  import mt_thumb_pkg::*;

  logic [31:0] instr;
  xlat_t       xlat;
  logic        thumb_state;
  dec_t        dec;
  int checks = 0, failures = 0;

  arm_decoder dut (.instr(instr), .xlat(xlat), .thumb_state(thumb_state), .dec(dec));

  task automatic apply(input logic [31:0] i, input xlat_t x, input logic ts);
    instr = i; xlat = x; thumb_state = ts;
    #1;
  endtask

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %h %s: got %h expected %h", instr, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ADDS r3,r4,r5
    apply(32'hE0943005, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_DP);   expect_eq("op", dec.alu_op, 4'h4);
    expect_eq("S", dec.set_flags, 1);         expect_eq("rn", dec.rn, 4);
    expect_eq("rd", dec.rd, 3);               expect_eq("rm", dec.rm, 5);
    expect_eq("use", {dec.use_rn, dec.use_rm, dec.use_rs, dec.writes_rd, dec.op2_imm}, 5'b11010);
    // ADD r0,sp,#20 (rotated immediate)
    apply(32'hE28D0F05, '0, 1'b1);
    expect_eq("imm", dec.imm, 20);            expect_eq("op2_imm", dec.op2_imm, 1);
    expect_eq("rn", dec.rn, 13);
    // MOV r0,#0xFF000000
    apply(32'hE3A004FF, '0, 1'b0);
    expect_eq("imm", dec.imm, 32'hFF000000);  expect_eq("use_rn", dec.use_rn, 0);
    // CMP r0,r7: no register write
    apply(32'hE1500007, '0, 1'b1);
    expect_eq("writes", dec.writes_rd, 0);    expect_eq("op", dec.alu_op, 4'hA);
    // MOVS r3,r3,LSL r4: register-specified shift
    apply(32'hE1B03413, '0, 1'b1);
    expect_eq("sbr", dec.shift_by_reg, 1);    expect_eq("rs", dec.rs, 4);
    expect_eq("use_rs", dec.use_rs, 1);       expect_eq("use_rn", dec.use_rn, 0);
    // MOVS r0,r7,LSR #32
    apply(32'hE1B00027, '0, 1'b1);
    expect_eq("type", dec.shift_type, 1);     expect_eq("amt", dec.shift_amt, 0);
    expect_eq("sbr", dec.shift_by_reg, 0);
    // MULS r2,r3,r2
    apply(32'hE0120293, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_MUL);   expect_eq("rd", dec.rd, 2);
    expect_eq("rm", dec.rm, 3);               expect_eq("rs", dec.rs, 2);
    expect_eq("use_rn", dec.use_rn, 0);
    // LDRSH r0,[r1,r2]
    apply(32'hE19100F2, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_HDT);
    expect_eq("mode", {dec.load, dec.half_acc, dec.signed_acc, dec.byte_acc, dec.use_rm}, 5'b11101);
    // LDRH r1,[r2,#6]
    apply(32'hE1D210B6, '0, 1'b1);
    expect_eq("imm", dec.imm, 6);             expect_eq("use_rm", dec.use_rm, 0);
    // LDR r2,[r3,#8]
    apply(32'hE5932008, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_SDT);   expect_eq("imm", dec.imm, 8);
    expect_eq("ld", {dec.load, dec.writes_rd, dec.pre_index, dec.up, dec.writeback}, 5'b11110);
    // STR r0,[r1,r2]
    apply(32'hE7810002, '0, 1'b1);
    expect_eq("st", {dec.store, dec.use_rd, dec.use_rm, dec.writes_rd}, 4'b1110);
    // STMDB sp!,{r4,lr}
    apply(32'hE92D4010, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_BDT);   expect_eq("list", dec.reglist, 16'h4010);
    expect_eq("wb", {dec.writeback, dec.pre_index, dec.up, dec.store}, 4'b1101);
    // BEQ -4 in Thumb state: halfword offsets
    apply(32'h0AFFFFFE, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_BR);    expect_eq("off", dec.br_offset, 32'hFFFFFFFC);
    expect_eq("cond", dec.cond, 0);
    // B +8 words in ARM state
    apply(32'hEA000008, '0, 1'b0);
    expect_eq("off", dec.br_offset, 32'h20);
    // BL prefix / suffix
    apply(32'hEBFFFFFF, '{undef: 0, bl_prefix: 1, bl_suffix: 0, pc_align: 0}, 1'b1);
    expect_eq("off", dec.br_offset, 32'hFFFFF000);
    expect_eq("wr", {dec.writes_rd, dec.rd, dec.link}, {1'b1, 4'd14, 1'b0});
    apply(32'hEB000123, '{undef: 0, bl_prefix: 0, bl_suffix: 1, pc_align: 0}, 1'b1);
    expect_eq("off", dec.br_offset, 32'h246);
    expect_eq("lr", {dec.use_rn, dec.rn, dec.link}, {1'b1, 4'd14, 1'b1});
    // BX lr
    apply(32'hE12FFF1E, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_BX);    expect_eq("rm", dec.rm, 14);
    // SWI
    apply(32'hEF000012, '0, 1'b1);
    expect_eq("class", dec.iclass, IC_SWI);   expect_eq("imm", dec.imm, 32'h12);
    // undefined
    apply(32'hE7F000F0, '{undef: 1, bl_prefix: 0, bl_suffix: 0, pc_align: 0}, 1'b1);
    expect_eq("class", dec.iclass, IC_UNDEF);
    apply(32'hEE000010, '0, 1'b0);   // coprocessor
    expect_eq("class", dec.iclass, IC_UNDEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
