// tb_thumb_decompressor: checks the Thumb-to-ARM expansion against hand-encoded ARM words.
//
// Each vector pairs a Thumb instruction with the ARM instruction that performs the same
// operation, encoded by hand from the ARMv4T instruction formats, and the side-band flags
// expected with it. Every Thumb format (1..19) is covered, plus the undefined encodings
// (including the Ts opcode, which must never be expanded into an executable instruction).
// A sweep over all 65536 encodings then checks two invariants worked out from the Thumb
// encoding map: exactly the ARMv4T-undefined encodings are flagged undefined, and only the
// conditional branch carries a condition other than AL.
module tb_thumb_decompressor;
  import mt_thumb_pkg::*;

  logic [15:0] thumb;
  logic [31:0] arm;
  xlat_t       xlat;
  int checks = 0, failures = 0;

  thumb_decompressor dut (.thumb(thumb), .arm(arm), .xlat(xlat));

  // {thumb, expected arm, expected flags {undef, bl_prefix, bl_suffix, pc_align}}
  typedef struct packed { logic [15:0] t; logic [31:0] a; logic [3:0] f; } vec_t;
  localparam int N = 44;
  vec_t v [N] = '{
    '{16'h00D1, 32'hE1B01182, 4'b0000},  // LSL r1,r2,#3
    '{16'h0838, 32'hE1B00027, 4'b0000},  // LSR r0,r7,#32
    '{16'h10A3, 32'hE1B03144, 4'b0000},  // ASR r3,r4,#2
    '{16'h1963, 32'hE0943005, 4'b0000},  // ADD r3,r4,r5
    '{16'h1FC8, 32'hE2510007, 4'b0000},  // SUB r0,r1,#7
    '{16'h2542, 32'hE3B05042, 4'b0000},  // MOV r5,#0x42
    '{16'h2AFF, 32'hE35200FF, 4'b0000},  // CMP r2,#255
    '{16'h3701, 32'hE2977001, 4'b0000},  // ADD r7,#1
    '{16'h3803, 32'hE2500003, 4'b0000},  // SUB r0,#3
    '{16'h4011, 32'hE0111002, 4'b0000},  // AND r1,r2
    '{16'h40A3, 32'hE1B03413, 4'b0000},  // LSL r3,r4
    '{16'h41C8, 32'hE1B00170, 4'b0000},  // ROR r0,r1
    '{16'h4159, 32'hE0B11003, 4'b0000},  // ADC r1,r3
    '{16'h421A, 32'hE1120003, 4'b0000},  // TST r2,r3
    '{16'h4251, 32'hE2721000, 4'b0000},  // NEG r1,r2
    '{16'h42B8, 32'hE1500007, 4'b0000},  // CMP r0,r7
    '{16'h42C8, 32'hE1700001, 4'b0000},  // CMN r0,r1
    '{16'h435A, 32'hE0120293, 4'b0000},  // MUL r2,r3
    '{16'h4388, 32'hE1D00001, 4'b0000},  // BIC r0,r1
    '{16'h43EC, 32'hE1F04005, 4'b0000},  // MVN r4,r5
    '{16'h4488, 32'hE0888001, 4'b0000},  // ADD r8,r1
    '{16'h4548, 32'hE1500009, 4'b0000},  // CMP r0,r9
    '{16'h4648, 32'hE1A00009, 4'b0000},  // MOV r0,r9
    '{16'h4770, 32'hE12FFF1E, 4'b0000},  // BX lr
    '{16'h4B04, 32'hE59F3010, 4'b0001},  // LDR r3,[pc,#16]
    '{16'h5088, 32'hE7810002, 4'b0000},  // STR r0,[r1,r2]
    '{16'h5C88, 32'hE7D10002, 4'b0000},  // LDRB r0,[r1,r2]
    '{16'h5288, 32'hE18100B2, 4'b0000},  // STRH r0,[r1,r2]
    '{16'h5688, 32'hE19100D2, 4'b0000},  // LDSB r0,[r1,r2]
    '{16'h5E88, 32'hE19100F2, 4'b0000},  // LDSH r0,[r1,r2]
    '{16'h689A, 32'hE5932008, 4'b0000},  // LDR r2,[r3,#8]
    '{16'h715A, 32'hE5C32005, 4'b0000},  // STRB r2,[r3,#5]
    '{16'h88D1, 32'hE1D210B6, 4'b0000},  // LDRH r1,[r2,#6]
    '{16'h9403, 32'hE58D400C, 4'b0000},  // STR r4,[sp,#12]
    '{16'hA805, 32'hE28D0F05, 4'b0000},  // ADD r0,sp,#20
    '{16'hA102, 32'hE28F1F02, 4'b0001},  // ADD r1,pc,#8
    '{16'hB084, 32'hE24DDF04, 4'b0000},  // ADD sp,#-16
    '{16'hB510, 32'hE92D4010, 4'b0000},  // PUSH {r4,lr}
    '{16'hBD10, 32'hE8BD8010, 4'b0000},  // POP {r4,pc}
    '{16'hC203, 32'hE8A20003, 4'b0000},  // STMIA r2!,{r0,r1}
    '{16'hD0FE, 32'h0AFFFFFE, 4'b0000},  // BEQ -4
    '{16'hDF12, 32'hEF000012, 4'b0000},  // SWI 0x12
    '{16'hE008, 32'hEA000008, 4'b0000},  // B +16
    '{16'hF7FF, 32'hEBFFFFFF, 4'b0100}   // BL prefix, offset -1
  };
  vec_t w [6] = '{
    '{16'hF923, 32'hEB000123, 4'b0010},  // BL suffix
    '{16'hDE05, 32'hE7F000F0, 4'b1000},  // Ts opcode: undefined to the ARM side
    '{16'hE800, 32'hE7F000F0, 4'b1000},  // 11101: undefined in ARMv4T
    '{16'hB200, 32'hE7F000F0, 4'b1000},  // 1011 0010: undefined in ARMv4T
    '{16'h4780, 32'hE7F000F0, 4'b1000},  // BX with H1 set
    '{16'hD8FF, 32'h8AFFFFFF, 4'b0000}   // BHI -2
  };

  task automatic check(input vec_t x);
    thumb = x.t;
    #1;
    checks++;
    if (arm !== x.a || {xlat.undef, xlat.bl_prefix, xlat.bl_suffix, xlat.pc_align} !== x.f) begin
      failures++;
      $display("FAIL thumb=%h arm=%h (exp %h) flags=%b (exp %b)", x.t, arm, x.a,
               {xlat.undef, xlat.bl_prefix, xlat.bl_suffix, xlat.pc_align}, x.f);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (v[i]) check(v[i]);
    foreach (w[i]) check(w[i]);
    for (int e = 0; e < 65536; e++) begin
      logic u;
      logic [15:0] t;
      t = 16'(e);
      thumb = t;
      #1;
      u = (t[15:11] == 5'b11101) || (t[15:8] == 8'hDE) ||
          (t[15:12] == 4'hB && !(t[11:8] == 4'h0 || t[10:9] == 2'b10)) ||
          (t[15:7] == 9'b010001111);
      checks++;
      if (xlat.undef !== u || (u && arm !== 32'hE7F000F0)) begin
        failures++;
        if (failures < 10) $display("FAIL sweep %h undef=%b expected %b", t, xlat.undef, u);
      end
      checks++;
      if (arm[31:28] !== ((t[15:12] == 4'hD && t[11:9] != 3'b111) ? t[11:8] : 4'hE)) begin
        failures++;
        if (failures < 10) $display("FAIL sweep %h cond %h", t, arm[31:28]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
