// tb_mt_thumb_frontend: end-to-end test of the multithreaded Thumb front end at its default
// size (two threads), playing the instruction memory and the later pipeline stages.
//
// Programs: each thread has a 4 KB region (thread t at t * 0x1000) of generated Thumb code
// (ALU, shifts, immediate moves, loads/stores, PC-relative loads and adds, hi-register moves)
// with Ts instructions at random places, never first and never adjacent. Thread 0 starts
// i1, i2, Ts, i3, i4, i5 and thread 1 starts b1, Ts, b2, b3: the two cases of the document's
// timing diagrams. At 0x700 in each region sits a Ts that can only be reached by a branch, so
// it arrives first in the buffer and is consumed alone.
//
// The testbench acts as the execute/write-back side: it stalls now and then, writes random
// registers of random threads through the write-back port, and treats some instructions that
// reach the ID/EX register as taken branches (redirects to a random target). It checks:
//   * the exact cycles at which the first eight instructions reach ID/EX (Fig. 6 / Fig. 4 cases:
//     no cycle spent on Ts, switch in the next cycle, i5 abandoned and refetched later);
//   * per thread, every issued instruction follows the previous one in program order (Ts
//     skipped), or is the redirect target after a redirect: nothing lost, nothing repeated;
//   * after a Ts, its thread issues at most two more instructions before another thread's;
//   * operands read in decode equal a model of each thread's registers (R15 reads as PC + 4,
//     word-aligned for PC-relative forms), including same-cycle write-through;
//   * each mechanism occurred: paired Ts, lone Ts, abandoned halfword, stall, redirect, full
//     buffer refusing a fetch, single-halfword fetch, write-through, and a bank read whose value
//     differs from the other thread's register of the same number.
module tb_mt_thumb_frontend;
  import mt_thumb_pkg::*;

  localparam int NT     = 2;
  localparam int HW     = 2048;            // halfwords per thread region
  localparam int CYCLES = 20000;

  logic clk = 0, rst_n = 0;
  addr_t imem_addr, redirect_pc, ex_pc, fetch_pc;
  logic [31:0] imem_rdata, wb_data, ex_arm, ex_op_a, ex_op_b, ex_op_c;
  logic stall, redirect_valid, wb_en, ex_valid, thread_switch;
  tid_t redirect_tid, wb_tid, ex_tid, fetch_tid;
  logic [3:0] wb_rd;
  logic [15:0] ex_thumb;
  dec_t ex_dec;

  mt_thumb_frontend dut (.*);

  always #5 clk = ~clk;

  logic [15:0] prog [NT][HW];
  logic [31:0] regs [NT][16];

  int checks = 0, failures = 0, cyc = 0;
  int n_paired = 0, n_alone = 0, n_abandon = 0, n_stall = 0, n_redirect = 0;
  int n_refused = 0, n_odd = 0, n_fwd = 0, n_bank = 0, n_pcread = 0, n_issued = 0;

  function automatic logic is_ts_hw(logic [15:0] h);
    return h[15:8] == 8'hDE;
  endfunction

  function automatic logic [15:0] hw_at(addr_t a);
    int t, i;
    t = int'(a[15:12]);
    i = int'(a[11:1]);
    return (t < NT) ? prog[t][i] : 16'h0000;
  endfunction

  assign imem_rdata = {hw_at(imem_addr + 2), hw_at(imem_addr)};

  function automatic logic [15:0] rand_instr();
    logic [2:0] rd, rs, rn;
    rd = 3'($urandom); rs = 3'($urandom); rn = 3'($urandom);
    case ($urandom_range(0, 9))
      0: return {5'b00100, rd, 8'($urandom)};                     // MOV Rd,#imm
      1: return {7'b0001100, rn, rs, rd};                         // ADD Rd,Rs,Rn
      2: return {6'b010000, 4'($urandom), rs, rd};                // ALU Rd,Rs
      3: return {5'b01001, rd, 8'($urandom)};                     // LDR Rd,[PC,#]
      4: return {5'b10100, rd, 8'($urandom)};                     // ADD Rd,PC,#
      5: return {5'b01101, 5'($urandom), rs, rd};                 // LDR Rd,[Rs,#]
      6: return {5'b01100, 5'($urandom), rs, rd};                 // STR Rd,[Rs,#]
      7: return {8'b01000110, 1'b0, 1'b1, 3'($urandom), rd};      // MOV Rd,Hs (R8..R15)
      8: return {5'b00000, 5'($urandom), rs, rd};                 // LSL Rd,Rs,#
      default: return {7'b0001111, rn, rs, rd};                   // SUB Rd,Rs,#
    endcase
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d %s: got %h expected %h", cyc, what, got, exp);
    end
  endtask

  // next instruction address in program order, skipping a Ts
  function automatic addr_t next_instr(addr_t a);
    return is_ts_hw(hw_at(a)) ? a + 2 : a;
  endfunction

  function automatic logic [31:0] operand(int t, logic [3:0] r, addr_t pc, logic [15:0] th);
    logic [31:0] v;
    if (r == 4'd15) begin
      v = pc + 4;
      if (th[15:11] == 5'b01001 || th[15:11] == 5'b10100) v[1:0] = 2'b00;
      return v;
    end
    return regs[t][r];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors (internal observation only)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_dec.id_ts_paired) n_paired++;
    if (dut.u_dec.id_ts_alone)  n_alone++;
    if (dut.u_fetch.do_switch && dut.u_fetch.n_fetch != 0 &&
        dut.u_fetch.n_fetch < (dut.fetch_pc[1] ? 2'd1 : 2'd2)) n_abandon++;
    if (dut.u_fetch.n_fetch == 0 && !dut.u_fetch.squash) n_refused++;
    if (dut.u_fetch.n_fetch != 0 && dut.fetch_pc[1]) n_odd++;
  end

  initial begin
    addr_t exp_next [NT];
    int    yield_left [NT];
    logic  yield_on [NT];
    logic  stall_d;
    int    t;
    addr_t tgt;
    // expected first ID/EX arrivals: {cycle, pc}
    int    e_cyc [8] = '{2, 3, 4, 5, 6, 7, 8, 9};
    addr_t e_pc  [8] = '{32'h0, 32'h2, 32'h6, 32'h8, 32'h1000, 32'h1004, 32'h1006, 32'hA};
    int    k0 = 0;

    for (int th = 0; th < NT; th++) begin
      for (int i = 0; i < HW; i++) begin
        if (i > 0 && !is_ts_hw(prog[th][i - 1]) && $urandom_range(0, 6) == 0)
          prog[th][i] = 16'hDE00 | 16'($urandom_range(0, 255));
        else
          prog[th][i] = rand_instr();
      end
      prog[th][HW - 1] = rand_instr();
      prog[th][HW - 2] = rand_instr();
      prog[th][11'h380] = 16'hDE11;                 // reached only by a branch
      prog[th][11'h381] = rand_instr();
      prog[th][11'h37F] = rand_instr();
      for (int r = 0; r < 16; r++) regs[th][r] = '0;
    end
    // thread 0: i1 i2 Ts i3 i4 i5 i6 ; thread 1: b1 Ts b2 b3 b4 b5
    for (int i = 0; i < 8; i++) begin prog[0][i] = rand_instr(); prog[1][i] = rand_instr(); end
    prog[0][2] = 16'hDE00;
    prog[1][1] = 16'hDE01;
    for (int th = 0; th < NT; th++) begin
      exp_next[th] = next_instr(addr_t'(th * 32'h1000));
      yield_on[th] = 0; yield_left[th] = 0;
    end

    stall = 0; redirect_valid = 0; redirect_tid = '0; redirect_pc = '0;
    wb_en = 0; wb_tid = '0; wb_rd = '0; wb_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    stall_d = 0;

    for (cyc = 1; cyc <= CYCLES; cyc++) begin
      // ---- drive this cycle (after the previous edge) ----
      redirect_valid = 0;
      wb_en = 0;
      stall = 0;
      if (cyc > 12) begin
        stall = $urandom_range(0, 14) == 0;
        wb_en = $urandom_range(0, 2) == 0;
        wb_tid = tid_t'($urandom_range(0, NT - 1));
        wb_rd = 4'($urandom_range(0, 14));
        wb_data = $urandom;
        if (ex_valid && !stall_d && !stall) begin
          t = int'(ex_tid);
          if ($urandom_range(0, 24) == 0 || ex_pc[11:0] > 12'hE00) begin
            redirect_valid = 1;
            redirect_tid = ex_tid;
            case ($urandom_range(0, 3))
              0: tgt = addr_t'(t * 32'h1000 + 32'h700);                  // the lone Ts
              default: tgt = addr_t'(t * 32'h1000) + addr_t'({$urandom_range(0, 1535), 1'b0});
            endcase
            redirect_pc = tgt;
          end
        end
      end
      @(posedge clk);
      // ---- model update for what happened in this cycle ----
      if (redirect_valid) begin
        t = int'(redirect_tid);
        exp_next[t] = next_instr(redirect_pc);
        yield_on[t] = is_ts_hw(hw_at(redirect_pc));
        yield_left[t] = 2;
        n_redirect++;
      end
      if (stall) n_stall++;
      // write-back of this cycle: the decode of this cycle already saw it (write-through)
      if (wb_en) regs[wb_tid][wb_rd] = wb_data;
      #1;
      // ---- check the ID/EX register (new when the cycle was not stalled) ----
      if (!stall && ex_valid) begin
        t = int'(ex_tid);
        n_issued++;
        if (k0 < 8) begin
          expect_eq("startup cycle", cyc, e_cyc[k0]);
          expect_eq("startup pc", ex_pc, e_pc[k0]);
          k0++;
        end
        expect_eq("program order", ex_pc, exp_next[t]);
        expect_eq("thumb", ex_thumb, hw_at(ex_pc));
        // yield rule
        for (int o = 0; o < NT; o++) if (o != t) yield_on[o] = 0;
        if (yield_on[t]) begin
          checks++;
          if (yield_left[t] == 0) begin
            failures++;
            $display("FAIL cycle %0d thread %0d did not yield after Ts", cyc, t);
            yield_on[t] = 0;
          end else yield_left[t]--;
        end
        if (is_ts_hw(hw_at(ex_pc + 2))) begin yield_on[t] = 1; yield_left[t] = 2; end
        exp_next[t] = next_instr(ex_pc + 2);
        // operands
        if (ex_dec.use_rn) expect_eq("op_a", ex_op_a, operand(t, ex_dec.rn, ex_pc, ex_thumb));
        if (ex_dec.use_rm) expect_eq("op_b", ex_op_b, operand(t, ex_dec.rm, ex_pc, ex_thumb));
        if (ex_dec.use_rd)
          expect_eq("op_c", ex_op_c, operand(t, ex_dec.rd, ex_pc, ex_thumb));
        if ((ex_dec.use_rn && ex_dec.rn == 4'd15) || (ex_dec.use_rm && ex_dec.rm == 4'd15))
          n_pcread++;
        if (ex_dec.use_rn && ex_dec.rn != 4'd15 && regs[t][ex_dec.rn] != regs[1 - t][ex_dec.rn])
          n_bank++;
        if (wb_en && wb_tid == ex_tid &&
            ((ex_dec.use_rn && ex_dec.rn == wb_rd) || (ex_dec.use_rm && ex_dec.rm == wb_rd)))
          n_fwd++;
      end
      stall_d = stall;
      #1;
    end

    $display("issued %0d: Ts paired %0d, lone %0d, abandoned %0d, stalls %0d, redirects %0d,",
             n_issued, n_paired, n_alone, n_abandon, n_stall, n_redirect);
    $display("  fetch refused %0d, single-halfword fetches %0d, write-through %0d, bank reads %0d, pc reads %0d",
             n_refused, n_odd, n_fwd, n_bank, n_pcread);
    checks++;
    if (n_paired == 0 || n_alone == 0 || n_abandon == 0 || n_stall == 0 || n_redirect == 0 ||
        n_refused == 0 || n_odd == 0 || n_fwd == 0 || n_bank == 0 || n_pcread == 0 ||
        k0 != 8) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
