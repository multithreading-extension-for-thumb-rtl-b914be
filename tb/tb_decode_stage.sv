// tb_decode_stage: runs a Thumb instruction stream with embedded Ts instructions through the
// decode stage and checks what it issues.
//
// The testbench plays the fetch unit: it offers two halfwords whenever the stage reports room.
// The stream holds random Thumb instructions with Ts instructions scattered in it, never first
// and never adjacent (the rule a program must follow). Checks:
//   * the issued instructions are exactly the non-Ts instructions, in order, with their
//     addresses, and the ARM word and decode of each match a separate decompressor instance;
//   * every Ts raises the switch signal once, in the cycle its preceding instruction issues,
//     with cut address = Ts address + 6;
//   * Ts instructions cost no decode cycle: without stalls, instructions issue back to back;
//   * stall holds everything; a Ts arriving first is consumed alone; a redirect flushes the
//     thread's buffered instructions and issues nothing in its cycle.
module tb_decode_stage;
  import mt_thumb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] push_n, buf_space;
  ib_entry_t push [2];
  logic stall, redirect_valid;
  tid_t redirect_tid;
  logic switch_valid;
  tid_t switch_tid;
  addr_t switch_cut;
  logic id_valid, id_ts_paired, id_ts_alone;
  tid_t id_tid;
  addr_t id_pc;
  logic [15:0] id_thumb;
  logic [31:0] id_arm;
  xlat_t id_xlat;
  dec_t id_dec;

  logic [31:0] ref_arm;
  xlat_t ref_xlat;
  int checks = 0, failures = 0, cycles = 0;

  decode_stage dut (.*);
  thumb_decompressor u_ref (.thumb(id_thumb), .arm(ref_arm), .xlat(ref_xlat));

  always #5 clk = ~clk;

  localparam int LEN = 600;
  localparam addr_t BASE = 32'h2000;
  logic [15:0] prog [LEN];
  int fptr;                       // next halfword to fetch
  int exp_q [$];                  // indices of instructions expected to issue
  int ts_q [$];                   // indices of Ts instructions

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h expected %h", cycles, what, got, exp);
    end
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) fptr <= 0;
    else        fptr <= fptr + int'(push_n);
  end

  // fetch side: offer up to two halfwords when the stage has room for both
  always_comb begin
    push_n = 2'd0;
    for (int j = 0; j < 2; j++) begin
      push[j].valid = 1'b1;
      push[j].tid   = '0;
      push[j].addr  = BASE + addr_t'(2 * (fptr + j));
      push[j].hw    = (fptr + j < LEN) ? prog[fptr + j] : 16'h0000;
    end
    if (fptr + 2 <= LEN && buf_space >= 2) push_n = 2'd2;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_issue, last_issue, issued, bubbles, sw_seen;
    int pending_ts, f_at;
    // program: random Thumb (never 0xDExx), Ts at random legal places
    for (int i = 0; i < LEN; i++) begin
      if (i > 0 && prog[i - 1][15:8] != 8'hDE && $urandom_range(0, 4) == 0 && i < LEN - 1) begin
        prog[i] = 16'hDE00 | 16'($urandom_range(0, 255));
        ts_q.push_back(i);
      end else begin
        do prog[i] = 16'($urandom); while (prog[i][15:8] == 8'hDE);
        exp_q.push_back(i);
      end
    end
    stall = 0; redirect_valid = 0; redirect_tid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // phase 1: no stalls, count bubbles between first and last issue
    first_issue = -1; last_issue = -1; issued = 0; bubbles = 0; sw_seen = 0;
    pending_ts = 0;
    for (int c = 0; c < 2 * LEN && exp_q.size() > 0; c++) begin
      cycles++;
      stall = (c > LEN / 2) && (c < LEN / 2 + 40) && ($urandom_range(0, 2) == 0);
      #1;
      // the widened buffer keeps at least two instructions once the stream is running
      if (first_issue >= 0 && fptr + 2 <= LEN)
        expect_eq("at least two buffered", (fptr - (LEN - exp_q.size() - ts_q.size())) >= 2, 1);
      if (stall) expect_eq("no issue under stall", id_valid || switch_valid, 0);
      if (id_valid) begin
        int idx;
        idx = exp_q.pop_front();
        expect_eq("pc", id_pc, BASE + 2 * idx);
        expect_eq("thumb", id_thumb, prog[idx]);
        expect_eq("arm", id_arm, ref_arm);
        expect_eq("xlat", id_xlat, ref_xlat);
        // a Ts directly after this instruction must be decoded with it
        if (idx + 1 < LEN && prog[idx + 1][15:8] == 8'hDE) begin
          expect_eq("switch with Ts", switch_valid, 1);
          expect_eq("paired", id_ts_paired, 1);
          expect_eq("cut", switch_cut, BASE + 2 * (idx + 1) + 6);
          void'(ts_q.pop_front());
          sw_seen++;
        end else begin
          expect_eq("no switch", switch_valid, 0);
        end
        if (first_issue < 0) first_issue = c;
        last_issue = c;
        issued++;
      end else if (first_issue >= 0 && !stall) begin
        bubbles++;
      end
      @(posedge clk);
      #1;
    end
    stall = 0;
    expect_eq("all issued", exp_q.size(), 0);
    expect_eq("all Ts seen", ts_q.size(), 0);
    expect_eq("no bubbles: Ts cost no cycle", bubbles, 0);
    $display("issued %0d Thumb, %0d Ts paired, bubbles %0d", issued, sw_seen, bubbles);

    // phase 2: a Ts that arrives first is consumed alone; a redirect flushes
    prog[0] = 16'hDE00; prog[1] = 16'h2001; prog[2] = 16'h2102; prog[3] = 16'h2203;
    rst_n = 0; @(posedge clk); #1 rst_n = 1;
    @(posedge clk);   // DE00, 2001 arrive
    #1;
    expect_eq("lone Ts: no issue", id_valid, 0);
    expect_eq("lone Ts: switch", switch_valid, 1);
    expect_eq("lone Ts flag", id_ts_alone, 1);
    expect_eq("lone Ts cut", switch_cut, BASE + 6);
    @(posedge clk);
    #1;
    expect_eq("after lone Ts", id_thumb, 16'h2001);
    expect_eq("after lone Ts valid", id_valid, 1);
    redirect_valid = 1; redirect_tid = '0;
    #1;
    expect_eq("redirect: no issue", id_valid, 0);
    f_at = fptr;
    @(posedge clk);
    #1 redirect_valid = 0;
    #1;
    // the buffer was flushed; refilling starts from the fetch side's next halfword
    expect_eq("redirect flushed old entries", {id_valid, buf_space}, {1'b0, 2'd3});
    @(posedge clk);
    #1;
    expect_eq("refilled", id_pc, BASE + 2 * f_at);
    expect_eq("refilled valid", id_valid, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
