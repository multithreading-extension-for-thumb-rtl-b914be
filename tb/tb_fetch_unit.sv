// tb_fetch_unit: checks fetch addresses, delivered halfwords, thread switching and redirects.
//
// The instruction memory is modelled as a function of the address (the halfword at byte
// address a holds a[16:1] xor 0x5A5A), so every delivered halfword can be checked against its
// address. Each cycle the testbench offers random buffer space and, now and then, a thread
// switch (with a cut address 2..6 bytes past the fetch PC, as the Ts decoder produces) or a
// branch redirect, and compares the unit's outputs with a model of the rules: two halfwords per
// aligned fetch, one from an odd halfword, all-or-nothing on buffer space, nothing at or past
// the cut in a switching cycle, next thread from the next cycle, redirect squashes its own
// thread's fetch. It also checks the document's Fig. 6 case directly: the instruction fetched
// in the same word as the switching instruction is abandoned.
module tb_fetch_unit;
  import mt_thumb_pkg::*;

  localparam int NT = 2;
  localparam addr_t STRIDE = 32'h1000;
  logic clk = 0, rst_n = 0;
  addr_t imem_addr, switch_cut, redirect_pc, fetch_pc;
  logic [31:0] imem_rdata;
  logic [1:0] buf_space, push_n;
  ib_entry_t push [2];
  logic switch_valid, redirect_valid;
  tid_t switch_tid, redirect_tid, fetch_tid;
  int checks = 0, failures = 0, cycles = 0;
  int n_switch = 0, n_abandon = 0, n_redirect = 0, n_refused = 0, n_odd = 0;

  fetch_unit #(.NUM_THREADS(NT), .BOOT_PC(32'h100), .BOOT_STRIDE(STRIDE)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] hw_at(addr_t a);
    return a[16:1] ^ 16'h5A5A;
  endfunction
  assign imem_rdata = {hw_at(imem_addr + 2), hw_at(imem_addr)};

  addr_t m_pc [NT];
  int    m_cur;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h expected %h", cycles, what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int avail, n;
    addr_t pc;
    buf_space = 0; switch_valid = 0; redirect_valid = 0;
    switch_tid = '0; redirect_tid = '0; switch_cut = '0; redirect_pc = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) m_pc[t] = 32'h100 + t * STRIDE;
    m_cur = 0;
    for (int k = 0; k < 4000; k++) begin
      cycles++;
      pc = m_pc[m_cur];
      buf_space      = 2'($urandom_range(0, 3));
      switch_valid   = $urandom_range(0, 5) == 0;
      switch_tid     = tid_t'(m_cur);
      switch_cut     = pc + 2 * $urandom_range(1, 3);
      redirect_valid = $urandom_range(0, 15) == 0;
      redirect_tid   = tid_t'($urandom_range(0, NT - 1));
      redirect_pc    = {16'h0, 15'($urandom), 1'b0};
      if (redirect_valid) switch_valid = 0;
      #1;
      avail = pc[1] ? 1 : 2;
      if (switch_valid && (switch_cut - pc) / 2 < avail) begin
        avail = (switch_cut - pc) / 2;
        n_abandon++;
      end
      n = (redirect_valid && int'(redirect_tid) == m_cur) ? 0 : (avail <= buf_space) ? avail : 0;
      if (n == 0 && avail > buf_space) n_refused++;
      if (n > 0 && pc[1]) n_odd++;
      expect_eq("imem_addr", imem_addr, {pc[31:2], 2'b00});
      expect_eq("fetch_tid", fetch_tid, m_cur);
      expect_eq("push_n", push_n, n);
      for (int j = 0; j < n; j++) begin
        expect_eq("push.hw", push[j].hw, hw_at(pc + 2 * j));
        expect_eq("push.addr", push[j].addr, pc + 2 * j);
        expect_eq("push.tid", push[j].tid, m_cur);
      end
      @(posedge clk);
      m_pc[m_cur] = pc + 2 * n;
      if (redirect_valid) begin m_pc[redirect_tid] = redirect_pc; n_redirect++; end
      if (switch_valid) begin m_cur = (m_cur + 1) % NT; n_switch++; end
      #1;
    end
    // Fig. 6 situation: fetch PC is the word holding i4 (switching) and i5; cut = address of i5.
    redirect_valid = 0; switch_valid = 0; buf_space = 3;
    pc = m_pc[m_cur];
    if (pc[1]) begin
      @(posedge clk); #1;      // one single-halfword fetch realigns the PC
      m_pc[m_cur] = pc + 2;
      pc = m_pc[m_cur];
    end
    switch_valid = 1; switch_tid = tid_t'(m_cur); switch_cut = pc + 2;
    #1;
    expect_eq("fig6 only i4 delivered", push_n, 1);
    expect_eq("fig6 i4", push[0].hw, hw_at(pc));
    @(posedge clk); #1;
    switch_valid = 0;
    m_cur = (m_cur + 1) % NT;
    expect_eq("fig6 next thread", fetch_tid, m_cur);
    expect_eq("fig6 next pc", fetch_pc, m_pc[m_cur]);
    if (n_switch == 0 || n_abandon == 0 || n_redirect == 0 || n_refused == 0 || n_odd == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("switches %0d abandoned %0d redirects %0d refused %0d odd %0d",
             n_switch, n_abandon, n_redirect, n_refused, n_odd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
