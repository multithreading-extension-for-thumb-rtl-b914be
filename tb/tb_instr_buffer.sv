// tb_instr_buffer: random push / pop / flush traffic against a queue model.
//
// Every cycle the testbench picks a legal combination of flush (all entries of one thread),
// pop (0..2 oldest remaining entries) and push (0..2 new entries, never more than fit), applies
// it, and after the clock edge compares all three slots and the free count with a SystemVerilog
// queue that models the buffer.
module tb_instr_buffer;
  import mt_thumb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic flush;
  tid_t flush_tid;
  logic [1:0] pop, push_n, free;
  ib_entry_t push [2];
  ib_entry_t slot [3];
  int checks = 0, failures = 0, cycles = 0;
  int n_full = 0, n_flush = 0, n_pop2 = 0;

  instr_buffer dut (.*);

  always #5 clk = ~clk;

  ib_entry_t model [$];

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %h expected %h", cycles, what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ib_entry_t kept [$];
    int np, nq;
    flush = 0; flush_tid = '0; pop = 0; push_n = 0;
    push[0] = '0; push[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    expect_eq("free after reset", free, 3);
    for (int k = 0; k < 3000; k++) begin
      cycles++;
      flush     = $urandom_range(0, 9) == 0;
      flush_tid = tid_t'($urandom_range(0, 1));
      kept.delete();
      foreach (model[i]) if (!(flush && model[i].tid == flush_tid)) kept.push_back(model[i]);
      np = $urandom_range(0, (kept.size() < 2) ? kept.size() : 2);
      nq = $urandom_range(0, (3 - (kept.size() - np) < 2) ? 3 - (kept.size() - np) : 2);
      pop = 2'(np);
      push_n = 2'(nq);
      for (int j = 0; j < 2; j++) begin
        push[j].valid = 1'b1;
        push[j].tid   = tid_t'($urandom_range(0, 1));
        push[j].addr  = $urandom;
        push[j].hw    = 16'($urandom);
      end
      if (flush && kept.size() != model.size()) n_flush++;
      if (np == 2) n_pop2++;
      repeat (np) void'(kept.pop_front());
      for (int j = 0; j < nq; j++) kept.push_back(push[j]);
      model = kept;
      if (model.size() == 3) n_full++;
      @(posedge clk);
      #1;
      for (int i = 0; i < 3; i++) begin
        if (i < model.size()) expect_eq($sformatf("slot%0d", i), slot[i], model[i]);
        else                  expect_eq($sformatf("slot%0d valid", i), slot[i].valid, 0);
      end
      expect_eq("free", free, 3 - model.size());
    end
    if (n_full == 0 || n_flush == 0 || n_pop2 == 0) begin
      failures++;
      $display("FAIL coverage full=%0d flush=%0d pop2=%0d", n_full, n_flush, n_pop2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
