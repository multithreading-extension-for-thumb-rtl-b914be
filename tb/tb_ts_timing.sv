// tb_ts_timing: the two thread-switch patterns of the design's timing analysis, cycle by cycle.
//
// Runs the front end at its default size from reset with short hand-written programs for two
// threads, A at 0x0000 and B at 0x1000, and checks in which cycle each instruction is decoded
// (cycle 1 is the first fetch after reset; an instruction decoded in cycle k is in the ID/EX
// register after edge k):
//   pattern 1, yield at the second instruction after a Ts that is the first halfword of a word:
//     A = i1 i2 Ts i3 i4 i5 ..., B = b1 b2 b3 Ts b4 b5 ...
//     decode: i1 2, i2 3, i3 4, i4 5, b1 6, b2 7, b3 8, b4 9, b5 10, i5 11, i6 12.
//     i5 was fetched with i4 in cycle 3 and dropped; it comes back from an odd-halfword fetch.
//   pattern 2, Ts as the second halfword of a word:
//     A = i1 Ts i2 i3 i4 i5 ..., B = b1 b2 Ts b3 b4 b5 ...
//     decode: i1 2, i2 3, i3 4, b1 5, b2 6, b3 7, b4 8, i4 9, i5 10 (b5 dropped in cycle 6).
// In both, Ts never takes a decode cycle, and the instructions between a switch request and the
// other thread's first instruction are exactly the two after the Ts.
module tb_ts_timing;
  import mt_thumb_pkg::*;

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

  logic [15:0] prog [2][32];
  int checks = 0, failures = 0, n_switch = 0;

  function automatic logic [15:0] hw_at(addr_t a);
    return (a[15:12] < 2 && a[11:6] == 0) ? prog[a[12]][a[5:1]] : 16'h2000;
  endfunction
  assign imem_rdata = {hw_at(imem_addr + 2), hw_at(imem_addr)};

  always @(posedge clk) if (rst_n && thread_switch) n_switch++;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // load programs: every non-Ts slot is MOV r0,#<index>, Ts slots given by mask
  task automatic load(input logic [31:0] ts_a, input logic [31:0] ts_b);
    for (int i = 0; i < 32; i++) begin
      prog[0][i] = ts_a[i] ? 16'hDE00 : (16'h2000 | 16'(i));
      prog[1][i] = ts_b[i] ? 16'hDE00 : (16'h2080 | 16'(i));
    end
  endtask

  task automatic run(input string name, input addr_t exp_pc [], input int first_cycle);
    int k;
    rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    k = 0;
    for (int cyc = 1; cyc <= first_cycle + exp_pc.size() - 1; cyc++) begin
      @(posedge clk);
      #1;
      if (cyc >= first_cycle) begin
        expect_eq($sformatf("%s cycle %0d valid", name, cyc), ex_valid, 1);
        expect_eq($sformatf("%s cycle %0d pc", name, cyc), ex_pc, exp_pc[k]);
        expect_eq($sformatf("%s cycle %0d thumb", name, cyc), ex_thumb, hw_at(exp_pc[k]));
        k++;
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t p1 [] = '{32'h0, 32'h2, 32'h6, 32'h8, 32'h1000, 32'h1002, 32'h1004, 32'h1008,
                     32'h100A, 32'hA, 32'hC};
    addr_t p2 [] = '{32'h0, 32'h4, 32'h6, 32'h1000, 32'h1002, 32'h1006, 32'h1008, 32'h8, 32'hA};
    stall = 0; redirect_valid = 0; redirect_tid = '0; redirect_pc = '0;
    wb_en = 0; wb_tid = '0; wb_rd = '0; wb_data = '0;
    load(32'h4, 32'h8);            // A: Ts at index 2, B: Ts at index 3
    n_switch = 0;
    run("pattern1", p1, 2);
    expect_eq("pattern1 switches", n_switch, 2);
    load(32'h2, 32'h4);            // A: Ts at index 1, B: Ts at index 2
    n_switch = 0;
    run("pattern2", p2, 2);
    expect_eq("pattern2 switches", n_switch, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
