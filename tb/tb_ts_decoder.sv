// tb_ts_decoder: checks Ts recognition, pairing with the preceding Thumb instruction, the
// number of halfwords consumed and the switch signal with its cut address.
//
// Random buffer contents are generated (with a bias towards the Ts opcode); the expected outputs
// are worked out in the testbench from the rules: a Ts in ib2 of the same thread as a Thumb
// instruction in ib1 is consumed with it (2 halfwords, switch, cut = Ts address + 6); a Ts in
// ib1 is consumed alone (1 halfword, switch, cut = its address + 6); otherwise one Thumb
// instruction is consumed; nothing happens without `advance`.
module tb_ts_decoder;
  import mt_thumb_pkg::*;

  ib_entry_t ib1, ib2;
  logic advance;
  logic thumb_valid, ts_paired, ts_alone, switch_valid;
  logic [1:0] consume;
  tid_t switch_tid;
  addr_t switch_cut;
  int checks = 0, failures = 0;
  int n_paired = 0, n_alone = 0;

  ts_decoder dut (.*);

  function automatic logic [15:0] rand_hw();
    return ($urandom_range(0, 2) == 0) ? (16'hDE00 | 16'($urandom_range(0, 255)))
                                       : 16'($urandom);
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (ib1=%h/%0d ib2=%h/%0d adv=%b)", what, got, exp,
               ib1.hw, ib1.valid, ib2.hw, ib2.valid, advance);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic t1, t2, pair;
    logic [1:0] e_cons;
    logic e_sw;
    addr_t e_cut;
    for (int k = 0; k < 2000; k++) begin
      ib1.valid = $urandom_range(0, 5) != 0;
      ib1.tid   = tid_t'($urandom_range(0, 1));
      ib1.addr  = {$urandom, 1'b0};
      ib1.hw    = rand_hw();
      ib2.valid = $urandom_range(0, 5) != 0;
      ib2.tid   = ($urandom_range(0, 5) == 0) ? ~ib1.tid : ib1.tid;
      ib2.addr  = ib1.addr + 2;
      ib2.hw    = rand_hw();
      advance   = $urandom_range(0, 4) != 0;
      #1;
      t1   = ib1.valid && ib1.hw[15:8] == 8'hDE;
      t2   = ib2.valid && ib2.hw[15:8] == 8'hDE;
      pair = ib1.valid && !t1 && t2 && ib2.tid == ib1.tid;
      e_cons = !advance ? 2'd0 : pair ? 2'd2 : ib1.valid ? 2'd1 : 2'd0;
      e_sw   = advance && (pair || t1);
      e_cut  = pair ? ib1.addr + 8 : ib1.addr + 6;
      expect_eq("thumb_valid", thumb_valid, ib1.valid && !t1);
      expect_eq("paired", ts_paired, pair);
      expect_eq("alone", ts_alone, t1);
      expect_eq("consume", consume, e_cons);
      expect_eq("switch", switch_valid, e_sw);
      if (e_sw) begin
        expect_eq("cut", switch_cut, e_cut);
        expect_eq("tid", switch_tid, ib1.tid);
        if (pair) n_paired++; else n_alone++;
      end
    end
    if (n_paired == 0 || n_alone == 0) failures++;
    $display("paired switches %0d, lone switches %0d", n_paired, n_alone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
