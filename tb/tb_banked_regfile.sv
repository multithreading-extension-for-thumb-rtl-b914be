// tb_banked_regfile: random writes and reads across the thread banks against an array model.
//
// Checks that each thread sees only its own bank, that a same-cycle write to the register being
// read is forwarded (write-through) and that reset clears every register.
module tb_banked_regfile;
  import mt_thumb_pkg::*;

  localparam int NT = 2;
  logic clk = 0, rst_n = 0;
  tid_t rd_tid, wr_tid;
  logic [3:0] rd_addr [3];
  logic [31:0] rd_data [3];
  logic wr_en;
  logic [3:0] wr_addr;
  logic [31:0] wr_data;
  int checks = 0, failures = 0, n_fwd = 0;

  banked_regfile #(.NUM_THREADS(NT)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] model [NT][16];

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_tid = '0; wr_addr = '0; wr_data = '0; rd_tid = '0;
    foreach (rd_addr[p]) rd_addr[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (model[t, r]) model[t][r] = '0;
    for (int k = 0; k < 3000; k++) begin
      wr_en   = $urandom_range(0, 2) != 0;
      wr_tid  = tid_t'($urandom_range(0, NT - 1));
      wr_addr = 4'($urandom);
      wr_data = $urandom;
      rd_tid  = tid_t'($urandom_range(0, NT - 1));
      foreach (rd_addr[p]) rd_addr[p] = ($urandom_range(0, 3) == 0) ? wr_addr : 4'($urandom);
      #1;
      foreach (rd_addr[p]) begin
        if (wr_en && wr_tid == rd_tid && wr_addr == rd_addr[p]) begin
          expect_eq("forward", rd_data[p], wr_data);
          n_fwd++;
        end else begin
          expect_eq($sformatf("read t%0d r%0d", rd_tid, rd_addr[p]), rd_data[p],
                    model[rd_tid][rd_addr[p]]);
        end
      end
      @(posedge clk);
      if (wr_en) model[wr_tid][wr_addr] = wr_data;
      #1;
    end
    if (n_fwd == 0) failures++;
    // reset clears all banks
    rst_n = 0; wr_en = 0;
    @(posedge clk); #1;
    rst_n = 1;
    for (int t = 0; t < NT; t++) for (int r = 0; r < 16; r++) begin
      rd_tid = tid_t'(t); rd_addr[0] = 4'(r);
      #1;
      expect_eq("after reset", rd_data[0], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
