// banked_regfile: the ARM register file with one complete bank of registers per hardware thread.
//
// Each thread's architectural registers live in their own bank, selected by the thread id that
// travels with every instruction, so a thread switch needs no copying: the state of a thread that
// leaves the pipeline simply stays in its bank until it returns. Reads are combinational in the
// decode stage (NUM_READ ports, for Rn, Rm and Rs/store data). The single write port comes from
// write-back and writes at the clock edge; a read of the register being written in the same
// cycle returns the new value (write-through), so write-back and decode can overlap.
// R15 is stored like the others; the decode stage substitutes the PC when R15 is read.
//
// The document states that banked register sets are added for the thread contexts; the number of
// read ports, the write-through and the reset to zero are this design's choices.
// Reset is synchronous and active low and clears all registers.
module banked_regfile
  import mt_thumb_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 2,
  parameter int unsigned NUM_REGS    = 16,
  parameter int unsigned NUM_READ    = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tid_t        rd_tid,
  input  logic [3:0]  rd_addr [NUM_READ],
  output logic [31:0] rd_data [NUM_READ],
  input  logic        wr_en,
  input  tid_t        wr_tid,
  input  logic [3:0]  wr_addr,
  input  logic [31:0] wr_data
);

  // index width of the bank array
  localparam int unsigned TIX = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1;

  logic [31:0] bank [NUM_THREADS][NUM_REGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < NUM_THREADS; t++)
        for (int r = 0; r < NUM_REGS; r++) bank[t][r] <= '0;
    end else if (wr_en) begin
      bank[wr_tid[TIX-1:0]][wr_addr] <= wr_data;
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_READ; p++) begin
      if (wr_en && wr_tid == rd_tid && wr_addr == rd_addr[p]) rd_data[p] = wr_data;
      else                                                    rd_data[p] = bank[rd_tid[TIX-1:0]][rd_addr[p]];
    end
  end

  a_wr_tid: assert property (@(posedge clk) disable iff (!rst_n)
                             !wr_en || (int'(wr_tid) < NUM_THREADS))
    else $error("banked_regfile: write to a bank that does not exist");

endmodule
