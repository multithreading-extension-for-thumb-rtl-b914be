// mt_thumb_frontend: fetch and decode/register-read stages of a multithreaded ARM/Thumb
// pipeline with the Ts thread-switch extension.
//
// The pipeline is the classic five-stage ARM organisation (fetch; decode and register read;
// shift/ALU; data memory; write-back). This block implements the first two stages, which is where
// the thread-switch extension lives, and hands decoded instructions with their operands to the
// execute stage through the ID/EX register (`ex_*` outputs). It contains:
//   * fetch_unit      - per-thread PCs, two Thumb instructions per fetch, switch on request;
//   * decode_stage    - 48-bit buffer, Thumb decompressor + ARM decoder, and the Ts decoder that
//                       removes a Ts alongside the preceding Thumb instruction and asks the fetch
//                       unit to switch threads in the next cycle;
//   * banked_regfile  - one register bank per thread, read in decode with the instruction's
//                       thread id, written by write-back (`wb_*`).
// A Thumb program marks a switch point by placing the Ts instruction two instructions ahead of
// the instruction at which the thread should yield (typically a long-latency load or a branch).
// The two instructions after the Ts still issue; the next fetched pair comes from the next
// thread, and an old-thread instruction fetched in the same word as the yielding one is
// abandoned and refetched when the thread returns. No cycle is spent on the Ts itself.
//
// Operands: R15 reads as the instruction address + 4 (word-aligned for PC-relative loads and
// ADD Rd,PC,#), as in Thumb state. Operand C is Rd for instructions that read Rd (stores,
// multiply-accumulate) and Rs otherwise.
// `stall` (from the later stages) freezes decode and the ID/EX register; `redirect_*` (a taken
// branch resolved later in the pipeline) loads the thread's new PC and flushes its buffered
// instructions. The later stages, the memories and the branch unit are outside this block.
// Reset is synchronous and active low.
module mt_thumb_frontend
  import mt_thumb_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 2,
  parameter addr_t       BOOT_PC     = 32'h0000_0000,
  parameter addr_t       BOOT_STRIDE = 32'h0000_1000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory (combinational read)
  output addr_t       imem_addr,
  input  logic [31:0] imem_rdata,
  // from the later pipeline stages
  input  logic        stall,
  input  logic        redirect_valid,
  input  tid_t        redirect_tid,
  input  addr_t       redirect_pc,
  input  logic        wb_en,
  input  tid_t        wb_tid,
  input  logic [3:0]  wb_rd,
  input  logic [31:0] wb_data,
  // ID/EX register
  output logic        ex_valid,
  output tid_t        ex_tid,
  output addr_t       ex_pc,
  output logic [15:0] ex_thumb,
  output logic [31:0] ex_arm,
  output dec_t        ex_dec,
  output logic [31:0] ex_op_a,     // Rn
  output logic [31:0] ex_op_b,     // Rm
  output logic [31:0] ex_op_c,     // Rs or Rd
  // status
  output tid_t        fetch_tid,
  output addr_t       fetch_pc,
  output logic        thread_switch  // a Ts was decoded this cycle
);

  logic [1:0]  push_n, buf_space;
  ib_entry_t   push [2];
  logic        switch_valid;
  tid_t        switch_tid;
  addr_t       switch_cut;

  logic        id_valid, id_ts_paired, id_ts_alone;
  tid_t        id_tid;
  addr_t       id_pc;
  logic [15:0] id_thumb;
  logic [31:0] id_arm;
  xlat_t       id_xlat;
  dec_t        id_dec;

  logic [3:0]  rd_addr [3];
  logic [31:0] rd_data [3];
  logic [31:0] opnd    [3];
  addr_t       pc_read;

  fetch_unit #(
    .NUM_THREADS (NUM_THREADS),
    .BOOT_PC     (BOOT_PC),
    .BOOT_STRIDE (BOOT_STRIDE)
  ) u_fetch (
    .clk            (clk),
    .rst_n          (rst_n),
    .imem_addr      (imem_addr),
    .imem_rdata     (imem_rdata),
    .buf_space      (buf_space),
    .push_n         (push_n),
    .push           (push),
    .switch_valid   (switch_valid),
    .switch_tid     (switch_tid),
    .switch_cut     (switch_cut),
    .redirect_valid (redirect_valid),
    .redirect_tid   (redirect_tid),
    .redirect_pc    (redirect_pc),
    .fetch_tid      (fetch_tid),
    .fetch_pc       (fetch_pc)
  );

  decode_stage u_dec (
    .clk            (clk),
    .rst_n          (rst_n),
    .push_n         (push_n),
    .push           (push),
    .buf_space      (buf_space),
    .stall          (stall),
    .redirect_valid (redirect_valid),
    .redirect_tid   (redirect_tid),
    .switch_valid   (switch_valid),
    .switch_tid     (switch_tid),
    .switch_cut     (switch_cut),
    .id_valid       (id_valid),
    .id_tid         (id_tid),
    .id_pc          (id_pc),
    .id_thumb       (id_thumb),
    .id_arm         (id_arm),
    .id_xlat        (id_xlat),
    .id_dec         (id_dec),
    .id_ts_paired   (id_ts_paired),
    .id_ts_alone    (id_ts_alone)
  );

  banked_regfile #(
    .NUM_THREADS (NUM_THREADS),
    .NUM_REGS    (16),
    .NUM_READ    (3)
  ) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_tid  (id_tid),
    .rd_addr (rd_addr),
    .rd_data (rd_data),
    .wr_en   (wb_en),
    .wr_tid  (wb_tid),
    .wr_addr (wb_rd),
    .wr_data (wb_data)
  );

  assign rd_addr[0] = id_dec.rn;
  assign rd_addr[1] = id_dec.rm;
  assign rd_addr[2] = id_dec.use_rd ? id_dec.rd : id_dec.rs;

  always_comb begin
    pc_read    = id_pc + addr_t'(4);
    if (id_xlat.pc_align) pc_read[1:0] = 2'b00;
    for (int p = 0; p < 3; p++) opnd[p] = (rd_addr[p] == 4'd15) ? pc_read : rd_data[p];
    thread_switch = id_ts_paired || id_ts_alone;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_tid   <= '0;
      ex_pc    <= '0;
      ex_thumb <= '0;
      ex_arm   <= '0;
      ex_dec   <= '0;
      ex_op_a  <= '0;
      ex_op_b  <= '0;
      ex_op_c  <= '0;
    end else if (!stall) begin
      ex_valid <= id_valid;
      ex_tid   <= id_tid;
      ex_pc    <= id_pc;
      ex_thumb <= id_thumb;
      ex_arm   <= id_arm;
      ex_dec   <= id_dec;
      ex_op_a  <= opnd[0];
      ex_op_b  <= opnd[1];
      ex_op_c  <= opnd[2];
    end
  end

endmodule
