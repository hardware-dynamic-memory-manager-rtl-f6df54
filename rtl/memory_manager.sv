// memory_manager: worst-fit dynamic memory manager coprocessor.
//
// Allocation (MALLOC) and release (FREE) of blocks of an on-chip SRAM in a
// small, fixed number of clock cycles, whatever the number or layout of the
// free blocks. Three parts: mm_control_unit decodes and sequences the
// instructions, rocket_queue keeps every free block sorted by size so that
// the largest one is always at its top, and mm_memory is the managed SRAM,
// which also holds a one-word header at the start of every block.
//
// Interface (single clock, synchronous active-high reset):
//   enable, instr[1:0], data_in[D_W+A_W-1:0] = {address, data} : instruction,
//       accepted in a cycle where ready=1 (MALLOC=0, FREE=1, WRITE=2, READ=3)
//   ready    : manager can accept an instruction this cycle
//   valid    : data_out holds a MALLOC address or READ data this cycle
//   error    : MALLOC could not be served, or FREE of a block already free
//   data_out : D_W bits (the MALLOC address occupies the low A_W bits)
// After reset the manager spends one cycle initialising the memory with a
// single free block spanning all 2^A_W words, then raises ready.
// Timing is listed in mm_control_unit.
//
// Queue sizing: free blocks cannot touch each other (they are merged) and an
// allocated block has at least two words, so at most floor((2^A_W+2)/3) blocks
// are free at once; the defaults give 95 queue cells for 86 such blocks at
// A_W = 8. QUEUE_DUP_LEVELS = 4 with 16 cells per merged level is the queue
// shape of the document's FPGA evaluation; the number of merged levels is
// this implementation's choice for the default memory size. The queue's
// item_count output goes to q_count, which nothing reads (lint reports it): the
// sizing above guarantees the queue never overflows, so it is not needed.
module memory_manager #(
  parameter int A_W                 = 8,
  parameter int D_W                 = 32,
  parameter int QUEUE_DUP_LEVELS    = 4,
  parameter int QUEUE_MERGED_LEVELS = 5
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               enable,
  input  logic [1:0]         instr,
  input  logic [D_W+A_W-1:0] data_in,
  output logic               ready,
  output logic               valid,
  output logic               error,
  output logic [D_W-1:0]     data_out
);

  localparam int ID_W = A_W + 1;
  localparam int SZ_W = A_W + 1;
  localparam int IW   = ID_W + SZ_W;
  localparam int CAPACITY = (1 << QUEUE_DUP_LEVELS) - 1
                          + QUEUE_MERGED_LEVELS * (1 << QUEUE_DUP_LEVELS);
  localparam int MAX_FREE = ((1 << A_W) + 2) / 3;

  if (CAPACITY < MAX_FREE) begin : g_check
    $error("memory_manager: queue capacity below the worst-case number of free blocks");
  end

  logic                q_add;
  logic [IW-1:0]       q_item, q_top;
  logic [$clog2(CAPACITY+1)-1:0] q_count;

  logic                p0_en, p0_we, p1_en, p1_we;
  logic [A_W-1:0]      p0_addr, p1_addr;
  logic [D_W-1:0]      p0_wdata, p0_rdata, p1_wdata, p1_rdata;

  mm_control_unit #(.A_W(A_W), .D_W(D_W)) u_control_unit (
    .clk, .rst, .enable, .instr, .data_in, .ready, .valid, .error, .data_out,
    .q_add, .q_item, .q_top,
    .p0_en, .p0_we, .p0_addr, .p0_wdata, .p0_rdata,
    .p1_en, .p1_we, .p1_addr, .p1_wdata, .p1_rdata
  );

  rocket_queue #(
    .DUP_LEVELS(QUEUE_DUP_LEVELS), .MERGED_LEVELS(QUEUE_MERGED_LEVELS),
    .ID_W(ID_W), .VAL_W(SZ_W), .IS_MAX(1'b1)
  ) u_max_queue (
    .clk, .rst, .add_item(q_add), .item_in(q_item), .top_item(q_top),
    .item_count(q_count)
  );

  mm_memory #(.A_W(A_W), .D_W(D_W)) u_memory (
    .clk,
    .p0_en, .p0_we, .p0_addr, .p0_wdata, .p0_rdata,
    .p1_en, .p1_we, .p1_addr, .p1_wdata, .p1_rdata
  );

endmodule
