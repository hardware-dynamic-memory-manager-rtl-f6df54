// rocket_queue: pipelined max (or min) queue with removal by ID.
//
// The queue is a cascade of levels. The first DUP_LEVELS levels are
// duplicating levels holding 1, 2, 4, ... 2^(DUP_LEVELS-1) cells; they form a
// binary tree. Below them MERGED_LEVELS merged levels of 2^DUP_LEVELS cells
// each form that many columns. Capacity is
// 2^DUP_LEVELS - 1 + MERGED_LEVELS * 2^DUP_LEVELS items. Each cell holds an
// item {id, value}; the tree keeps the heap order, so the first level's only
// cell is always the best item (largest value when IS_MAX).
//
// Interface: present an instruction for one cycle on add_item/item_in.
// add_item=1 inserts item_in, add_item=0 removes the item whose ID equals
// item_in.id. item_in.id = 0 is the empty item and means no operation. The
// instruction enters level 1 at once and moves one level per cycle; top_item
// and item_count reflect it from the next cycle on. item_count is the number
// of items in the queue; it settles once the instruction has reached the
// level where its item lands (counts are propagated upward one level per
// cycle). Throughput: one instruction per two cycles. An insert may also
// follow any instruction in the very next cycle, because an insert only reads
// the level it is in; a remove may not (checked by an assertion), because it
// reads the level below, which the previous instruction may still be writing.
// Inserting more items than the capacity loses items out of the bottom.
module rocket_queue #(
  parameter int  DUP_LEVELS    = 4,
  parameter int  MERGED_LEVELS = 5,
  parameter int  ID_W          = 9,
  parameter int  VAL_W         = 9,
  parameter bit  IS_MAX        = 1'b1,
  localparam int IW            = ID_W + VAL_W,
  localparam int NL            = DUP_LEVELS + MERGED_LEVELS,
  localparam int MAXC          = 1 << DUP_LEVELS,
  localparam int CAPACITY      = MAXC - 1 + MERGED_LEVELS * MAXC,
  localparam int CNT_W         = $clog2(CAPACITY + 1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              add_item,
  input  logic [IW-1:0]     item_in,
  output logic [IW-1:0]     top_item,
  output logic [CNT_W-1:0]  item_count
);

  // bus k carries the inputs of level k (k = 0 is the queue input) and the
  // bank contents / counts of level k towards level k-1
  logic [NL:0]                       add_b;
  logic [NL:0][IW-1:0]               item_b;
  logic [NL:0][DUP_LEVELS-1:0]       addr_b;
  logic [NL:0]                       push_b;
  logic [NL:0][MAXC-1:0][IW-1:0]     up_b;
  logic [NL:0][MAXC-1:0][CNT_W-1:0]  cnt_b;

  assign add_b[0]  = add_item;
  assign item_b[0] = item_in;
  assign addr_b[0] = '0;
  assign push_b[0] = 1'b0;
  // below the last level: empty items and zero counts
  assign up_b[NL]  = '0;
  assign cnt_b[NL] = '0;

  for (genvar k = 0; k < DUP_LEVELS; k++) begin : g_dup
    localparam int NC    = 1 << k;
    localparam int AIN_W = (k > 0) ? k : 1;
    logic [k:0] addr_o;
    rq_dup_level #(
      .NCELLS(NC), .ID_W(ID_W), .VAL_W(VAL_W), .CNT_W(CNT_W), .IS_MAX(IS_MAX)
    ) u_level (
      .clk          (clk),
      .rst          (rst),
      .add_item_in  (add_b[k]),
      .item_top     (item_b[k]),
      .addr_in      (addr_b[k][AIN_W-1:0]),
      .push_in      (push_b[k]),
      .items_up     (up_b[k][NC-1:0]),
      .items_cnt_up (cnt_b[k][NC-1:0]),
      .add_item_out (add_b[k+1]),
      .item_down    (item_b[k+1]),
      .addr_out     (addr_o),
      .push_out     (push_b[k+1]),
      .items_bot    (up_b[k+1][2*NC-1:0]),
      .items_cnt_bot(cnt_b[k+1][2*NC-1:0])
    );
    assign addr_b[k+1] = DUP_LEVELS'(addr_o);
    if (NC < MAXC) begin : g_fill
      assign up_b[k][MAXC-1:NC]  = '0;
      assign cnt_b[k][MAXC-1:NC] = '0;
    end
  end

  for (genvar k = DUP_LEVELS; k < NL; k++) begin : g_mrg
    rq_merged_level #(
      .NCELLS(MAXC), .ID_W(ID_W), .VAL_W(VAL_W), .CNT_W(CNT_W), .IS_MAX(IS_MAX)
    ) u_level (
      .clk          (clk),
      .rst          (rst),
      .add_item_in  (add_b[k]),
      .item_top     (item_b[k]),
      .addr_in      (addr_b[k]),
      .push_in      (push_b[k]),
      .items_up     (up_b[k]),
      .items_cnt_up (cnt_b[k]),
      .add_item_out (add_b[k+1]),
      .item_down    (item_b[k+1]),
      .addr_out     (addr_b[k+1]),
      .push_out     (push_b[k+1]),
      .items_bot    (up_b[k+1]),
      .items_cnt_bot(cnt_b[k+1])
    );
  end

  assign top_item   = up_b[0][0];
  assign item_count = cnt_b[0][0];

  // Instruction spacing rule: no remove in the cycle after an instruction.
  logic prev_op;
  always_ff @(posedge clk) begin
    if (rst) prev_op <= 1'b0;
    else     prev_op <= (item_in[IW-1 -: ID_W] != '0);
  end

  a_remove_spacing: assert property (@(posedge clk) disable iff (rst)
    prev_op |-> !(!add_item && item_in[IW-1 -: ID_W] != '0))
    else $error("rocket_queue: remove issued in the cycle after another instruction");

endmodule
