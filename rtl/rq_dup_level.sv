// rq_dup_level: one duplicating level of the Rocket-Queue max/min queue.
//
// The level holds NCELLS item registers (its "bank of items"). Every cell of
// this level has two children in the level below, at addresses {a,0} and
// {a,1}, so the level below holds 2*NCELLS cells. An instruction spends one
// clock cycle in the level and leaves through registered outputs towards the
// next level, so instructions move down the queue as a pipeline.
//
// Insert (add_item_in=1, item_top.id != 0): the cell selected by addr_in takes
// item_top if push_in is set, if the cell is empty, or if item_top sorts
// better (higher value for a max queue, lower for a min queue); the displaced
// item continues down with push_out=1. Otherwise item_top continues down with
// push_out=0. The address is extended by one bit that steers the instruction
// to the child whose subtree holds fewer items (tree balancing).
// Remove (add_item_in=0): every cell compares its ID with item_top.id at
// once. The matching cell (or, with push_in, the cell at addr_in) takes the
// better of its two children from the level below and sends the child's
// address down with push_out=1, so the hole moves down one level per cycle.
// An item with ID 0 is the empty item; sending it is a no-operation.
//
// Ports: items_up/items_cnt_up expose all cells and their subtree item
// counts to the level above; items_bot/items_cnt_bot are the level below's.
// The subtree counts are registered and recomputed every cycle as
// (cell occupied) + counts of the two children, so they settle one level per
// cycle after a change; this recomputation is this implementation's way of
// keeping the counts, the document only names a count register per cell.
// Instructions must be separated as the Rocket-Queue requires: a remove may
// not enter a level in the cycle right after another instruction did.
module rq_dup_level #(
  parameter int  NCELLS = 1,   // cells in this level (power of two)
  parameter int  ID_W   = 9,   // item ID width
  parameter int  VAL_W  = 9,   // sorting value width
  parameter int  CNT_W  = 7,   // subtree item count width
  parameter bit  IS_MAX = 1'b1,
  localparam int IW     = ID_W + VAL_W,
  localparam int AIN_W  = (NCELLS > 1) ? $clog2(NCELLS) : 1,
  localparam int AOUT_W = $clog2(2 * NCELLS),
  localparam int NBOT   = 2 * NCELLS
) (
  input  logic                          clk,
  input  logic                          rst,
  // from the level above
  input  logic                          add_item_in,
  input  logic [IW-1:0]                 item_top,
  input  logic [AIN_W-1:0]              addr_in,
  input  logic                          push_in,
  output logic [NCELLS-1:0][IW-1:0]     items_up,
  output logic [NCELLS-1:0][CNT_W-1:0]  items_cnt_up,
  // to the level below
  output logic                          add_item_out,
  output logic [IW-1:0]                 item_down,
  output logic [AOUT_W-1:0]             addr_out,
  output logic                          push_out,
  input  logic [NBOT-1:0][IW-1:0]       items_bot,
  input  logic [NBOT-1:0][CNT_W-1:0]    items_cnt_bot
);

  typedef struct packed {
    logic [ID_W-1:0]  id;
    logic [VAL_W-1:0] value;
  } item_t;

  item_t [NCELLS-1:0]      bank_q, bank_d;
  logic  [NCELLS-1:0][CNT_W-1:0] cnt_q;

  item_t                   top;
  item_t                   down_d;
  logic  [AOUT_W-1:0]      addr_d;
  logic                    push_d;
  logic  [AIN_W-1:0]       a;

  assign top = item_t'(item_top);
  assign a   = (NCELLS > 1) ? addr_in : '0;

  // "better" comparator: the single comparator shared by the level
  function automatic logic better(input logic [VAL_W-1:0] x, input logic [VAL_W-1:0] y);
    return IS_MAX ? (x > y) : (x < y);
  endfunction

  // which child of cell c to pull up on a remove: the non-empty, better one
  function automatic logic pick_child(input item_t c0, input item_t c1);
    if (c1.id == '0) return 1'b0;
    if (c0.id == '0) return 1'b1;
    return better(c1.value, c0.value);
  endfunction

  always_comb begin
    logic              hit;
    logic [AIN_W-1:0]  hit_idx;
    logic [AIN_W-1:0]  t;
    logic              go;
    item_t             cur;
    logic              repl;

    bank_d  = bank_q;
    down_d  = top;
    push_d  = 1'b0;
    addr_d  = AOUT_W'({a, 1'b0});
    hit     = 1'b0;
    hit_idx = '0;
    t       = '0;
    go      = 1'b0;
    repl    = 1'b0;
    cur     = bank_q[a];

    // address encoder: which cell holds the ID being removed
    for (int i = 0; i < NCELLS; i++) begin
      if (bank_q[i].id == top.id && top.id != '0) begin
        hit     = 1'b1;
        hit_idx = AIN_W'(i);
      end
    end

    if (add_item_in) begin
      repl = (top.id != '0) && (push_in || cur.id == '0 || better(top.value, cur.value));
      if (repl) begin
        bank_d[a] = top;
        down_d    = cur;
        push_d    = 1'b1;
      end
      // address extender: continue to the child with fewer items
      addr_d = AOUT_W'({a, (items_cnt_bot[{a, 1'b1}] < items_cnt_bot[{a, 1'b0}])});
    end else if (push_in || hit) begin
      t  = push_in ? a : hit_idx;
      go = pick_child(items_bot[{t, 1'b0}], items_bot[{t, 1'b1}]);
      bank_d[t] = items_bot[{t, go}];
      addr_d    = AOUT_W'({t, go});
      push_d    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bank_q       <= '0;
      cnt_q        <= '0;
      add_item_out <= 1'b0;
      item_down    <= '0;
      addr_out     <= '0;
      push_out     <= 1'b0;
    end else begin
      bank_q       <= bank_d;
      for (int i = 0; i < NCELLS; i++) begin
        cnt_q[i] <= CNT_W'(bank_d[i].id != '0)
                  + items_cnt_bot[2*i] + items_cnt_bot[2*i+1];
      end
      add_item_out <= add_item_in;
      item_down    <= down_d;
      addr_out     <= addr_d;
      push_out     <= push_d;
    end
  end

  assign items_up     = bank_q;
  assign items_cnt_up = cnt_q;

endmodule
