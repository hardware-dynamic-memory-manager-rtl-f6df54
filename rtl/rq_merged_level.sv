// rq_merged_level: one merged level of the Rocket-Queue max/min queue.
//
// Same function as a duplicating level (see rq_dup_level), except that the
// level below has as many cells as this one: cell i has exactly one child,
// cell i of the next level. The address therefore passes down unchanged and
// there is neither an address extender nor a comparison of subtree counts.
// Together the merged levels form 2^D columns below the D duplicating levels.
//
// Insert: the cell at addr_in takes item_top if push_in is set, the cell is
// empty or item_top sorts better; the displaced item goes down with
// push_out=1, otherwise item_top goes down with push_out=0.
// Remove: all cells compare their IDs with item_top.id in parallel; the
// matching cell (or the cell at addr_in when push_in is set) takes its child
// from the level below and sends push_out=1 with that address.
// All outputs towards the level below are registered (one cycle per level).
// Subtree counts are registered and recomputed each cycle as
// (cell occupied) + count of the child, which is this implementation's
// choice of how the per-cell count register is kept up to date.
module rq_merged_level #(
  parameter int  NCELLS = 16,  // cells in this level (2^D)
  parameter int  ID_W   = 9,
  parameter int  VAL_W  = 9,
  parameter int  CNT_W  = 7,
  parameter bit  IS_MAX = 1'b1,
  localparam int IW     = ID_W + VAL_W,
  localparam int AW     = (NCELLS > 1) ? $clog2(NCELLS) : 1
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          add_item_in,
  input  logic [IW-1:0]                 item_top,
  input  logic [AW-1:0]                 addr_in,
  input  logic                          push_in,
  output logic [NCELLS-1:0][IW-1:0]     items_up,
  output logic [NCELLS-1:0][CNT_W-1:0]  items_cnt_up,
  output logic                          add_item_out,
  output logic [IW-1:0]                 item_down,
  output logic [AW-1:0]                 addr_out,
  output logic                          push_out,
  input  logic [NCELLS-1:0][IW-1:0]     items_bot,
  input  logic [NCELLS-1:0][CNT_W-1:0]  items_cnt_bot
);

  typedef struct packed {
    logic [ID_W-1:0]  id;
    logic [VAL_W-1:0] value;
  } item_t;

  item_t [NCELLS-1:0]            bank_q, bank_d;
  logic  [NCELLS-1:0][CNT_W-1:0] cnt_q;

  item_t           top;
  item_t           down_d;
  logic [AW-1:0]   addr_d;
  logic            push_d;

  assign top = item_t'(item_top);

  function automatic logic better(input logic [VAL_W-1:0] x, input logic [VAL_W-1:0] y);
    return IS_MAX ? (x > y) : (x < y);
  endfunction

  always_comb begin
    logic           hit;
    logic [AW-1:0]  hit_idx;
    logic [AW-1:0]  t;
    item_t          cur;

    bank_d  = bank_q;
    down_d  = top;
    push_d  = 1'b0;
    addr_d  = addr_in;
    hit     = 1'b0;
    hit_idx = '0;
    t       = '0;
    cur     = bank_q[addr_in];

    for (int i = 0; i < NCELLS; i++) begin
      if (bank_q[i].id == top.id && top.id != '0) begin
        hit     = 1'b1;
        hit_idx = AW'(i);
      end
    end

    if (add_item_in) begin
      if ((top.id != '0) && (push_in || cur.id == '0 || better(top.value, cur.value))) begin
        bank_d[addr_in] = top;
        down_d          = cur;
        push_d          = 1'b1;
      end
    end else if (push_in || hit) begin
      t         = push_in ? addr_in : hit_idx;
      bank_d[t] = items_bot[t];
      addr_d    = t;
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
      bank_q <= bank_d;
      for (int i = 0; i < NCELLS; i++) begin
        cnt_q[i] <= CNT_W'(bank_d[i].id != '0) + items_cnt_bot[i];
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
