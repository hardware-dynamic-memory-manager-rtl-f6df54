// tb_rq_dup_level: directed test of one duplicating Rocket-Queue level.
//
// A level of two cells is driven directly; the level below (four cells) is
// modelled by the testbench's own items_bot/items_cnt_bot values. Each step
// applies one instruction for one cycle and compares the registered outputs
// (item_down, addr_out, push_out, add_item_out) and the bank contents with
// values worked out by hand from the level's rules: replace on better value,
// empty cell or push; pass the item down otherwise; steer to the child with
// fewer items; on remove pull up the better child of the matching cell (or of
// the pushed cell); ignore IDs that are not stored; recompute subtree counts.
module tb_rq_dup_level;
  localparam int ID_W = 4, VAL_W = 4, CNT_W = 4, NC = 2;
  localparam int IW = ID_W + VAL_W;

  logic clk = 0, rst = 1;
  logic add_in = 0, push_in = 0;
  logic [IW-1:0] item_top = '0;
  logic [0:0] addr_in = '0;
  logic [NC-1:0][IW-1:0] items_up;
  logic [NC-1:0][CNT_W-1:0] cnt_up;
  logic add_out, push_out;
  logic [IW-1:0] item_down;
  logic [1:0] addr_out;
  logic [2*NC-1:0][IW-1:0] items_bot = '0;
  logic [2*NC-1:0][CNT_W-1:0] cnt_bot = '0;

  rq_dup_level #(.NCELLS(NC), .ID_W(ID_W), .VAL_W(VAL_W), .CNT_W(CNT_W)) dut (
    .clk, .rst, .add_item_in(add_in), .item_top, .addr_in, .push_in,
    .items_up, .items_cnt_up(cnt_up), .add_item_out(add_out), .item_down,
    .addr_out, .push_out, .items_bot, .items_cnt_bot(cnt_bot));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [IW-1:0] it(input int id, input int v);
    return {ID_W'(id), VAL_W'(v)};
  endfunction

  task automatic step(input bit add, input int id, input int v, input bit a, input bit push);
    @(negedge clk);
    add_in = add; item_top = it(id, v); addr_in = a; push_in = push;
    @(negedge clk);
    add_in = 0; item_top = '0; push_in = 0; addr_in = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(items_up == '0 && cnt_up == '0, "reset clears bank");

    // insert into empty cell 1; child 3 has fewer items than child 2
    cnt_bot[2] = 3; cnt_bot[3] = 1;
    step(1, 5, 7, 1, 0);
    check(items_up[1] == it(5, 7), "insert into empty cell");
    check(push_out && item_down == '0 && addr_out == 2'd3 && add_out, "insert outputs, steer to child 3");
    check(cnt_up[1] == 4'd5, $sformatf("count of cell 1 = 1+3+1, got %0d", cnt_up[1]));

    // smaller item passes down unchanged; now child 2 has fewer items
    cnt_bot[2] = 0;
    step(1, 6, 3, 1, 0);
    check(items_up[1] == it(5, 7), "smaller item does not replace");
    check(!push_out && item_down == it(6, 3) && addr_out == 2'd2, "smaller item passes down to child 2");

    // equal value also passes down
    step(1, 9, 7, 1, 0);
    check(items_up[1] == it(5, 7) && item_down == it(9, 7) && !push_out, "equal value passes down");

    // larger item replaces, old one goes down
    step(1, 7, 12, 1, 0);
    check(items_up[1] == it(7, 12), "larger item replaces");
    check(push_out && item_down == it(5, 7), "displaced item goes down");

    // pushed item replaces even though smaller
    step(1, 8, 2, 1, 1);
    check(items_up[1] == it(8, 2) && item_down == it(7, 12) && push_out, "push forces replacement");

    // empty item is a no-operation
    step(1, 0, 15, 1, 0);
    check(items_up[1] == it(8, 2) && item_down[IW-1 -: ID_W] == '0 && !push_out, "empty item is no-op");

    // insert into cell 0 for later
    step(1, 3, 9, 0, 0);
    check(items_up[0] == it(3, 9), "insert into cell 0");

    // remove ID 8 (cell 1): children 2 and 3 hold values 4 and 11 -> take 3
    items_bot[2] = it(10, 4); items_bot[3] = it(11, 11);
    step(0, 8, 0, 0, 0);
    check(items_up[1] == it(11, 11), "remove pulls up better child");
    check(push_out && addr_out == 2'd3 && !add_out, "remove pushes down towards child 3");

    // remove of an ID not in this level passes down, nothing changes
    step(0, 13, 0, 0, 0);
    check(items_up[0] == it(3, 9) && items_up[1] == it(11, 11) && !push_out && item_down == it(13, 0),
          "unknown ID passes down");

    // pushed remove at cell 0: child 1 empty -> take child 0
    items_bot[0] = it(12, 1); items_bot[1] = '0;
    step(0, 0, 0, 0, 1);
    check(items_up[0] == it(12, 1) && push_out && addr_out == 2'd0, "pushed remove takes non-empty child");

    // pushed remove with both children empty empties the cell
    items_bot[0] = '0;
    step(0, 0, 0, 0, 1);
    check(items_up[0] == '0, "pushed remove with empty children empties cell");
    @(negedge clk);
    check(cnt_up[0] == 4'd0 && cnt_up[1] == 4'd2, $sformatf("counts %0d %0d", cnt_up[0], cnt_up[1]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
