// tb_rq_merged_level: directed test of one merged Rocket-Queue level.
//
// A level of four cells is driven directly and the level below (also four
// cells, cell i under cell i) is modelled by the testbench. Expected bank
// contents and registered outputs are worked out by hand from the level's
// rules: insert replaces on better value, empty cell or push and passes the
// displaced or rejected item down at the same address; remove pulls the
// child of the matching (or pushed) cell up; counts are occupancy plus the
// child's count.
module tb_rq_merged_level;
  localparam int ID_W = 4, VAL_W = 4, CNT_W = 4, NC = 4;
  localparam int IW = ID_W + VAL_W;

  logic clk = 0, rst = 1;
  logic add_in = 0, push_in = 0;
  logic [IW-1:0] item_top = '0;
  logic [1:0] addr_in = '0;
  logic [NC-1:0][IW-1:0] items_up;
  logic [NC-1:0][CNT_W-1:0] cnt_up;
  logic add_out, push_out;
  logic [IW-1:0] item_down;
  logic [1:0] addr_out;
  logic [NC-1:0][IW-1:0] items_bot = '0;
  logic [NC-1:0][CNT_W-1:0] cnt_bot = '0;

  rq_merged_level #(.NCELLS(NC), .ID_W(ID_W), .VAL_W(VAL_W), .CNT_W(CNT_W)) dut (
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

  task automatic step(input bit add, input int id, input int v, input int a, input bit push);
    @(negedge clk);
    add_in = add; item_top = it(id, v); addr_in = 2'(a); push_in = push;
    @(negedge clk);
    add_in = 0; item_top = '0; push_in = 0; addr_in = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    check(items_up == '0, "reset clears bank");

    cnt_bot[2] = 2;
    step(1, 4, 6, 2, 0);
    check(items_up[2] == it(4, 6) && push_out && item_down[IW-1 -: ID_W] == '0 && addr_out == 2'd2 && add_out,
          "insert into empty cell 2");
    check(cnt_up[2] == 4'd3, $sformatf("count 1+2, got %0d", cnt_up[2]));

    step(1, 5, 3, 2, 0);
    check(items_up[2] == it(4, 6) && !push_out && item_down == it(5, 3) && addr_out == 2'd2,
          "smaller item passes down at the same address");

    step(1, 6, 9, 2, 0);
    check(items_up[2] == it(6, 9) && push_out && item_down == it(4, 6), "larger item replaces");

    step(1, 7, 1, 2, 1);
    check(items_up[2] == it(7, 1) && push_out && item_down == it(6, 9), "push forces replacement");

    step(1, 8, 5, 0, 0);
    check(items_up[0] == it(8, 5) && items_up[2] == it(7, 1), "insert into cell 0 leaves cell 2");

    // remove ID 7 (cell 2): child 2 moves up
    items_bot[2] = it(9, 0);
    step(0, 7, 0, 0, 0);
    check(items_up[2] == it(9, 0) && push_out && addr_out == 2'd2 && !add_out, "remove pulls child up");

    step(0, 12, 0, 0, 0);
    check(items_up[0] == it(8, 5) && items_up[2] == it(9, 0) && !push_out, "unknown ID changes nothing");

    items_bot[0] = it(10, 2);
    step(0, 0, 0, 0, 1);
    check(items_up[0] == it(10, 2) && push_out && addr_out == 2'd0, "pushed remove pulls child of addressed cell");

    items_bot = '0; cnt_bot = '0;
    step(0, 9, 0, 0, 0);
    check(items_up[2] == '0, "remove with empty child empties cell");
    @(negedge clk);
    check(cnt_up[0] == 4'd1 && cnt_up[2] == 4'd0, "counts follow occupancy");

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
