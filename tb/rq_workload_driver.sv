// rq_workload_driver: drives one Rocket-Queue configuration with random
// traffic and checks it against a reference model (used by
// tb_rocket_queue_sizes). The queue is filled to its full capacity with the
// counts allowed to settle between inserts, checked, drained by removing the
// top item each time (which must come out in sorted order: non-increasing
// for a max queue, non-decreasing for a min queue when IS_MAX = 0),
// and then run with mixed random inserts and removes at one instruction per
// two cycles. Results are reported through checks/failures and done.
module rq_workload_driver #(
  parameter int D = 4,
  parameter int M = 1,
  parameter int ID_W = 5,
  parameter int VAL_W = 55,
  parameter int OPS = 1000,
  parameter bit IS_MAX = 1'b1
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int IW = ID_W + VAL_W;
  localparam int CAP = (1 << D) - 1 + M * (1 << D);
  localparam int CNT_W = $clog2(CAP + 1);
  localparam int NID = 1 << ID_W;

  logic add_item = 0;
  logic [IW-1:0] item_in = '0;
  logic [IW-1:0] top_item;
  logic [CNT_W-1:0] item_count;

  rocket_queue #(.DUP_LEVELS(D), .MERGED_LEVELS(M), .ID_W(ID_W), .VAL_W(VAL_W), .IS_MAX(IS_MAX)) dut (
    .clk, .rst, .add_item, .item_in, .top_item, .item_count);

  logic [VAL_W-1:0] m_val [NID];
  bit               m_in  [NID];
  int               m_n = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d cells) @%0t: %s", CAP, $time, msg);
    end
  endtask

  function automatic logic [VAL_W-1:0] rnd_val();
    return VAL_W'({$urandom, $urandom});
  endfunction

  task automatic check_top();
    logic [VAL_W-1:0] mx = '0;
    bit any = 0;
    for (int i = 1; i < NID; i++)
      if (m_in[i] && (!any || (IS_MAX ? (m_val[i] > mx) : (m_val[i] < mx)))) begin mx = m_val[i]; any = 1; end
    if (!any) check(top_item[IW-1 -: ID_W] == '0, "queue should be empty");
    else check(top_item[VAL_W-1:0] == mx && m_in[top_item[IW-1 -: ID_W]] &&
               m_val[top_item[IW-1 -: ID_W]] == mx, "top is not the largest item");
  endtask

  task automatic issue(input bit add, input int id, input logic [VAL_W-1:0] v);
    @(negedge clk);
    add_item = add; item_in = {ID_W'(id), v};
    @(negedge clk);
    add_item = 0; item_in = '0;
    check_top();
  endtask

  task automatic ins(input logic [VAL_W-1:0] v);
    int id;
    do id = $urandom_range(1, NID - 1); while (m_in[id]);
    m_in[id] = 1; m_val[id] = v; m_n++;
    issue(1'b1, id, v);
  endtask

  task automatic rem(input int id);
    m_in[id] = 0; m_n--;
    issue(1'b0, id, '0);
  endtask

  initial begin
    int last;
    logic [VAL_W-1:0] prev;
    checks = 0; failures = 0; done = 0;
    for (int i = 0; i < NID; i++) begin m_in[i] = 0; m_val[i] = '0; end
    @(negedge rst);
    repeat (2) @(negedge clk);
    for (int i = 0; i < CAP; i++) begin
      ins(rnd_val());
      repeat (2 * (D + M)) @(negedge clk);
    end
    check(int'(item_count) == CAP, $sformatf("count %0d after filling %0d", item_count, CAP));
    prev = top_item[VAL_W-1:0];
    while (m_n > 0) begin
      last = int'(top_item[IW-1 -: ID_W]);
      check(IS_MAX ? (top_item[VAL_W-1:0] <= prev) : (top_item[VAL_W-1:0] >= prev), "drain order not sorted");
      prev = top_item[VAL_W-1:0];
      rem(last);
    end
    repeat (2 * (D + M) + 2) @(negedge clk);
    check(item_count == 0 && top_item == '0, "empty after draining");
    for (int it = 0; it < OPS; it++) begin
      if (m_n == 0 || ($urandom_range(0, 99) < 55 && m_n < (2 * CAP) / 3)) ins(rnd_val());
      else begin
        int id;
        do id = $urandom_range(1, NID - 1); while (!m_in[id]);
        rem(id);
      end
    end
    repeat (2 * (D + M) + 2) @(negedge clk);
    check(int'(item_count) == m_n, "count after random traffic");
    done = 1;
  end
endmodule
