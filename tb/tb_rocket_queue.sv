// tb_rocket_queue: self-checking random test of the Rocket-Queue max queue.
//
// A reference model keeps the set of stored items in plain arrays. Random
// inserts (unique IDs, random values) and removes by ID are issued at the
// queue's rate of one instruction per two cycles, and sometimes an insert is
// issued in the cycle right after a remove. One cycle after every instruction
// the queue's top item must carry the model's largest value, and its ID must
// be one of the model's items with that value. After idle gaps long enough for
// the counts to settle, the item count must equal the model's. The test also
// fills the queue to capacity once and drains it completely.
module tb_rocket_queue;
  localparam int D = 2, M = 3, ID_W = 6, VAL_W = 6;
  localparam int IW = ID_W + VAL_W;
  localparam int CAP = (1 << D) - 1 + M * (1 << D);
  localparam int CNT_W = $clog2(CAP + 1);

  logic clk = 0, rst = 1;
  logic add_item;
  logic [IW-1:0] item_in;
  logic [IW-1:0] top_item;
  logic [CNT_W-1:0] item_count;

  rocket_queue #(.DUP_LEVELS(D), .MERGED_LEVELS(M), .ID_W(ID_W), .VAL_W(VAL_W)) dut (
    .clk, .rst, .add_item, .item_in, .top_item, .item_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ins = 0, n_rem = 0, n_back2back = 0, n_full = 0;

  // reference model
  int          m_n = 0;
  logic [ID_W-1:0]  m_id [64];
  logic [VAL_W-1:0] m_val[64];
  logic        used [64];

  function automatic int model_max();
    int mx = -1;
    for (int i = 0; i < m_n; i++) if (int'(m_val[i]) > mx) mx = int'(m_val[i]);
    return mx;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  task automatic check_top();
    int mx = model_max();
    logic ok_id = 1'b0;
    if (m_n == 0) begin
      check(top_item[IW-1 -: ID_W] == '0, "queue should be empty");
      return;
    end
    for (int i = 0; i < m_n; i++)
      if (m_id[i] == top_item[IW-1 -: ID_W] && int'(m_val[i]) == mx) ok_id = 1'b1;
    check(int'(top_item[VAL_W-1:0]) == mx && ok_id,
          $sformatf("top=%0d/%0d expected value %0d", top_item[IW-1 -: ID_W], top_item[VAL_W-1:0], mx));
  endtask

  // drive one instruction for one cycle, then check the top one cycle later
  task automatic issue(input bit add, input logic [ID_W-1:0] id, input logic [VAL_W-1:0] v);
    @(negedge clk);
    add_item = add;
    item_in  = {id, v};
    @(negedge clk);
    add_item = 1'b0;
    item_in  = '0;
  endtask

  task automatic do_insert(input logic [VAL_W-1:0] v);
    logic [ID_W-1:0] id;
    do id = ID_W'($urandom_range(1, (1 << ID_W) - 1)); while (used[id]);
    used[id] = 1'b1;
    m_id[m_n] = id; m_val[m_n] = v; m_n++;
    issue(1'b1, id, v);
    n_ins++;
    check_top();
  endtask

  task automatic do_remove(input int idx, input bit back2back);
    logic [ID_W-1:0] id = m_id[idx];
    used[id] = 1'b0;
    m_id[idx] = m_id[m_n-1]; m_val[idx] = m_val[m_n-1]; m_n--;
    issue(1'b0, id, '0);
    n_rem++;
    check_top();
    if (back2back && m_n < CAP - 2) begin
      // insert in the very next cycle after the remove
      logic [ID_W-1:0] nid;
      logic [VAL_W-1:0] v = VAL_W'($urandom);
      do nid = ID_W'($urandom_range(1, (1 << ID_W) - 1)); while (used[nid]);
      used[nid] = 1'b1;
      m_id[m_n] = nid; m_val[m_n] = v; m_n++;
      // the issue() above left us one negedge after the remove was sampled,
      // so this insert is sampled exactly one cycle after it
      add_item = 1'b1; item_in = {nid, v};
      @(negedge clk);
      add_item = 1'b0; item_in = '0;
      n_ins++; n_back2back++;
      check_top();
    end
  endtask

  task automatic settle_and_count();
    repeat (2 * (D + M) + 4) @(negedge clk);
    check(int'(item_count) == m_n, $sformatf("count %0d expected %0d", item_count, m_n));
    check_top();
  endtask

  initial begin
    add_item = 0; item_in = '0;
    for (int i = 0; i < 64; i++) used[i] = 1'b0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(top_item == '0 && item_count == 0, "empty after reset");

    // fill to capacity with settled counts, then drain (balancing test)
    for (int i = 0; i < CAP; i++) begin
      do_insert(VAL_W'($urandom));
      repeat (2 * (D + M)) @(negedge clk);
    end
    settle_and_count();
    if (int'(item_count) == CAP) n_full++;
    while (m_n > 0) begin
      do_remove(0, 1'b0);
      // remove the current maximum sometimes
    end
    settle_and_count();

    // random mixed traffic, occupancy kept below 2/3 of capacity
    for (int it = 0; it < 3000; it++) begin
      int r;
      r = $urandom_range(0, 99);
      if (m_n == 0 || (r < 55 && m_n < (2 * CAP) / 3)) begin
        do_insert(VAL_W'($urandom_range(0, (1 << VAL_W) - 1)));
      end else begin
        int idx;
        idx = $urandom_range(0, m_n - 1);
        if (r > 85) begin
          // remove the top item
          for (int i = 0; i < m_n; i++) if (m_id[i] == top_item[IW-1 -: ID_W]) idx = i;
        end
        do_remove(idx, ($urandom_range(0, 3) == 0));
      end
      if (it % 97 == 0) settle_and_count();
    end
    settle_and_count();

    check(n_ins > 0 && n_rem > 0, "inserts and removes happened");
    check(n_back2back > 0, "insert right after remove happened");
    check(n_full > 0, "queue was filled to capacity");
    $display("inserts=%0d removes=%0d back_to_back=%0d", n_ins, n_rem, n_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
