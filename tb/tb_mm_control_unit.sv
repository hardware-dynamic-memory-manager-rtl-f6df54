// tb_mm_control_unit: directed test of the memory manager's control unit.
//
// The control unit is connected to the dual-port SRAM and to a behavioural
// max queue. A fixed instruction sequence on a 32-word memory walks through
// every path of the state machine: MALLOC with and without split, MALLOC
// errors, FREE with no merge, with the next block, with the previous block,
// with both, FREE of a free block, WRITE and READ. After each step the block
// headers are read back with READ and compared with header words worked out
// by hand ({free, prev_free, prev_addr, size} in bits 11..0). Latencies and
// busy cycles of every instruction are checked as well.
module tb_mm_control_unit;
  import mm_pkg::*;
  localparam int A_W = 5, D_W = 16;
  localparam int IW = 2 * (A_W + 1);

  logic clk = 0, rst = 1;
  logic enable = 0;
  logic [1:0] instr = '0;
  logic [D_W+A_W-1:0] data_in = '0;
  logic ready, valid, error;
  logic [D_W-1:0] data_out;
  logic q_add;
  logic [IW-1:0] q_item, q_top;
  logic [7:0] q_count;
  logic p0_en, p0_we, p1_en, p1_we;
  logic [A_W-1:0] p0_addr, p1_addr;
  logic [D_W-1:0] p0_wdata, p0_rdata, p1_wdata, p1_rdata;

  mm_control_unit #(.A_W(A_W), .D_W(D_W)) dut (
    .clk, .rst, .enable, .instr, .data_in, .ready, .valid, .error, .data_out,
    .q_add, .q_item, .q_top,
    .p0_en, .p0_we, .p0_addr, .p0_wdata, .p0_rdata,
    .p1_en, .p1_we, .p1_addr, .p1_wdata, .p1_rdata);
  mm_memory #(.A_W(A_W), .D_W(D_W)) mem (.clk,
    .p0_en, .p0_we, .p0_addr, .p0_wdata, .p0_rdata,
    .p1_en, .p1_we, .p1_addr, .p1_wdata, .p1_rdata);
  max_queue_model #(.ID_W(A_W + 1), .VAL_W(A_W + 1)) q (.clk, .rst, .add_item(q_add),
    .item_in(q_item), .top_item(q_top), .item_count(q_count));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic logic [D_W-1:0] hdr(input bit fr, input bit pf, input int pa, input int sz);
    return D_W'({fr, pf, A_W'(pa), A_W'(sz)});
  endfunction

  int busy, valid_at, error_at;
  logic [D_W-1:0] result;
  task automatic run(input instr_e op, input int addr, input int data);
    int k;
    while (!ready) @(negedge clk);
    enable = 1; instr = op; data_in = {A_W'(addr), D_W'(data)};
    @(negedge clk);
    enable = 0; data_in = '0;
    k = 1; valid_at = 0; error_at = 0;
    while (!ready && k < 20) begin
      if (valid) begin valid_at = k; result = data_out; end
      if (error) error_at = k;
      @(negedge clk);
      k++;
    end
    busy = k;
  endtask

  task automatic malloc(input int n, input int exp_addr, input bit split);
    run(I_MALLOC, 0, n);
    check(int'(result) == exp_addr && error_at == 0, $sformatf("malloc(%0d) -> %0d expected %0d", n, result, exp_addr));
    check(valid_at == (split ? 2 : 1) && busy == (split ? 4 : 2),
          $sformatf("malloc(%0d) timing val@%0d busy %0d", n, valid_at, busy));
  endtask

  task automatic free(input int a, input int merges);
    run(I_FREE, a, 0);
    check(error_at == 0 && busy == 4 + 2 * merges, $sformatf("free(%0d) busy %0d expected %0d", a, busy, 4 + 2 * merges));
  endtask

  task automatic expect_hdr(input int a, input logic [D_W-1:0] h);
    run(I_READ, a, 0);
    check(valid_at == 1 && busy == 2 && result == h, $sformatf("header @%0d = %h expected %h", a, result, h));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(ready, "ready after initialisation");
    expect_hdr(0, hdr(1, 0, 0, 0));

    malloc(3, 0, 1);
    expect_hdr(0, hdr(0, 0, 0, 4));
    expect_hdr(4, hdr(1, 0, 0, 28));
    malloc(3, 4, 1);
    expect_hdr(8, hdr(1, 0, 4, 24));
    malloc(3, 8, 1);
    expect_hdr(12, hdr(1, 0, 8, 20));

    free(4, 0);                       // neighbours 0 and 8 are allocated
    expect_hdr(4, hdr(1, 0, 0, 4));
    expect_hdr(8, hdr(0, 1, 4, 4));
    free(0, 1);                       // merges with the free block at 4
    expect_hdr(0, hdr(1, 0, 0, 8));
    expect_hdr(8, hdr(0, 1, 0, 4));

    malloc(19, 12, 0);                // exact fit of the 20-word block
    expect_hdr(12, hdr(0, 0, 8, 20));
    run(I_MALLOC, 0, 8);              // largest free block is 8 words
    check(error_at == 1 && valid_at == 0 && busy == 2, "malloc too big: error");
    run(I_MALLOC, 0, 0);
    check(error_at == 1 && valid_at == 0, "malloc(0): error");

    free(8, 1);                       // merges with the free block before it
    expect_hdr(0, hdr(1, 0, 0, 12));
    expect_hdr(12, hdr(0, 1, 0, 20));
    free(12, 1);                      // last block, merges with previous
    expect_hdr(0, hdr(1, 0, 0, 0));

    malloc(3, 0, 1);
    malloc(3, 4, 1);
    malloc(3, 8, 1);
    free(0, 0);
    free(8, 1);                       // merges with the rest after it
    expect_hdr(8, hdr(1, 0, 4, 24));
    free(4, 2);                       // merges with both neighbours
    expect_hdr(0, hdr(1, 0, 0, 0));
    run(I_FREE, 4, 0);
    check(error_at == 1 && busy == 2, "free of a free block: error");
    check(q_count == 1, "one free block left in the queue");

    run(I_WRITE, 5, 16'hBEEF);
    check(busy == 1 && valid_at == 0, "write takes one cycle");
    run(I_READ, 5, 0);
    check(valid_at == 1 && busy == 2 && result == 16'hBEEF, "read back written word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
