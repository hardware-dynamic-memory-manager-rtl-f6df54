// tb_memory_manager_sizes: the memory manager at the other memory sizes of
// the evaluation (16, 32, 64 and 128 words of 16 bits, and 512 words of 32
// bits; the 256 x 32 default is covered by tb_memory_manager).
//
// Each configuration runs in its own mm_workload_driver: worst-case
// fragmentation phases, then random MALLOC/FREE/WRITE/READ traffic, checked
// against a predictor of the block map, the worst-fit choice, the error
// cases, the data and the cycle count of every instruction. The default
// queue (95 cells) covers up to 256 words; the 512-word manager needs 171
// free-block slots and gets QUEUE_MERGED_LEVELS = 10 (175 cells).
module tb_memory_manager_sizes;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int N = 5;
  int   c [N];
  int   f [N];
  logic d [N];

  mm_workload_driver #(.A_W(4), .D_W(16), .OPS(600))  w4 (.clk, .rst, .checks(c[0]), .failures(f[0]), .done(d[0]));
  mm_workload_driver #(.A_W(5), .D_W(16), .OPS(1200)) w5 (.clk, .rst, .checks(c[1]), .failures(f[1]), .done(d[1]));
  mm_workload_driver #(.A_W(6), .D_W(16), .OPS(1800)) w6 (.clk, .rst, .checks(c[2]), .failures(f[2]), .done(d[2]));
  mm_workload_driver #(.A_W(7), .D_W(16), .OPS(2400)) w7 (.clk, .rst, .checks(c[3]), .failures(f[3]), .done(d[3]));
  mm_workload_driver #(.A_W(9), .D_W(32), .QUEUE_MERGED_LEVELS(10), .OPS(3000)) w9 (
    .clk, .rst, .checks(c[4]), .failures(f[4]), .done(d[4]));

  function automatic int total(input int v [N]);
    int t = 0;
    for (int i = 0; i < N; i++) t += v[i];
    return t;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4]);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end
endmodule
