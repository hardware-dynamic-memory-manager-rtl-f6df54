// tb_rocket_queue_sizes: the smallest and the largest Rocket-Queue shapes of
// the FPGA evaluation (four duplicating levels, merged levels of 16 cells,
// 60-bit items): 31 cells with a 5-bit ID and 255 cells with an 8-bit ID.
// Each shape is filled to capacity, drained in sorted order and then run with
// random inserts and removes against a reference model. A third instance
// checks the min-queue configuration (IS_MAX = 0) on the 31-cell shape.
module tb_rocket_queue_sizes;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int c31, f31, c255, f255, cmin, fmin;
  logic d31, d255, dmin;

  rq_workload_driver #(.D(4), .M(1),  .ID_W(5), .VAL_W(55), .OPS(1500)) w31  (.clk, .rst, .checks(c31),  .failures(f31),  .done(d31));
  rq_workload_driver #(.D(4), .M(15), .ID_W(8), .VAL_W(52), .OPS(1500)) w255 (.clk, .rst, .checks(c255), .failures(f255), .done(d255));

  rq_workload_driver #(.D(4), .M(1),  .ID_W(5), .VAL_W(55), .OPS(1000), .IS_MAX(1'b0)) wmin (.clk, .rst, .checks(cmin), .failures(fmin), .done(dmin));

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (d31 && d255 && dmin);
    $display("31 cells: %0d checks, 255 cells: %0d checks, min queue: %0d checks", c31, c255, cmin);
    $display("TB_RESULT checks=%0d failures=%0d", c31 + c255 + cmin, f31 + f255 + fmin);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c31 + c255 + cmin, f31 + f255 + fmin + 1);
    $finish;
  end
endmodule
