// tb_mm_memory: self-checking test of the dual-port managed SRAM.
//
// Writes random words through both ports (two different addresses per cycle),
// then reads them back through both ports, checking that read data appears
// exactly one cycle after the read and is held while the port is idle.
module tb_mm_memory;
  localparam int A_W = 5, D_W = 16, WORDS = 1 << A_W;

  logic clk = 0;
  logic p0_en = 0, p0_we = 0, p1_en = 0, p1_we = 0;
  logic [A_W-1:0] p0_addr = '0, p1_addr = '0;
  logic [D_W-1:0] p0_wdata = '0, p1_wdata = '0, p0_rdata, p1_rdata;
  logic [D_W-1:0] ref_mem [WORDS];

  mm_memory #(.A_W(A_W), .D_W(D_W)) dut (.clk, .p0_en, .p0_we, .p0_addr, .p0_wdata,
    .p0_rdata, .p1_en, .p1_we, .p1_addr, .p1_wdata, .p1_rdata);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    @(negedge clk);
    for (int a = 0; a < WORDS / 2; a++) begin
      p0_en = 1; p0_we = 1; p0_addr = A_W'(a); p0_wdata = D_W'($urandom);
      p1_en = 1; p1_we = 1; p1_addr = A_W'(a + WORDS / 2); p1_wdata = D_W'($urandom);
      ref_mem[a] = p0_wdata; ref_mem[a + WORDS / 2] = p1_wdata;
      @(negedge clk);
    end
    p0_we = 0; p1_we = 0;
    for (int i = 0; i < 64; i++) begin
      int x, y;
      x = $urandom_range(0, WORDS - 1);
      y = $urandom_range(0, WORDS - 1);
      p0_en = 1; p0_addr = A_W'(x); p1_en = 1; p1_addr = A_W'(y);
      @(negedge clk);
      p0_en = 0; p1_en = 0;
      check(p0_rdata == ref_mem[x], $sformatf("port 0 read %0d", x));
      check(p1_rdata == ref_mem[y], $sformatf("port 1 read %0d", y));
      @(negedge clk);
      check(p0_rdata == ref_mem[x] && p1_rdata == ref_mem[y], "read data held while idle");
    end
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
