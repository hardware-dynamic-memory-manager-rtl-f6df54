// tb_memory_manager: end-to-end random test of the worst-fit memory manager
// at its default parameters.
//
// A predictor keeps its own map of the managed memory (block starts, sizes,
// free flags and the data words written into allocated blocks). A random
// instruction stream of MALLOC, FREE, WRITE and READ is sent through the
// coprocessor interface. For every instruction the testbench checks:
//   MALLOC  that the returned block is a free block of the largest free size
//           (worst fit; any of several equal-size blocks is accepted), or that
//           error is raised exactly when no free block is big enough;
//   FREE    that error is raised exactly for a block that is already free;
//   READ    the returned word against the data written earlier;
// and the cycle counts: result 1 cycle after issue for MALLOC without split
// and READ, 2 for MALLOC with split; busy cycles 2/4 for MALLOC, 4/6/8 for
// FREE with no, one or two merges, 1 for WRITE, 2 for READ.
// It counts how often each path of the state machine ran and fails if one
// never did.
module tb_memory_manager;
  import mm_pkg::*;

  localparam int A_W = 8, D_W = 32;
  localparam int WORDS = 1 << A_W;

  logic clk = 0, rst = 1;
  logic enable = 0;
  logic [1:0] instr = '0;
  logic [D_W+A_W-1:0] data_in = '0;
  logic ready, valid, error;
  logic [D_W-1:0] data_out;

  memory_manager dut (.clk, .rst, .enable, .instr, .data_in, .ready, .valid,
                      .error, .data_out);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_exact = 0, n_split = 0, n_merr = 0, n_free0 = 0, n_prefix = 0,
      n_postfix = 0, n_both = 0, n_ferr = 0, n_read = 0, n_write = 0;
  int max_free_blocks = 0, n_frag_peak = 0, n_frag_peak2 = 0;

  // predictor state
  bit          m_start[WORDS];
  bit          m_free [WORDS];
  int          m_size [WORDS];
  logic [D_W-1:0] m_data[WORDS];
  bit          m_wr   [WORDS];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic int max_free();
    int mx = 0;
    for (int a = 0; a < WORDS; a++) if (m_start[a] && m_free[a] && m_size[a] > mx) mx = m_size[a];
    return mx;
  endfunction

  function automatic int count_free();
    int c = 0;
    for (int a = 0; a < WORDS; a++) if (m_start[a] && m_free[a]) c++;
    return c;
  endfunction

  // issue one instruction and follow it until ready returns
  int busy, valid_at, error_at;
  logic [D_W-1:0] result;
  task automatic run(input instr_e op, input logic [A_W-1:0] addr, input logic [D_W-1:0] data);
    int k;
    while (!ready) @(negedge clk);
    enable = 1'b1; instr = op; data_in = {addr, data};
    @(negedge clk);
    enable = 1'b0; data_in = '0;
    k = 1; valid_at = 0; error_at = 0;
    while (!ready && k < 20) begin
      if (valid) begin valid_at = k; result = data_out; end
      if (error) error_at = k;
      @(negedge clk);
      k++;
    end
    busy = k;
  endtask

  task automatic do_malloc(input int n);
    int mx = max_free();
    int b = n + 1;
    run(I_MALLOC, '0, D_W'(n));
    if (n == 0 || b > mx) begin
      check(error_at == 1 && valid_at == 0 && busy == 2,
            $sformatf("malloc(%0d) max %0d: expected error, err@%0d val@%0d busy %0d", n, mx, error_at, valid_at, busy));
      n_merr++;
    end else begin
      int t = int'(result[A_W-1:0]);
      check(result < WORDS && m_start[t] && m_free[t] && m_size[t] == mx,
            $sformatf("malloc(%0d): block %0d is not a largest free block (%0d)", n, t, mx));
      if (!(m_start[t] && m_free[t] && m_size[t] == mx)) return;
      if (b == mx) begin
        check(valid_at == 1 && error_at == 0 && busy == 2,
              $sformatf("malloc exact: val@%0d busy %0d", valid_at, busy));
        m_free[t] = 0;
        n_exact++;
      end else begin
        check(valid_at == 2 && error_at == 0 && busy == 4,
              $sformatf("malloc split: val@%0d busy %0d", valid_at, busy));
        m_free[t] = 0; m_size[t] = b;
        m_start[t+b] = 1; m_free[t+b] = 1; m_size[t+b] = mx - b;
        n_split++;
      end
      for (int w = t; w < t + b; w++) m_wr[w] = 0;
    end
  endtask

  task automatic do_free(input int a);
    int p = -1, nx, merges = 0;
    if (m_free[a]) begin
      run(I_FREE, A_W'(a), '0);
      check(error_at == 1 && busy == 2, $sformatf("double free %0d: err@%0d busy %0d", a, error_at, busy));
      n_ferr++;
      return;
    end
    for (int q = a - 1; q >= 0; q--) if (m_start[q]) begin p = q; break; end
    nx = a + m_size[a];
    run(I_FREE, A_W'(a), '0);
    m_free[a] = 1;
    if (nx < WORDS && m_free[nx]) begin
      m_size[a] += m_size[nx]; m_start[nx] = 0; merges++;
    end
    if (p >= 0 && m_free[p]) begin
      m_size[p] += m_size[a]; m_start[a] = 0; merges++;
      if (nx < WORDS && merges == 2) n_both++; else n_prefix++;
    end else if (merges == 1) n_postfix++;
    else n_free0++;
    check(error_at == 0 && valid_at == 0 && busy == 4 + 2 * merges,
          $sformatf("free %0d (%0d merges): err@%0d busy %0d", a, merges, error_at, busy));
  endtask

  // pick a random block start; want_free selects free or allocated blocks
  function automatic int pick_block(input bit want_free);
    int cand[$];
    for (int a = 0; a < WORDS; a++) if (m_start[a] && m_free[a] == want_free) cand.push_back(a);
    if (cand.size() == 0) return -1;
    return cand[$urandom_range(0, cand.size() - 1)];
  endfunction

  task automatic do_write_read();
    int a = pick_block(1'b0);
    int w;
    logic [D_W-1:0] v = $urandom;
    if (a < 0 || m_size[a] < 2) return;
    w = a + $urandom_range(1, m_size[a] - 1);
    run(I_WRITE, A_W'(w), v);
    check(busy == 1 && valid_at == 0 && error_at == 0, $sformatf("write busy %0d", busy));
    m_data[w] = v; m_wr[w] = 1; n_write++;
    w = a + $urandom_range(1, m_size[a] - 1);
    run(I_READ, A_W'(w), '0);
    check(busy == 2 && valid_at == 1, $sformatf("read busy %0d val@%0d", busy, valid_at));
    if (m_wr[w]) check(result == m_data[w], $sformatf("read %0d: %h expected %h", w, result, m_data[w]));
    n_read++;
  endtask

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      m_start[a] = 0; m_free[a] = 0; m_size[a] = 0; m_wr[a] = 0; m_data[a] = '0;
    end
    m_start[0] = 1; m_free[0] = 1; m_size[0] = WORDS;
    repeat (3) @(negedge clk);
    rst = 0;
    check(!ready, "not ready while in reset");
    @(negedge clk);
    check(ready, "ready one cycle after reset");

    // worst-case fragmentation: fill memory with 2-word blocks, then free
    // every other one, so the queue holds the largest possible number of
    // free blocks; then free the rest (each free merges with both sides)
    while (max_free() >= 2) do_malloc(1);
    for (int a = 0; a < WORDS; a += 4) if (m_start[a] && !m_free[a]) do_free(a);
    if (count_free() > max_free_blocks) max_free_blocks = count_free();
    n_frag_peak = count_free();
    for (int a = 2; a < WORDS; a += 4) if (m_start[a] && !m_free[a]) do_free(a);
    check(max_free() == WORDS, "memory not whole again after freeing all blocks");
    do_malloc(WORDS - 1);
    do_free(0);

    // near the worst case: 3-word blocks everywhere, then each one is freed
    // (last one first) and re-allocated as 2 words, leaving a 1-word free
    // block behind it;
    // this puts (WORDS-1)/3 free blocks into the queue at once
    while (max_free() >= 3) do_malloc(2);
    for (int a = ((WORDS / 3) - 1) * 3; a >= 0; a -= 3) begin
      do_free(a);
      do_malloc(1);
    end
    n_frag_peak2 = count_free();
    if (n_frag_peak2 > max_free_blocks) max_free_blocks = n_frag_peak2;
    check(n_frag_peak2 == (WORDS - 1) / 3, $sformatf("second fragmentation peak %0d free blocks", n_frag_peak2));
    begin
      int a;
      a = pick_block(1'b0);
      while (a >= 0) begin
        do_free(a);
        a = pick_block(1'b0);
      end
    end
    check(max_free() == WORDS, "memory not whole again after the second fragmentation test");

    for (int it = 0; it < 6000; it++) begin
      int r, phase;
      r = $urandom_range(0, 99);
      phase = (it / 1000) % 2;   // alternate filling and draining phases
      if (r < (phase == 0 ? 45 : 25)) begin
        int n, s;
        s = $urandom_range(0, 9);
        if (s == 0) n = max_free() - 1;                 // exact fit
        else if (s == 1) n = $urandom_range(0, WORDS);  // may fail
        else n = $urandom_range(1, 6);
        if (n < 0) n = 0;
        do_malloc(n);
      end else if (r < 80) begin
        int a;
        a = pick_block(($urandom_range(0, 19) == 0) ? 1'b1 : 1'b0);
        if (a >= 0) do_free(a);
      end else begin
        do_write_read();
      end
      if (count_free() > max_free_blocks) max_free_blocks = count_free();
    end

    $display("exact=%0d split=%0d malloc_err=%0d free_nomerge=%0d prefix=%0d postfix=%0d both=%0d free_err=%0d write=%0d read=%0d max_free_blocks=%0d frag_peak=%0d",
             n_exact, n_split, n_merr, n_free0, n_prefix, n_postfix, n_both, n_ferr, n_write, n_read, max_free_blocks, n_frag_peak);
    check(n_frag_peak == WORDS / 4, $sformatf("fragmentation peak only %0d free blocks", n_frag_peak));
    check(n_exact > 0, "MALLOC without split never happened");
    check(n_split > 0, "MALLOC with split never happened");
    check(n_merr > 0, "MALLOC error never happened");
    check(n_free0 > 0, "FREE without merge never happened");
    check(n_prefix > 0, "FREE merging with previous block never happened");
    check(n_postfix > 0, "FREE merging with next block never happened");
    check(n_both > 0, "FREE merging with both neighbours never happened");
    check(n_ferr > 0, "FREE of a free block never happened");
    check(n_write > 0 && n_read > 0, "WRITE/READ never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
