// tb_paro_top: end-to-end testbench of paro_top at its default sizes.
//
// Runs both designs at once. The processor array computes the full example
// index space (41 PEs, time steps 0..8) twice with different border data,
// the testbench acting as the environment and checking every output buffer
// after every step against the reference model. Meanwhile the pipelined S1
// PE processes a stream of random operand sets, first with run held high
// (checking one result every 2 cycles and a latency of 3) and then with
// random pauses.
//
// It counts how often each mechanism of the design was exercised and fails
// if any count is zero: border values taken from the ports, same-step
// (combinational) forwarding of a between neighbours, delay-memory reads of
// y four steps back with a nonzero value, a restart that clears the array's
// history, additions overlapped with the next iteration's first product, and
// pauses of the S1 PE with an iteration in flight.
module tb_paro_top;
  import paro_pkg::*;
  import tb_ex31_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   arr_start = 1'b0;
  pe_in_t arr_border [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  arr_y_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  arr_a_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  arr_u_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  logic   arr_busy, arr_done;
  logic [3:0] arr_t_step;
  logic   s1_run = 1'b0;
  word_t  s1_y_jk1 = '0, s1_u_k2 = '0, s1_a_jk1 = '0, s1_u_j = '0;
  logic   s1_iter_start;
  word_t  s1_y;
  logic   s1_y_valid;

  int checks = 0;
  int failures = 0;
  int n_border = 0, n_same_step = 0, n_delay_mem = 0, n_restart = 0;
  int n_overlap = 0, n_pause = 0, n_nonzero = 0;
  bit arr_finished = 0;

  paro_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- processor array ----------------
  task automatic array_run(int unsigned seed);
    int steps = 0;
    compute(seed);
    @(negedge clk);
    arr_start = 1'b1;
    @(posedge clk);
    #1 arr_start = 1'b0;
    while (arr_busy) begin
      int k;
      @(negedge clk);
      k = int'(arr_t_step);
      for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
        for (int p2 = H2_MIN; p2 <= H2_MAX; p2++) begin
          arr_border[p1][p2] = border_in(p1, p2, k);
          if (inside_q(p1, p2)) begin
            n_border += !inside_q(p1, p2-1) ? 4 : 0;
            n_border += !inside_q(p1-1, p2-1) ? 2 : 0;
            n_border += !inside_q(p1-1, p2) ? 2 : 0;
          end
        end
      @(posedge clk);
      #1;
      for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
        for (int p2 = H2_MIN; p2 <= H2_MAX; p2++)
          if (inside_q(p1, p2)) begin
            expect_eq(arr_y_q[p1][p2], ref_v[V_Y][p1][p2][k], $sformatf("y[%0d,%0d,%0d]", p1, p2, k));
            expect_eq(arr_a_q[p1][p2], ref_v[V_A][p1][p2][k], $sformatf("a[%0d,%0d,%0d]", p1, p2, k));
            expect_eq(arr_u_q[p1][p2], ref_v[V_U][p1][p2][k], $sformatf("u[%0d,%0d,%0d]", p1, p2, k));
            if (ref_v[V_Y][p1][p2][k] != '0) n_nonzero++;
            if (inside_q(p1-1, p2)) begin
              n_same_step++;
              if (k >= 4 && ref_v[V_Y][p1-1][p2][k-4] != '0) n_delay_mem++;
            end
          end
      steps++;
    end
    checks++;
    if (steps != N_STEPS) begin
      failures++;
      $display("FAIL array ran %0d steps, expected %0d", steps, N_STEPS);
    end
  endtask

  initial begin
    for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
      for (int p2 = H2_MIN; p2 <= H2_MAX; p2++) arr_border[p1][p2] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    array_run(99);
    repeat (2) @(posedge clk);
    array_run(4242);
    n_restart++;
    arr_finished = 1;
  end

  // ---------------- pipelined S1 PE ----------------
  word_t expq [$];
  int    launchq [$];

  initial begin
    int last_out = -1;
    bit launched_prev = 0;
    repeat (2) @(negedge clk);
    for (int cycle = 0; cycle < 240; cycle++) begin
      @(negedge clk);
      if (s1_y_valid) begin
        word_t e;
        int l;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL S1 result with nothing outstanding");
        end else begin
          e = expq.pop_front();
          l = launchq.pop_front();
          expect_eq(s1_y, e, $sformatf("S1 y at cycle %0d", cycle));
          if (cycle < 100) begin
            checks++;
            if (cycle - l != 3 || (last_out >= 0 && cycle - last_out != 2)) begin
              failures++;
              $display("FAIL S1 timing at cycle %0d: latency %0d interval %0d", cycle,
                       cycle - l, cycle - last_out);
            end
          end
          if (launched_prev) n_overlap++;
        end
        last_out = cycle;
      end
      s1_run = (cycle < 100) ? 1'b1 : ($urandom_range(0, 2) != 0);
      if (!s1_run && expq.size() != 0) n_pause++;
      #1;
      launched_prev = s1_iter_start;
      if (s1_iter_start) begin
        s1_y_jk1 = word_t'($urandom);
        s1_u_k2  = word_t'($urandom);
        s1_a_jk1 = word_t'($urandom);
        s1_u_j   = word_t'($urandom);
        expq.push_back(word_t'(int'(s1_y_jk1) * int'(s1_u_k2) + int'(s1_a_jk1) * int'(s1_u_j)));
        launchq.push_back(cycle);
      end
    end
    wait (arr_finished);
    $display("border_inputs=%0d same_step_forwards=%0d delay_memory_reads=%0d restarts=%0d",
             n_border, n_same_step, n_delay_mem, n_restart);
    $display("nonzero_y=%0d s1_overlapped_additions=%0d s1_pauses=%0d", n_nonzero, n_overlap,
             n_pause);
    checks++;
    if (n_border == 0 || n_same_step == 0 || n_delay_mem == 0 || n_restart == 0 ||
        n_overlap == 0 || n_pause == 0 || n_nonzero == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
