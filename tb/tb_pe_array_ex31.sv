// tb_pe_array_ex31: self-checking testbench for the example processor array.
//
// Plays the array's environment: during each time step it drives every
// border input whose source lies outside the processor space with the
// reference value for that step (and inputs the array must ignore with
// noise). After every step it compares the output buffers of all 41 PEs with
// the reference model of tb_ex31_ref_pkg, and checks that hull points
// without a PE stay zero. It checks the step timing (busy for exactly 9
// cycles, one done pulse, t_step counting 0..8) and runs the whole
// computation twice with different border data, so the second run also
// shows that start clears the history of the first.
module tb_pe_array_ex31;
  import paro_pkg::*;
  import tb_ex31_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start = 1'b0;
  pe_in_t border [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  y_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  a_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  word_t  u_q [H1_MIN:H1_MAX][H2_MIN:H2_MAX];
  logic   busy, done;
  logic [3:0] t_step;
  int checks = 0;
  int failures = 0;

  pe_array_ex31 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
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

  task automatic run_once(int unsigned seed);
    int steps = 0;
    compute(seed);
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    while (busy) begin
      int k;
      @(negedge clk);
      k = int'(t_step);
      checks++;
      if (k != steps) begin
        failures++;
        $display("FAIL t_step=%0d expected %0d", k, steps);
      end
      for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
        for (int p2 = H2_MIN; p2 <= H2_MAX; p2++)
          border[p1][p2] = border_in(p1, p2, k);
      @(posedge clk);
      #1;
      for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
        for (int p2 = H2_MIN; p2 <= H2_MAX; p2++) begin
          word_t ey, ea, eu;
          ey = inside_q(p1, p2) ? ref_v[V_Y][p1][p2][k] : '0;
          ea = inside_q(p1, p2) ? ref_v[V_A][p1][p2][k] : '0;
          eu = inside_q(p1, p2) ? ref_v[V_U][p1][p2][k] : '0;
          expect_eq(y_q[p1][p2], ey, $sformatf("seed %0d y[%0d,%0d,%0d]", seed, p1, p2, k));
          expect_eq(a_q[p1][p2], ea, $sformatf("seed %0d a[%0d,%0d,%0d]", seed, p1, p2, k));
          expect_eq(u_q[p1][p2], eu, $sformatf("seed %0d u[%0d,%0d,%0d]", seed, p1, p2, k));
        end
      steps++;
    end
    checks++;
    if (steps != N_STEPS || !done) begin
      failures++;
      $display("FAIL %0d steps (expected %0d), done=%b", steps, N_STEPS, done);
    end
    @(posedge clk);
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done longer than one cycle");
    end
  endtask

  initial begin
    for (int p1 = H1_MIN; p1 <= H1_MAX; p1++)
      for (int p2 = H2_MIN; p2 <= H2_MAX; p2++) border[p1][p2] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_once(7);
    repeat (3) @(posedge clk);
    run_once(12345);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
