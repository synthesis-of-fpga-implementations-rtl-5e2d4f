// tb_pe_s1_pipelined: self-checking testbench for pe_s1_pipelined.
//
// Plays the environment: whenever the PE starts an iteration (iter_start)
// it presents a fresh random operand set and holds it until the next
// iteration starts. Every y_valid pulse is compared with
// y_jk1 * u_k2 + a_jk1 * u_j (mod 2^16) of the oldest outstanding
// iteration. In a first phase run stays high; there the testbench checks
// the iteration interval of 2 cycles between results and the latency of 3
// clock edges from iteration start to result. A second phase toggles run
// at random to check that the PE holds its state during pauses.
module tb_pe_s1_pipelined;
  import paro_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  run = 1'b0;
  word_t y_jk1 = '0, u_k2 = '0, a_jk1 = '0, u_j = '0;
  logic  iter_start;
  word_t y;
  logic  y_valid;
  int checks = 0;
  int failures = 0;

  word_t expq [$];
  int    launchq [$];
  int    cycle = 0;
  int    last_out = -1;
  int    n_out = 0;
  int    overlaps = 0;
  logic  launched_prev = 1'b0;

  pe_s1_pipelined dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 600; cycle++) begin
      @(negedge clk);
      // Results stored at the last edge.
      if (y_valid) begin
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: result with no iteration outstanding", cycle);
        end else begin
          word_t e;
          int    l;
          e = expq.pop_front();
          l = launchq.pop_front();
          if (y !== e) begin
            failures++;
            $display("FAIL cycle %0d: y=%h expected %h", cycle, y, e);
          end
          if (cycle < 200) begin
            checks++;
            if (cycle - l != 3) begin
              failures++;
              $display("FAIL cycle %0d: latency %0d, expected 3", cycle, cycle - l);
            end
            if (last_out >= 0) begin
              checks++;
              if (cycle - last_out != 2) begin
                failures++;
                $display("FAIL cycle %0d: interval %0d, expected 2", cycle, cycle - last_out);
              end
            end
          end
          // The sum was stored in the same cycle as the next iteration's
          // first product: functional pipelining.
          if (launched_prev) overlaps++;
        end
        last_out = cycle;
        n_out++;
      end
      run = (cycle < 200) ? 1'b1 : ($urandom_range(0, 2) != 0);
      #1;
      launched_prev = iter_start;
      if (iter_start) begin
        y_jk1 = word_t'($urandom);
        u_k2  = word_t'($urandom);
        a_jk1 = word_t'($urandom);
        u_j   = word_t'($urandom);
        expq.push_back(word_t'(int'(y_jk1) * int'(u_k2) + int'(a_jk1) * int'(u_j)));
        launchq.push_back(cycle);
      end
    end
    checks++;
    if (n_out < 150 || overlaps < 100) begin
      failures++;
      $display("FAIL too few results (%0d) or overlapped additions (%0d)", n_out, overlaps);
    end
    $display("results=%0d overlapped_additions=%0d", n_out, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
