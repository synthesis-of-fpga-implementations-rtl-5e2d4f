// tb_pe_ex31: self-checking testbench for one processing element of the
// example array.
//
// Feeds the PE random neighbour values for 40 time steps (with a few idle
// cycles in between, during which nothing may change) and checks every step:
// the same-step outputs y_now, a_now, u_now against the equations evaluated
// here with this PE's own history of u (two steps back); after the clock
// edge the output buffers (value of the step just ended) and the delay
// memory output y_d4 (this PE's y four steps before the next one). A clear
// in the middle must restart the history from zero.
module tb_pe_ex31;
  import paro_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    clr = 1'b0;
  logic    en = 1'b0;
  pe_in_t  pin = '0;
  pe_out_t pout;
  int checks = 0;
  int failures = 0;

  word_t yh [$];
  word_t ah [$];
  word_t uh [$];

  pe_ex31 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t hist(ref word_t h [$], input int back);
    int n = h.size();
    return (n - back >= 0) ? h[n - back] : '0;
  endfunction

  task automatic expect_eq(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 60; s++) begin
      word_t ey, ea, eu;
      @(negedge clk);
      if (s == 30) begin
        clr = 1'b1;
        en  = 1'b0;
        @(posedge clk);
        #1 clr = 1'b0;
        yh.delete();
        ah.delete();
        uh.delete();
        expect_eq(pout.y_reg, '0, "y_reg after clear");
        expect_eq(pout.y_d4, '0, "y_d4 after clear");
        @(negedge clk);
      end
      en  = ($urandom_range(0, 4) != 0);
      pin = pe_in_t'({$urandom, $urandom, $urandom, $urandom});
      ey = pin.y01_t1 * hist(uh, 2) + pin.a11_t1 * pin.u01_t0;
      ea = pin.y01_t0 - pin.a10_t0;
      eu = pin.u01_t1 - pin.y11_t0 * pin.y10_t4;
      #1;
      expect_eq(pout.y_now, ey, $sformatf("step %0d y_now", s));
      expect_eq(pout.a_now, ea, $sformatf("step %0d a_now", s));
      expect_eq(pout.u_now, eu, $sformatf("step %0d u_now", s));
      expect_eq(pout.y_d4, hist(yh, 4), $sformatf("step %0d y_d4 before", s));
      @(posedge clk);
      if (en) begin
        yh.push_back(ey);
        ah.push_back(ea);
        uh.push_back(eu);
      end
      #1;
      expect_eq(pout.y_reg, hist(yh, 1), $sformatf("step %0d y_reg", s));
      expect_eq(pout.a_reg, hist(ah, 1), $sformatf("step %0d a_reg", s));
      expect_eq(pout.u_reg, hist(uh, 1), $sformatf("step %0d u_reg", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
