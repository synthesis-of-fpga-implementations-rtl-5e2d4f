// tb_pe_controller: self-checking testbench for pe_controller.
//
// Uses P = 3 and a four-bit control vector with a distinct pattern per
// state. While en is high the controller must cycle through states
// 0, 1, 2, 0, ... (modulo-P counter) and put the schedule row of the state
// on ctrl; with en low the state must hold and ctrl be zero; clr returns to
// state 0. wrap must mark state P-1.
module tb_pe_controller;
  localparam int P = 3;
  localparam int NCTRL = 4;
  localparam logic [P*NCTRL-1:0] SCHED = 12'b1001_0110_0011;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic en = 1'b0;
  logic [1:0] state;
  logic [NCTRL-1:0] ctrl;
  logic wrap;
  int checks = 0;
  int failures = 0;
  int exp_state = 0;
  int wraps = 0;

  pe_controller #(.P(P), .NCTRL(NCTRL), .SCHEDULE(SCHED)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    logic [NCTRL-1:0] exp_ctrl;
    exp_ctrl = en ? SCHED[exp_state*NCTRL +: NCTRL] : '0;
    checks++;
    if (int'(state) != exp_state || ctrl !== exp_ctrl || wrap !== (exp_state == P - 1)) begin
      failures++;
      $display("FAIL %s: state=%0d/%0d ctrl=%b/%b wrap=%b", what, state, exp_state,
               ctrl, exp_ctrl, wrap);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      en  = (c < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);
      clr = (c == 300) || (c == 451);
      #1 check($sformatf("cycle %0d", c));
      @(posedge clk);
      if (clr) exp_state = 0;
      else if (en) begin
        if (exp_state == P - 1) wraps++;
        exp_state = (exp_state + 1) % P;
      end
    end
    checks++;
    if (wraps < 30) begin
      failures++;
      $display("FAIL too few wraps: %0d", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
