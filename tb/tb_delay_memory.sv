// tb_delay_memory: self-checking testbench for delay_memory.
//
// Drives random data with a random write enable into a G = 3 delay memory
// and compares q every cycle with a software queue that shifts only on
// write pulses. Also checks the synchronous clear and that q does not move
// while we is low.
module tb_delay_memory;
  localparam int W = 16;
  localparam int G = 3;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         clr = 1'b0;
  logic         we = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  int checks = 0;
  int failures = 0;
  logic [W-1:0] model [G];

  delay_memory #(.W(W), .G(G)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_q(string what);
    checks++;
    if (q !== model[G-1]) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, model[G-1]);
    end
  endtask

  initial begin
    for (int n = 0; n < G; n++) model[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_q("after reset");
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 2) != 0);
      d   = W'($urandom);
      clr = (c == 200);
      @(posedge clk);
      if (clr) begin
        for (int n = 0; n < G; n++) model[n] = '0;
      end else if (we) begin
        for (int n = G - 1; n > 0; n--) model[n] = model[n-1];
        model[0] = d;
      end
      #1 check_q($sformatf("cycle %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
