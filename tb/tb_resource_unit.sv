// tb_resource_unit: self-checking testbench for resource_unit.
//
// Three operand sources per input multiplexer and two output buffers. Each
// cycle it picks random sources, selects, operation and buffer enables,
// checks the combinational result against a reference computed here, and
// after the clock edge checks that exactly the enabled buffers took it, or
// that all were emptied on a clear.
module tb_resource_unit;
  import paro_pkg::*;
  localparam int W = 16;
  localparam int NSRC = 3;
  localparam int NBUF = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0;
  logic [W-1:0] src_a [NSRC];
  logic [W-1:0] src_b [NSRC];
  logic [1:0] sel_a = '0;
  logic [1:0] sel_b = '0;
  op_t op = OP_ADD;
  logic [NBUF-1:0] buf_en = '0;
  logic [W-1:0] res;
  logic [W-1:0] buf_q [NBUF];
  logic [W-1:0] model [NBUF];
  logic [W-1:0] exp_res;
  int checks = 0;
  int failures = 0;

  resource_unit #(.W(W), .NSRC(NSRC), .NBUF(NBUF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NSRC; n++) begin
      src_a[n] = '0;
      src_b[n] = '0;
    end
    for (int n = 0; n < NBUF; n++) model[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      logic [W-1:0] a, b;
      @(negedge clk);
      for (int n = 0; n < NSRC; n++) begin
        src_a[n] = W'($urandom);
        src_b[n] = W'($urandom);
      end
      sel_a  = 2'($urandom_range(0, NSRC - 1));
      sel_b  = 2'($urandom_range(0, NSRC - 1));
      op     = op_t'($urandom_range(0, 2));
      buf_en = NBUF'($urandom);
      clr    = ($urandom_range(0, 19) == 0);
      a = src_a[sel_a];
      b = src_b[sel_b];
      case (op)
        OP_ADD:  exp_res = W'(int'(a) + int'(b));
        OP_SUB:  exp_res = W'(int'(a) - int'(b));
        default: exp_res = W'(longint'(a) * longint'(b));
      endcase
      #1;
      checks++;
      if (res !== exp_res) begin
        failures++;
        $display("FAIL cycle %0d: op=%s a=%h b=%h res=%h expected %h", c, op.name(), a, b,
                 res, exp_res);
      end
      @(posedge clk);
      for (int n = 0; n < NBUF; n++)
        if (clr) model[n] = '0;
        else if (buf_en[n]) model[n] = exp_res;
      #1;
      for (int n = 0; n < NBUF; n++) begin
        checks++;
        if (buf_q[n] !== model[n]) begin
          failures++;
          $display("FAIL cycle %0d: buffer %0d=%h expected %h", c, n, buf_q[n], model[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
