// pe_s1_pipelined: PE for equation S1 of the running example with a shared
// multiplier and functional pipelining.
//
// After operator splitting, S1 is two products and a sum:
//   y1 = y[i, j-1, k-1] * u[i, j, k-2]
//   y2 = a[i-1, j-1, k-1] * u[i, j-1, k]
//   y  = y1 + y2
// This PE binds both products to one multiplier resource unit and the sum
// to one adder resource unit, and runs them on a cyclic schedule with
// iteration interval P = 2: the multiplier forms y1 in cycle 0 and y2 in
// cycle 1 of an iteration, and the adder forms y in cycle 0 of the next
// iteration, overlapping that iteration's first product. Sharing one
// multiplier and overlapping the addition with the next iteration is the
// published method's example of functional pipelining; the latencies (one cycle per
// operation) and so P = 2 are this design's choice.
//
// A pe_controller (modulo-2 counter and decoder) drives the multiplier's
// operand select and the buffer enables. Control vector bits: [0] multiplier
// operand select, [1] store y1, [2] store y2, [3] store y.
//
// Interface and timing: while run is high the counter advances every cycle.
// iter_start is high in cycle 0 of an iteration; the four operands must be
// valid in that cycle and the next. The sum of that iteration is in y from
// the third clock edge after the iteration began, marked by a one-cycle
// y_valid pulse. One result every P = 2 cycles while run stays high. When
// run is low everything holds.
module pe_s1_pipelined
  import paro_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  input  word_t y_jk1,   // y[i, j-1, k-1]
  input  word_t u_k2,    // u[i, j, k-2]
  input  word_t a_jk1,   // a[i-1, j-1, k-1]
  input  word_t u_j,     // u[i, j-1, k]
  output logic  iter_start,
  output word_t y,
  output logic  y_valid
);

  localparam int P_II  = 2;
  localparam int NCTRL = 4;
  // State 1: select 1, store y2.  State 0: select 0, store y1, store y.
  localparam logic [P_II*NCTRL-1:0] SCHED = {4'b0100 | 4'b0001, 4'b1000 | 4'b0010};

  logic [0:0]       state;
  logic [NCTRL-1:0] ctrl;
  logic             wrap;
  logic             have_pair;

  pe_controller #(.P(P_II), .NCTRL(NCTRL), .SCHEDULE(SCHED)) u_pec (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (1'b0),
    .en    (run),
    .state (state),
    .ctrl  (ctrl),
    .wrap  (wrap)
  );

  assign iter_start = run && (state == 1'b0);

  // Multiplier RU: two operand sources, two output buffers (y1, y2).
  word_t mul_src_a [2];
  word_t mul_src_b [2];
  word_t mul_buf   [2];
  word_t mul_res;

  assign mul_src_a[0] = y_jk1;
  assign mul_src_b[0] = u_k2;
  assign mul_src_a[1] = a_jk1;
  assign mul_src_b[1] = u_j;

  resource_unit #(.W(DW), .NSRC(2), .NBUF(2)) u_ru_mul (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (1'b0),
    .src_a  (mul_src_a),
    .src_b  (mul_src_b),
    .sel_a  (ctrl[0]),
    .sel_b  (ctrl[0]),
    .op     (OP_MUL),
    .buf_en (ctrl[2:1]),
    .res    (mul_res),
    .buf_q  (mul_buf)
  );

  // Adder RU: one source per operand, one output buffer (y). It only stores
  // when both products of one iteration are in the multiplier buffers.
  word_t add_src_a [1];
  word_t add_src_b [1];
  word_t add_buf   [1];
  word_t add_res;
  logic  add_en;

  assign add_src_a[0] = mul_buf[0];
  assign add_src_b[0] = mul_buf[1];
  assign add_en       = ctrl[3] && have_pair;

  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_add (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (1'b0),
    .src_a  (add_src_a),
    .src_b  (add_src_b),
    .sel_a  (1'b0),
    .sel_b  (1'b0),
    .op     (OP_ADD),
    .buf_en (add_en),
    .res    (add_res),
    .buf_q  (add_buf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_pair <= 1'b0;
      y_valid   <= 1'b0;
    end else begin
      y_valid <= add_en;
      if (ctrl[2])      have_pair <= 1'b1;
      else if (add_en)  have_pair <= 1'b0;
    end
  end

  assign y = add_buf[0];

  // The two products of an iteration are stored in consecutive states.
  assert property (@(posedge clk) disable iff (!rst_n) ctrl[1] |-> !ctrl[2])
    else $error("pe_s1_pipelined: both product buffers written at once");

endmodule
