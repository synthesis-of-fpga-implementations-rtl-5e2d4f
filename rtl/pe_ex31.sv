// pe_ex31: processing element of the Example 3.1 processor array.
//
// The PE at processor index (i, j) evaluates, at time step k, the three
// equations of the running example after operator splitting:
//   y1 = y[i, j-1, k-1] * u[i, j, k-2]
//   y2 = a[i-1, j-1, k-1] * u[i, j-1, k]
//   y  = y1 + y2
//   a  = y[i, j-1, k] - a[i-1, j, k]
//   u1 = y[i-1, j-1, k] * y[i-1, j, k-4]
//   u  = u[i, j-1, k-1] - u1
// All arithmetic is on 16-bit words modulo 2^16; products keep the low 16
// bits. The space-time mapping is p = (i, j), t = k, so the iteration
// interval is P = 1 clock cycle: each operation has its own resource unit
// and all six are evaluated in the cycle of step k (the one-to-one binding,
// P = 1 and the wrap-around arithmetic are choices of this design).
//
// Values needed by a neighbour in the same step (time displacement 0) leave
// on *_now, combinationally. Every result is written to an output buffer at
// the end of its step, so *_reg carries the previous step's value (time
// displacement 1). Longer displacements use write-enabled delay memories
// sized by g = ceil(d~/P) with d~ = d_t* - 1 (the output buffer already
// gives one step): y for the (i+1, j) neighbour four steps later needs
// g = 3, this PE's own u two steps later needs g = 1.
//
// A local pe_controller (P = 1) produces the buffer and delay memory write
// enables while en is high. clr empties all buffers and delay memories to
// zero at the start of a run, so values from before step 0 read as zero.
//
// Inside the array the same-step outputs of one PE feed same-step inputs of
// its neighbours. The chains always run towards higher (i, j) and never
// close, but a tool that treats the array's signal arrays as whole
// variables reports them as circular logic on y, a and u here.
module pe_ex31
  import paro_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    en,
  input  pe_in_t  pin,
  output pe_out_t pout
);

  localparam int P_II   = 1;                  // iteration interval
  localparam int LAT    = 1;                  // L' of every operation
  localparam int G_Y_T4 = delay_words(stmt_displacement(4, 0, 0, LAT), P_II);
  localparam int G_U_T2 = delay_words(stmt_displacement(2, 0, 0, LAT), P_II);

  // Control vector: [0] output buffer enable, [1] delay memory write enable.
  logic [0:0] state;
  logic [1:0] ctrl;
  logic       wrap;

  pe_controller #(
    .P        (P_II),
    .NCTRL    (2),
    .SCHEDULE (2'b11)
  ) u_pec (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (clr),
    .en    (en),
    .state (state),
    .ctrl  (ctrl),
    .wrap  (wrap)
  );

  word_t y1, y2, u1, y, a, u;
  word_t y1_buf [1], y2_buf [1], u1_buf [1], y_buf [1], a_buf [1], u_buf [1];
  word_t y_reg, a_reg, u_reg, u_d2, y_d4;

  // One resource unit per split operation. The products are consumed in the
  // same cycle, so their output buffers are never enabled; y, a and u keep
  // their result in the output buffer for the next step's consumers.
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_y1 (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{pin.y01_t1}), .src_b ('{u_d2}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_MUL), .buf_en (1'b0), .res (y1), .buf_q (y1_buf)
  );
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_y2 (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{pin.a11_t1}), .src_b ('{pin.u01_t0}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_MUL), .buf_en (1'b0), .res (y2), .buf_q (y2_buf)
  );
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_y (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{y1}), .src_b ('{y2}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_ADD), .buf_en (ctrl[0]), .res (y), .buf_q (y_buf)
  );
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_a (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{pin.y01_t0}), .src_b ('{pin.a10_t0}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_SUB), .buf_en (ctrl[0]), .res (a), .buf_q (a_buf)
  );
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_u1 (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{pin.y11_t0}), .src_b ('{pin.y10_t4}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_MUL), .buf_en (1'b0), .res (u1), .buf_q (u1_buf)
  );
  resource_unit #(.W(DW), .NSRC(1), .NBUF(1)) u_ru_u (
    .clk (clk), .rst_n (rst_n), .clr (clr),
    .src_a ('{pin.u01_t1}), .src_b ('{u1}), .sel_a (1'b0), .sel_b (1'b0),
    .op (OP_SUB), .buf_en (ctrl[0]), .res (u), .buf_q (u_buf)
  );

  assign y_reg = y_buf[0];
  assign a_reg = a_buf[0];
  assign u_reg = u_buf[0];

  // Delay memories, written once per iteration interval.
  delay_memory #(.W(DW), .G(G_Y_T4)) u_dly_y (
    .clk (clk), .rst_n (rst_n), .clr (clr), .we (ctrl[1]),
    .d (y_reg), .q (y_d4)
  );

  delay_memory #(.W(DW), .G(G_U_T2)) u_dly_u (
    .clk (clk), .rst_n (rst_n), .clr (clr), .we (ctrl[1]),
    .d (u_reg), .q (u_d2)
  );

  always_comb begin
    pout.y_now = y;
    pout.a_now = a;
    pout.u_now = u;
    pout.y_reg = y_reg;
    pout.a_reg = a_reg;
    pout.u_reg = u_reg;
    pout.y_d4  = y_d4;
  end

endmodule
