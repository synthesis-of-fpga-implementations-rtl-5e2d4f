// pe_controller: local PE controller, a modulo-P counter and a decoder.
//
// The cyclic schedule inside a PE repeats every iteration interval P clock
// cycles. A counter of ceil(log2 P) bits (one bit when P = 1) steps through
// 0..P-1 while en is high and holds while it is low. The decoder turns the
// counter state into the control vector: multiplexer selects, output buffer
// enables, resource function codes and delay memory write enables. The
// counter and decoder structure follows the published method. Here the decoder is a
// lookup in the parameter SCHEDULE, bits [s*NCTRL +: NCTRL] holding the
// control vector for state s, which the schedule of the PE fills in; while en is low every
// control bit is zero, so no buffer or delay memory is written.
//
// Interface: clk, rst_n (asynchronous, active low), clr (synchronous, back to
// state 0), en (the PE is running), state (counter value), ctrl (decoded
// control vector, combinational from state and en), wrap (last state of the
// interval, high when the next enabled clock returns to state 0).
module pe_controller #(
  parameter int P     = 3,
  parameter int NCTRL = 4,
  parameter logic [P*NCTRL-1:0] SCHEDULE = '1,
  localparam int SW   = (P > 1) ? $clog2(P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  output logic [SW-1:0]    state,
  output logic [NCTRL-1:0] ctrl,
  output logic             wrap
);

  localparam logic [SW-1:0] LAST = SW'(P - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               state <= '0;
    else if (clr)             state <= '0;
    else if (en) begin
      if (state == LAST)      state <= '0;
      else                    state <= state + 1'b1;
    end
  end

  always_comb begin
    ctrl = '0;
    if (en) ctrl = SCHEDULE[state*NCTRL +: NCTRL];
  end

  assign wrap = (state == LAST);

  assert property (@(posedge clk) disable iff (!rst_n) state <= LAST)
    else $error("pe_controller: counter left 0..P-1");

endmodule
