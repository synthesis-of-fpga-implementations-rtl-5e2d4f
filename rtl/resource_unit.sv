// resource_unit: one resource unit (RU) of a processing element.
//
// An RU is an input multiplexer per operand, a computational resource and a
// bank of output buffer registers, all steered by the local PE controller
// (structure after the published method's general RU form). Operand a is chosen from
// src_a[sel_a] and operand b from src_b[sel_b]; the resource computes res =
// a + b, a - b or the low W bits of a * b as op selects (a resource whose
// op is fixed is simply driven with a constant op). Output buffer n loads
// res at the clock edge where buf_en[n] is high and holds it otherwise, so a
// result is available in a buffer one cycle after its operands (latency 1).
// res is also brought out combinationally for same-cycle consumers.
//
// Interface: clk, rst_n (asynchronous, buffers reset to zero), clr
// (synchronous clear of all buffers, takes priority over buf_en), src_a/src_b
// (NSRC candidate operands each), sel_a/sel_b, op (paro_pkg::op_t), buf_en
// (one enable per buffer), res, buf_q (buffer contents).
module resource_unit
  import paro_pkg::*;
#(
  parameter int W    = 16,
  parameter int NSRC = 2,
  parameter int NBUF = 2,
  localparam int SELW = (NSRC > 1) ? $clog2(NSRC) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [W-1:0]    src_a [NSRC],
  input  logic [W-1:0]    src_b [NSRC],
  input  logic [SELW-1:0] sel_a,
  input  logic [SELW-1:0] sel_b,
  input  op_t             op,
  input  logic [NBUF-1:0] buf_en,
  output logic [W-1:0]    res,
  output logic [W-1:0]    buf_q [NBUF]
);

  logic [W-1:0] opa, opb;

  // Input multiplexers; a select beyond NSRC-1 yields zero.
  always_comb begin
    opa = '0;
    opb = '0;
    for (int n = 0; n < NSRC; n++) begin
      if (sel_a == SELW'(n)) opa = src_a[n];
      if (sel_b == SELW'(n)) opb = src_b[n];
    end
  end

  // Computational resource.
  always_comb begin
    unique case (op)
      OP_ADD:  res = opa + opb;
      OP_SUB:  res = opa - opb;
      OP_MUL:  res = opa * opb;   // low W bits of the product
      default: res = '0;
    endcase
  end

  // Output buffers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NBUF; n++) buf_q[n] <= '0;
    end else if (clr) begin
      for (int n = 0; n < NBUF; n++) buf_q[n] <= '0;
    end else begin
      for (int n = 0; n < NBUF; n++)
        if (buf_en[n]) buf_q[n] <= res;
    end
  end

endmodule
