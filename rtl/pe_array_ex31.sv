// pe_array_ex31: processor array for the running example (Example 3.1).
//
// The processor space Q of the example is a convex polygon in the (p1, p2)
// plane. The array spans its rectangular hull H (p1 in 1..6, p2 in 2..11)
// with two nested generate loops and places a pe_ex31 only where the index
// check inside_q() holds, 41 PEs in all. Each PE's outputs go into a signal
// array over H; a PE reads its neighbour at processor index p - d_p* for
// each processor displacement vector d_p* of the example, (0,1), (1,1) and
// (1,0). Where that neighbour lies outside Q, the value comes from the
// border input instead, so there are no border processors: the surrounding
// system has to present each border value at the right step and position.
// This placement scheme follows the published method; the struct bundling of the
// signal arrays is this design's choice.
//
// Time: the schedule is t = k, one clock cycle per time step (iteration
// interval P = 1). A pulse on start, while idle, clears every PE's buffers
// and delay memories and starts N_STEPS = 9 steps (k = 0..8); busy is high
// during them and t_step gives the current k. During step k the border
// inputs must carry the step-k values; at the clock edge ending step k the
// output buffers take y, a, u of step k, visible on y_q, a_q, u_q from then
// on. done pulses for one cycle after the last step. Hull points without a
// PE read zero on the outputs.
//
// Same-step data (time displacement 0) travels combinationally from PE to
// PE, always from a lower (i, j) to a higher one, so the chains are long
// (up to the whole array) but acyclic; a tool that treats the signal arrays
// as single variables may still report a loop through them.
module pe_array_ex31
  import paro_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  pe_in_t border [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  y_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  a_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  u_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output logic   busy,
  output logic   done,
  output logic [3:0] t_step
);

  localparam logic [3:0] LAST_STEP = 4'(N_STEPS - 1);

  logic clr;

  // Time-step sequencer shared by all PEs.
  assign clr = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      t_step <= '0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        busy   <= 1'b1;
        t_step <= '0;
      end else if (busy) begin
        if (t_step == LAST_STEP) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          t_step <= t_step + 1'b1;
        end
      end
    end
  end

  // Signal array of PE outputs over the hull.
  pe_out_t pe_o [H1_MIN:H1_MAX][H2_MIN:H2_MAX];

  for (genvar p1 = H1_MIN; p1 <= H1_MAX; p1++) begin : g_p1
    for (genvar p2 = H2_MIN; p2 <= H2_MAX; p2++) begin : g_p2
      if (inside_q(p1, p2)) begin : g_pe
        localparam bit HAS01 = inside_q(p1, p2 - 1);
        localparam bit HAS11 = inside_q(p1 - 1, p2 - 1);
        localparam bit HAS10 = inside_q(p1 - 1, p2);

        pe_out_t nb01, nb11, nb10;
        pe_in_t  pin;

        if (HAS01) begin : g_nb01
          assign nb01 = pe_o[p1][p2-1];
        end else begin : g_bd01
          assign nb01 = '0;
        end
        if (HAS11) begin : g_nb11
          assign nb11 = pe_o[p1-1][p2-1];
        end else begin : g_bd11
          assign nb11 = '0;
        end
        if (HAS10) begin : g_nb10
          assign nb10 = pe_o[p1-1][p2];
        end else begin : g_bd10
          assign nb10 = '0;
        end

        always_comb begin
          pin = border[p1][p2];
          if (HAS01) begin
            pin.y01_t0 = nb01.y_now;
            pin.y01_t1 = nb01.y_reg;
            pin.u01_t0 = nb01.u_now;
            pin.u01_t1 = nb01.u_reg;
          end
          if (HAS11) begin
            pin.y11_t0 = nb11.y_now;
            pin.a11_t1 = nb11.a_reg;
          end
          if (HAS10) begin
            pin.y10_t4 = nb10.y_d4;
            pin.a10_t0 = nb10.a_now;
          end
        end

        pe_ex31 u_pe (
          .clk   (clk),
          .rst_n (rst_n),
          .clr   (clr),
          .en    (busy),
          .pin   (pin),
          .pout  (pe_o[p1][p2])
        );

        assign y_q[p1][p2] = pe_o[p1][p2].y_reg;
        assign a_q[p1][p2] = pe_o[p1][p2].a_reg;
        assign u_q[p1][p2] = pe_o[p1][p2].u_reg;
      end else begin : g_empty
        assign pe_o[p1][p2] = '0;
        assign y_q[p1][p2]  = '0;
        assign a_q[p1][p2]  = '0;
        assign u_q[p1][p2]  = '0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> t_step <= LAST_STEP)
    else $error("pe_array_ex31: time step out of range");

endmodule
