// paro_top: the two hardware designs of this collection side by side.
//
// arr_*: the processor array of the running example (pe_array_ex31), 41 PEs
// on a 6 x 10 hull computing y, a and u for time steps k = 0..8, one step
// per clock cycle, with its border data supplied through arr_border.
// s1_*: a single PE (pe_s1_pipelined) that evaluates equation S1 of the
// same example on one shared multiplier with functional pipelining, one
// result every two cycles.
//
// The two share only the clock and the asynchronous active-low reset; see
// the two modules for the timing of their ports. Both come from the same
// worked example of the method; placing them in one top without any
// connection between them is a choice of this collection.
module paro_top
  import paro_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // Processor array.
  input  logic   arr_start,
  input  pe_in_t arr_border [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  arr_y_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  arr_a_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output word_t  arr_u_q    [H1_MIN:H1_MAX][H2_MIN:H2_MAX],
  output logic   arr_busy,
  output logic   arr_done,
  output logic [3:0] arr_t_step,
  // Functionally pipelined S1 PE.
  input  logic   s1_run,
  input  word_t  s1_y_jk1,
  input  word_t  s1_u_k2,
  input  word_t  s1_a_jk1,
  input  word_t  s1_u_j,
  output logic   s1_iter_start,
  output word_t  s1_y,
  output logic   s1_y_valid
);

  pe_array_ex31 u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (arr_start),
    .border (arr_border),
    .y_q    (arr_y_q),
    .a_q    (arr_a_q),
    .u_q    (arr_u_q),
    .busy   (arr_busy),
    .done   (arr_done),
    .t_step (arr_t_step)
  );

  pe_s1_pipelined u_s1 (
    .clk        (clk),
    .rst_n      (rst_n),
    .run        (s1_run),
    .y_jk1      (s1_y_jk1),
    .u_k2       (s1_u_k2),
    .a_jk1      (s1_a_jk1),
    .u_j        (s1_u_j),
    .iter_start (s1_iter_start),
    .y          (s1_y),
    .y_valid    (s1_y_valid)
  );

endmodule
