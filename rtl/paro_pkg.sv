// paro_pkg: types, constants and helper functions shared by the processor
// array blocks.
//
// The data word is 16 bits wide, as the published method states for the array
// variables of its running example. The bounds of the rectangular hull H
// around the processor space Q (p1 in 1..6, p2 in 2..11) and the time range
// k in 0..8 come from the example's index space. inside_q() is the index
// check that decides whether a point of H carries a processing element. Its
// inequalities are the processor part (A_p, b_p) of that index space.
// delay_words() is the number of words g = ceil(d~/P) that a delay memory
// needs for a statement time displacement d~ and iteration interval P.
// The bounds, the index check and both delay formulas follow the method this
// design implements; the struct bundles of PE inputs and outputs and the
// operation encoding are this design's own.
package paro_pkg;

  parameter int DW = 16;

  // Rectangular hull H of the processor space Q.
  parameter int H1_MIN = 1;
  parameter int H1_MAX = 6;
  parameter int H2_MIN = 2;
  parameter int H2_MAX = 11;

  // Time range of the index space (k = t).
  parameter int K_MIN = 0;
  parameter int K_MAX = 8;
  parameter int N_STEPS = K_MAX - K_MIN + 1;

  typedef logic [DW-1:0] word_t;

  // Operation codes of a multi-functional computational resource.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } op_t;

  // Values a PE of the Example 3.1 array reads, named after the variable,
  // the processor displacement d_p* and the time displacement d_t*.
  typedef struct packed {
    word_t y01_t0;  // y[i, j-1, k]
    word_t y01_t1;  // y[i, j-1, k-1]
    word_t y11_t0;  // y[i-1, j-1, k]
    word_t y10_t4;  // y[i-1, j, k-4]
    word_t a11_t1;  // a[i-1, j-1, k-1]
    word_t a10_t0;  // a[i-1, j, k]
    word_t u01_t0;  // u[i, j-1, k]
    word_t u01_t1;  // u[i, j-1, k-1]
  } pe_in_t;

  // Values a PE of the Example 3.1 array offers its neighbours.
  typedef struct packed {
    word_t y_now;   // y of the current step, same-step consumers
    word_t a_now;
    word_t u_now;
    word_t y_reg;   // output buffers: value of the previous step
    word_t a_reg;
    word_t u_reg;
    word_t y_d4;    // y four steps back, from the delay memory
  } pe_out_t;

  // Index check function of the processor space Q.
  function automatic bit inside_q(int p1, int p2);
    return (p1 >= 1) && (p1 <= 6) && (p2 >= 2) && (p1 + p2 <= 12) &&
           (p1 - p2 <= 2) && (p1 + p2 >= 4);
  endfunction

  // Words of a write-enabled delay memory: g = ceil(d~ / P).
  function automatic int delay_words(int dtilde, int p);
    return (dtilde + p - 1) / p;
  endfunction

  // Statement time displacement d~ = d_t* + gamma(v1) - gamma(v2) - L'(v2).
  function automatic int stmt_displacement(int dt, int gamma_v1, int gamma_v2,
                                           int lat_v2);
    return dt + gamma_v1 - gamma_v2 - lat_v2;
  endfunction

endpackage
