// delay_memory: write-enabled shift register of G words.
//
// A delay memory holds a value computed by a PE until another PE (or the
// same one) uses it a fixed number of time steps later. Instead of a shift
// register that moves every clock, it shifts only when the producing
// operation has completed, once per iteration interval P, so it needs only
// g = ceil(d~/P) words for a statement time displacement d~ (this sizing and
// the write enable follow the published method). Each we pulse shifts d in at word 0
// and every word one place on; q is the word written G pulses ago.
//
// Interface: clk, active-low asynchronous reset rst_n, synchronous clear clr
// (both set every word to zero; the zero initial value is a choice of this
// design), write enable we, data d, output q (registered, no combinational
// path from d). G must be at least 1.
module delay_memory #(
  parameter int W = 16,
  parameter int G = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] words [G];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < G; n++) words[n] <= '0;
    end else if (clr) begin
      for (int n = 0; n < G; n++) words[n] <= '0;
    end else if (we) begin
      words[0] <= d;
      for (int n = 1; n < G; n++) words[n] <= words[n-1];
    end
  end

  assign q = words[G-1];

  initial assert (G >= 1) else $error("delay_memory: G must be at least 1");

endmodule
