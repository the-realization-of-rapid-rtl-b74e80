// sort3 - orders three pixels into min, med and max.
//
// This is the basic part that every step of the rapid median uses. It works
// in two compare levels, as the reference sort routine does: first a and b
// are ordered into lo/hi; then c is placed below lo, above hi, or between
// them, using the two comparisons c<lo and c>hi in parallel.
//
// PIPE = 0: fully combinational, outputs follow the inputs.
// PIPE = 1: a register level (enabled by en) sits between the two compare
//           levels, so the outputs appear one clock after the inputs were
//           sampled with en high. This lets a pipeline put one register level
//           after every compare level. The register is this design's choice.
// clk, rst_n and en are unused when PIPE = 0.
module sort3
  import median_pkg::*;
#(
  parameter bit PIPE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  pix_t a,
  input  pix_t b,
  input  pix_t c,
  output pix_t min_o,
  output pix_t med_o,
  output pix_t max_o
);

  // Level 1: order a and b.
  pix_t lo1, hi1, c1;
  always_comb begin
    if (a < b) begin
      lo1 = a;
      hi1 = b;
    end else begin
      lo1 = b;
      hi1 = a;
    end
    c1 = c;
  end

  // Optional register between the levels.
  pix_t lo2, hi2, c2;
  if (PIPE) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        lo2 <= '0;
        hi2 <= '0;
        c2  <= '0;
      end else if (en) begin
        lo2 <= lo1;
        hi2 <= hi1;
        c2  <= c1;
      end
    end
  end else begin : g_comb
    assign lo2 = lo1;
    assign hi2 = hi1;
    assign c2  = c1;
    // Clock, reset and enable have no use without the register.
    logic unused;
    assign unused = clk ^ rst_n ^ en;
  end

  // Level 2: place c.
  always_comb begin
    if (c2 < lo2) begin
      min_o = c2;
      med_o = lo2;
      max_o = hi2;
    end else if (c2 > hi2) begin
      min_o = lo2;
      med_o = hi2;
      max_o = c2;
    end else begin
      min_o = lo2;
      med_o = c2;
      max_o = hi2;
    end
  end

endmodule
