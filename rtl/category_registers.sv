// category_registers: the category structure of the contents-table.
//
// The stored reference words are split into C categories by value range:
// category k holds the words w with bounds[k] <= w < bounds[k+1] (unsigned),
// so the bounds must be written in ascending order. The range rule is this
// design's choice; the structure is freely rewritable through the write port
// when the table is loaded. All bounds are broadcast to every port module,
// whose category-comparators test the search data against them.
//
// After reset the bounds split the D-bit value space into C equal ranges
// (bounds[k] = k * 2^D / C). C must be a power of two.
//
// Timing: a write is visible on `bounds` the cycle after `cat_we`.
module category_registers #(
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cat_we,
  input  logic [CW-1:0]        cat_idx,
  input  logic [D-1:0]         cat_bound,
  output logic [C-1:0][D-1:0]  bounds
);

  // Reset value of one bound: k * 2^D / C (C is a power of two).
  function automatic logic [D-1:0] reset_bound(int unsigned k);
    return D'(k) << (D - CW);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < C; k++) bounds[k] <= reset_bound(k);
    end else if (cat_we) begin
      bounds[cat_idx] <= cat_bound;
    end
  end

endmodule
