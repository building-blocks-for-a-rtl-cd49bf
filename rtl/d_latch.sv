// Level-sensitive D latch, the storage element of the high-frequency divider
// and of the band-search front end.
//
// While clk is high the latch is transparent and q follows d, like a buffer;
// while clk is low it holds the last value (in silicon, by a cross-coupled
// pair in source-coupled logic). A pair of these latches on opposite clock
// phases forms the divide-by-2 flip-flop. The complementary output qn is
// provided because the differential circuit offers both polarities for free.
// rst_n is an asynchronous clear, added in this design so that dividers start
// from a known phase; the source circuit has none.
module d_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qn
);
  always_latch begin
    if (!rst_n)   q = 1'b0;
    else if (clk) q = d;
  end
  assign qn = ~q;
endmodule
