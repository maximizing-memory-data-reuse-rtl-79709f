// me_partial_sr: partial-solution shift register.
//
// While one column of quads is processed, the behind PE array evaluates
// some candidates of the two left-hand blocks (A and C) of the quads in the
// next column, using search data that is already in the window. The best of
// those candidates for each block, its partial solution, waits in this
// register until the next column reaches that block, where it seeds the
// block's comparator. One entry is kept per block row of the frame:
// DEPTH = FH/N (36 for a 144-line frame with 4x4 blocks).
//
// Entries move two at a time, A then C of one quad: push2 appends
// {in_a, in_c} at the tail, pop2 removes the two entries at the head, shown
// on head_a/head_c. Entries come out in the order they went in, which is the
// top-to-bottom order of the quads in a column. Both may happen in the same
// cycle. Assertions flag an overflow or a pop from an empty register.
// The register, its purpose and its length follow the document; moving
// entries in pairs is this design's choice.
module me_partial_sr
  import me_pkg::*;
#(
  parameter int unsigned DEPTH = 36
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push2,
  input  mv_result_t in_a,
  input  mv_result_t in_c,
  input  logic       pop2,
  output mv_result_t head_a,
  output mv_result_t head_c,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  mv_result_t q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < DEPTH; e++) q[e] <= '0;
      count <= '0;
    end else begin
      automatic int unsigned base = pop2 ? int'(count) - 2 : int'(count);
      if (pop2)
        for (int e = 0; e < DEPTH; e++)
          q[e] <= (e + 2 < DEPTH) ? q[e+2] : '0;
      if (push2) begin
        q[base]     <= in_a;
        q[base + 1] <= in_c;
      end
      count <= $bits(count)'(base + (push2 ? 2 : 0));
    end
  end

  assign head_a = q[0];
  assign head_c = q[1];

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   push2 |-> (int'(count) - (pop2 ? 2 : 0) + 2 <= int'(DEPTH)))
    else $error("me_partial_sr: overflow");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop2 |-> (count >= 2))
    else $error("me_partial_sr: pop from empty register");

endmodule
