// me_result_sr: pass result register (PE sums to the comparators).
//
// At the end of each pass (one vertical search offset) the PE arrays hold
// one set of four SADs per PE, front array first, then behind array. This
// register takes all NPE sets in one cycle (load) and then shifts them out
// one per cycle, PE 0 first, towards the comparator units, so that the PE arrays can start the next pass
// straight away. Each entry leaves with the horizontal offset index of its
// PE (out_idx = p) and the vertical offset of the pass it came from (out_dy).
//
// Interface: load with din/dy loads and restarts the output sequence; for
// the following NPE cycles out_valid=1 and out_sad/out_idx/out_dy present the
// entries in order. A load must not come before the previous contents have
// left (NPE cycles); busy shows that entries are still waiting.
// The document does not say how PE sums reach the comparators; this
// serialiser is this design's choice (the partial-solution register of the
// document is me_partial_sr).
module me_result_sr
  import me_pkg::*;
#(
  parameter int unsigned NPE = 12
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  sad4_t                  din [NPE],
  input  mv_t                    dy,
  output logic                   out_valid,
  output sad4_t                  out_sad,
  output logic [$clog2(NPE)-1:0] out_idx,
  output mv_t                    out_dy,
  output logic                   busy
);

  sad4_t                  q [NPE];
  logic [$clog2(NPE+1)-1:0] cnt;
  logic [$clog2(NPE)-1:0] idx;
  mv_t                    dy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPE; p++) q[p] <= '0;
      cnt  <= '0;
      idx  <= '0;
      dy_q <= '0;
    end else if (load) begin
      q    <= din;
      cnt  <= ($clog2(NPE+1))'(NPE);
      idx  <= '0;
      dy_q <= dy;
    end else if (cnt != 0) begin
      for (int p = 0; p < NPE - 1; p++) q[p] <= q[p+1];
      q[NPE-1] <= '0;
      cnt <= cnt - 1'b1;
      idx <= idx + 1'b1;
    end
  end

  assign out_valid = (cnt != 0);
  assign out_sad   = q[0];
  assign out_idx   = idx;
  assign out_dy    = dy_q;
  assign busy      = (cnt != 0);

  // A new pass must not overwrite results that have not been shifted out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) load |-> (cnt == 0 || cnt == 1))
    else $error("me_result_sr: load while %0d entries still waiting", cnt);

endmodule
