// me_pe_array: one-dimensional array of four-subtractor PEs.
//
// NPE PEs (me_pe4) are chained by their current-pixel registers and share
// one broadcast search pixel and one enable/clear pair. PE p of the array
// therefore works on the current pixel stream delayed by p cycles relative
// to PE 0, which gives each PE its own horizontal search offset: when the
// search row is streamed column by column, PE p pairs search column q with
// current column q-p.
//
// The estimator uses two of these arrays on the same search pixel: a front
// array of R+N-S+1 PEs for the current quad's four blocks, and a behind
// array of L+R-N+1 PEs (LANE_MASK 4'b0101) for blocks A and C of the quad one
// column to the right, whose partial solutions are kept for later (see
// me_top). The chain end is brought out (x_out/x_out_valid) so arrays can be
// chained.
//
// Interface: sad[p] are the four running sums of PE p; see me_pe4 for the
// cycle behaviour. Two 1-D PE arrays follow the document; how the offsets are
// split between them is this design's choice.
module me_pe_array
  import me_pkg::*;
#(
  parameter int unsigned     NPE       = 8,
  parameter logic [NBLK-1:0] LANE_MASK = '1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   clr,
  input  pixel_t y,
  input  pix4_t  x_in,
  input  logic   x_in_valid,
  output pix4_t  x_out,
  output logic   x_out_valid,
  output sad4_t  sad [NPE]
);

  pix4_t x_chain [NPE+1];
  logic  v_chain [NPE+1];

  assign x_chain[0] = x_in;
  assign v_chain[0] = x_in_valid;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    me_pe4 #(.LANE_MASK(LANE_MASK)) u_pe (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .clr        (clr),
      .y          (y),
      .x_in       (x_chain[p]),
      .x_in_valid (v_chain[p]),
      .x_out      (x_chain[p+1]),
      .x_out_valid(v_chain[p+1]),
      .sad        (sad[p])
    );
  end

  assign x_out       = x_chain[NPE];
  assign x_out_valid = v_chain[NPE];

endmodule
