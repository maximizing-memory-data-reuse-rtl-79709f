// me_pe4: processing element with four subtractors (four-way reuse PE).
//
// One search pixel y is compared in the same cycle with four current pixels,
// one from each block of a 2x2 quad of current blocks, and the four absolute
// differences are added to four running sums. Sharing y between the four
// blocks is the four-way reuse idea: a search pixel fetched once serves the
// candidate at offset (dx,dy) of block A, (dx-N,dy) of B, (dx,dy-N) of C and
// (dx-N,dy-N) of D.
//
// The current pixels travel systolically: each PE registers x_in/x_in_valid
// and passes the registered copy on through x_out/x_out_valid, so PE p of an
// array sees the current pixel stream delayed by p+1 cycles. The search
// pixel y is broadcast (already registered by the caller, aligned with the
// register stage of the first PE).
//
// LANE_MASK leaves out subtractors a PE does not need (their sums stay 0);
// the behind array, which serves only the two left-hand blocks of the next
// column, uses two of the four.
//
// Timing: in a cycle with en=1 the sums become
//   sad[j] <= (clr ? 0 : sad[j]) + (x_valid ? |x[j] - y| : 0)
// where x is this PE's registered current pixel. With en=0 the sums hold, so
// the caller can read them. Reset clears the sums and the pixel register.
// The four-subtractor PE follows the document; the systolic current-pixel
// path and the clear/enable protocol are this design's choices.
module me_pe4
  import me_pkg::*;
#(
  parameter logic [NBLK-1:0] LANE_MASK = '1   // subtractors present (1 = used)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,          // accumulate this cycle
  input  logic   clr,         // start a new sum with this cycle's difference
  input  pixel_t y,           // broadcast search pixel
  input  pix4_t  x_in,        // current pixels from the previous PE (or the buffer)
  input  logic   x_in_valid,
  output pix4_t  x_out,       // registered current pixels, to the next PE
  output logic   x_out_valid,
  output sad4_t  sad          // four running SADs
);

  pix4_t x_q;
  logic  x_vq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q  <= '0;
      x_vq <= 1'b0;
    end else begin
      x_q  <= x_in;
      x_vq <= x_in_valid;
    end
  end

  assign x_out       = x_q;
  assign x_out_valid = x_vq;

  sad4_t absdiff;
  always_comb begin
    for (int j = 0; j < NBLK; j++) begin
      pixel_t d;
      d = (x_q[j] > y) ? (x_q[j] - y) : (y - x_q[j]);
      absdiff[j] = (x_vq && LANE_MASK[j]) ? sad_t'(d) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad <= '0;
    end else if (en) begin
      for (int j = 0; j < NBLK; j++)
        sad[j] <= (clr ? sad_t'(0) : sad[j]) + absdiff[j];
    end
  end

endmodule
