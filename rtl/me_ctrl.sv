// me_ctrl: sequencer of the four-way reuse motion estimator.
//
// Walks the frame quad by quad, 2N x 2N pixels (four N x N current blocks)
// at a time, going down one column of quads before moving right to the next
// column, as in the document's scan (for each column, for each row). For
// each quad it runs these phases:
//   ST_CUR    4N^2 cycles: read the quad's current pixels into the buffer.
//   ST_CURN   2N^2 cycles, not in the last column: read the left half (blocks
//             A and C) of the quad one column to the right, for the behind
//             PE array.
//   ST_SRCH   read new search rows, W pixels each: all H for the first quad
//             of a column, otherwise only the 2N rows the window moved down
//             by (the other U+D rows are kept in the search register).
//   ST_SETTLE 1 cycle: the last read lands.
//   ST_PASS / ST_GAP, PD = U+D+N+1 times: one pass per vertical quad offset
//             dy = -U .. D+N. A pass streams N search rows (window rows
//             dy+U .. dy+U+N-1) of W pixels through the PE arrays, together
//             with the matching current rows (current column q valid for
//             q < N; next quad's column q-OFF valid for OFF <= q < OFF+N),
//             then one gap cycle.
//   ST_DRAIN  NPE+1 cycles: the last pass's sums leave the result register.
//   ST_OUT    1 cycle: the four block results are valid (res_valid); the
//             behind comparators' partial solutions are pushed (ps_push).
// The partial solutions for this quad's blocks A and C are popped when its
// comparators are cleared (ps_pop, not in the first column).
// Cycles per quad = 4N^2 + (2N^2 unless last column) + rows*W + 1
//                   + PD*(N*W+1) + NPE + 2, rows = H or 2N.
//
// Window and arrays: the window starts S = min(R-N+1, N-L) columns right of
// the quad and is W = 2N+R-S wide. The front array covers quad offsets
// dx = S..R+N (NPEF PEs), the behind array the next quad's offsets
// -L..R-N for its blocks A and C (NPEB PEs), fed OFF = 2N-L-S columns late.
// The configuration must satisfy S <= 0 (R < N or L >= N) and L+R >= N.
//
// Datapath strobes (pe_en, pe_clr, rsr_load) are registered here so they line
// up with the PE arrays' input register stage: the PE sees search column q
// one cycle after the controller addresses it, and the pass's sums are
// complete two cycles after its last column was addressed.
// The scan order and the carrying of partial solutions to the next column
// follow the document; the phase structure and offsets are this design's.
module me_ctrl
  import me_pkg::*;
#(
  parameter int unsigned N  = 4,
  parameter int unsigned L  = 4,
  parameter int unsigned R  = 3,
  parameter int unsigned U  = 4,
  parameter int unsigned D  = 3,
  parameter int unsigned FW = 176,
  parameter int unsigned FH = 144,
  localparam int          S    = ((int'(R) - int'(N) + 1) < (int'(N) - int'(L))) ? (int'(R) - int'(N) + 1) : (int'(N) - int'(L)),
  localparam int unsigned H    = 2*N + U + D,
  localparam int unsigned W    = unsigned'(2*int'(N) + int'(R) - S),
  localparam int unsigned PD   = U + D + N + 1,
  localparam int unsigned NPEF = unsigned'(int'(R) + int'(N) - S + 1),
  localparam int unsigned NPEB = unsigned'(int'(L) + int'(R) - int'(N) + 1),
  localparam int unsigned NPE  = NPEF + NPEB,
  localparam int unsigned OFF  = unsigned'(2*int'(N) - int'(L) - S)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  // quad position (top-left pixel)
  output logic [15:0]            qx,
  output logic [15:0]            qy,
  output logic                   first_col,
  // current-data load
  output logic                   cur_rd_en,
  output logic                   cur_next,     // reading the next column's quad
  output logic [$clog2(2*N)-1:0] cur_row,
  output logic [$clog2(2*N)-1:0] cur_col,
  output logic                   cur_wr_en,    // one cycle after cur_rd_en
  output logic                   cur_wr_next,
  output logic [$clog2(2*N)-1:0] cur_wr_row,
  output logic [$clog2(2*N)-1:0] cur_wr_col,
  // search-data load
  output logic                   srch_fetch,   // address a window pixel
  output logic [$clog2(H)-1:0]   win_row,
  output logic [$clog2(W)-1:0]   win_col,
  output logic                   srch_wr_en,   // one cycle after srch_fetch
  output logic [$clog2(W)-1:0]   srch_wr_col,
  output logic                   srch_wr_last,
  // pass streaming
  output logic [$clog2(H)-1:0]   rd_row,       // search register row
  output logic [$clog2(W)-1:0]   rd_col,       // search register column
  output logic [$clog2(N)-1:0]   cb_row,       // current buffer row
  output logic [$clog2(N)-1:0]   cb_col,       // current buffer column
  output logic [$clog2(N)-1:0]   cbn_col,      // next-quad buffer column
  output logic                   x_valid,      // current pixel valid (q < N)
  output logic                   xn_valid,     // next-quad pixel valid
  output logic                   pe_en,
  output logic                   pe_clr,
  output logic                   rsr_load,
  output mv_t                    rsr_dy,
  output logic                   cmp_clear,
  output logic                   ps_pop,
  output logic                   ps_push,
  output logic                   res_valid
);

  if (S > 0) begin : g_bad_s
    $error("me_ctrl: needs R < N or L >= N");
  end
  if (int'(L) + int'(R) < int'(N)) begin : g_bad_lr
    $error("me_ctrl: needs L+R >= N");
  end

  me_state_e                  state;
  logic                       first_col_quad, last_col;
  logic [$clog2(2*N)-1:0]     cr, cc;
  logic [$clog2(H)-1:0]       wr;
  logic [$clog2(W)-1:0]       wc;
  logic [$clog2(PD)-1:0]      pd;
  logic [$clog2(N)-1:0]       pr;
  logic [$clog2(W)-1:0]       pq;
  logic [$clog2(NPE+2)-1:0]   dcnt;

  logic pass_last;
  logic en_d, clr_d, last_d, last_dd;
  mv_t  dy_d, dy_dd;

  assign last_col  = (32'(qx) + 2*N >= FW);
  assign first_col = (qx == '0);
  assign pass_last = (state == ST_PASS) && (pr == $clog2(N)'(N-1)) && (pq == $clog2(W)'(W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= ST_IDLE;
      qx             <= '0;
      qy             <= '0;
      first_col_quad <= 1'b1;
      cr <= '0; cc <= '0; wr <= '0; wc <= '0;
      pd <= '0; pr <= '0; pq <= '0; dcnt <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          state <= ST_CUR;
          qx <= '0; qy <= '0; first_col_quad <= 1'b1;
          cr <= '0; cc <= '0;
        end
        ST_CUR: begin
          if (cc == $clog2(2*N)'(2*N-1)) begin
            cc <= '0;
            if (cr == $clog2(2*N)'(2*N-1)) begin
              cr <= '0;
              if (last_col) begin
                state <= ST_SRCH;
                wr    <= first_col_quad ? '0 : $clog2(H)'(H - 2*N);
                wc    <= '0;
              end else state <= ST_CURN;
            end else cr <= cr + 1'b1;
          end else cc <= cc + 1'b1;
        end
        ST_CURN: begin
          if (cc == $clog2(2*N)'(N-1)) begin
            cc <= '0;
            if (cr == $clog2(2*N)'(2*N-1)) begin
              cr    <= '0;
              state <= ST_SRCH;
              wr    <= first_col_quad ? '0 : $clog2(H)'(H - 2*N);
              wc    <= '0;
            end else cr <= cr + 1'b1;
          end else cc <= cc + 1'b1;
        end
        ST_SRCH: begin
          if (wc == $clog2(W)'(W-1)) begin
            wc <= '0;
            if (wr == $clog2(H)'(H-1)) state <= ST_SETTLE;
            else wr <= wr + 1'b1;
          end else wc <= wc + 1'b1;
        end
        ST_SETTLE: begin
          state <= ST_PASS;
          pd <= '0; pr <= '0; pq <= '0;
        end
        ST_PASS: begin
          if (pq == $clog2(W)'(W-1)) begin
            pq <= '0;
            if (pr == $clog2(N)'(N-1)) begin
              pr    <= '0;
              state <= ST_GAP;
            end else pr <= pr + 1'b1;
          end else pq <= pq + 1'b1;
        end
        ST_GAP: begin
          if (pd == $clog2(PD)'(PD-1)) begin
            state <= ST_DRAIN;
            dcnt  <= '0;
          end else begin
            pd    <= pd + 1'b1;
            state <= ST_PASS;
          end
        end
        ST_DRAIN: begin
          if (dcnt == $clog2(NPE+2)'(NPE)) state <= ST_OUT;
          else dcnt <= dcnt + 1'b1;
        end
        ST_OUT: begin
          first_col_quad <= 1'b0;
          cr <= '0; cc <= '0;
          if (32'(qy) + 2*N >= FH) begin
            qy <= '0;
            first_col_quad <= 1'b1;
            if (last_col) begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end else begin
              qx    <= qx + 16'(2*N);
              state <= ST_CUR;
            end
          end else begin
            qy    <= qy + 16'(2*N);
            state <= ST_CUR;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Pipeline of strobes for the memory write-back and the PE arrays.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_wr_en <= 1'b0; cur_wr_next <= 1'b0; cur_wr_row <= '0; cur_wr_col <= '0;
      srch_wr_en <= 1'b0; srch_wr_col <= '0; srch_wr_last <= 1'b0;
      en_d <= 1'b0; clr_d <= 1'b0; last_d <= 1'b0; last_dd <= 1'b0;
      dy_d <= '0; dy_dd <= '0;
    end else begin
      cur_wr_en    <= (state == ST_CUR) || (state == ST_CURN);
      cur_wr_next  <= (state == ST_CURN);
      cur_wr_row   <= cr;
      cur_wr_col   <= cc;
      srch_wr_en   <= (state == ST_SRCH);
      srch_wr_col  <= wc;
      srch_wr_last <= (state == ST_SRCH) && (wc == $clog2(W)'(W-1));
      en_d    <= (state == ST_PASS);
      clr_d   <= (state == ST_PASS) && (pr == '0) && (pq == '0);
      last_d  <= pass_last;
      last_dd <= last_d;
      dy_d    <= mv_t'(int'(pd) - int'(U));
      dy_dd   <= dy_d;
    end
  end

  assign busy       = (state != ST_IDLE);
  assign cur_rd_en  = (state == ST_CUR) || (state == ST_CURN);
  assign cur_next   = (state == ST_CURN);
  assign cur_row    = cr;
  assign cur_col    = cc;
  assign srch_fetch = (state == ST_SRCH);
  assign win_row    = wr;
  assign win_col    = wc;

  assign rd_row   = $clog2(H)'(int'(pd) + int'(pr));
  assign rd_col   = pq;
  assign cb_row   = pr;
  assign cb_col   = $clog2(N)'(pq);
  assign cbn_col  = $clog2(N)'(int'(pq) - int'(OFF));
  assign x_valid  = (state == ST_PASS) && (int'(pq) < int'(N));
  assign xn_valid = (state == ST_PASS) && (int'(pq) >= int'(OFF)) && (int'(pq) < int'(OFF + N));

  assign pe_en     = en_d;
  assign pe_clr    = clr_d;
  assign rsr_load  = last_dd;
  assign rsr_dy    = dy_dd;
  assign cmp_clear = (state == ST_CUR) && (cr == '0) && (cc == '0);
  assign ps_pop    = cmp_clear && !first_col;
  assign ps_push   = (state == ST_OUT) && !last_col;
  assign res_valid = (state == ST_OUT);

endmodule
