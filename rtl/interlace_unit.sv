// interlace_unit: interlace detector and per-frame counter.
//
// A 4x4 microblock is interlaced when, in every one of its four columns, the
// luminance alternates from row to row: rows 0 and 2 are both brighter than
// row 1 and row 2 is brighter than row 3, or all of these comparisons go the
// other way. That is three comparisons per column, twelve per polarity, all of
// which must hold; equal neighbours break the pattern in both polarities.
// Every interlaced microblock adds one to a 32-bit frame counter.
//
// Interface: one microblock per cycle on mb_valid/mb_pix. mb_interlaced flags
// the current word combinationally. count_next is the frame count including
// the current word; the register takes it on each valid word, or returns to
// zero when frame_last marks the frame's last word, so a controller latches
// count_next in that cycle as the frame result. No cycle of latency.
//
// Reset is synchronous and active low (rst_n), a choice of this design.
//
// The comparison set and the counter follow the document; the strict
// comparisons in both polarities and the clear-on-last timing are this
// design's reading of it.
module interlace_unit
  import vq_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mb_valid,
  input  mb_pix_t mb_pix,
  input  logic    frame_last,
  output logic    mb_interlaced,
  output sum_t    count_next
);

  logic [MB_DIM-1:0] col_hi;  // column follows bright-dark-bright-dark
  logic [MB_DIM-1:0] col_lo;  // column follows dark-bright-dark-bright
  sum_t              count_q;

  always_comb begin
    for (int c = 0; c < MB_DIM; c++) begin
      col_hi[c] = (mb_at(mb_pix, 0, c) > mb_at(mb_pix, 1, c)) &&
                  (mb_at(mb_pix, 2, c) > mb_at(mb_pix, 1, c)) &&
                  (mb_at(mb_pix, 2, c) > mb_at(mb_pix, 3, c));
      col_lo[c] = (mb_at(mb_pix, 0, c) < mb_at(mb_pix, 1, c)) &&
                  (mb_at(mb_pix, 2, c) < mb_at(mb_pix, 1, c)) &&
                  (mb_at(mb_pix, 2, c) < mb_at(mb_pix, 3, c));
    end
    mb_interlaced = (&col_hi) || (&col_lo);
    count_next    = count_q + sum_t'(mb_valid && mb_interlaced);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      count_q <= '0;
    else if (mb_valid)
      count_q <= frame_last ? '0 : count_next;
  end

endmodule
