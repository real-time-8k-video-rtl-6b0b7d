// blockiness_unit: blockiness metric accumulator (IntraSum / InterSum).
//
// Frames reach the hardware in 8x8 blocks whose grid is shifted by one pixel
// right and down against the codec's 8x8 grid, so a codec block border runs
// inside every transferred block: between its columns 6 and 7 and between its
// rows 6 and 7. Every border sample pair therefore arrives in one word, and no
// line buffer is needed. For each sample pair across a border the unit adds
// |a - b| to InterSum, and for the pair just inside the border (columns 5/6 or
// rows 5/6) it adds the difference to IntraSum.
//
// Which pairs each microblock contributes depends on its place in the block:
//   top-left     : nothing
//   top-right    : horizontal pairs in all four rows (block rows 0..3)
//   bottom-left  : vertical pairs in all four columns (block columns 0..3)
//   bottom-right : horizontal pairs in its rows 0 and 3 (block rows 4, 7) and
//                  vertical pairs in its columns 0 and 3 (block columns 4, 7)
// So every microblock uses at most four intra and four inter terms, and one
// set of eight absolute-difference circuits and two adder trees serves all
// positions; a row mask and a column mask pick the terms.
//
// Interface: one microblock per cycle on mb_valid/mb_pix with its position
// mb_pos. intra_next/inter_next are the frame sums including the current
// word; the registers take them on each valid word, or clear when frame_last
// marks the frame's last word. No cycle of latency.
//
// Reset is synchronous and active low (rst_n), a choice of this design.
//
// The per-position sample pairs follow the document; the mask form, the
// 32-bit sums and the clear timing are this design's own choices.
module blockiness_unit
  import vq_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mb_valid,
  input  mb_pos_e mb_pos,
  input  mb_pix_t mb_pix,
  input  logic    frame_last,
  output sum_t    intra_next,
  output sum_t    inter_next
);

  localparam int unsigned DELTA_W = PIX_W + 3;  // sum of up to 8 differences

  logic [MB_DIM-1:0] row_en;  // rows whose horizontal pairs are used
  logic [MB_DIM-1:0] col_en;  // columns whose vertical pairs are used
  logic [DELTA_W-1:0] intra_d, inter_d;
  sum_t intra_q, inter_q;

  always_comb begin
    unique case (mb_pos)
      MB_TR:   begin row_en = 4'b1111; col_en = 4'b0000; end
      MB_BL:   begin row_en = 4'b0000; col_en = 4'b1111; end
      MB_BR:   begin row_en = 4'b1001; col_en = 4'b1001; end
      default: begin row_en = 4'b0000; col_en = 4'b0000; end
    endcase
  end

  // Horizontal pairs: border between microblock columns 2 and 3.
  // Vertical pairs:   border between microblock rows 2 and 3.
  always_comb begin
    intra_d = '0;
    inter_d = '0;
    for (int i = 0; i < MB_DIM; i++) begin
      if (row_en[i]) begin
        intra_d += DELTA_W'(abs_diff(mb_at(mb_pix, i, 2), mb_at(mb_pix, i, 1)));
        inter_d += DELTA_W'(abs_diff(mb_at(mb_pix, i, 2), mb_at(mb_pix, i, 3)));
      end
      if (col_en[i]) begin
        intra_d += DELTA_W'(abs_diff(mb_at(mb_pix, 2, i), mb_at(mb_pix, 1, i)));
        inter_d += DELTA_W'(abs_diff(mb_at(mb_pix, 2, i), mb_at(mb_pix, 3, i)));
      end
    end
    intra_next = intra_q + (mb_valid ? sum_t'(intra_d) : '0);
    inter_next = inter_q + (mb_valid ? sum_t'(inter_d) : '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      intra_q <= '0;
      inter_q <= '0;
    end else if (mb_valid) begin
      intra_q <= frame_last ? '0 : intra_next;
      inter_q <= frame_last ? '0 : inter_next;
    end
  end

endmodule
