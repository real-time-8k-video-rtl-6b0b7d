// vq_fpga: one video quality assessment channel (the vqFPGA process).
//
// The channel reads a 128-bit input stream. The first word after reset holds
// the frame resolution; from then on every word is one 4x4 microblock and the
// channel runs forever, frame after frame. Each word is split into its sixteen
// 8-bit samples and fed to the blockiness and interlace units in the same
// cycle. A microblock counter gives each word its place inside its 8x8 block
// (the counter's two low bits) and finds the frame's last word
// (width*height/16 words per frame). On that word the channel latches the
// frame's InterSum, IntraSum and interlace count, plus a frame number, into
// one result word for the output stream, and the units clear their sums.
//
// Interface: valid/ready streams on both sides, a word moves when valid and
// ready are both high. The result register is a single pipeline stage: it
// leaves at most one result waiting, and a full register whose result is not
// taken holds the input (in_ready low) until out_ready returns. A resolution
// word that gives fewer than 16 pixels is ignored.
//
// Timing: one microblock per clock while the output is not blocked; the
// result of a frame is valid in the cycle after its last microblock.
//
// Reset is synchronous and active low (rst_n), a choice of this design.
//
// The stream widths, the resolution-first protocol, the per-frame reset and
// the two metrics follow the document. The header and result layouts, the
// handshake and the fixed 16-bit width/height fields are this design's own.
module vq_fpga
  import vq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // input stream (from the producer)
  input  word_t in_data,
  input  logic  in_valid,
  output logic  in_ready,
  // output stream (to the consumer)
  output word_t out_data,
  output logic  out_valid,
  input  logic  out_ready,
  // status
  output logic  configured,   // resolution word received
  output logic  frame_done    // pulse: last microblock of a frame taken
);

  typedef enum logic { S_RES, S_RUN } state_e;

  state_e      state_q;
  sum_t        mb_total_q;   // microblocks per frame
  sum_t        mb_cnt_q;     // microblocks of the current frame taken
  sum_t        frame_idx_q;
  vq_result_t  result_q;
  logic        res_valid_q;

  resolution_t res_in;
  sum_t        mb_total_in;
  logic        mb_fire, last_mb;
  mb_pos_e     mb_pos;
  mb_pix_t     mb_pix;
  sum_t        intra_next, inter_next, ilace_next;

  assign res_in      = resolution_t'(in_data[2*DIM_W-1:0]);
  assign mb_total_in = (sum_t'(res_in.width) * sum_t'(res_in.height)) >> 4;

  assign in_ready = (state_q == S_RES) || !res_valid_q || out_ready;
  assign mb_fire  = (state_q == S_RUN) && in_valid && in_ready;
  assign last_mb  = (mb_cnt_q == mb_total_q - 1'b1);
  assign mb_pos   = mb_pos_e'(mb_cnt_q[1:0]);
  assign mb_pix   = mb_pix_t'(in_data);

  blockiness_unit u_blockiness (
    .clk       (clk),
    .rst_n     (rst_n),
    .mb_valid  (mb_fire),
    .mb_pos    (mb_pos),
    .mb_pix    (mb_pix),
    .frame_last(last_mb),
    .intra_next(intra_next),
    .inter_next(inter_next)
  );

  interlace_unit u_interlace (
    .clk          (clk),
    .rst_n        (rst_n),
    .mb_valid     (mb_fire),
    .mb_pix       (mb_pix),
    .frame_last   (last_mb),
    .mb_interlaced(),
    .count_next   (ilace_next)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_RES;
      mb_total_q  <= '0;
      mb_cnt_q    <= '0;
      frame_idx_q <= '0;
      result_q    <= '0;
      res_valid_q <= 1'b0;
    end else begin
      if (out_valid && out_ready)
        res_valid_q <= 1'b0;
      unique case (state_q)
        S_RES: begin
          if (in_valid && mb_total_in != '0) begin
            mb_total_q <= mb_total_in;
            mb_cnt_q   <= '0;
            state_q    <= S_RUN;
          end
        end
        S_RUN: begin
          if (mb_fire) begin
            if (last_mb) begin
              mb_cnt_q    <= '0;
              frame_idx_q <= frame_idx_q + 1'b1;
              result_q    <= '{frame_idx: frame_idx_q, interlace: ilace_next,
                               intra_sum: intra_next, inter_sum: inter_next};
              res_valid_q <= 1'b1;
            end else begin
              mb_cnt_q <= mb_cnt_q + 1'b1;
            end
          end
        end
        default: state_q <= S_RES;
      endcase
    end
  end

  assign out_data   = word_t'(result_q);
  assign out_valid  = res_valid_q;
  assign configured = (state_q == S_RUN);
  assign frame_done = mb_fire && last_mb;

  // A result offered and not taken stays put.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
