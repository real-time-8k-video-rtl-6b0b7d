// vq_top: four-channel video quality assessment accelerator.
//
// N_MODULES independent channels stand side by side, each fed by its own host
// stream: input stream buffer -> vq_fpga -> output stream buffer. Every
// channel takes its own resolution word and its own video, so four streams (or
// four parts of one stream) are assessed at once; the channels share nothing
// but the clock and reset. The host link and the software producer and
// consumer sit outside: their stream ends are this module's ports.
//
// Interface, per channel i: in_data[i]/in_valid[i]/in_ready[i] carry the
// resolution word and then 128-bit microblocks; out_data[i]/out_valid[i]/
// out_ready[i] return one vq_result_t word per frame. configured[i] is high
// once channel i holds a resolution; frame_done[i] pulses when it takes the
// last microblock of a frame.
//
// Timing: each channel takes one microblock per clock. A word written into an
// empty input buffer reaches vq_fpga one cycle later; a frame's result leaves
// the output buffer two cycles after the frame's last microblock enters
// vq_fpga.
//
// Four channels, 128-bit streams and the channel structure follow the
// document; the buffer depth is this design's own choice.
module vq_top
  import vq_pkg::*;
#(
  parameter int unsigned N_MODULES    = 4,
  parameter int unsigned STREAM_DEPTH = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [N_MODULES-1:0][WORD_W-1:0] in_data,
  input  logic [N_MODULES-1:0]             in_valid,
  output logic [N_MODULES-1:0]             in_ready,
  output logic [N_MODULES-1:0][WORD_W-1:0] out_data,
  output logic [N_MODULES-1:0]             out_valid,
  input  logic [N_MODULES-1:0]             out_ready,
  output logic [N_MODULES-1:0]             configured,
  output logic [N_MODULES-1:0]             frame_done
);

  for (genvar i = 0; i < N_MODULES; i++) begin : g_ch
    word_t mb_data, res_data;
    logic  mb_valid, mb_ready, res_valid, res_ready;

    stream_fifo #(.WIDTH(WORD_W), .DEPTH(STREAM_DEPTH)) u_in_stream (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_data (in_data[i]),
      .wr_valid(in_valid[i]),
      .wr_ready(in_ready[i]),
      .rd_data (mb_data),
      .rd_valid(mb_valid),
      .rd_ready(mb_ready)
    );

    vq_fpga u_vq (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_data   (mb_data),
      .in_valid  (mb_valid),
      .in_ready  (mb_ready),
      .out_data  (res_data),
      .out_valid (res_valid),
      .out_ready (res_ready),
      .configured(configured[i]),
      .frame_done(frame_done[i])
    );

    stream_fifo #(.WIDTH(WORD_W), .DEPTH(STREAM_DEPTH)) u_out_stream (
      .clk     (clk),
      .rst_n   (rst_n),
      .wr_data (res_data),
      .wr_valid(res_valid),
      .wr_ready(res_ready),
      .rd_data (out_data[i]),
      .rd_valid(out_valid[i]),
      .rd_ready(out_ready[i])
    );
  end

endmodule
