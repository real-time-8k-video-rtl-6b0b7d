// vq_stream_agent: host-side model of one channel's producer and consumer.
//
// run(w, h, frames, seed) plays the producer: it sends the resolution word,
// then every frame as 8x8 blocks in raster order, each block as its four
// microblocks (TL, TR, BL, BR), with random gaps of gap_pct percent. For each
// frame it queues the expected result computed by vq_tb_pkg. The consumer
// side takes result words with random back-pressure (bp_pct percent of
// cycles not ready) and checks each against the queue. When gap_pct and
// bp_pct are both zero (full_rate set) it also checks that consecutive
// frames end exactly one frame of microblocks apart, i.e. one microblock per
// clock, and that the first frame ends w*h/16 cycles after its first word
// enters the channel.
module vq_stream_agent
  import vq_pkg::*;
  import vq_tb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  output word_t in_data,
  output logic  in_valid,
  input  logic  in_ready,
  input  word_t out_data,
  input  logic  out_valid,
  output logic  out_ready,
  input  logic  frame_done
);

  int   gap_pct = 0, bp_pct = 0;
  bit   full_rate = 0;
  int   checks = 0, failures = 0;
  int   stalls = 0, results = 0, interlaced_frames = 0, rate_checks = 0;
  int unsigned nmb = 0, words_sent = 0;
  longint t_first = -1, t_prev_done = -1, cycle = 0;
  vq_result_t exp_q[$];

  initial begin
    in_data = '0;
    in_valid = 0;
    out_ready = 0;
  end

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %m: %s", what);
    end
  endfunction

  task automatic send(word_t w);
    @(negedge clk);
    while (gap_pct != 0 && $urandom % 100 < gap_pct) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_data = w;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) begin
      stalls++;
      @(posedge clk);
    end
    if (words_sent == 1) t_first = cycle;
    words_sent++;
  endtask

  task automatic run(int unsigned w, int unsigned h, int unsigned frames, int unsigned seed);
    block8_t b;
    vq_result_t e;
    int unsigned di, de;
    nmb = w * h / 16;
    words_sent = 0;
    t_first = -1;
    t_prev_done = -1;
    send(resolution_word(w, h));
    for (int unsigned f = 0; f < frames; f++) begin
      e = '0;
      e.frame_idx = f;
      for (int unsigned by = 0; by < h / 8; by++)
        for (int unsigned bx = 0; bx < w / 8; bx++) begin
          get_block(seed + f, bx, by, b);
          for (int q = 0; q < 4; q++) begin
            ref_blockiness(b, q, di, de);
            e.intra_sum += di;
            e.inter_sum += de;
            e.interlace += ref_interlace(b, q);
            send(pack_mb(b, q));
          end
        end
      exp_q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  // Wait until every queued result has been taken.
  task automatic drain(int unsigned max_cycles);
    int unsigned n = 0;
    while (exp_q.size() != 0 && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    check(exp_q.size() == 0, "results outstanding after drain");
  endtask

  always @(negedge clk) out_ready <= (bp_pct == 0) || (($urandom % 100) >= bp_pct);

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      vq_result_t got, e;
      got = vq_result_t'(out_data);
      if (exp_q.size() == 0) begin
        check(0, "unexpected result word");
      end else begin
        e = exp_q.pop_front();
        check(got == e, $sformatf("frame %0d: got %h exp %h", e.frame_idx, got, e));
        results++;
        if (e.interlace != 0) interlaced_frames++;
      end
    end
    if (frame_done) begin
      if (full_rate) begin
        if (t_prev_done < 0)
          check(cycle - t_first == longint'(nmb),
                $sformatf("first frame ended %0d cycles after its first word, expected %0d",
                          cycle - t_first, nmb));
        else
          check(cycle - t_prev_done == longint'(nmb),
                $sformatf("frame took %0d cycles, expected %0d", cycle - t_prev_done, nmb));
        rate_checks++;
      end
      t_prev_done = cycle;
    end
  end

endmodule
