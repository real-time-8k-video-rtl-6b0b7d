// vq_fpga_tb: self-checking test of one assessment channel.
// After a zero resolution word (which must be ignored) it sends a resolution
// word and sixteen frames of test-picture blocks, with random gaps on the
// input and random back-pressure on the output, and compares every result
// word (InterSum, IntraSum, interlace count, frame number) with the reference
// of vq_tb_pkg. A final phase with no gaps and no back-pressure checks one
// microblock per clock: a frame of N microblocks takes N cycles and its
// result is valid one cycle after its last word.
module vq_fpga_tb;
  import vq_pkg::*;
  import vq_tb_pkg::*;

  localparam int unsigned W = 48, H = 32;            // 6 x 4 blocks
  localparam int unsigned NMB = W * H / 16;          // 96 microblocks

  logic  clk = 0, rst_n = 0;
  word_t in_data = '0, out_data;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic  configured, frame_done;
  int    checks = 0, failures = 0, stalls = 0;
  int    gap_pct = 20, bp_pct = 40;
  vq_result_t exp_q[$];

  vq_fpga dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Offer one word; returns right after the clock edge that takes it and
  // leaves in_valid high, so consecutive calls send back to back.
  task automatic send(word_t w);
    @(negedge clk);
    while ($urandom % 100 < gap_pct) begin
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
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic send_frame(int unsigned seed, int unsigned fidx);
    block8_t b;
    vq_result_t e;
    int unsigned di, de;
    e = '0;
    e.frame_idx = fidx;
    for (int by = 0; by < H / 8; by++)
      for (int bx = 0; bx < W / 8; bx++) begin
        get_block(seed, bx, by, b);
        for (int q = 0; q < 4; q++) begin
          ref_blockiness(b, q, di, de);
          e.intra_sum += di;
          e.inter_sum += de;
          e.interlace += ref_interlace(b, q);
          send(pack_mb(b, q));
        end
      end
    exp_q.push_back(e);
  endtask

  // Output side: random back-pressure and result check.
  always @(negedge clk) out_ready <= ($urandom % 100) >= bp_pct;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    vq_result_t got, e;
    got = vq_result_t'(out_data);
    if (exp_q.size() == 0) begin
      check(0, "unexpected result");
    end else begin
      e = exp_q.pop_front();
      check(got == e, $sformatf("frame %0d: got %h exp %h", e.frame_idx, got, e));
    end
  end

  initial begin
    int t_first, t_last, t_res, nfr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(!configured, "not configured after reset");
    send(resolution_word(0, 1080));
    idle();
    check(!configured, "zero resolution ignored");
    send(resolution_word(W, H));
    idle();
    check(configured, "configured");
    nfr = 0;
    for (int f = 0; f < 16; f++) begin
      bp_pct = (f < 8) ? 40 : 90;
      send_frame(100 + f, nfr);
      nfr++;
    end
    // Full rate phase.
    idle();
    gap_pct = 0;
    bp_pct = 0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all results out before full-rate phase");
    fork
      send_frame(200, nfr);
      begin
        @(posedge clk iff (in_valid && in_ready));
        t_first = $time;
        @(posedge clk iff frame_done);
        t_last = $time;
        @(posedge clk iff out_valid);
        t_res = $time;
      end
    join
    idle();
    nfr++;
    check((t_last - t_first) / 10 == NMB - 1,
          $sformatf("%0d microblocks took %0d cycles", NMB, (t_last - t_first) / 10 + 1));
    check((t_res - t_last) / 10 == 1, "result one cycle after last microblock");
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all results delivered");
    check(stalls > 0, "back-pressure stalled the input");
    $display("input stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
