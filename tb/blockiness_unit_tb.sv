// blockiness_unit_tb: self-checking test of the IntraSum/InterSum unit.
// Streams 8x8 blocks of test pictures as four microblocks each (TL, TR, BL,
// BR) with random idle cycles, and compares the running sums after every word
// with sums built from the block's 2-D geometry (vq_tb_pkg). Frames of random
// length check that both sums restart after frame_last.
module blockiness_unit_tb;
  import vq_pkg::*;
  import vq_tb_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    mb_valid = 0, frame_last = 0;
  mb_pos_e mb_pos = MB_TL;
  mb_pix_t mb_pix = '0;
  sum_t    intra_next, inter_next;
  int      checks = 0, failures = 0;

  blockiness_unit dut (.*);

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

  initial begin
    block8_t b;
    int unsigned exp_intra, exp_inter, di, de, frame_blocks, nb, ext;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_intra = 0;
    exp_inter = 0;
    nb = 0;
    frame_blocks = 1 + $urandom % 8;
    for (int blk = 0; blk < 4000; blk++) begin
      get_block(11, blk % 61, blk / 61, b);
      nb++;
      for (int q = 0; q < 4; q++) begin
        if ($urandom % 5 == 0) begin
          @(negedge clk);
          mb_valid = 0;
          mb_pos = mb_pos_e'(q);
          mb_pix = mb_pix_t'({$urandom, $urandom, $urandom, $urandom});
          frame_last = 1;
          #1;
          check(intra_next == exp_intra && inter_next == exp_inter, "idle sums");
          @(posedge clk);
        end
        @(negedge clk);
        ref_blockiness(b, q, di, de);
        exp_intra += di;
        exp_inter += de;
        mb_valid = 1;
        mb_pos = mb_pos_e'(q);
        mb_pix = mb_pix_t'(pack_mb(b, q));
        frame_last = (q == 3) && (nb == frame_blocks);
        #1;
        check(intra_next == exp_intra, $sformatf("intra blk %0d q %0d exp %0d got %0d",
                                                 blk, q, exp_intra, intra_next));
        check(inter_next == exp_inter, $sformatf("inter blk %0d q %0d exp %0d got %0d",
                                                 blk, q, exp_inter, inter_next));
        if (frame_last) begin
          exp_intra = 0;
          exp_inter = 0;
          nb = 0;
          frame_blocks = 1 + $urandom % 8;
        end
        @(posedge clk);
      end
    end
    // Largest per-word terms: alternating 0/255 columns and rows.
    @(negedge clk);
    frame_last = 0;
    ext = 0;
    for (int q = 0; q < 4; q++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          b[r][c] = ((r + c) % 2 == 0) ? 8'd0 : 8'd255;
      ref_blockiness(b, q, di, de);
      exp_intra += di;
      exp_inter += de;
      ext += di + de;
      mb_valid = 1;
      mb_pos = mb_pos_e'(q);
      mb_pix = mb_pix_t'(pack_mb(b, q));
      #1;
      check(intra_next == exp_intra && inter_next == exp_inter, "extreme sums");
      @(posedge clk);
      @(negedge clk);
    end
    check(ext == 24 * 255, "extreme reference");
    mb_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
