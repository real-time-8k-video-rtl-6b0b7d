// interlace_unit_tb: self-checking test of the interlace detector/counter.
// Drives microblocks from test pictures rich in interlaced, near-miss and
// flat tiles, plus idle cycles, and compares the per-tile flag and the frame
// count with the geometric reference of vq_tb_pkg. Frames of random length
// check that the count restarts after frame_last.
module interlace_unit_tb;
  import vq_pkg::*;
  import vq_tb_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    mb_valid = 0, frame_last = 0;
  mb_pix_t mb_pix = '0;
  logic    mb_interlaced;
  sum_t    count_next;
  int      checks = 0, failures = 0, hits = 0;

  interlace_unit dut (.*);

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
    int unsigned exp_count, frame_len, n;
    bit exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_count = 0;
    n = 0;
    frame_len = 5 + $urandom % 20;
    for (int blk = 0; blk < 3000; blk++) begin
      get_block(3, blk % 97, blk / 97, b);
      for (int q = 0; q < 4; q++) begin
        // random idle cycle
        if ($urandom % 4 == 0) begin
          @(negedge clk);
          mb_valid = 0;
          mb_pix = mb_pix_t'({$urandom, $urandom, $urandom, $urandom});
          frame_last = $urandom % 2;
          #1 check(count_next == exp_count, "idle count");
          @(posedge clk);
        end
        @(negedge clk);
        exp = ref_interlace(b, q);
        mb_valid = 1;
        mb_pix = mb_pix_t'(pack_mb(b, q));
        n++;
        frame_last = (n == frame_len);
        exp_count += exp;
        hits += exp;
        #1;
        check(mb_interlaced == exp, $sformatf("flag blk %0d q %0d", blk, q));
        check(count_next == exp_count, $sformatf("count blk %0d q %0d exp %0d got %0d",
                                                 blk, q, exp_count, count_next));
        if (frame_last) begin
          exp_count = 0;
          n = 0;
          frame_len = 1 + $urandom % 30;
        end
        @(posedge clk);
      end
    end
    @(negedge clk);
    mb_valid = 0;
    check(hits > 50, "interlaced tiles exercised");
    $display("interlaced tiles seen: %0d", hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
