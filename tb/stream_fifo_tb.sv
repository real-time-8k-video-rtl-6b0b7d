// stream_fifo_tb: self-checking test of the stream buffer.
// Random valid on the write side and random ready on the read side, with a
// queue as the reference: every word must come out once, in order, intact.
// Checks that the buffer fills up and runs empty, that wr_ready drops exactly
// when DEPTH words are held, and that with both sides always on it moves one
// word per clock after a one-cycle fill latency.
module stream_fifo_tb;
  localparam int unsigned WIDTH = 128;
  localparam int unsigned DEPTH = 8;

  logic             clk = 0, rst_n = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic             wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  int               checks = 0, failures = 0;
  int               full_seen = 0, empty_seen = 0;
  logic [WIDTH-1:0] model[$];
  int               wvalid_pct = 50, rready_pct = 50;

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  // Scoreboard at each clock edge.
  always @(posedge clk) if (rst_n) begin
    check(wr_ready == (model.size() < DEPTH), "wr_ready vs occupancy");
    check(rd_valid == (model.size() > 0), "rd_valid vs occupancy");
    if (model.size() == DEPTH) full_seen++;
    if (model.size() == 0) empty_seen++;
    if (rd_valid && rd_ready) begin
      check(model.size() > 0 && rd_data == model[0], "read data");
      void'(model.pop_front());
    end
    if (wr_valid && wr_ready) model.push_back(wr_data);
  end

  // Drivers change inputs after the edge.
  always @(negedge clk) if (rst_n) begin
    if (!(wr_valid && !wr_ready) || $urandom % 2 == 0) begin
      wr_valid <= ($urandom % 100) < wvalid_pct;
      wr_data  <= {$urandom, $urandom, $urandom, $urandom};
    end
    rd_ready <= ($urandom % 100) < rready_pct;
  end

  initial begin
    int t0, n;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wvalid_pct = 80; rready_pct = 30; repeat (3000) @(posedge clk);
    wvalid_pct = 30; rready_pct = 80; repeat (3000) @(posedge clk);
    wvalid_pct = 60; rready_pct = 60; repeat (3000) @(posedge clk);
    // drain, then measure rate with both sides always on
    wvalid_pct = 0; rready_pct = 100; repeat (20) @(posedge clk);
    check(model.size() == 0, "drained");
    wvalid_pct = 100; rready_pct = 100;
    @(posedge clk);
    t0 = $time;
    n = 0;
    repeat (200) begin
      @(posedge clk);
      if (rd_valid && rd_ready) n++;
    end
    check(n >= 198, $sformatf("rate: %0d words in 200 cycles", n));
    check(full_seen > 0 && empty_seen > 0, "full and empty reached");
    $display("cycles full %0d empty %0d", full_seen, empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
