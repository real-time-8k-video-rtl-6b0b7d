// vq_top_tb: end-to-end test of the four-channel accelerator at small frame
// sizes (shallow stream buffers to provoke back-pressure).
//
// Phase 1: all four channels run at once, each with its own resolution and
// picture, with random input gaps and heavy random output back-pressure, so
// the output buffers fill, vq_fpga holds its input and the input buffers
// fill up to the host port. Phase 2: after a reset, the channels run again
// with no gaps and no back-pressure, and the agents check one microblock per
// clock. A zero resolution word is sent first on one channel and must be
// ignored. Counted mechanisms: host-port stalls, internal channel stalls,
// frame-end result/reset, frames with interlaced tiles, concurrent activity
// of all four channels, ignored resolution word, full-rate frames.
module vq_top_tb;
  import vq_pkg::*;
  import vq_tb_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][WORD_W-1:0] in_data, out_data;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready, configured, frame_done;
  int checks = 0, failures = 0;
  int inner_stalls = 0, all_busy = 0, frames_done = 0;

  vq_top #(.N_MODULES(N), .STREAM_DEPTH(4)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    vq_stream_agent u_ag (
      .clk(clk), .rst_n(rst_n),
      .in_data(in_data[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .out_data(out_data[i]), .out_valid(out_valid[i]), .out_ready(out_ready[i]),
      .frame_done(frame_done[i])
    );
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_ch[0].u_vq.in_valid && !dut.g_ch[0].u_vq.in_ready) inner_stalls++;
    if (dut.g_ch[1].u_vq.in_valid && !dut.g_ch[1].u_vq.in_ready) inner_stalls++;
    if (dut.g_ch[2].u_vq.in_valid && !dut.g_ch[2].u_vq.in_ready) inner_stalls++;
    if (dut.g_ch[3].u_vq.in_valid && !dut.g_ch[3].u_vq.in_ready) inner_stalls++;
    if (&(in_valid & in_ready)) all_busy++;
    frames_done += $countones(frame_done);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endfunction

  task automatic set_mode(int gap, int bp, bit full);
    g_ag[0].u_ag.gap_pct = gap; g_ag[0].u_ag.bp_pct = bp; g_ag[0].u_ag.full_rate = full;
    g_ag[1].u_ag.gap_pct = gap; g_ag[1].u_ag.bp_pct = bp; g_ag[1].u_ag.full_rate = full;
    g_ag[2].u_ag.gap_pct = gap; g_ag[2].u_ag.bp_pct = bp; g_ag[2].u_ag.full_rate = full;
    g_ag[3].u_ag.gap_pct = gap; g_ag[3].u_ag.bp_pct = bp; g_ag[3].u_ag.full_rate = full;
  endtask

  task automatic run_all(int unsigned seed);
    fork
      g_ag[0].u_ag.run(16, 8, 12, seed + 0);
      g_ag[1].u_ag.run(32, 16, 6, seed + 100);
      g_ag[2].u_ag.run(48, 24, 4, seed + 200);
      g_ag[3].u_ag.run(64, 8, 8, seed + 300);
    join
    fork
      g_ag[0].u_ag.drain(5000);
      g_ag[1].u_ag.drain(5000);
      g_ag[2].u_ag.drain(5000);
      g_ag[3].u_ag.drain(5000);
    join
  endtask

  int ignored = 0, host_stalls = 0, ilace = 0, results = 0, rate = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A zero-sized resolution word on channel 2 must leave it unconfigured.
    @(negedge clk);
    in_valid[2] = 1;
    in_data[2] = resolution_word(0, 0);
    @(negedge clk);
    in_valid[2] = 0;
    repeat (4) @(posedge clk);
    if (!configured[2]) ignored++;

    set_mode(10, 97, 0);
    run_all(1000);
    set_mode(0, 0, 1);
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    check(configured == '0, "reset clears configuration");
    run_all(2000);

    host_stalls = g_ag[0].u_ag.stalls + g_ag[1].u_ag.stalls + g_ag[2].u_ag.stalls + g_ag[3].u_ag.stalls;
    ilace = g_ag[0].u_ag.interlaced_frames + g_ag[1].u_ag.interlaced_frames +
            g_ag[2].u_ag.interlaced_frames + g_ag[3].u_ag.interlaced_frames;
    results = g_ag[0].u_ag.results + g_ag[1].u_ag.results + g_ag[2].u_ag.results + g_ag[3].u_ag.results;
    rate = g_ag[0].u_ag.rate_checks + g_ag[1].u_ag.rate_checks +
           g_ag[2].u_ag.rate_checks + g_ag[3].u_ag.rate_checks;
    checks += g_ag[0].u_ag.checks + g_ag[1].u_ag.checks + g_ag[2].u_ag.checks + g_ag[3].u_ag.checks;
    failures += g_ag[0].u_ag.failures + g_ag[1].u_ag.failures +
                g_ag[2].u_ag.failures + g_ag[3].u_ag.failures;

    $display("mechanisms: host stalls %0d, channel stalls %0d, frame ends %0d, results %0d,",
             host_stalls, inner_stalls, frames_done, results);
    $display("            interlaced frames %0d, all-four-busy cycles %0d, ignored header %0d, full-rate frames %0d",
             ilace, all_busy, ignored, rate);
    check(host_stalls > 0, "host-port stall happened");
    check(inner_stalls > 0, "channel stall happened");
    check(frames_done == 2 * (12 + 6 + 4 + 8), "frame ends");
    check(results == 2 * (12 + 6 + 4 + 8), "results received");
    check(ilace > 0, "interlaced tiles seen");
    check(all_busy > 0, "channels ran concurrently");
    check(ignored == 1, "zero resolution ignored");
    check(rate == 12 + 6 + 4 + 8, "full-rate frames checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
