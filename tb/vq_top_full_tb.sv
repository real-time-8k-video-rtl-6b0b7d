// vq_top_full_tb: the four-channel accelerator at its default parameters on
// the video resolutions of the evaluation, at full stream rate.
//
// Run 1: channel 0 assesses one 8K frame (8192x4096), channel 1 two 4K frames
// (4096x2048), channel 2 four Full HD frames (1920x1080) and channel 3 ten
// VGA frames (640x480), all at once. Run 2, after a reset, gives every channel
// three QVGA frames (320x240). Every result word is checked against the
// reference model, and every frame must take exactly width*height/16 clock
// cycles, one microblock per clock with no gaps and no back-pressure.
module vq_top_full_tb;
  import vq_pkg::*;
  import vq_tb_pkg::*;

  localparam int unsigned N = 4;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][WORD_W-1:0] in_data, out_data;
  logic [N-1:0] in_valid, in_ready, out_valid, out_ready, configured, frame_done;
  int checks = 0, failures = 0;

  vq_top dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_ag
    vq_stream_agent u_ag (
      .clk(clk), .rst_n(rst_n),
      .in_data(in_data[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .out_data(out_data[i]), .out_valid(out_valid[i]), .out_ready(out_ready[i]),
      .frame_done(frame_done[i])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2500000) @(posedge clk);
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

  int results = 0, rate = 0;
  longint c0;

  task automatic tally();
    results = g_ag[0].u_ag.results + g_ag[1].u_ag.results + g_ag[2].u_ag.results + g_ag[3].u_ag.results;
    rate = g_ag[0].u_ag.rate_checks + g_ag[1].u_ag.rate_checks +
           g_ag[2].u_ag.rate_checks + g_ag[3].u_ag.rate_checks;
  endtask

  initial begin
    g_ag[0].u_ag.full_rate = 1;
    g_ag[1].u_ag.full_rate = 1;
    g_ag[2].u_ag.full_rate = 1;
    g_ag[3].u_ag.full_rate = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    c0 = g_ag[0].u_ag.cycle;
    fork
      g_ag[0].u_ag.run(8192, 4096, 1, 10);
      g_ag[1].u_ag.run(4096, 2048, 2, 20);
      g_ag[2].u_ag.run(1920, 1080, 4, 30);
      g_ag[3].u_ag.run(640, 480, 10, 40);
    join
    fork
      g_ag[0].u_ag.drain(100);
      g_ag[1].u_ag.drain(100);
      g_ag[2].u_ag.drain(100);
      g_ag[3].u_ag.drain(100);
    join
    $display("run 1: %0d cycles; 8K frame = %0d microblocks = %0d cycles per channel",
             g_ag[0].u_ag.cycle - c0, 8192 * 4096 / 16, 8192 * 4096 / 16);
    tally();
    check(results == 1 + 2 + 4 + 10, $sformatf("run 1 results %0d", results));
    check(rate == 1 + 2 + 4 + 10, $sformatf("run 1 rate checks %0d", rate));

    @(negedge clk);
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    fork
      g_ag[0].u_ag.run(320, 240, 3, 50);
      g_ag[1].u_ag.run(320, 240, 3, 60);
      g_ag[2].u_ag.run(320, 240, 3, 70);
      g_ag[3].u_ag.run(320, 240, 3, 80);
    join
    fork
      g_ag[0].u_ag.drain(100);
      g_ag[1].u_ag.drain(100);
      g_ag[2].u_ag.drain(100);
      g_ag[3].u_ag.drain(100);
    join
    tally();
    check(results == 17 + 12, $sformatf("results %0d", results));
    check(rate == 17 + 12, $sformatf("rate checks %0d", rate));
    checks += g_ag[0].u_ag.checks + g_ag[1].u_ag.checks + g_ag[2].u_ag.checks + g_ag[3].u_ag.checks;
    failures += g_ag[0].u_ag.failures + g_ag[1].u_ag.failures +
                g_ag[2].u_ag.failures + g_ag[3].u_ag.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
