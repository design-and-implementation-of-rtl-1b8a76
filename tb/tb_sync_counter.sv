// tb_sync_counter: runs the synchronisation counter with a small N against a
// model of the downstream block that answers each released frame with a
// frame_done pulse a random number of cycles later. Checks that exactly N
// consecutive symbols are released per frame, sof on the first, nothing
// while waiting, that run_i low stops it after the current frame, and the
// frame count.
module tb_sync_counter;
  localparam int N = 16;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        run = 1'b0;
  logic        done = 1'b0;
  logic        issue, sof, waiting;
  logic [15:0] frames;
  int          checks = 0, failures = 0;

  sync_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .run_i(run), .frame_done_i(done),
                             .issue_o(issue), .sof_o(sof), .waiting_o(waiting),
                             .frames_o(frames));

  always #5 clk = ~clk;

  int run_len = 0, nframes = 0, waits = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (issue) begin failures++; $display("FAIL issue while idle"); end
    run = 1'b1;
    for (int f = 0; f < 8; f++) begin
      // Expect a burst of N issues with sof on the first.
      while (!issue) @(posedge clk) #1;
      checks++;
      if (!sof) begin failures++; $display("FAIL no sof at frame %0d", f); end
      run_len = 0;
      while (issue) begin
        if (run_len > 0 && sof) begin failures++; $display("FAIL sof inside frame"); end
        run_len++;
        @(posedge clk) #1;
      end
      nframes++;
      checks++;
      if (run_len != N) begin failures++; $display("FAIL frame %0d released %0d", f, run_len); end
      checks++;
      if (int'(frames) != nframes) begin failures++; $display("FAIL frames=%0d", frames); end
      if (f == 7) run = 1'b0;
      // Downstream busy for a while: nothing may be released meanwhile.
      repeat ($urandom_range(1, 40)) begin
        checks++;
        if (issue || !waiting) begin failures++; $display("FAIL released while waiting"); end
        waits++;
        @(posedge clk) #1;
      end
      done = 1'b1;
      @(posedge clk) #1;
      done = 1'b0;
    end
    // run low: must stay idle.
    repeat (50) begin
      checks++;
      if (issue || waiting) begin failures++; $display("FAIL not idle after run low"); end
      @(posedge clk) #1;
    end
    checks++;
    if (waits == 0) begin failures++; $display("FAIL wait never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
