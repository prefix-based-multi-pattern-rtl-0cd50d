// tb_text_window_buffer: checks the window buffer against a model of the
// text. Several texts (lengths that fill and do not fill the buffer, with
// and without a partial last beat) are streamed with random source gaps
// while the window is slid at random. Whenever a group is valid, every
// character shown must be the text character at pos+j, win_ok must mark
// exactly the windows that lie inside the text, and every beat must have
// been the oldest beat exactly once before text_done. A final text with no
// gaps and a slide every cycle must sustain one group per clock.
module tb_text_window_buffer;
  localparam int CW = 8, L = 36, M = 8;
  localparam int BEATS = (M + L - 1 + M - 1) / M;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     in_valid = 0, in_ready, in_last = 0, advance = 0;
  logic [M-1:0][CW-1:0]     in_data = '0;
  logic [M-1:0]             in_keep = '0;
  logic                     grp_valid, text_done;
  logic [M+L-2:0][CW-1:0]   win_chars;
  logic [M-1:0]             win_ok;
  logic [31:0]              pos;

  text_window_buffer dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned text [];
  int T, groups, exp_pos, slide_prob;
  bit running = 0;
  longint t_first, t_done;

  // Checker: on the falling edge, look at the group and choose to slide.
  always @(negedge clk) if (running) begin
    advance = 0;
    if (grp_valid) begin
      checks++;
      if (pos != 32'(exp_pos)) begin
        failures++; $display("pos %0d expected %0d", pos, exp_pos);
      end
      for (int j = 0; j < M + L - 1; j++)
        if (exp_pos + j < T && win_chars[j] != text[exp_pos+j]) begin
          failures++; $display("char %0d of group at %0d wrong", j, exp_pos);
        end
      for (int i = 0; i < M; i++)
        if (win_ok[i] != (exp_pos + i + L <= T)) begin
          failures++; $display("win_ok[%0d] wrong at %0d", i, exp_pos);
        end
      if ($urandom_range(0, 99) < slide_prob) begin
        advance = 1;
        if (groups == 0) t_first = cyc;
        groups++;
        exp_pos += M;
      end
    end
  end
  always @(posedge clk) if (running && text_done) t_done = cyc;

  task automatic run(int len, bit gaps, int prob);
    int beats = (len + M - 1) / M;
    T = len; slide_prob = prob;
    text = new[len];
    foreach (text[j]) text[j] = 8'($urandom);
    groups = 0; exp_pos = 0; t_done = -1;
    running = 1;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 2) == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      in_last  = (b == beats - 1);
      for (int i = 0; i < M; i++) begin
        in_keep[i] = (b*M + i < T);
        in_data[i] = (b*M + i < T) ? text[b*M+i] : 8'hff;
      end
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (t_done < 0) @(posedge clk);
    @(negedge clk);
    running = 0; advance = 0;
    checks++;
    if (groups != beats) begin
      failures++; $display("%0d groups for %0d beats", groups, beats);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(300, 1, 50);
    run(301, 1, 70);
    run(20, 0, 60);      // shorter than one window
    run(41, 1, 100);     // shorter than the buffer
    run(48, 0, 30);      // exactly the buffer
    // throughput: one group per clock once the buffer is full
    run(800, 0, 100);
    checks++;
    if (t_done - t_first != 100) begin
      failures++; $display("100 groups took %0d cycles", t_done - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
