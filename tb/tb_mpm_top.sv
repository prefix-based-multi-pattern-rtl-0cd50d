// tb_mpm_top: end-to-end test of the matcher at its default sizes
// (16 patterns of 36 characters, prefix 4, 8 characters per clock).
//
// Patterns and texts are random over a four-letter alphabet so that prefix
// hits are frequent, with copies of patterns planted in the text. A
// reference model scans every text position against every loaded pattern
// and the set of occurrences the matcher reports must equal it exactly. For
// texts streamed without gaps the cycle count from the first full window
// group to text_done must equal the sum over groups of 1 cycle, plus 2+h
// cycles when h different patterns hit prefixes in that group (3 stall
// cycles for a single pattern). It also counts how often each mechanism
// occurred: stalls, several patterns in one group, prefix hits whose body
// differs, several occurrences in one group, partial last beats, source
// gaps, backpressure, unloaded patterns, pattern rewrite, short texts.
module tb_mpm_top;
  localparam int CW = 8, N = 16, K = 4, L = 36, M = 8;
  localparam int BEATS = (M + L - 1 + M - 1) / M;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                    cfg_we = 0, cfg_clear = 0;
  logic [3:0]              cfg_addr = '0;
  logic [L-1:0][CW-1:0]    cfg_pattern = '0;
  logic                    in_valid = 0, in_ready, in_last = 0;
  logic [M-1:0][CW-1:0]    in_data = '0;
  logic [M-1:0]            in_keep = '0;
  logic                    match_valid, text_done, stall;
  logic [3:0]              match_pat;
  logic [M-1:0]            match_mask;
  logic [31:0]             match_pos;

  mpm_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned pats [N][L];
  bit           loaded [N];
  byte unsigned text [];
  int           T;

  // mechanism counters
  int n_stall_single = 0, n_multi_pat = 0, n_body_miss = 0, n_multi_win = 0;
  int n_partial = 0, n_gaps = 0, n_backpressure = 0, n_unloaded = 0;
  int n_rewrite = 0, n_short = 0, n_stall_cycles = 0;

  always @(posedge clk) if (stall) n_stall_cycles++;
  always @(posedge clk) if (in_valid && !in_ready) n_backpressure++;

  function automatic byte unsigned rnd_char();
    return 8'h61 + 8'($urandom_range(0, 3));
  endfunction

  // Stimulus changes on the falling edge, the design samples on the rising.
  task automatic load(int n);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 4'(n);
    for (int j = 0; j < L; j++) cfg_pattern[j] = pats[n][j];
    @(negedge clk);
    cfg_we = 0;
    loaded[n] = 1;
  endtask

  function automatic bit pfx_at(int q, int n);
    for (int j = 0; j < K; j++) if (text[q+j] != pats[n][j]) return 0;
    return 1;
  endfunction
  function automatic bit full_at(int q, int n);
    for (int j = 0; j < L; j++) if (text[q+j] != pats[n][j]) return 0;
    return 1;
  endfunction

  // Collected results of one text, keyed by pattern*2^32 + position.
  bit     got [longint];
  bit     collecting = 0;
  longint t_done;
  longint t_first;
  int     accepted;

  always @(posedge clk) begin
    if (collecting && match_valid) begin
      if ($countones(match_mask) > 1) n_multi_win++;
      for (int i = 0; i < M; i++)
        if (match_mask[i]) begin
          longint key;
          key = longint'(match_pat) * 64'h1_0000_0000 + longint'(match_pos) + longint'(i);
          checks++;
          if (got.exists(key)) begin
            failures++;
            $display("duplicate match pattern %0d at %0d", match_pat, match_pos + i);
          end
          got[key] = 1;
        end
    end
    if (collecting && text_done) t_done = cyc;
    if (in_valid && in_ready) begin
      accepted++;
      if (accepted == BEATS || (in_last && accepted < BEATS)) t_first = cyc + 1;
    end
  end

  task automatic run_text(int len, bit gaps, bit check_cycles);
    int beats, nexp, h, exp_cycles;
    bit hitp [N];
    T = len;
    beats = (T + M - 1) / M;
    if (T % M != 0) n_partial++;
    got.delete();
    accepted = 0; t_done = -1; t_first = -1;
    collecting = 1;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 3) == 0) begin
        in_valid = 0; n_gaps++;
        @(negedge clk);
      end
      in_valid = 1;
      in_last  = (b == beats - 1);
      for (int i = 0; i < M; i++) begin
        in_keep[i] = (b*M + i < T);
        in_data[i] = (b*M + i < T) ? text[b*M+i] : 8'h00;
      end
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0; in_last = 0;
    while (t_done < 0) @(posedge clk);
    @(posedge clk);
    collecting = 0;

    // reference: every occurrence of every loaded pattern
    nexp = 0;
    for (int q = 0; q + L <= T; q++)
      for (int n = 0; n < N; n++) begin
        longint key = longint'(n) * 64'h1_0000_0000 + longint'(q);
        bit f = full_at(q, n);
        if (f && !loaded[n]) n_unloaded++;
        if (loaded[n] && pfx_at(q, n) && !f) n_body_miss++;
        if (loaded[n] && f) begin
          nexp++;
          checks++;
          if (!got.exists(key)) begin
            failures++;
            $display("missed pattern %0d at %0d", n, q);
          end
        end else if (got.exists(key)) begin
          failures++;
          $display("false match pattern %0d at %0d", n, q);
        end
      end
    checks++;
    if (got.size() != nexp) begin
      failures++;
      $display("reported %0d occurrences, expected %0d", got.size(), nexp);
    end

    // reference cycle count
    exp_cycles = 0;
    for (int g = 0; g < beats; g++) begin
      foreach (hitp[n]) hitp[n] = 0;
      for (int i = 0; i < M; i++) begin
        int q = g*M + i;
        if (q + L <= T)
          for (int n = 0; n < N; n++) if (loaded[n] && pfx_at(q, n)) hitp[n] = 1;
      end
      h = 0;
      foreach (hitp[n]) h += int'(hitp[n]);
      if (h == 1) n_stall_single++;
      if (h > 1) n_multi_pat++;
      exp_cycles += 1 + ((h > 0) ? 2 + h : 0);
    end
    if (check_cycles) begin
      checks++;
      if (t_done - t_first != longint'(exp_cycles)) begin
        failures++;
        $display("cycles %0d, expected %0d", t_done - t_first, exp_cycles);
      end
    end
    $display("text of %0d characters: %0d occurrences, %0d cycles (expected %0d)",
             T, nexp, t_done - t_first, exp_cycles);
  endtask

  task automatic make_text(int len, int plants);
    text = new[len];
    foreach (text[j]) text[j] = rnd_char();
    for (int p = 0; p < plants; p++) begin
      int n = $urandom_range(0, N - 1);
      int q = $urandom_range(0, len - L);
      for (int j = 0; j < L; j++) text[q+j] = pats[n][j];
      if (n == 2 && q + 2 + L <= len)           // periodic pattern, twice
        for (int j = 0; j < L; j++) text[q+2+j] = pats[n][j];
    end
  endtask

  initial begin
    for (int n = 0; n < N; n++) begin
      for (int j = 0; j < L; j++) pats[n][j] = rnd_char();
      loaded[n] = 0;
    end
    for (int j = 0; j < K; j++) pats[1][j] = pats[0][j];      // shared prefix
    for (int j = 0; j < L; j++) pats[2][j] = (j % 2 == 1) ? "a" : "b"; // period 2

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N - 1; n++) load(n);   // pattern 15 stays unloaded

    // 1: long text, no source gaps, partial last beat; cycle-exact check
    make_text(3005, 60);
    run_text(3005, 0, 1);

    // 2: load pattern 15, rewrite pattern 3, stream with source gaps
    load(N - 1);
    for (int j = 0; j < L; j++) pats[3][j] = rnd_char();
    load(3); n_rewrite++;
    make_text(1603, 40);
    run_text(1603, 1, 0);

    // 3: text shorter than the window buffer
    make_text(40, 0);
    for (int j = 0; j < L; j++) text[3+j] = pats[5][j];
    n_short++;
    run_text(40, 0, 1);

    // 4: clear all patterns, reload two, full-beat text
    @(negedge clk); cfg_clear = 1; @(negedge clk); cfg_clear = 0;
    foreach (loaded[n]) loaded[n] = 0;
    load(0); load(2);
    make_text(800, 20);
    run_text(800, 0, 1);

    $display("mechanisms: single-pattern stalls %0d, multi-pattern groups %0d, prefix hits with body mismatch %0d, groups with several occurrences %0d, partial last beats %0d, source gaps %0d, backpressure cycles %0d, unloaded-pattern copies %0d, rewrites %0d, short texts %0d, stall cycles %0d",
             n_stall_single, n_multi_pat, n_body_miss, n_multi_win, n_partial, n_gaps,
             n_backpressure, n_unloaded, n_rewrite, n_short, n_stall_cycles);
    checks++;
    if (n_stall_single == 0 || n_multi_pat == 0 || n_body_miss == 0 || n_multi_win == 0 ||
        n_partial == 0 || n_gaps == 0 || n_backpressure == 0 || n_unloaded == 0 ||
        n_rewrite == 0 || n_short == 0) begin
      failures++;
      $display("some mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
