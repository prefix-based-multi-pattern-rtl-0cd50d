// tb_mpm_workload: runs the matcher at its default sizes (16 patterns of
// 36 characters, prefix 4, 8 characters per clock) over texts of 10 KiB,
// 100 KiB, 1 MiB, 10 MiB and 100 MiB, the text sizes of the evaluation, streamed
// without gaps. The text is random lower-case letters with 1 planted copy
// of a random pattern per 500 characters; the patterns are random
// lower-case strings. Every reported occurrence is checked against a
// reference scan, and the cycle count from the first full window group to
// text_done must equal the count predicted from the prefix hits (1 cycle
// per group, plus 2+h when h patterns hit prefixes in it). It prints the
// sustained characters per clock and the time at 160 MHz.
module tb_mpm_workload;
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
    repeat (25000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned pats [N][L];
  byte unsigned text [];
  int T;

  bit     got [longint];
  bit     collecting = 0;
  longint t_done, t_first;
  int     accepted;

  always @(posedge clk) begin
    if (collecting && match_valid)
      for (int i = 0; i < M; i++)
        if (match_mask[i]) begin
          longint key;
          key = longint'(match_pat) * 64'h1_0000_0000 + longint'(match_pos) + longint'(i);
          if (got.exists(key)) begin
            failures++;
            $display("duplicate match pattern %0d at %0d", match_pat, match_pos + i);
          end
          got[key] = 1;
        end
    if (collecting && text_done) t_done = cyc;
    if (in_valid && in_ready) begin
      accepted++;
      if (accepted == BEATS) t_first = cyc + 1;
    end
  end

  function automatic bit pfx_at(int q, int n);
    for (int j = 0; j < K; j++) if (text[q+j] != pats[n][j]) return 0;
    return 1;
  endfunction
  function automatic bit body_at(int q, int n);
    for (int j = K; j < L; j++) if (text[q+j] != pats[n][j]) return 0;
    return 1;
  endfunction

  task automatic run_text(int len);
    int beats, nexp, h, nfound;
    longint exp_cycles;
    bit hitp [N];
    T = len;
    text = new[len];
    foreach (text[j]) text[j] = 8'h61 + 8'($urandom_range(0, 25));
    for (int p = 0; p < len / 500; p++) begin
      int n = $urandom_range(0, N - 1);
      int q = $urandom_range(0, len - L);
      for (int j = 0; j < L; j++) text[q+j] = pats[n][j];
    end
    beats = (T + M - 1) / M;
    got.delete();
    accepted = 0; t_done = -1; t_first = -1;
    collecting = 1;
    for (int b = 0; b < beats; b++) begin
      @(negedge clk);
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

    // reference scan and cycle prediction in one pass over the groups
    nexp = 0; nfound = 0; exp_cycles = 0;
    for (int g = 0; g < beats; g++) begin
      foreach (hitp[n]) hitp[n] = 0;
      for (int i = 0; i < M; i++) begin
        int q = g*M + i;
        if (q + L <= T)
          for (int n = 0; n < N; n++)
            if (pfx_at(q, n)) begin
              longint key = longint'(n) * 64'h1_0000_0000 + longint'(q);
              hitp[n] = 1;
              if (body_at(q, n)) begin
                nexp++;
                checks++;
                if (got.exists(key)) nfound++;
                else begin
                  failures++;
                  $display("missed pattern %0d at %0d", n, q);
                end
              end
            end
      end
      h = 0;
      foreach (hitp[n]) h += int'(hitp[n]);
      exp_cycles += 1 + ((h > 0) ? 2 + h : 0);
    end
    checks++;
    if (got.size() != nfound) begin
      failures++;
      $display("%0d false matches", got.size() - nfound);
    end
    checks++;
    if (t_done - t_first != exp_cycles) begin
      failures++;
      $display("cycles %0d, expected %0d", t_done - t_first, exp_cycles);
    end
    $display("text of %0d characters: %0d occurrences, %0d cycles, %0.2f characters per clock, %0.6f s at 160 MHz",
             T, nexp, t_done - t_first, real'(T) / real'(t_done - t_first),
             real'(t_done - t_first) / 160.0e6);
  endtask

  initial begin
    for (int n = 0; n < N; n++)
      for (int j = 0; j < L; j++) pats[n][j] = 8'h61 + 8'($urandom_range(0, 25));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 4'(n);
      for (int j = 0; j < L; j++) cfg_pattern[j] = pats[n][j];
    end
    @(negedge clk);
    cfg_we = 0;
    run_text(10 * 1024);
    run_text(100 * 1024);
    run_text(1024 * 1024);
    run_text(10 * 1024 * 1024);
    run_text(100 * 1024 * 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
