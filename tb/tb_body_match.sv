// tb_body_match: presents random pattern bodies and matching windows (with
// the body planted into some body windows, and near misses that differ in
// one character) and random window masks, and checks the registered
// result one cycle later: match_valid only when a masked window holds the
// body, the exact mask of such windows, the pattern index and position.
module tb_body_match;
  localparam int CW = 8, N = 16, K = 4, L = 36, M = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                      en = 0;
  logic [3:0]                pat = '0;
  logic [M-1:0]              wmask = '0;
  logic [L-K-1:0][CW-1:0]    body = '0;
  logic [M+L-2:0][CW-1:0]    win_chars = '0;
  logic [31:0]               pos = '0;
  logic                      match_valid;
  logic [3:0]                match_pat;
  logic [M-1:0]              match_mask;
  logic [31:0]               match_pos;

  body_match dut (.*);

  int checks = 0, failures = 0, nmatch = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] exp_mask;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int j = 0; j < L - K; j++) body[j] = 8'($urandom);
      for (int j = 0; j < M + L - 1; j++) win_chars[j] = 8'($urandom);
      begin
        int i = $urandom_range(0, M - 1);
        for (int j = 0; j < L - K; j++) win_chars[i+K+j] = body[j];
        if ($urandom_range(0, 2) == 0) win_chars[i + K + $urandom_range(0, L - K - 1)] ^= 8'h01;
      end
      en = ($urandom_range(0, 3) != 0);
      pat = 4'($urandom);
      wmask = 8'($urandom);
      pos = $urandom;
      // model
      for (int i = 0; i < M; i++) begin
        exp_mask[i] = wmask[i];
        for (int j = 0; j < L - K; j++) if (win_chars[i+K+j] != body[j]) exp_mask[i] = 0;
      end
      @(negedge clk);
      checks++;
      if (match_valid != (en && exp_mask != '0) ||
          (match_valid && (match_mask != exp_mask || match_pat != pat || match_pos != pos))) begin
        failures++;
        $display("step %0d: valid %b mask %h pat %0d, expected valid %b mask %h pat %0d",
                 t, match_valid, match_mask, match_pat, en && exp_mask != '0, exp_mask, pat);
      end
      if (match_valid) nmatch++;
    end
    checks++;
    if (nmatch < 500) begin failures++; $display("only %0d matches", nmatch); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
