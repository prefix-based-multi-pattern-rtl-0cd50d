// tb_prefix_match: loads random prefixes (two patterns share one, one stays
// unloaded), presents random prefix windows over a small alphabet with
// random win_ok, and compares the combinational any_hit and the captured
// hit matrix (one cycle later, with hit_valid) with a model that compares
// every prefix with every window. Also checks that cfg_clear unloads all
// patterns and that hit_valid follows capture.
module tb_prefix_match;
  localparam int CW = 8, N = 16, K = 4, M = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                     cfg_we = 0, cfg_clear = 0, capture = 0;
  logic [3:0]               cfg_addr = '0;
  logic [K-1:0][CW-1:0]     cfg_prefix = '0;
  logic [M+K-2:0][CW-1:0]   pfx_chars = '0;
  logic [M-1:0]             win_ok = '0;
  logic                     any_hit, hit_valid;
  logic [N-1:0][M-1:0]      hit_q;

  prefix_match dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned pfx [N][K];
  bit loaded [N];
  logic [N-1:0][M-1:0] exp_hit;
  int nhits = 0;

  function automatic logic [N-1:0][M-1:0] model();
    logic [N-1:0][M-1:0] h;
    for (int n = 0; n < N; n++)
      for (int i = 0; i < M; i++) begin
        h[n][i] = loaded[n] && win_ok[i];
        for (int j = 0; j < K; j++)
          if (pfx_chars[i+j] != pfx[n][j]) h[n][i] = 0;
      end
    return h;
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      for (int j = 0; j < K; j++) pfx[n][j] = 8'h30 + 8'($urandom_range(0, 2));
      loaded[n] = 0;
    end
    for (int j = 0; j < K; j++) pfx[5][j] = pfx[4][j];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < N - 1; n++) begin
      cfg_we = 1; cfg_addr = 4'(n);
      for (int j = 0; j < K; j++) cfg_prefix[j] = pfx[n][j];
      @(negedge clk);
      loaded[n] = 1;
    end
    cfg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      if (t == 2000) begin
        cfg_clear = 1; @(negedge clk); cfg_clear = 0;
        foreach (loaded[n]) loaded[n] = 0;
      end
      for (int j = 0; j < M + K - 1; j++) pfx_chars[j] = 8'h30 + 8'($urandom_range(0, 2));
      if (t % 7 == 0)   // plant a prefix
        for (int j = 0; j < K; j++) pfx_chars[(t/7) % M + j] = pfx[(t/7) % N][j];
      win_ok = 8'($urandom) | 8'h0f;
      capture = ($urandom_range(0, 1) == 1);
      #1;
      exp_hit = model();
      checks++;
      if (any_hit != (exp_hit != '0)) begin
        failures++; $display("any_hit wrong at %0d", t);
      end
      if (exp_hit != '0) nhits++;
      @(negedge clk);
      checks++;
      if (hit_valid != capture || (capture && hit_q != exp_hit)) begin
        failures++; $display("hit matrix wrong at %0d: %h expected %h", t, hit_q, exp_hit);
      end
    end
    checks++;
    if (nhits < 100) begin
      failures++; $display("only %0d groups with hits", nhits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
