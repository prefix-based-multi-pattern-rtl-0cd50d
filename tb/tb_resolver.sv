// tb_resolver: gives the resolver random N x M hit matrices, one at a time
// with hit_valid for one cycle, and checks what it issues: the first
// address exactly 2 cycles after hit_valid, then one per cycle, the
// patterns with any hit in ascending order, each with its row of the
// matrix as wmask, last on the final one, and nothing else.
module tb_resolver;
  localparam int N = 16, M = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 hit_valid = 0;
  logic [N-1:0][M-1:0]  hit_q = '0;
  logic                 addr_valid, last;
  logic [3:0]           addr;
  logic [M-1:0]         wmask;

  resolver dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][M-1:0] mat;
    int exp_list [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      // 1 to 16 patterns with hits, sparse rows
      do begin
        mat = '0;
        for (int n = 0; n < N; n++)
          if ($urandom_range(0, 15) < (t % 16) + 1) mat[n] = 8'($urandom) & 8'($urandom);
      end while (mat == '0);
      exp_list.delete();
      for (int n = 0; n < N; n++) if (mat[n] != '0) exp_list.push_back(n);
      hit_valid = 1; hit_q = mat;
      @(negedge clk);
      hit_valid = 0; hit_q = '0;
      checks++;
      if (addr_valid) begin failures++; $display("address too early"); end
      @(negedge clk);
      foreach (exp_list[e]) begin
        checks++;
        if (!addr_valid || addr != 4'(exp_list[e]) || wmask != mat[exp_list[e]] ||
            last != (e == exp_list.size() - 1)) begin
          failures++;
          $display("matrix %0d item %0d: valid %b addr %0d wmask %h last %b, expected addr %0d wmask %h",
                   t, e, addr_valid, addr, wmask, last, exp_list[e], mat[exp_list[e]]);
        end
        @(negedge clk);
      end
      checks++;
      if (addr_valid) begin failures++; $display("extra address after matrix %0d", t); end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
