// tb_pattern_ram: writes random bodies to all 16 words, then mixes random
// reads (data must appear in the same cycle as the address) with
// overwrites, checking every read against a copy of the contents.
module tb_pattern_ram;
  localparam int CW = 8, N = 16, BODY = 32;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                      we = 0;
  logic [3:0]                addr = '0;
  logic [BODY-1:0][CW-1:0]   wdata = '0, rdata;

  pattern_ram dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [BODY-1:0][CW-1:0] copy [N];

  function automatic logic [BODY-1:0][CW-1:0] rnd_word();
    logic [BODY-1:0][CW-1:0] w;
    for (int j = 0; j < BODY; j++) w[j] = 8'($urandom);
    return w;
  endfunction

  initial begin
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      we = 1; addr = 4'(n); wdata = rnd_word(); copy[n] = wdata;
      @(negedge clk);
    end
    for (int t = 0; t < 3000; t++) begin
      addr = 4'($urandom);
      we = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (rdata != copy[addr]) begin
        failures++; $display("read of word %0d wrong", addr);
      end
      if (we) begin wdata = rnd_word(); copy[addr] = wdata; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
