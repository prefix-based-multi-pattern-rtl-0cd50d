// prefix_match: the prefix matching part.
//
// Holds the k-character prefix of each of the N patterns in registers and
// compares every prefix with each of the M prefix windows in parallel:
// N*M comparators of k characters. Prefix window i is the k characters
// starting at pfx_chars[i]; window i+1 is window i slid by one character.
// A pair hits when the characters are equal, the pattern has been loaded
// and window i lies inside the text (win_ok[i]).
//
// any_hit is combinational in the cycle the windows are presented, so the
// controller can decide at once whether the windows slide on. On capture
// the N x M hit matrix is registered (hit_q[n][i]) and hit_valid is raised
// for one cycle; this register feeds the resolver.
//
// Prefixes are written through cfg_we/cfg_addr/cfg_prefix (character 0 in
// the low bits), which also marks the pattern as loaded; cfg_clear unloads
// all patterns. The comparator array follows the published architecture; the prefix
// registers, their write port and the output register are this design's.
module prefix_match #(
  parameter int unsigned CHAR_W = mpm_pkg::CHAR_W,
  parameter int unsigned N      = mpm_pkg::NPAT,
  parameter int unsigned K      = mpm_pkg::PFX_LEN,
  parameter int unsigned M      = mpm_pkg::LANES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cfg_we,
  input  logic [$clog2(N)-1:0]         cfg_addr,
  input  logic [K-1:0][CHAR_W-1:0]     cfg_prefix,
  input  logic                         cfg_clear,
  input  logic [M+K-2:0][CHAR_W-1:0]   pfx_chars,
  input  logic [M-1:0]                 win_ok,
  input  logic                         capture,
  output logic                         any_hit,
  output logic                         hit_valid,
  output logic [N-1:0][M-1:0]          hit_q
);
  logic [N-1:0][K-1:0][CHAR_W-1:0] prefix_q;
  logic [N-1:0]                    loaded_q;
  logic [N-1:0][M-1:0]             hit;

  always_comb begin
    for (int n = 0; n < N; n++)
      for (int i = 0; i < M; i++)
        hit[n][i] = loaded_q[n] && win_ok[i] &&
                    (pfx_chars[i +: K] == prefix_q[n]);
    any_hit = |hit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loaded_q  <= '0;
      prefix_q  <= '0;
      hit_valid <= 1'b0;
      hit_q     <= '0;
    end else begin
      if (cfg_clear) loaded_q <= '0;
      if (cfg_we) begin
        prefix_q[cfg_addr] <= cfg_prefix;
        loaded_q[cfg_addr] <= 1'b1;
      end
      hit_valid <= capture;
      if (capture) hit_q <= hit;
    end
  end
endmodule
