// body_match: the body comparators.
//
// M comparators of L-k characters compare one pattern body (read from the
// pattern RAM) with the M body windows: body window i is the L-k characters
// starting at win_chars[i+K]. Only windows whose prefix hit that pattern
// (wmask) count. When en is high and at least one window matched, the next
// cycle shows match_valid with the pattern index, the mask of windows that
// match the whole pattern, and the text position of window 0, so window i
// is an occurrence at match_pos+i. The comparators follow the published architecture; the
// registered result format is this design's.
module body_match #(
  parameter int unsigned CHAR_W = mpm_pkg::CHAR_W,
  parameter int unsigned N      = mpm_pkg::NPAT,
  parameter int unsigned K      = mpm_pkg::PFX_LEN,
  parameter int unsigned L      = mpm_pkg::PAT_LEN,
  parameter int unsigned M      = mpm_pkg::LANES,
  parameter int unsigned POS_W  = mpm_pkg::POS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [$clog2(N)-1:0]          pat,
  input  logic [M-1:0]                  wmask,
  input  logic [L-K-1:0][CHAR_W-1:0]    body,
  input  logic [M+L-2:0][CHAR_W-1:0]    win_chars,
  input  logic [POS_W-1:0]              pos,
  output logic                          match_valid,
  output logic [$clog2(N)-1:0]          match_pat,
  output logic [M-1:0]                  match_mask,
  output logic [POS_W-1:0]              match_pos
);
  logic [M-1:0] eq;

  always_comb
    for (int i = 0; i < M; i++)
      eq[i] = wmask[i] && (win_chars[i + K +: L - K] == body);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      match_valid <= 1'b0;
      match_pat   <= '0;
      match_mask  <= '0;
      match_pos   <= '0;
    end else begin
      match_valid <= en && (eq != '0);
      if (en) begin
        match_pat  <= pat;
        match_mask <= eq;
        match_pos  <= pos;
      end
    end
  end
endmodule
