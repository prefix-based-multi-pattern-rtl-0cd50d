// mpm_top: prefix-based multi-pattern matcher.
//
// Finds every occurrence of N patterns of L characters in a text that
// streams in at M characters per clock. Rather than comparing whole
// patterns with every text position, it compares only the k-character
// prefix of each pattern with the M prefix windows of the current group of
// positions (N*M small comparators, prefix_match). Only when a prefix hits
// is the rest of that pattern, its body, read from a one-port pattern RAM
// (pattern_ram) at the address the resolver picks, and compared with the M
// body windows (body_match). Comparator logic therefore grows with N*k
// instead of N*L.
//
// Timing. A group of M windows with no prefix hit slides on after one
// cycle. When prefixes hit, the windows stop sliding: the hit matrix is
// registered (cycle t), the resolver takes two cycles (t+1, t+2) to produce
// the first pattern address, and the RAM read plus body comparison take one
// (t+3), after which the windows slide. A group where one pattern hits thus
// costs 3 extra cycles; when h different patterns hit, the resolver issues
// them on consecutive cycles and the group costs 2+h extra cycles.
//
// Interface.
//   cfg_*   load pattern cfg_addr (character 0 in the low bits): its prefix
//           goes to the prefix registers, its body to the pattern RAM.
//           Load only while no text is streaming; cfg_clear unloads all.
//   in_*    text stream, valid/ready beats of M characters (character 0 in
//           the low bits), keep mask contiguous from lane 0, last flag.
//   match_* one result per pattern and group: bit i of match_mask means the
//           pattern occurs at text position match_pos+i. No backpressure.
//   text_done pulses once the last window of the text is resolved; the
//           next text starts at position 0.
//   stall   high while the windows are held for prefix-hit resolution.
//
// The split into prefix part, resolver, pattern RAM and body comparators
// and the 3-cycle stall follow the published architecture; the load port, stream and
// result formats and the handling of several hits in one group are this
// design's.
module mpm_top #(
  parameter int unsigned CHAR_W = mpm_pkg::CHAR_W,
  parameter int unsigned N      = mpm_pkg::NPAT,
  parameter int unsigned K      = mpm_pkg::PFX_LEN,
  parameter int unsigned L      = mpm_pkg::PAT_LEN,
  parameter int unsigned M      = mpm_pkg::LANES,
  parameter int unsigned POS_W  = mpm_pkg::POS_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  logic [$clog2(N)-1:0]          cfg_addr,
  input  logic [L-1:0][CHAR_W-1:0]      cfg_pattern,
  input  logic                          cfg_clear,
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [M-1:0][CHAR_W-1:0]      in_data,
  input  logic [M-1:0]                  in_keep,
  input  logic                          in_last,
  output logic                          match_valid,
  output logic [$clog2(N)-1:0]          match_pat,
  output logic [M-1:0]                  match_mask,
  output logic [POS_W-1:0]              match_pos,
  output logic                          text_done,
  output logic                          stall
);
  localparam int unsigned AW = $clog2(N);

  typedef enum logic {SCAN, RESOLVE} state_e;
  state_e state_q;

  logic                        grp_valid, advance, capture, any_hit;
  logic [M+L-2:0][CHAR_W-1:0]  win_chars;
  logic [M-1:0]                win_ok;
  logic [POS_W-1:0]            pos;
  logic                        hit_valid;
  logic [N-1:0][M-1:0]         hit_q;
  logic                        addr_valid, addr_last;
  logic [AW-1:0]               res_addr, ram_addr;
  logic [M-1:0]                wmask;
  logic [L-K-1:0][CHAR_W-1:0]  body;

  text_window_buffer #(.CHAR_W(CHAR_W), .L(L), .M(M), .POS_W(POS_W)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .in_keep, .in_last,
    .advance, .grp_valid, .win_chars, .win_ok, .pos, .text_done);

  prefix_match #(.CHAR_W(CHAR_W), .N(N), .K(K), .M(M)) u_pfx (
    .clk, .rst_n, .cfg_we, .cfg_addr,
    .cfg_prefix (cfg_pattern[K-1:0]),
    .cfg_clear,
    .pfx_chars  (win_chars[M+K-2:0]),
    .win_ok, .capture, .any_hit, .hit_valid, .hit_q);

  resolver #(.N(N), .M(M)) u_res (
    .clk, .rst_n, .hit_valid, .hit_q,
    .addr_valid, .addr(res_addr), .wmask, .last(addr_last));

  // One port: loading has the address while it writes.
  assign ram_addr = cfg_we ? cfg_addr : res_addr;

  pattern_ram #(.CHAR_W(CHAR_W), .N(N), .BODY(L - K)) u_ram (
    .clk, .we(cfg_we), .addr(ram_addr),
    .wdata(cfg_pattern[L-1:K]), .rdata(body));

  body_match #(.CHAR_W(CHAR_W), .N(N), .K(K), .L(L), .M(M), .POS_W(POS_W)) u_body (
    .clk, .rst_n, .en(addr_valid), .pat(res_addr), .wmask, .body,
    .win_chars, .pos, .match_valid, .match_pat, .match_mask, .match_pos);

  // Window control: slide on a group without prefix hits; otherwise hold
  // it until the body comparison of its last hit pattern.
  always_comb begin
    capture = 1'b0;
    advance = 1'b0;
    if (state_q == SCAN) begin
      capture = grp_valid && any_hit;
      advance = grp_valid && !any_hit;
    end else begin
      advance = addr_valid && addr_last;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= SCAN;
    else if (state_q == SCAN && capture) state_q <= RESOLVE;
    else if (state_q == RESOLVE && advance) state_q <= SCAN;
  end

  assign stall = (state_q == RESOLVE);

  a_no_load_while_resolving: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> !cfg_we);
endmodule
