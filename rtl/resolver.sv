// resolver: turns the prefix hit matrix into pattern RAM addresses.
//
// Input is the N x M matrix of prefix hits of one group of windows
// (hit_q[n][i]: pattern n's prefix matches prefix window i), presented with
// a one-cycle hit_valid. The resolver is a two-stage sequential circuit:
//   stage 1 registers the matrix and the set of patterns with any hit;
//   stage 2 picks the lowest-numbered pending pattern each cycle and
//           registers it as the address (addr), together with the windows
//           where that pattern's prefix hit (wmask), and last when no other
//           pattern is pending.
// The first address appears 2 cycles after hit_valid; further patterns of
// the same group follow one per cycle. A new matrix must only be given
// after the previous group's last address.
//
// Its role (choose which pattern the RAM reads) and its 2-cycle latency
// follow the published architecture; the pending set, the priority order and the issue
// rate of one pattern per cycle are this design's.
module resolver #(
  parameter int unsigned N = mpm_pkg::NPAT,
  parameter int unsigned M = mpm_pkg::LANES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   hit_valid,
  input  logic [N-1:0][M-1:0]    hit_q,
  output logic                   addr_valid,
  output logic [$clog2(N)-1:0]   addr,
  output logic [M-1:0]           wmask,
  output logic                   last
);
  localparam int unsigned AW = $clog2(N);

  logic [N-1:0][M-1:0] mat_q;     // stage 1: hit matrix
  logic [N-1:0]        pend_q;    // stage 1: patterns still to issue

  logic [AW-1:0] sel;
  logic [N-1:0]  rest;

  // Lowest pending pattern, and what stays pending after it.
  always_comb begin
    sel = '0;
    for (int n = N - 1; n >= 0; n--)
      if (pend_q[n]) sel = AW'(n);
    rest = pend_q;
    rest[sel] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mat_q      <= '0;
      pend_q     <= '0;
      addr_valid <= 1'b0;
      addr       <= '0;
      wmask      <= '0;
      last       <= 1'b0;
    end else begin
      addr_valid <= |pend_q;
      if (|pend_q) begin
        addr   <= sel;
        wmask  <= mat_q[sel];
        last   <= (rest == '0);
        pend_q <= rest;
      end
      if (hit_valid) begin
        mat_q <= hit_q;
        for (int n = 0; n < N; n++) pend_q[n] <= |hit_q[n];
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    hit_valid |-> (pend_q == '0));
endmodule
