// text_window_buffer: holds the text around the current matching windows.
//
// The matcher looks at M matching windows at once, starting at text
// positions pos .. pos+M-1. Each window is L characters long: its first k
// characters are the prefix window, the rest the body window. Together the M
// windows span M+L-1 characters, which this buffer presents on win_chars
// (character pos+j at index j).
//
// Storage is a shift register of BEATS = ceil((M+L-1)/M) beats of M
// characters. Text arrives as a valid/ready stream of M-character beats with
// a keep mask (contiguous from lane 0, only the last beat may be partial)
// and a last flag. A group of windows is valid once the buffer is full, or,
// after the last beat, while the oldest beat still holds text. On advance
// the oldest beat is dropped (the windows slide by M characters) and a new
// beat may enter in the same cycle: in_ready depends combinationally on
// advance so the stream keeps M characters per clock. win_ok[i] is set when
// window i lies entirely inside the text. text_done pulses for one cycle
// when the last group has been slid out; the next text then starts at
// position 0.
//
// The published architecture defines the windows and the input bandwidth M; the storage
// structure, stream handshake and end-of-text handling are this design's.
module text_window_buffer #(
  parameter int unsigned CHAR_W = mpm_pkg::CHAR_W,
  parameter int unsigned L      = mpm_pkg::PAT_LEN,
  parameter int unsigned M      = mpm_pkg::LANES,
  parameter int unsigned POS_W  = mpm_pkg::POS_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [M-1:0][CHAR_W-1:0]       in_data,
  input  logic [M-1:0]                   in_keep,
  input  logic                           in_last,
  input  logic                           advance,
  output logic                           grp_valid,
  output logic [M+L-2:0][CHAR_W-1:0]     win_chars,
  output logic [M-1:0]                   win_ok,
  output logic [POS_W-1:0]               pos,
  output logic                           text_done
);
  localparam int unsigned BEATS = mpm_pkg::buf_beats(M, L);
  localparam int unsigned CNT_W = $clog2(BEATS + 1);

  logic [BEATS-1:0][M-1:0][CHAR_W-1:0] data_q;
  logic [BEATS-1:0][M-1:0]             keep_q;   // per-character valid
  logic [CNT_W-1:0]                    cnt_q;    // beats held
  logic                                eos_q;    // last beat received
  logic [POS_W-1:0]                    pos_q;

  logic                    accept, shift;
  logic [BEATS*M-1:0]      flat_keep;

  assign shift     = advance && grp_valid;
  assign in_ready  = !eos_q && ((cnt_q < CNT_W'(BEATS)) || shift);
  assign accept    = in_valid && in_ready;
  assign grp_valid = (cnt_q != '0) && ((cnt_q == CNT_W'(BEATS)) || eos_q);
  assign text_done = eos_q && (cnt_q == '0);
  assign pos       = pos_q;

  always_comb begin
    flat_keep = keep_q;
    for (int j = 0; j < M + L - 1; j++)
      win_chars[j] = data_q[j / M][j % M];
    for (int i = 0; i < M; i++)
      win_ok[i] = flat_keep[i + L - 1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_q  <= '0;
      eos_q  <= 1'b0;
      pos_q  <= '0;
      keep_q <= '0;
      data_q <= '0;
    end else begin
      if (shift) begin
        for (int b = 0; b < BEATS - 1; b++) begin
          data_q[b] <= data_q[b+1];
          keep_q[b] <= keep_q[b+1];
        end
        data_q[BEATS-1] <= '0;
        keep_q[BEATS-1] <= '0;
        pos_q <= pos_q + POS_W'(M);
      end
      if (accept) begin
        data_q[int'(cnt_q) - (shift ? 1 : 0)] <= in_data;
        keep_q[int'(cnt_q) - (shift ? 1 : 0)] <= in_keep;
        if (in_last) eos_q <= 1'b1;
      end
      cnt_q <= cnt_q + CNT_W'(accept) - CNT_W'(shift);
      if (text_done) begin
        eos_q <= 1'b0;
        pos_q <= '0;
      end
    end
  end

  // A beat may only be partial when it is the last one.
  a_partial_only_last: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && !in_last) |-> (in_keep == '1));
endmodule
