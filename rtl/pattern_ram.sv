// pattern_ram: one-port RAM holding the N pattern bodies.
//
// Each word is one pattern body: the L-k characters after the prefix,
// character 0 in the low bits, addressed by pattern index. There is a
// single address port: a write (we) stores wdata at addr on the clock edge;
// otherwise rdata shows the word at addr in the same cycle (asynchronous
// read, i.e. distributed LUT RAM on an FPGA). The asynchronous read lets
// RAM read and body comparison share the single cycle the architecture gives
// them. The contents are not reset.
module pattern_ram #(
  parameter int unsigned CHAR_W = mpm_pkg::CHAR_W,
  parameter int unsigned N      = mpm_pkg::NPAT,
  parameter int unsigned BODY   = mpm_pkg::PAT_LEN - mpm_pkg::PFX_LEN
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(N)-1:0]          addr,
  input  logic [BODY-1:0][CHAR_W-1:0]   wdata,
  output logic [BODY-1:0][CHAR_W-1:0]   rdata
);
  logic [BODY-1:0][CHAR_W-1:0] mem [N];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
