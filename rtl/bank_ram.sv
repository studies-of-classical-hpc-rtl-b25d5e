// bank_ram: one internal memory bank (simple dual-port RAM).
//
// The accelerators spread a matrix over many such banks so that one element
// from every bank can be read in the same clock. One write port and one read
// port; the read is synchronous: rdata holds mem[raddr] one clock after raddr
// is presented. A read of the address being written returns the old word.
// Depth and width are set by the user; contents are not reset.
module bank_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
