// sbox_rom512: one 512 x 32-bit S-box ROM bank with synchronous read.
//
// This is the reduced "512 ROM" of the extension memory-based S-box method:
// a read-only array of 512 32-bit words whose output is captured in a
// register on the rising clock edge, so the data for an address presented in
// one cycle is available during the next.  One bank holds two S-boxes, the
// first in words 0..255 and the second in words 256..511, so the address is
// {select, byte}.  The contents are loaded from INIT_FILE, a hex image with
// one word per line.
//
// Interface: NPORTS independent read ports (addr[p] -> data[p]).  The two
// 64-bit cores that share the store each need two lookups per bank per
// cycle, hence four ports by default; on an FPGA such a ROM is built from
// replicated or dual-ported block RAMs.  The port count and the two-S-box
// split are choices of this design; the 512-word depth, the 32-bit width and
// the registered output follow the method it implements.
//
// Timing: data[p] <= rom[addr[p]] at every rising edge of clk; no enable,
// no reset (the output register holds ROM data only).
module sbox_rom512 #(
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned NPORTS    = 4,
  parameter string       INIT_FILE = "rtl/sbox_bank0.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic                            clk,
  input  logic [NPORTS-1:0][AW-1:0]       addr,
  output logic [NPORTS-1:0][WIDTH-1:0]    data
);

  logic [WIDTH-1:0] rom [DEPTH];

  initial begin
    $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      data[p] <= rom[addr[p]];
    end
  end

endmodule
