// sbox_shared: the S-box store shared by the parallel Blowfish cores.
//
// Each core presents the 32-bit word that enters its F function.  The word
// is cut into four bytes a|b|c|d (a = bits 31:24); S1[a], S2[b], S3[c] and
// S4[d] come back one clock later, read from two 512-word ROM banks: bank 0
// holds S1 (words 0..255) and S2 (256..511), bank 1 holds S3 and S4.  The
// four S-boxes together are the 1024 words of standard Blowfish; splitting
// them into two 512-word ROMs is how this design reads the reduced 512-word
// ROM of the method it implements.  Sharing one store between the cores
// follows the block diagram of the 128-bit design.
//
// Interface: addr[c] from core c, sdata[c][k] = S(k+1) of the matching byte.
// Timing: one clock of latency, sdata registered in the ROM banks.
module sbox_shared
  import blowfish_pkg::*;
#(
  parameter int unsigned NCORES = 2
) (
  input  logic                    clk,
  input  word_t     [NCORES-1:0]  addr,
  output sbox_out_t [NCORES-1:0]  sdata
);

  localparam int unsigned NP = 2 * NCORES;

  logic [NP-1:0][8:0]  a0, a1;  // bank 0 / bank 1 addresses
  logic [NP-1:0][31:0] d0, d1;

  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      a0[2*c]   = {1'b0, addr[c][31:24]};  // S1
      a0[2*c+1] = {1'b1, addr[c][23:16]};  // S2
      a1[2*c]   = {1'b0, addr[c][15:8]};   // S3
      a1[2*c+1] = {1'b1, addr[c][7:0]};    // S4
    end
  end

  sbox_rom512 #(.NPORTS(NP), .INIT_FILE("rtl/sbox_bank0.hex")) u_bank0 (
    .clk (clk), .addr(a0), .data(d0)
  );

  sbox_rom512 #(.NPORTS(NP), .INIT_FILE("rtl/sbox_bank1.hex")) u_bank1 (
    .clk (clk), .addr(a1), .data(d1)
  );

  always_comb begin
    for (int c = 0; c < NCORES; c++) begin
      sdata[c][0] = d0[2*c];
      sdata[c][1] = d0[2*c+1];
      sdata[c][2] = d1[2*c];
      sdata[c][3] = d1[2*c+1];
    end
  end

endmodule
