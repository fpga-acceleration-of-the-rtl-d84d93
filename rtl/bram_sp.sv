// bram_sp: one block-RAM bank of the accelerator (the "Block Memory
// Generator" instance behind each AXI BRAM controller).
//
// Single-port synchronous RAM with byte write enables. A read returns the
// word one cycle after en is sampled with we == 0 (read-first on a write).
// Default size: 32768 x 64 bits = 256 kB, the bank size of the address map
// (12 banks of 256 kB). The word width is the 64-bit width of the
// accelerator's memory port; the single port is this design's choice.
module bram_sp #(
  parameter int unsigned DEPTH  = 32768,
  parameter int unsigned WIDTH  = 64,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned NBYTE = WIDTH / 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [NBYTE-1:0] we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      for (int i = 0; i < NBYTE; i++)
        if (we[i]) mem[addr][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

endmodule
