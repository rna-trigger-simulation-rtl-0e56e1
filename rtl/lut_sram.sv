// lut_sram: fast static RAM used as a look-up table (the 256k x 16 VL-LUT and
// VR-LUT of the Pattern-Unit, the 64k x 4 MIND-LUT and HITS-LUT of the
// C-CARDs-Unit).
//
// One address port shared by reading and writing, as on the asynchronous
// SRAM chips of the card: the read data follows the address combinationally
// (the table sits in the fast path of the trigger), and a write stores wdata
// at addr on a clock edge while we is high. Contents are undefined after
// power-up; the board loads them over the VMEbus before use.
//
// Sizes follow the description. Using the clock for writes instead of a
// write-enable pulse edge is this design's choice.
module lut_sram #(
  parameter int unsigned AW = 18,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
