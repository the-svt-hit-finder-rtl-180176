// SPY buffer memory: a synchronous single-port SRAM of 64K words.
//
// The board uses 64K x 18 synchronous SRAMs as the Input SPY buffer of each clustering engine
// (a copy of the last 64K input words, or a source of test input) and, two side by side, as
// the 36-bit Output SPY buffer of the output processor. A write stores wdata at addr on the
// clock edge; a read returns the word at addr on rdata one clock later. The depth and width
// follow the parts named for the board; burst and byte-write features of the part are not
// modelled.
module hf_spy_ram #(
  parameter int unsigned AW = 16,
  parameter int unsigned W  = 18
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
