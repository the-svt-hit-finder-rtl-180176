// Cluster RAM (CRAM): the 128K x 8 asynchronous SRAM beside each HitMan.
//
// Fire uses it as a lookup table: the address holds the top five bits of three neighbouring
// pulse heights, the data bits 5:0 return the signed centroid offset in sixteenths of a strip.
// The table is loaded through the HitMan's VME port before data taking. Reads are
// combinational (asynchronous part); writes are taken on the HitMan clock edge while we is
// high, which is how the HitMan drives the write strobe. Size follows the part used.
module hf_cram #(
  parameter int unsigned AW = 17,
  parameter int unsigned W  = 8
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
  end
  assign rdata = mem[addr];

endmodule
