// spram: single-port synchronous RAM, one access per clock.  A read returns
// its word on 'rdata' in the next clock and 'rdata' then holds until the next
// read; a write does not change 'rdata'.  Models the 32K x 16 static RAM that
// holds the reassembly linked lists and the 32K x 32 RAM bank of the
// reassembly buffer (sizes from the document; the one-cycle read timing is a
// design choice).  Contents are not reset.
module spram #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 32768
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
