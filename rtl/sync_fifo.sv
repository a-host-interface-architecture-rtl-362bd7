// sync_fifo: single-clock first-in first-out buffer with show-ahead output.
// Used as the segmenter's data buffer (32-bit words from the bus), the cell
// manager's cell body FIFO (bytes) and the small token queues between the
// reassembler's pipeline stages.  'dout' is the oldest entry whenever
// 'empty' is low; 'pop' removes it.  Push and pop may happen in the same
// clock.  DEPTH must be a power of two.  Sizes are design choices.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [WIDTH-1:0]       din,
  input  logic                   pop,
  output logic [WIDTH-1:0]       dout,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[AW:0]);
  assign dout  = mem[rptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full)  wptr <= wptr + 1'b1;
      if (pop && !empty)  rptr <= rptr + 1'b1;
      case ({push && !full, pop && !empty})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
