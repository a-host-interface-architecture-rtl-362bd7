// cam: content addressable memory of ENTRIES words of KEY_W bits, each with a
// valid bit; the function of the AMD Am99C10 256 x 48 CAM the reassembler
// uses.  The search is combinational over all entries: 'match'/'match_idx'
// give the lowest valid entry equal to 'search_key'; 'free_valid'/'free_idx'
// give the lowest unused entry.  A write stores a key and marks the entry
// valid, a delete clears the valid bit; both take effect at the clock edge.
// 'rd_idx' reads an entry combinationally for the host.  Size from the
// document; the port set is a design choice.
module cam #(
  parameter int ENTRIES = 256,
  parameter int KEY_W   = 48
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [KEY_W-1:0]           search_key,
  output logic                       match,
  output logic [$clog2(ENTRIES)-1:0] match_idx,
  output logic                       free_valid,
  output logic [$clog2(ENTRIES)-1:0] free_idx,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [KEY_W-1:0]           wr_key,
  input  logic                       del_en,
  input  logic [$clog2(ENTRIES)-1:0] del_idx,
  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output logic [KEY_W-1:0]           rd_key,
  output logic                       rd_valid
);
  localparam int IW = $clog2(ENTRIES);

  logic [KEY_W-1:0] key   [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_comb begin
    match      = 1'b0;
    match_idx  = '0;
    free_valid = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && key[i] == search_key) begin
        match     = 1'b1;
        match_idx = IW'(i);
      end
      if (!valid[i]) begin
        free_valid = 1'b1;
        free_idx   = IW'(i);
      end
    end
  end

  assign rd_key   = key[rd_idx];
  assign rd_valid = valid[rd_idx];

  always_ff @(posedge clk) begin
    if (wr_en) key[wr_idx] <= wr_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else begin
      if (del_en) valid[del_idx] <= 1'b0;
      if (wr_en)  valid[wr_idx]  <= 1'b1;
    end
  end
endmodule
