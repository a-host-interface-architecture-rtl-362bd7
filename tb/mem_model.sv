// mem_model: behavioural host memory behind a streaming bus master port, for
// the testbenches.  A burst pays SETUP clocks before its first word and then
// moves one word every WORD_CYCLES clocks (200 ns and 100 ns at a 50 ns
// clock, the Micro Channel streaming figures).  A pause of up to GAP clocks in
// the requests does not end the burst.  'stalls' counts clocks a request
// waited.
module mem_model #(
  parameter int WORDS       = 4096,
  parameter int SETUP       = 4,
  parameter int WORD_CYCLES = 2,
  parameter int GAP         = 3
) (
  input  logic        clk,
  input  logic        m_req,
  input  logic        m_we,
  input  logic [31:0] m_addr,
  input  logic [31:0] m_wdata,
  output logic        m_ready,
  output logic [31:0] m_rdata
);
  localparam int AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];
  int          cnt = SETUP;
  int          idle = 100;
  int          words = 0;

  assign m_ready = m_req && (cnt == 0);
  assign m_rdata = mem[m_addr[AW+1:2]];

  always_ff @(posedge clk) begin
    if (!m_req) begin
      idle <= idle + 1;
      if (idle >= GAP) cnt <= SETUP;
    end else begin
      idle <= 0;
      if (cnt == 0) begin
        cnt   <= WORD_CYCLES - 1;
        words <= words + 1;
        if (m_we) mem[m_addr[AW+1:2]] <= m_wdata;
      end else begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule
