// tb_segmenter: programs the segmenter through its I/O registers, lets it
// fetch blocks from the memory model and compares the transmitted cells with
// the reference model.  Reads back registers, the busy/done status and the
// cell counter.
module tb_segmenter;
  import atm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic io_req = 0, io_we = 0, io_ack;
  logic [3:0] io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata;
  logic m_req, m_we, m_ready;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic [7:0] tx_data;
  logic tx_valid, tx_soc, tx_ready = 1, irq;
  int checks = 0, failures = 0;

  mem_model #(.WORDS(4096)) u_mem (.clk, .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rdata);
  segmenter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] got [$];
  always @(posedge clk) if (tx_valid && tx_ready) got.push_back(tx_data);

  task automatic io_write(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk);
    io_req = 1; io_we = 1; io_addr = a; io_wdata = d;
    do @(negedge clk); while (!io_ack);
    io_req = 0;
  endtask
  task automatic io_read(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk);
    io_req = 1; io_we = 0; io_addr = a;
    do @(negedge clk); while (!io_ack);
    d = io_rdata;
    io_req = 0;
  endtask

  task automatic run(input int base, input int len, input logic [15:0] v, input logic [9:0] m);
    logic [7:0] data [];
    logic [7:0] p [48];
    logic [31:0] r;
    logic [2:0] pt;
    int pay, ncell, li;
    cell_t c;
    data = new[len + 4];
    foreach (data[i]) data[i] = 8'($urandom);
    for (int w = 0; w < (len + 3) / 4; w++)
      u_mem.mem[base / 4 + w] = {data[4*w], data[4*w+1], data[4*w+2], data[4*w+3]};
    pt = 3'($urandom);
    got.delete();
    io_write(0, base);
    io_write(1, len);
    io_write(2, {12'h0, 1'b0, pt, v});
    io_write(3, {22'h0, m});
    io_read(2, r);
    checks++;
    if (r !== {12'h0, 1'b0, pt, v}) begin failures++; $display("FAIL header reg %h", r); end
    io_write(4, 1);
    io_read(4, r);
    checks++;
    if (r[0] !== 1'b1) begin failures++; $display("FAIL not busy after GO"); end
    while (!irq) @(negedge clk);
    io_read(4, r);
    checks++;
    if (r[1:0] !== 2'b10) begin failures++; $display("FAIL status %b after done", r[1:0]); end
    pay   = v[15] ? 44 : 48;
    ncell = (len + pay - 1) / pay;
    checks++;
    if (got.size() != 53 * ncell) begin
      failures++; $display("FAIL %0d bytes, want %0d", got.size(), 53 * ncell); return;
    end
    for (int k = 0; k < ncell; k++) begin
      li = (len - k * pay < pay) ? len - k * pay : pay;
      for (int i = 0; i < 48; i++) p[i] = (i < li) ? data[k * pay + i] : 8'h00;
      c = build_cell(v, pt, 1'b0, (ncell == 1) ? 2'b11 : (k == 0) ? 2'b10 : (k == ncell - 1) ? 2'b01 : 2'b00,
                     4'(k), m, 6'(li), p);
      for (int i = 0; i < 53; i++) begin
        checks++;
        if (got[53 * k + i] !== c[i]) begin
          failures++; $display("FAIL cell %0d byte %0d: %h want %h", k, i, got[53 * k + i], c[i]);
        end
      end
    end
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(32'h100, 1000, 16'h8055, 10'h123);
    run(32'h2000, 96, 16'h0077, 10'h0);
    run(32'h3000, 7, 16'hFFFF, 10'h3FF);
    io_read(5, r);
    checks++;
    if (r !== 32'd26) begin failures++; $display("FAIL cells sent %0d", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
