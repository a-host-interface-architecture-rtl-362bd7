// tb_reassembler: initialises the list SRAM through the I/O registers (512
// empty lists, 24 free nodes), sends a mix of cells (a plain VC, two
// interleaved AAL4 datagrams, a bad-HEC and a bad-CRC cell) and then reads
// the data back into the memory model with read requests.  Checks the CAM
// entries, the list status words, the data and its order, the early stop
// on an empty list, list deletion, drops when no node is free, and the
// statistics registers.
module tb_reassembler;
  import atm_ref_pkg::*;
  localparam int NODES = 24;
  logic clk = 0, rst_n = 0;
  logic io_req = 0, io_we = 0, io_ack;
  logic [3:0] io_addr = 0;
  logic [31:0] io_wdata = 0, io_rdata;
  logic m_req, m_we, m_ready;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0, rx_soc = 0, irq;
  int checks = 0, failures = 0;

  mem_model #(.WORDS(8192)) u_mem (.clk, .m_req, .m_we, .m_addr, .m_wdata, .m_ready, .m_rdata);
  reassembler dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h want %h", what, got, want); end
  endtask

  // bodies sent per list, in order
  logic [7:0] sent [int][$];

  task automatic send(input logic [15:0] vci, input logic [9:0] mid, input logic [1:0] st,
                      input int corrupt, input int list);
    cell_t c;
    logic [7:0] p [48];
    foreach (p[i]) p[i] = 8'($urandom);
    c = build_cell(vci, 3'b0, 1'b0, st, 4'($urandom), mid, 6'd44, p);
    if (corrupt == 1) c[3] ^= 8'h20;
    if (corrupt == 2) c[30] ^= 8'h04;
    if (list >= 0) for (int i = 5; i < 53; i++) sent[list].push_back(c[i]);
    for (int i = 0; i < 53; i++) begin
      @(negedge clk); rx_valid = 1; rx_soc = (i == 0); rx_data = c[i];
    end
    @(negedge clk); rx_valid = 0; rx_soc = 0;
  endtask

  task automatic read_list(input int list, input int n, input int base, input int want_n);
    logic [31:0] r;
    io_write(0, 32'(base * 4));
    io_write(1, 32'(list));
    io_write(2, 32'(n));
    io_write(3, 1);
    while (!irq) @(negedge clk);
    io_read(4, r);
    expect_eq("cells transferred", r, 32'(want_n));
    for (int c = 0; c < want_n; c++)
      for (int w = 0; w < 12; w++) begin
        logic [31:0] exp;
        exp = {sent[list][0], sent[list][1], sent[list][2], sent[list][3]};
        repeat (4) void'(sent[list].pop_front());
        expect_eq($sformatf("list %h cell %0d word %0d", list, c, w), u_mem.mem[base + 12 * c + w], exp);
      end
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // empty lists, then a free list of NODES nodes
    io_write(7, 0);
    for (int l = 0; l < 512; l++) begin
      io_write(8, 32'hFFFF); io_write(8, 32'hFFFF); io_write(8, 0); io_write(8, 0);
    end
    io_write(7, 32'h800); io_write(8, 0);
    io_write(7, 32'h1000);
    for (int n = 0; n < NODES; n++) io_write(8, (n == NODES - 1) ? 32'hFFFF : 32'(n + 1));
    io_write(7, 32'h1005); io_read(8, r);
    expect_eq("SRAM read-back", r, 6);

    send(16'h0042, 0, 0, 0, 'h000);
    send(16'h8001, 5, 2'b10, 0, 'h100);
    send(16'h8001, 6, 2'b10, 0, 'h101);
    send(16'h8001, 5, 2'b00, 0, 'h100);
    send(16'h0042, 0, 0, 0, 'h000);
    send(16'h8001, 6, 2'b01, 0, 'h101);
    send(16'h0099, 0, 0, 1, -1);          // bad HEC
    send(16'h8001, 5, 2'b00, 0, 'h100);
    send(16'h8001, 5, 2'b00, 2, -1);      // bad CRC-10
    send(16'h8001, 5, 2'b01, 0, 'h100);
    send(16'h0042, 0, 0, 0, 'h000);
    repeat (200) @(negedge clk);

    io_write(5, 32'h100); io_read(6, r);
    expect_eq("CAM entry 0x100", r, {1'b1, 5'h0, 16'h8001, 10'd5});
    io_write(5, 32'h101); io_read(6, r);
    expect_eq("CAM entry 0x101", r, {1'b1, 5'h0, 16'h8001, 10'd6});
    io_write(5, 32'h000); io_read(6, r);
    expect_eq("CAM entry 0x000", r, {1'b1, 5'h0, 10'h0, 16'h0042});
    io_write(5, 32'h001); io_read(6, r);
    expect_eq("CAM entry 0x001 unused", r[31], 0);
    io_write(7, 32'h402); io_read(8, r);
    expect_eq("status list 0x100", r, {1'b1, 15'd4});
    io_write(7, 32'h002); io_read(8, r);
    expect_eq("status list 0x000", r, {1'b0, 15'd3});

    read_list('h100, 10, 0, 4);           // stops early: list holds 4 cells
    read_list('h000, 2, 1000, 2);
    read_list('h000, 5, 2000, 1);
    io_write(7, 32'h402); io_read(8, r);
    expect_eq("status list 0x100 after read", r, 0);

    // delete datagram 6 and its list; its nodes return to the free list
    io_write(5, 32'h101); io_write(6, 0);
    io_write(5, 32'h101); io_read(6, r);
    expect_eq("CAM entry 0x101 deleted", r[31], 0);
    io_write(7, 32'h406); io_read(8, r);
    expect_eq("status list 0x101 deleted", r, 0);

    // all NODES nodes are free again: NODES + 2 cells leave 2 without a node
    for (int k = 0; k < NODES + 2; k++) send(16'h0777, 0, 0, 0, (k < NODES) ? 'h001 : -1);
    repeat (200) @(negedge clk);
    io_read(11, r);
    expect_eq("no-buffer drops", r[31:16], 2);
    read_list('h001, NODES, 3000, NODES);

    io_read(9, r);
    expect_eq("cells in / HEC errors", r, {16'd1, 16'd37});
    io_read(10, r);
    expect_eq("overflow / CRC errors", r, {16'd0, 16'd1});
    io_read(12, r);
    expect_eq("bodies flushed / stored", r, {16'd4, 16'd33});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
