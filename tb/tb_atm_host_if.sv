// tb_atm_host_if: the whole host interface at its default sizes, segmenter
// looped back into reassembler through the framer ports as in a loop-back
// test of the two cards.  The host side is played by I/O register tasks and
// two memory models.  The test initialises all 512 lists and the 2048-node
// free list, segments blocks on a plain VC and on AAL4 datagrams, corrupts
// one header and one AAL4 body on the link, reads the lists back and checks
// every word against cells built by the reference model.  It also deletes a
// datagram, fills the datagram CAM until a cell is dropped, and fills the
// reassembly buffer until cells are dropped for want of a node.  Each
// mechanism is counted and must occur at least once.
module tb_atm_host_if;
  import atm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic seg_io_req = 0, seg_io_we = 0, seg_io_ack, seg_irq;
  logic [3:0] seg_io_addr = 0;
  logic [31:0] seg_io_wdata = 0, seg_io_rdata;
  logic seg_m_req, seg_m_we, seg_m_ready;
  logic [31:0] seg_m_addr, seg_m_wdata, seg_m_rdata;
  logic [7:0] tx_data, rx_data;
  logic tx_valid, tx_soc, tx_ready, rx_valid, rx_soc;
  logic rsm_io_req = 0, rsm_io_we = 0, rsm_io_ack, rsm_irq;
  logic [3:0] rsm_io_addr = 0;
  logic [31:0] rsm_io_wdata = 0, rsm_io_rdata;
  logic rsm_m_req, rsm_m_we, rsm_m_ready;
  logic [31:0] rsm_m_addr, rsm_m_wdata, rsm_m_rdata;
  int checks = 0, failures = 0;

  mem_model #(.WORDS(32768)) u_src (.clk, .m_req(seg_m_req), .m_we(seg_m_we), .m_addr(seg_m_addr),
      .m_wdata(seg_m_wdata), .m_ready(seg_m_ready), .m_rdata(seg_m_rdata));
  mem_model #(.WORDS(16384)) u_dst (.clk, .m_req(rsm_m_req), .m_we(rsm_m_we), .m_addr(rsm_m_addr),
      .m_wdata(rsm_m_wdata), .m_ready(rsm_m_ready), .m_rdata(rsm_m_rdata));
  atm_host_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- link: loop-back with fault injection and back-pressure
  bit  backpressure = 0;
  int  tx_cells = 0, tx_byte = 0, bad_cell = -1, bad_byte = 0;
  always @(posedge clk) tx_ready <= backpressure ? ($urandom_range(0, 7) != 0) : 1'b1;
  assign rx_valid = tx_valid && tx_ready;
  assign rx_soc   = tx_soc;
  assign rx_data  = tx_data ^ ((tx_cells == bad_cell && tx_byte == bad_byte) ? 8'h08 : 8'h00);

  // ---------------- mechanism counters
  int n_bom = 0, n_com = 0, n_eom = 0, n_ssm = 0, n_plain = 0, n_stall_tx = 0, n_dma_stall = 0;
  int n_overlap = 0, n_early_stop = 0, n_delete = 0, n_complete = 0;
  int src_words_left = 0, n_hec = 0, n_crc = 0, n_cam_full = 0, n_no_buf = 0;
  logic [15:0] cur_vci;
  // The monitor samples at the falling edge, where the link signals are
  // settled for the rising edge that moves the byte.  tx_byte is the index
  // within the cell of the byte now on the link.
  bit pending = 0;
  always @(negedge clk) begin
    if (pending) begin
      if (tx_byte == 52) begin tx_byte = 0; tx_cells = tx_cells + 1; end
      else tx_byte = tx_byte + 1;
    end
    pending = tx_valid && tx_ready;
    if (tx_valid && !tx_ready) n_stall_tx++;
    if (pending && tx_byte == 5) begin
      if (!cur_vci[15]) n_plain++;
      else case (tx_data[7:6])
        2'b10: n_bom++;
        2'b00: n_com++;
        2'b01: n_eom++;
        default: n_ssm++;
      endcase
    end
  end
  always @(posedge clk) begin
    if (seg_m_req && seg_m_ready) src_words_left--;
    if (!seg_m_req && src_words_left > 0 && !seg_irq) n_dma_stall++;
    if (rsm_m_req && rsm_m_ready && rx_valid) n_overlap++;
  end

  // ---------------- host register access
  task automatic seg_wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); seg_io_req = 1; seg_io_we = 1; seg_io_addr = a; seg_io_wdata = d;
    do @(negedge clk); while (!seg_io_ack);
    seg_io_req = 0;
  endtask
  task automatic rsm_wr(input logic [3:0] a, input logic [31:0] d);
    @(negedge clk); rsm_io_req = 1; rsm_io_we = 1; rsm_io_addr = a; rsm_io_wdata = d;
    do @(negedge clk); while (!rsm_io_ack);
    rsm_io_req = 0;
  endtask
  task automatic rsm_rd(input logic [3:0] a, output logic [31:0] d);
    @(negedge clk); rsm_io_req = 1; rsm_io_we = 0; rsm_io_addr = a;
    do @(negedge clk); while (!rsm_io_ack);
    d = rsm_io_rdata; rsm_io_req = 0;
  endtask
  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin failures++; $display("FAIL %s: %h want %h", what, got, want); end
  endtask

  // expected cell bodies per list
  logic [7:0] exp_body [int][$];

  // Segment one block.  bad: -1 none, else the cell (within the block) whose
  // byte bad_at is corrupted on the link.  list: where its cells should land.
  task automatic send_block(input logic [15:0] vci, input logic [9:0] mid, input int len,
                            input int bad, input int bad_at, input int list, input bit wait_done);
    logic [7:0] data [];
    logic [7:0] p [48];
    int pay, ncell, li;
    cell_t c;
    data = new[len + 4];
    foreach (data[i]) data[i] = 8'($urandom);
    for (int w = 0; w < (len + 3) / 4; w++)
      u_src.mem[w] = {data[4*w], data[4*w+1], data[4*w+2], data[4*w+3]};
    pay   = vci[15] ? 44 : 48;
    ncell = (len + pay - 1) / pay;
    for (int k = 0; k < ncell; k++) begin
      li = (len - k * pay < pay) ? len - k * pay : pay;
      for (int i = 0; i < 48; i++) p[i] = (i < li) ? data[k * pay + i] : 8'h00;
      c = build_cell(vci, 3'b0, 1'b0, (ncell == 1) ? 2'b11 : (k == 0) ? 2'b10 : (k == ncell - 1) ? 2'b01 : 2'b00,
                     4'(k), mid, 6'(li), p);
      if (k != bad && list >= 0) for (int i = 5; i < 53; i++) exp_body[list].push_back(c[i]);
    end
    bad_cell = (bad >= 0) ? tx_cells + bad : -1;
    bad_byte = bad_at;
    cur_vci = vci;
    seg_wr(0, 0);
    seg_wr(1, len);
    seg_wr(2, {16'h0, vci});
    seg_wr(3, {22'h0, mid});
    src_words_left = (len + 3) / 4;
    seg_wr(4, 1);
    if (wait_done) begin
      while (!seg_irq) @(negedge clk);
      repeat (120) @(negedge clk);    // let the last cell through the pipeline
    end
  endtask

  task automatic start_read(input int list, input int n, input int base);
    rsm_wr(0, 32'(base * 4)); rsm_wr(1, 32'(list)); rsm_wr(2, 32'(n)); rsm_wr(3, 1);
  endtask
  task automatic finish_read(input int list, input int base, input int want_n, input int n);
    logic [31:0] r;
    while (!rsm_irq) @(negedge clk);
    rsm_rd(4, r);
    expect_eq($sformatf("cells read from list %h", list), r, 32'(want_n));
    if (want_n < n) n_early_stop++;
    for (int c = 0; c < want_n; c++)
      for (int w = 0; w < 12; w++) begin
        logic [31:0] e;
        e = {exp_body[list][0], exp_body[list][1], exp_body[list][2], exp_body[list][3]};
        repeat (4) void'(exp_body[list].pop_front());
        checks++;
        if (u_dst.mem[base + 12 * c + w] !== e) begin
          failures++;
          $display("FAIL list %h cell %0d word %0d: %h want %h", list, c, w, u_dst.mem[base + 12 * c + w], e);
        end
      end
  endtask

  task automatic must_happen(input string what, input int n);
    $display("  %-38s %0d", what, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 512 empty lists and a free list of all 2048 buffer slots
    rsm_wr(7, 0);
    for (int l = 0; l < 512; l++) begin
      rsm_wr(8, 32'hFFFF); rsm_wr(8, 32'hFFFF); rsm_wr(8, 0); rsm_wr(8, 0);
    end
    rsm_wr(7, 32'h800); rsm_wr(8, 0);
    rsm_wr(7, 32'h1000);
    for (int n = 0; n < 2048; n++) rsm_wr(8, (n == 2047) ? 32'hFFFF : 32'(n + 1));

    // datagram MID 7 (12 cells) with link back-pressure, then a plain VC
    // block with one header corrupted, a datagram with one body corrupted,
    // a single-cell datagram
    backpressure = 1;
    send_block(16'h8100, 10'd7, 500, -1, 0, 'h100, 1);
    backpressure = 0;
    send_block(16'h0033, 10'd0, 1000, 3, 2, 'h000, 1);
    send_block(16'h8100, 10'd8, 100, 1, 30, 'h101, 1);
    send_block(16'h8100, 10'd9, 20, -1, 0, 'h102, 1);
    rsm_wr(7, 32'h402); rsm_rd(8, r);
    expect_eq("status of datagram MID 7", r, {1'b1, 15'd12});
    if (r[15]) n_complete++;
    rsm_wr(5, 32'h100); rsm_rd(6, r);
    expect_eq("CAM entry of MID 7", r, {1'b1, 5'h0, 16'h8100, 10'd7});

    // read datagram 7 while more cells for the VC arrive
    start_read('h100, 20, 0);
    send_block(16'h0033, 10'd0, 300, -1, 0, 'h000, 1);
    finish_read('h100, 0, 12, 20);
    start_read('h000, 27, 1000);
    finish_read('h000, 1000, 27, 27);

    // delete datagram 8
    rsm_wr(5, 32'h101); rsm_wr(6, 0);
    n_delete++;
    rsm_rd(6, r);
    expect_eq("deleted CAM entry", r[31], 0);
    rsm_wr(7, 32'h406); rsm_rd(8, r);
    expect_eq("deleted list status", r, 0);
    exp_body['h101].delete();

    // 255 more datagrams: 254 fit in the CAM, the last is dropped
    for (int m = 0; m < 255; m++) send_block(16'h8100, 10'(100 + m), 10, -1, 0, -1, 1);
    rsm_rd(11, r);
    expect_eq("CAM-full drops", r[15:0], 1);
    n_cam_full = r[15:0];

    // 255 nodes are in use; a 1800-cell block finds 1793 free nodes
    send_block(16'h0044, 10'd0, 1800 * 48, -1, 0, 'h001, 1);
    rsm_rd(11, r);
    expect_eq("no-buffer drops", r[31:16], 7);
    n_no_buf = r[31:16];
    start_read('h001, 50, 4000);
    finish_read('h001, 4000, 50, 50);

    rsm_rd(9, r);
    expect_eq("HEC errors", r[31:16], 1);
    n_hec = r[31:16];
    expect_eq("cells received", r[15:0], 16'(12 + 21 + 3 + 1 + 7 + 255 + 1800));
    rsm_rd(10, r);
    expect_eq("CRC-10 errors / overflow", r, {16'd0, 16'd1});
    n_crc = r[15:0];

    $display("mechanisms:");
    must_happen("AAL4 BOM cells", n_bom);
    must_happen("AAL4 COM cells", n_com);
    must_happen("AAL4 EOM cells", n_eom);
    must_happen("AAL4 SSM cells", n_ssm);
    must_happen("plain VC cells", n_plain);
    must_happen("framer back-pressure clocks", n_stall_tx);
    must_happen("data buffer full, bus paused (clocks)", n_dma_stall);
    must_happen("read to host while cells arrive", n_overlap);
    must_happen("read stopped at an empty list", n_early_stop);
    must_happen("datagram complete flag", n_complete);
    must_happen("list deleted by host", n_delete);
    must_happen("cell with HEC error dropped", n_hec);
    must_happen("cell with CRC-10 error dropped", n_crc);
    must_happen("cell dropped, datagram CAM full", n_cam_full);
    must_happen("cell dropped, no free buffer node", n_no_buf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
