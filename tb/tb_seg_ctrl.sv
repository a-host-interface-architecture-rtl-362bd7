// tb_seg_ctrl: feeds blocks of random data through a data buffer into the
// segmentation controller and compares every transmitted byte with cells
// built by the reference model (AAL4 and plain VCs, several lengths, with and
// without framer back-pressure).  Checks that cells leave every 54 clocks (2.7 us) when the
// framer is always ready.
module tb_seg_ctrl;
  import atm_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done, tx_valid, tx_soc, tx_ready = 1;
  logic [31:0] length = 0;
  logic [15:0] vci = 0, cells_sent;
  logic [2:0]  pt = 0;
  logic        clp = 0;
  logic [9:0]  mid = 0;
  logic [7:0]  tx_data;
  logic        push = 0, pop, empty, full;
  logic [31:0] din = 0, dout;
  logic [6:0]  count;
  int checks = 0, failures = 0;
  bit  bp = 0;

  sync_fifo #(.WIDTH(32), .DEPTH(64)) u_buf (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);
  seg_ctrl dut (.clk, .rst_n, .start, .length, .vci, .pt, .clp, .mid, .busy, .done, .cells_sent,
                .buf_dout(dout), .buf_count(count), .buf_pop(pop),
                .tx_data, .tx_valid, .tx_soc, .tx_ready);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) tx_ready = bp ? ($urandom_range(0, 3) != 0) : 1'b1;

  logic [7:0] data [];
  logic [7:0] got [$];
  int         soc_at [$];
  int         cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_valid && tx_ready) begin
      got.push_back(tx_data);
      if (tx_soc) soc_at.push_back(cyc);
    end
  end

  task automatic run(input int len, input logic [15:0] v, input logic [9:0] m, input bit backp);
    int nw, pay, ncell, li;
    cell_t c;
    logic [7:0] p [48];
    logic [1:0] st;
    data = new[len + 4];
    foreach (data[i]) data[i] = 8'($urandom);
    nw = (len + 3) / 4;
    got.delete(); soc_at.delete();
    bp = backp;
    @(negedge clk);
    length = len; vci = v; mid = m; pt = 3'($urandom); clp = 1'($urandom);
    start = 1;
    @(negedge clk) start = 0;
    for (int w = 0; w < nw; w++) begin
      while (full) @(negedge clk);
      push = 1; din = {data[4*w], data[4*w+1], data[4*w+2], data[4*w+3]};
      @(negedge clk);
      push = 0;
    end
    while (busy) @(negedge clk);
    pay   = v[15] ? 44 : 48;
    ncell = (len + pay - 1) / pay;
    checks++;
    if (got.size() != 53 * ncell) begin
      failures++; $display("FAIL len %0d: %0d bytes, want %0d", len, got.size(), 53 * ncell);
      return;
    end
    for (int k = 0; k < ncell; k++) begin
      li = (len - k * pay < pay) ? len - k * pay : pay;
      for (int i = 0; i < 48; i++) p[i] = (i < li) ? data[k * pay + i] : 8'h00;
      st = (ncell == 1) ? 2'b11 : (k == 0) ? 2'b10 : (k == ncell - 1) ? 2'b01 : 2'b00;
      c = build_cell(v, pt, clp, st, 4'(k), m, 6'(li), p);
      for (int i = 0; i < 53; i++) begin
        checks++;
        if (got[53 * k + i] !== c[i]) begin
          failures++;
          $display("FAIL len %0d cell %0d byte %0d: %h want %h", len, k, i, got[53 * k + i], c[i]);
        end
      end
    end
    if (!backp && ncell > 1) begin
      checks++;
      if (soc_at[1] - soc_at[0] != 54) begin
        failures++; $display("FAIL cell spacing %0d clocks", soc_at[1] - soc_at[0]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(44, 16'h8123, 10'h155, 0);
    run(1, 16'h8001, 10'h3FF, 0);
    run(200, 16'h8ABC, 10'h021, 0);
    run(45, 16'h9000, 10'h100, 1);
    run(48, 16'h0042, 10'h0, 0);
    run(50, 16'h1234, 10'h0, 1);
    run(301, 16'h7FFF, 10'h0, 0);
    run(133, 16'hC0DE, 10'h2A5, 1);
    checks++;
    if (cells_sent != 16'd23) begin failures++; $display("FAIL cells_sent %0d", cells_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
