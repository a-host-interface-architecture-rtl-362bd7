// tb_aal_crc10: random SAR-PDUs.  The transmitter use (46 bytes, then the six
// LI bits through crc_next) must give the long-division CRC; the receiver use
// (all 48 bytes with the CRC in place) must leave zero, and non-zero after a
// single flipped bit.
module tb_aal_crc10;
  import atm_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, six_only = 0;
  logic [7:0] din = 0;
  logic [9:0] crc, crc_next;
  int checks = 0, failures = 0;

  aal_crc10 dut (.clk, .rst_n, .clear, .en, .six_only, .din, .crc, .crc_next);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input logic [7:0] b[48], input int n);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    for (int i = 0; i < n; i++) begin
      en = 1; six_only = 0; din = b[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    logic [7:0] b [48];
    logic [9:0] want;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 100; k++) begin
      foreach (b[i]) b[i] = 8'($urandom);
      b[46][1:0] = 2'b00; b[47] = 8'h00;
      want = ref_crc10(b);
      // transmitter
      feed(b, 46);
      din = b[46]; six_only = 1;
      #1;
      checks++;
      if (crc_next !== want) begin failures++; $display("FAIL tx crc %h want %h", crc_next, want); end
      six_only = 0;
      // receiver
      b[46][1:0] = want[9:8]; b[47] = want[7:0];
      feed(b, 48);
      checks++;
      if (crc !== 10'd0) begin failures++; $display("FAIL rx remainder %h", crc); end
      b[$urandom_range(0, 47)] ^= 8'(1 << $urandom_range(0, 7));
      feed(b, 48);
      checks++;
      if (crc === 10'd0) begin failures++; $display("FAIL corrupted cell passed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
