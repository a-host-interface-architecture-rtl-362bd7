// tb_cam: fills a small CAM, searches for present and absent keys, checks the
// free-entry output, deletion and host reads against a model.
module tb_cam;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [47:0] search_key = 0, wr_key = 0, rd_key;
  logic match, free_valid, wr_en = 0, del_en = 0, rd_valid;
  logic [3:0] match_idx, free_idx, wr_idx = 0, del_idx = 0, rd_idx = 0;
  logic [47:0] mkey [N];
  logic        mval [N];
  int checks = 0, failures = 0;

  cam #(.ENTRIES(N), .KEY_W(48)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_search(input logic [47:0] k);
    int exp_i;
    exp_i = -1;
    for (int i = 0; i < N; i++) if (mval[i] && mkey[i] == k && exp_i < 0) exp_i = i;
    search_key = k;
    #1;
    checks++;
    if (match !== (exp_i >= 0) || (exp_i >= 0 && match_idx !== 4'(exp_i))) begin
      failures++; $display("FAIL search %h: match %b idx %0d want %0d", k, match, match_idx, exp_i);
    end
  endtask

  task automatic check_free;
    int exp_i;
    exp_i = -1;
    for (int i = N - 1; i >= 0; i--) if (!mval[i]) exp_i = i;
    #1;
    checks++;
    if (free_valid !== (exp_i >= 0) || (exp_i >= 0 && free_idx !== 4'(exp_i))) begin
      failures++; $display("FAIL free %b %0d want %0d", free_valid, free_idx, exp_i);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin mval[i] = 0; mkey[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      int op;
      op = $urandom_range(0, 9);
      @(negedge clk);
      check_free();
      if (op < 5 && free_valid) begin
        wr_en = 1; wr_idx = free_idx; wr_key = 48'($urandom_range(0, 40));
        mkey[free_idx] = wr_key; mval[free_idx] = 1;
        @(negedge clk); wr_en = 0;
      end else if (op < 7) begin
        del_en = 1; del_idx = 4'($urandom); mval[del_idx] = 0;
        @(negedge clk); del_en = 0;
      end else begin
        rd_idx = 4'($urandom);
        #1;
        checks++;
        if (rd_valid !== mval[rd_idx] || (mval[rd_idx] && rd_key !== mkey[rd_idx])) begin
          failures++; $display("FAIL read %0d", rd_idx);
        end
      end
      check_search(48'($urandom_range(0, 40)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
